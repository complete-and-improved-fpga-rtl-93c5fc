// Self-checking testbench of comb_sl (line of S = 4 elements).
//
// Rows of 8 bits are split into a pivot block A (low 4 bits) and a second
// block B.  Block A is streamed in pivot mode, then back-substituted; block
// B is streamed in replay mode with the operations recorded from A, then
// back-substituted in replay mode.  A reference model eliminates the whole
// 8-bit rows at once with the same pivot rule; the reduced words of both
// passes, the recorded operations, the pivot rows after back-substitution
// (identity in A, the matching rows in B) and the fail flag are compared.
module tb_comb_sl;
  localparam int S = 4, PW = 2, NR = 10, TRIALS = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clr, row_valid, pivot_en, ext_en, cap_en, op_piv_in, op_piv_out, fail;
  logic [S-1:0] data_in, op_xm_in, data_out, op_xm_out, trig, rd_row;
  logic [PW-1:0] op_pidx_in, op_pidx_out, bs_j, rd_idx;
  logic bs_en, bs_replay;

  comb_sl #(.S(S)) dut (.*);

  int checks = 0, failures = 0, n_fail = 0, n_full = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("%s", what);
    end
  endtask

  initial begin
    logic [2*S-1:0] rows [NR];
    logic [2*S-1:0] piv [S];
    logic [2*S-1:0] w;
    logic [S-1:0] xm [NR];
    logic pv [NR];
    logic [PW-1:0] pix [NR];
    logic [2*S-1:0] outw [NR];
    bit found [S];
    bit allf;
    clr = 0; row_valid = 0; pivot_en = 0; ext_en = 0; cap_en = 1;
    data_in = 0; op_xm_in = 0; op_piv_in = 0; op_pidx_in = 0;
    bs_en = 0; bs_replay = 0; bs_j = 0; rd_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int tr = 0; tr < TRIALS; tr++) begin
      for (int i = 0; i < NR; i++) rows[i] = 8'($urandom);
      if (tr % 3 == 0) for (int i = 0; i < NR; i++) rows[i][S-1] = 0;  // rank deficient
      // reference elimination of whole rows
      for (int j = 0; j < S; j++) found[j] = 0;
      for (int i = 0; i < NR; i++) begin
        w = rows[i]; xm[i] = 0; pv[i] = 0; pix[i] = 0;
        for (int j = 0; j < S; j++) begin
          if (!pv[i] && w[j]) begin
            if (found[j]) begin w ^= piv[j]; xm[i][j] = 1; end
            else begin piv[j] = w; found[j] = 1; pv[i] = 1; pix[i] = PW'(j); end
          end
        end
        outw[i] = w;
      end
      allf = 1;
      for (int j = 0; j < S; j++) allf &= found[j];
      // pivot pass on block A
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      pivot_en = 1; ext_en = 0;
      for (int i = 0; i < NR; i++) begin
        row_valid = 1; data_in = rows[i][S-1:0];
        #1;
        check(op_xm_out === xm[i] && op_piv_out === pv[i] && (!pv[i] || op_pidx_out === pix[i]),
              $sformatf("trial %0d row %0d: operation differs", tr, i));
        if (!pv[i]) check(data_out === outw[i][S-1:0], $sformatf("trial %0d row %0d: A word", tr, i));
        @(negedge clk);
      end
      row_valid = 0;
      #1;
      check(fail === !allf, $sformatf("trial %0d: fail=%0b", tr, fail));
      if (!allf) begin n_fail++; continue; end
      n_full++;
      // reference back-substitution
      for (int j = S-1; j > 0; j--)
        for (int i = 0; i < j; i++) if (piv[i][j]) piv[i] ^= piv[j];
      for (int j = S-1; j > 0; j--) begin
        bs_en = 1; bs_replay = 0; bs_j = PW'(j); @(negedge clk);
      end
      bs_en = 0;
      for (int j = 0; j < S; j++) begin
        rd_idx = PW'(j); #1;
        check(rd_row === piv[j][S-1:0], $sformatf("trial %0d: A pivot %0d", tr, j));
      end
      // replay on block B
      clr = 1; @(negedge clk); clr = 0;
      pivot_en = 0; ext_en = 1;
      for (int i = 0; i < NR; i++) begin
        row_valid = 1; data_in = rows[i][2*S-1:S];
        op_xm_in = xm[i]; op_piv_in = pv[i]; op_pidx_in = pix[i];
        #1;
        if (!pv[i]) check(data_out === outw[i][2*S-1:S], $sformatf("trial %0d row %0d: B word", tr, i));
        @(negedge clk);
      end
      row_valid = 0; ext_en = 0;
      for (int j = S-1; j > 0; j--) begin
        bs_en = 1; bs_replay = 1; bs_j = PW'(j); @(negedge clk);
      end
      bs_en = 0; bs_replay = 0;
      for (int j = 0; j < S; j++) begin
        rd_idx = PW'(j); #1;
        check(rd_row === piv[j][2*S-1:S], $sformatf("trial %0d: B pivot %0d", tr, j));
      end
    end
    check(n_fail > 0 && n_full > 0, "both outcomes must occur");
    $display("rank deficient %0d, full rank %0d", n_fail, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
