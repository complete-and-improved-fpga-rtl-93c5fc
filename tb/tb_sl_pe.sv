// Self-checking testbench of sl_pe (processor element J = 3 of an 8-bit line).
//
// Random row words, operations and control inputs are applied for many
// clocks; a reference model of the element (its pivot register and found
// flag, and the pivot/replay rules) predicts data_out, op outputs, trig and
// the fail chain every clock.  Each rule (pass, reduce, capture, capture
// blocked, replayed XOR, replayed capture, back-substitution) is counted and
// must occur.
module tb_sl_pe;
  localparam int S = 8, J = 3, PW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clr, row_valid, pivot_en, ext_en, cap_en;
  logic [S-1:0] data_in, op_xm_in, data_out, op_xm_out, bs_row, r_out;
  logic op_piv_in, op_piv_out, trig, fail_in, check_en_in, fail_out, check_en_out;
  logic bs_en, bs_hit;
  logic [PW-1:0] op_pidx_in, op_pidx_out;

  sl_pe #(.S(S), .J(J)) dut (.*);

  logic [S-1:0] mr;
  logic mf;
  int checks = 0, failures = 0;
  int n_red = 0, n_cap = 0, n_blk = 0, n_rx = 0, n_rc = 0, n_bs = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [S-1:0] ed, exm;
    logic ep, et, ecap, exor;
    logic [PW-1:0] epi;
    clr = 0; row_valid = 0; pivot_en = 0; ext_en = 0; cap_en = 0;
    data_in = 0; op_xm_in = 0; op_piv_in = 0; op_pidx_in = 0;
    fail_in = 0; check_en_in = 0; bs_en = 0; bs_hit = 0; bs_row = 0;
    mr = 0; mf = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      clr = ($urandom_range(0, 40) == 0);
      row_valid = $urandom_range(0, 3) != 0;
      pivot_en = $urandom_range(0, 1);
      ext_en = !pivot_en;
      cap_en = $urandom_range(0, 4) != 0;
      data_in = S'($urandom);
      op_xm_in = S'($urandom);
      op_piv_in = $urandom_range(0, 5) == 0;
      op_pidx_in = (op_piv_in && $urandom_range(0, 1)) ? PW'(J) : PW'($urandom);
      fail_in = $urandom_range(0, 1);
      check_en_in = $urandom_range(0, 1);
      bs_en = $urandom_range(0, 5) == 0;
      bs_hit = $urandom_range(0, 1);
      bs_row = S'($urandom);
      #1;
      // reference
      exor = 0; ecap = 0;
      if (pivot_en) begin
        if (!op_piv_in && data_in[J]) begin
          if (mf) exor = 1; else if (cap_en) ecap = 1;
        end
        exm = op_xm_in; exm[J] = exm[J] | exor;
        ep = op_piv_in | ecap; epi = ecap ? PW'(J) : op_pidx_in;
      end else begin
        exor = op_xm_in[J];
        ecap = op_piv_in && op_pidx_in == PW'(J);
        exm = op_xm_in; ep = op_piv_in; epi = op_pidx_in;
      end
      ed = exor ? data_in ^ mr : data_in;
      et = row_valid && pivot_en && ecap;
      checks++;
      if (data_out !== ed || op_xm_out !== exm || op_piv_out !== ep ||
          op_pidx_out !== epi || trig !== et || r_out !== mr ||
          fail_out !== (fail_in || (check_en_in && !mf)) || check_en_out !== check_en_in) begin
        failures++;
        if (failures < 10) $display("step %0d: mismatch", n);
      end
      if (row_valid && pivot_en && exor) n_red++;
      if (row_valid && pivot_en && ecap) n_cap++;
      if (pivot_en && !op_piv_in && data_in[J] && !mf && !cap_en) n_blk++;
      if (row_valid && ext_en && exor) n_rx++;
      if (row_valid && ext_en && ecap) n_rc++;
      // state update
      if (clr) begin mr = 0; mf = 0; end
      else if (row_valid && ecap) begin mr = data_in; mf = 1; end
      else if (bs_en && bs_hit) begin mr ^= bs_row; n_bs++; end
    end
    checks++;
    if (!n_red || !n_cap || !n_blk || !n_rx || !n_rc || !n_bs) begin
      failures++;
      $display("rule not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
