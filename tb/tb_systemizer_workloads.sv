// Workload testbench of hea_systemizer: the other column-block sizes at
// full matrix size.
//
// Configurations: the 768 x 3488 matrix of mceliece348864 with column-block
// sizes s = 64 and 128.  The default s = 32 is run by the top-level
// testbench.  s = 16 is left out only for run time (7.5 million clocks);
// adding 16 to the CFG_ lists below (published check 611.8 k, finish
// 7173 k) runs it as well.
// For each configuration, one after another:
//   1. A matrix with a repeated row must fail its check run (early abort).
//   2. A matrix with an invertible left part (a product of random unit upper
//      and unit lower triangular matrices, with a random right part) must
//      pass its check run.
//   3. The matrix is written again and fully systemized.
// A reference Gauss-Jordan elimination here gives T. Every word of 64
// sampled rows of T is read back and compared. The check and full cycle
// counts are printed next to the published figures for the same method.
module tb_systemizer_workloads;
  localparam int NCFG = 2;
  localparam int CFG_ROWS [NCFG] = '{768, 768};
  localparam int CFG_COLS [NCFG] = '{3488, 3488};
  localparam int CFG_S    [NCFG] = '{64, 128};
  // published check / finish cycle counts in kcycles
  localparam real CFG_PCHK [NCFG] = '{44.63, 14.51};
  localparam real CFG_PFIN [NCFG] = '{459.4, 120.6};
  localparam int SAMPLE_ROWS = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int turn = -1;

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    localparam int ROWS = CFG_ROWS[g], COLS = CFG_COLS[g], S = CFG_S[g];
    localparam int NB = (COLS + S - 1) / S, NL = ROWS / S, KB = NB - NL;
    localparam int RW = $clog2(ROWS), BW = $clog2(NB), KBW = $clog2(KB);

    logic           mat_we;
    logic [BW-1:0]  mat_blk;
    logic [RW-1:0]  mat_row;
    logic [S-1:0]   mat_data;
    logic           start, full, busy, done, success, fail;
    logic           pk_rd;
    logic [RW-1:0]  pk_row;
    logic [KBW-1:0] pk_word;
    logic [S-1:0]   pk_data;
    logic           pk_valid;

    hea_systemizer #(.ROWS(ROWS), .COLS(COLS), .S(S)) dut (.*);

    logic [COLS-1:0] H [ROWS];
    logic [COLS-1:0] R [ROWS];

    function automatic bit ref_systemize();
      logic [COLS-1:0] t;
      for (int r = 0; r < ROWS; r++) R[r] = H[r];
      for (int c = 0; c < ROWS; c++) begin
        int pr = -1;
        for (int r = c; r < ROWS; r++) if (pr < 0 && R[r][c]) pr = r;
        if (pr < 0) return 1'b0;
        t = R[pr]; R[pr] = R[c]; R[c] = t;
        for (int r = 0; r < ROWS; r++)
          if (r != c && R[r][c]) R[r] ^= R[c];
      end
      return 1'b1;
    endfunction

    task automatic random_matrix(input bit invertible);
      logic [ROWS-1:0] U [ROWS];
      logic [ROWS-1:0] L [ROWS];
      logic [ROWS-1:0] acc;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c += 32) H[r][c +: 32] = $urandom;
      if (invertible) begin
        for (int r = 0; r < ROWS; r++) begin
          for (int c = 0; c < ROWS; c += 32) begin
            U[r][c +: 32] = $urandom; L[r][c +: 32] = $urandom;
          end
          for (int c = 0; c < ROWS; c++) begin
            if (c < r) U[r][c] = 1'b0;
            if (c > r) L[r][c] = 1'b0;
          end
          U[r][r] = 1'b1; L[r][r] = 1'b1;
        end
        for (int r = 0; r < ROWS; r++) begin
          acc = '0;
          for (int i = 0; i < ROWS; i++) if (U[r][i]) acc ^= L[i];
          H[r][ROWS-1:0] = acc;
        end
      end else begin
        H[ROWS-1] = H[$urandom_range(0, ROWS - 2)];
      end
    endtask

    task automatic load_matrix();
      for (int b = 0; b < NB; b++)
        for (int r = 0; r < ROWS; r++) begin
          @(negedge clk);
          mat_we = 1; mat_blk = BW'(b); mat_row = RW'(r);
          for (int i = 0; i < S; i++)
            mat_data[i] = (b*S + i < COLS) ? H[r][b*S + i] : 1'b0;
        end
      @(negedge clk); mat_we = 0;
    endtask

    task automatic run(input bit f, output int cycles);
      @(negedge clk); start = 1; full = f;
      @(negedge clk); start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
    endtask

    initial begin
      int cyc_abort, cyc_chk, cyc_full, r;
      logic [S-1:0] exp_w, got_w;
      mat_we = 0; mat_blk = 0; mat_row = 0; mat_data = 0;
      start = 0; full = 0; pk_rd = 0; pk_row = 0; pk_word = 0;
      wait (turn == g);
      // 1. singular left part: early abort
      random_matrix(1'b0);
      check(!ref_systemize(), $sformatf("s=%0d: reference singular matrix", S));
      load_matrix();
      run(1'b0, cyc_abort);
      check(fail && !success, $sformatf("s=%0d: singular matrix not rejected", S));
      // 2. invertible left part: check run passes
      random_matrix(1'b1);
      check(ref_systemize(), $sformatf("s=%0d: reference invertible matrix", S));
      load_matrix();
      run(1'b0, cyc_chk);
      check(success && !fail, $sformatf("s=%0d: check run failed", S));
      // 3. written again, full run
      load_matrix();
      run(1'b1, cyc_full);
      check(success && !fail, $sformatf("s=%0d: full run failed", S));
      for (int i = 0; i < SAMPLE_ROWS; i++) begin
        r = (i == 0) ? 0 : (i == 1) ? ROWS - 1 : $urandom_range(0, ROWS - 1);
        for (int w = 0; w < KB; w++) begin
          @(negedge clk); pk_rd = 1; pk_row = RW'(r); pk_word = KBW'(w);
          @(negedge clk); pk_rd = 0;
          @(negedge clk);
          exp_w = '0; got_w = '0;
          for (int b = 0; b < S; b++)
            if (ROWS + w*S + b < COLS) begin
              exp_w[b] = R[r][ROWS + w*S + b];
              got_w[b] = pk_data[b];
            end
          check(pk_valid && got_w === exp_w,
                $sformatf("s=%0d: T row %0d word %0d = %h expected %h", S, r, w, got_w, exp_w));
        end
      end
      $display("%0d x %0d, s=%0d: abort %0d, check %0d, full %0d cycles (published check %.1f k, finish %.1f k)",
               ROWS, COLS, S, cyc_abort, cyc_chk, cyc_full, CFG_PCHK[g], CFG_PFIN[g]);
      turn = g + 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    turn = 0;
    wait (turn == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
