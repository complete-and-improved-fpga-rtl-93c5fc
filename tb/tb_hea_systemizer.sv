// Self-checking testbench of hea_systemizer.
//
// Random parity-check matrices (16 x 46, column blocks of 4, the last one
// half used) are loaded and
// run through the HEA sequence: a check run, and, when the left square part
// is invertible, a reload and a full run.  A reference Gauss-Jordan
// elimination in the testbench decides whether the left part is invertible
// and computes T = L^-1 R; the check run's success/fail and every word of T
// read back through the public-key port are compared with it.  Matrices
// with a duplicated row are mixed in so that the early abort is exercised.
// Cycle counts of both runs are compared with the bounds of the design's
// timing (one clock per streamed row plus fixed per-pass overheads).
module tb_hea_systemizer;
  localparam int ROWS = 16;
  localparam int COLS = 46;
  localparam int S    = 4;
  localparam int NB   = (COLS + S - 1) / S;
  localparam int NL   = ROWS / S;
  localparam int KB   = NB - NL;
  localparam int RW   = $clog2(ROWS);
  localparam int BW   = $clog2(NB);
  localparam int KBW  = $clog2(KB);
  localparam int TRIALS = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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

  int checks = 0, failures = 0;
  int n_abort = 0, n_success = 0;

  logic [COLS-1:0] H   [ROWS];
  logic [COLS-1:0] ref_m [ROWS];

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: Gauss-Jordan on the left ROWS x ROWS part; returns 1 if invertible
  function automatic bit ref_systemize();
    logic [COLS-1:0] t;
    for (int r = 0; r < ROWS; r++) ref_m[r] = H[r];
    for (int c = 0; c < ROWS; c++) begin
      int pr = -1;
      for (int r = c; r < ROWS; r++) if (pr < 0 && ref_m[r][c]) pr = r;
      if (pr < 0) return 1'b0;
      t = ref_m[pr]; ref_m[pr] = ref_m[c]; ref_m[c] = t;
      for (int r = 0; r < ROWS; r++)
        if (r != c && ref_m[r][c]) ref_m[r] ^= ref_m[c];
    end
    return 1'b1;
  endfunction

  task automatic load_matrix();
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk);
        mat_we = 1; mat_blk = BW'(b); mat_row = RW'(r);
        for (int i = 0; i < S; i++) mat_data[i] = (b*S + i < COLS) ? H[r][b*S + i] : 1'($urandom);
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
    int cyc_chk, cyc_full;
    bit inv;
    int bound_chk, bound_full;
    logic [S-1:0] exp_w, got_w;
    mat_we = 0; mat_blk = 0; mat_row = 0; mat_data = 0;
    start = 0; full = 0; pk_rd = 0; pk_row = 0; pk_word = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // per-pass overhead: 3 pipeline + S write-back + 2 control; check run
    // streams ROWS-pS rows for each of the NL-p blocks of phase p
    bound_chk = ROWS + 4;
    bound_full = ROWS + 4;
    for (int p = 0; p < NL; p++) begin
      bound_chk  += (NL - p) * (ROWS - p*S + S + 6) + 5*S + 2;
      bound_full += (NB - p) * (ROWS + 2*S + 6) + 5*S + 2;
    end
    for (int tr = 0; tr < TRIALS; tr++) begin
      for (int r = 0; r < ROWS; r++)
        for (int w = 0; w < COLS; w += 32) H[r][w +: 32] = $urandom;
      if (tr % 4 == 1) H[ROWS-1] = H[$urandom_range(0, ROWS-2)];  // singular
      inv = ref_systemize();
      load_matrix();
      run(1'b0, cyc_chk);
      checks++;
      if (success !== inv || fail !== !inv) begin
        failures++;
        $display("trial %0d: check run success=%0b fail=%0b expected invertible=%0b",
                 tr, success, fail, inv);
      end
      checks++;
      if (cyc_chk > bound_chk) begin
        failures++;
        $display("trial %0d: check run took %0d cycles > %0d", tr, cyc_chk, bound_chk);
      end
      if (!inv) begin n_abort++; continue; end
      // HEA: regenerate (reload) and systemize the whole matrix
      load_matrix();
      run(1'b1, cyc_full);
      checks++;
      if (!success || fail) begin
        failures++;
        $display("trial %0d: full run did not succeed", tr);
      end
      checks++;
      if (cyc_full > bound_full) begin
        failures++;
        $display("trial %0d: full run took %0d cycles > %0d", tr, cyc_full, bound_full);
      end
      n_success++;
      for (int r = 0; r < ROWS; r++)
        for (int w = 0; w < KB; w++) begin
          @(negedge clk); pk_rd = 1; pk_row = RW'(r); pk_word = KBW'(w);
          @(negedge clk); pk_rd = 0;
          @(negedge clk);
          checks++;
          exp_w = ref_m[r][ROWS + w*S +: S];
          got_w = pk_data;
          for (int b = 0; b < S; b++) if (ROWS + w*S + b >= COLS) begin exp_w[b] = 0; got_w[b] = 0; end
          if (!pk_valid || got_w !== exp_w) begin
            failures++;
            if (failures < 10)
              $display("trial %0d: T row %0d word %0d = %h expected %h (valid %0b)",
                       tr, r, w, got_w, exp_w, pk_valid);
          end
        end
      $display("trial %0d: check %0d cycles, full %0d cycles", tr, cyc_chk, cyc_full);
    end
    checks++;
    if (n_abort == 0 || n_success == 0) begin
      failures++;
      $display("mechanism not exercised: aborts=%0d successes=%0d", n_abort, n_success);
    end
    $display("early aborts=%0d full systemizations=%0d", n_abort, n_success);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
