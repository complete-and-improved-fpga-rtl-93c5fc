// End-to-end testbench of mceliece_top at its default sizes (mceliece348864:
// n = 3488, n-k = 768, t = 64, 32-bit column blocks).
//
// 1. Key generation.  A parity-check matrix whose left part is singular (a
//    repeated row) is written and checked: the systemizer must abort early.
//    Then a matrix with an invertible left part (product of random unit
//    upper and unit lower triangular matrices, random right part) is
//    checked, written again and fully systemized; a reference Gauss-Jordan
//    elimination gives T, and sampled rows of T are read back and compared.
// 2. Encapsulation.  A random stream with every candidate out of range must
//    end in encap_error (restart); then fresh random streams are supplied
//    until FixedWeight succeeds.  The testbench computes e from the stream
//    itself and C0 = [I | T] e from the reference T; all of C0 is compared.
//    The Encode time (n-k)/32 + (n-k) k/32 + 5 clocks is checked.
// 3. Decapsulation helpers.  e (weight t) and a vector of weight t+1 are
//    scanned; the index lists and weight flags are compared.  A C1 value is
//    stored and compared with an equal and with a modified stream.
// Every mechanism (early abort, full systemization, FixedWeight restart,
// successful encapsulation, both weight-check outcomes, both compare
// outcomes) is counted and must occur.
module tb_mceliece_top;
  import mce_pkg::*;
  localparam int ROWS = MCE_NK, COLS = MCE_N, S = MCE_S, T = MCE_T, MB = MCE_M;
  localparam int SIGMA1 = MCE_SIGMA1, NCHUNK = MCE_NCHUNK, RNDW = 32, C1LEN = 8;
  localparam int NB = COLS / S, NL = ROWS / S, KB = NB - NL, K = COLS - ROWS;
  localparam int RW = $clog2(ROWS), BW = $clog2(NB), KBW = $clog2(KB);
  localparam int EAW = $clog2(NB), CAW = $clog2(NL), IW = $clog2(COLS);
  localparam int IAW = $clog2(T), C1AW = $clog2(C1LEN);
  localparam int FPW = RNDW / SIGMA1, NWORDS = NCHUNK / FPW;
  localparam int PK_ROWS_CHECKED = 48;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            mat_we;
  logic [BW-1:0]   mat_blk;
  logic [RW-1:0]   mat_row;
  logic [S-1:0]    mat_data;
  logic            sys_start, sys_full, sys_busy, sys_done, sys_success, sys_fail;
  logic            pk_rd;
  logic [RW-1:0]   pk_row;
  logic [KBW-1:0]  pk_word;
  logic [S-1:0]    pk_data;
  logic            pk_valid;
  logic            encap_start, rnd_valid, rnd_ready, encap_busy, encap_done, encap_error;
  logic [RNDW-1:0] rnd_data;
  logic            c0_rd;
  logic [CAW-1:0]  c0_addr;
  logic [S-1:0]    c0_data;
  logic            scan_start, e_rec_rd, scan_busy, scan_done, scan_weight_ok, idx_we;
  logic [EAW-1:0]  e_rec_addr;
  logic [S-1:0]    e_rec_data;
  logic [IAW-1:0]  idx_addr;
  logic [IW-1:0]   idx_data;
  logic            c1_we, cmp_start, cmp_valid, cmp_done, cmp_equal;
  logic [C1AW-1:0] c1_addr;
  logic [RNDW-1:0] c1_wdata, cmp_data;

  mceliece_top dut (.*);

  int checks = 0, failures = 0;
  int n_abort = 0, n_systemized = 0, n_fw_restart = 0, n_encap = 0;
  int n_wok = 0, n_wbad = 0, n_eq = 0, n_ne = 0;

  logic [COLS-1:0] H [ROWS];
  logic [COLS-1:0] R [ROWS];     // reference after Gauss-Jordan
  logic [RNDW-1:0] words [NWORDS];
  int widx;
  logic [COLS-1:0] e_rec;

  initial begin
    repeat (20_000_000) @(posedge clk);
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

  task automatic random_right();
    for (int r = 0; r < ROWS; r++)
      for (int c = ROWS; c < COLS; c += 32) H[r][c +: 32] = $urandom;
  endtask

  // left part = U * L with U unit upper and L unit lower triangular
  task automatic invertible_left();
    logic [ROWS-1:0] U [ROWS];
    logic [ROWS-1:0] L [ROWS];
    logic [ROWS-1:0] acc;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < ROWS; c += 32) begin U[r][c +: 32] = $urandom; L[r][c +: 32] = $urandom; end
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
  endtask

  task automatic load_matrix();
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk);
        mat_we = 1; mat_blk = BW'(b); mat_row = RW'(r);
        mat_data = H[r][b*S +: S];
      end
    @(negedge clk); mat_we = 0;
  endtask

  task automatic sys_run(input bit f, output int cycles);
    @(negedge clk); sys_start = 1; sys_full = f;
    @(negedge clk); sys_start = 0;
    cycles = 1;
    while (!sys_done) begin @(negedge clk); cycles++; end
  endtask

  // random stream on handshake
  always @(posedge clk) if (rnd_valid && rnd_ready) widx <= widx + 1;
  assign rnd_valid = (widx < NWORDS);
  assign rnd_data  = words[(widx < NWORDS) ? widx : 0];

  // recovered-e memory for the scanner
  always @(posedge clk) if (e_rec_rd) e_rec_data <= e_rec[e_rec_addr * S +: S];

  int idx_got [T];
  int n_idx;
  always @(posedge clk) if (idx_we) begin
    if (n_idx < T) idx_got[n_idx] = int'(idx_data);
    n_idx++;
  end

  // reference FIXEDWEIGHT on the supplied words; returns 1 on success
  function automatic bit ref_fixed_weight(output logic [COLS-1:0] e);
    int a [T];
    int cnt = 0, d;
    e = '0;
    for (int k = 0; k < NWORDS; k++)
      for (int f = 0; f < FPW; f++) begin
        d = int'(words[k][f*SIGMA1 +: MB]);
        if (d < COLS && cnt < T) begin a[cnt] = d; cnt++; end
      end
    if (cnt < T) return 1'b0;
    for (int i = 0; i < T; i++) begin
      if (e[a[i]]) return 1'b0;
      e[a[i]] = 1'b1;
    end
    return 1'b1;
  endfunction

  task automatic encap(output int cycles);
    widx = 0;
    @(negedge clk); encap_start = 1;
    @(negedge clk); encap_start = 0;
    cycles = 1;
    while (!encap_done) begin @(negedge clk); cycles++; end
  endtask

  task automatic scan(input logic [COLS-1:0] ev, output bit ok);
    e_rec = ev; n_idx = 0;
    @(negedge clk); scan_start = 1;
    @(negedge clk); scan_start = 0;
    while (!scan_done) @(negedge clk);
    ok = scan_weight_ok;
  endtask

  task automatic compare(input logic [RNDW-1:0] stored [C1LEN],
                         input logic [RNDW-1:0] fresh [C1LEN], output bit eq);
    for (int i = 0; i < C1LEN; i++) begin
      @(negedge clk); c1_we = 1; c1_addr = C1AW'(i); c1_wdata = stored[i];
    end
    @(negedge clk); c1_we = 0; cmp_start = 1;
    @(negedge clk); cmp_start = 0;
    for (int i = 0; i < C1LEN; i++) begin
      cmp_valid = 1; cmp_data = fresh[i]; @(negedge clk);
    end
    cmp_valid = 0;
    while (!cmp_done) @(negedge clk);
    eq = cmp_equal;
  endtask

  initial begin
    int cyc, cyc_chk, cyc_full, enc_cycles;
    bit inv, ok, eq;
    logic [COLS-1:0] e, e_bad;
    logic [ROWS-1:0] c0_ref;
    logic [RNDW-1:0] c1a [C1LEN];
    logic [RNDW-1:0] c1b [C1LEN];
    int exp_idx [T];
    int ne;

    mat_we = 0; mat_blk = 0; mat_row = 0; mat_data = 0; sys_start = 0; sys_full = 0;
    pk_rd = 0; pk_row = 0; pk_word = 0; encap_start = 0; c0_rd = 0; c0_addr = 0;
    scan_start = 0; c1_we = 0; c1_addr = 0; c1_wdata = 0;
    cmp_start = 0; cmp_valid = 0; cmp_data = 0; widx = NWORDS; e_rec = '0; n_idx = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------- key generation: singular left part -> early abort
    invertible_left();
    random_right();
    H[ROWS/2] = H[ROWS/3];
    inv = ref_systemize();
    check(!inv, "reference: singular matrix reported invertible");
    load_matrix();
    sys_run(1'b0, cyc_chk);
    check(sys_fail && !sys_success, "check run did not abort on a singular left part");
    if (sys_fail) n_abort++;
    $display("singular matrix: check run aborted after %0d cycles", cyc_chk);

    // ---------------- invertible left part: check, regenerate, full run
    invertible_left();
    random_right();
    inv = ref_systemize();
    check(inv, "reference: constructed matrix not invertible");
    load_matrix();
    sys_run(1'b0, cyc_chk);
    check(sys_success && !sys_fail, "check run failed on an invertible left part");
    load_matrix();
    sys_run(1'b1, cyc_full);
    check(sys_success && !sys_fail, "full run failed");
    if (sys_success) n_systemized++;
    $display("invertible matrix: check run %0d cycles, full run %0d cycles", cyc_chk, cyc_full);
    for (int n = 0; n < PK_ROWS_CHECKED; n++) begin
      int r;
      r = (n * 97 + 5) % ROWS;
      if (n == 0) r = 0;
      if (n == 1) r = ROWS - 1;
      for (int w = 0; w < KB; w++) begin
        @(negedge clk); pk_rd = 1; pk_row = RW'(r); pk_word = KBW'(w);
        @(negedge clk); pk_rd = 0;
        @(negedge clk);
        check(pk_valid && pk_data === R[r][ROWS + w*S +: S],
              $sformatf("T row %0d word %0d = %h expected %h", r, w, pk_data, R[r][ROWS + w*S +: S]));
      end
    end

    // ---------------- encapsulation: forced FixedWeight failure
    for (int k = 0; k < NWORDS; k++) words[k] = '1;
    encap(cyc);
    check(encap_error, "all-out-of-range stream did not give an error");
    if (encap_error) n_fw_restart++;

    // ---------------- encapsulation until FixedWeight succeeds
    for (int attempt = 0; attempt < 20 && n_encap == 0; attempt++) begin
      for (int k = 0; k < NWORDS; k++) words[k] = $urandom;
      ok = ref_fixed_weight(e);
      encap(cyc);
      check(encap_error === !ok, $sformatf("attempt %0d: encap_error=%0b expected %0b",
                                           attempt, encap_error, !ok));
      if (!ok) begin n_fw_restart++; continue; end
      n_encap++;
      c0_ref = e[ROWS-1:0];
      for (int r = 0; r < ROWS; r++) c0_ref[r] ^= ^(R[r][COLS-1:ROWS] & e[COLS-1:ROWS]);
      for (int w = 0; w < NL; w++) begin
        @(negedge clk); c0_rd = 1; c0_addr = CAW'(w);
        @(negedge clk); c0_rd = 0;
        check(c0_data === c0_ref[w*S +: S],
              $sformatf("C0 word %0d = %h expected %h", w, c0_data, c0_ref[w*S +: S]));
      end
      $display("encapsulation: %0d cycles (FixedWeight and Encode)", cyc);
    end
    // Encode alone: NL + ROWS*KB + PK_LAT(2) + 3 clocks
    enc_cycles = NL + ROWS * KB + 5;
    check(cyc > enc_cycles && cyc < enc_cycles + 2 * NCHUNK + NB + 3 * T + 20,
          $sformatf("encapsulation took %0d cycles", cyc));

    // ---------------- decapsulation helpers
    scan(e, ok);
    check(ok, "weight-t vector not accepted");
    if (ok) n_wok++;
    ne = 0;
    for (int i = 0; i < COLS; i++) if (e[i] && ne < T) begin exp_idx[ne] = i; ne++; end
    check(n_idx == T, $sformatf("%0d indexes written", n_idx));
    for (int i = 0; i < T && i < n_idx; i++)
      check(idx_got[i] == exp_idx[i], $sformatf("index %0d = %0d expected %0d", i, idx_got[i], exp_idx[i]));
    e_bad = e;
    for (int i = 0; i < COLS; i++) if (!e_bad[i]) begin e_bad[i] = 1'b1; break; end
    scan(e_bad, ok);
    check(!ok, "weight t+1 vector accepted");
    if (!ok) n_wbad++;

    for (int i = 0; i < C1LEN; i++) begin c1a[i] = $urandom; c1b[i] = c1a[i]; end
    compare(c1a, c1b, eq);
    check(eq, "equal C1 streams reported different");
    if (eq) n_eq++;
    c1b[C1LEN-1][RNDW-1] ^= 1'b1;
    compare(c1a, c1b, eq);
    check(!eq, "different C1 streams reported equal");
    if (!eq) n_ne++;

    $display("early aborts %0d, systemizations %0d, FixedWeight restarts %0d, encapsulations %0d",
             n_abort, n_systemized, n_fw_restart, n_encap);
    $display("weight ok %0d, weight wrong %0d, compare equal %0d, compare different %0d",
             n_wok, n_wbad, n_eq, n_ne);
    check(n_abort > 0 && n_systemized > 0 && n_fw_restart > 0 && n_encap > 0 &&
          n_wok > 0 && n_wbad > 0 && n_eq > 0 && n_ne > 0, "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
