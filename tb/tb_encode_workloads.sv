// Workload testbench of encode: the 32-bit Encode at the sizes of four
// Classic McEliece parameter sets.
//
// One Encode instance per parameter set (n, n-k, t):
//   mceliece348864  (3488,  768,  64)
//   mceliece460896  (4608, 1248,  96)
//   mceliece6688128 (6688, 1664, 128)
//   mceliece8192128 (8192, 1664, 128)
// The instances run one after another.  The public key is modelled by a hash
// of (row, word), so that no key has to be stored.  It is read with one clock
// of latency, and e is a random vector of weight t.  Every word of C0 is
// compared with [I | T] e computed here.  The start-to-done time must equal
// (n-k)/32 + (n-k) k/32 + 4 clocks.  It is printed next to the cycle count
// published for the 32-bit design of the same parameter set.
// mceliece6960119 (n-k = 1547) is not run: 1547 is not a multiple of 32,
// which this Encode requires.
module tb_encode_workloads;
  localparam int NCFG = 4;
  localparam int CFG_N [NCFG] = '{3488, 4608, 6688, 8192};
  localparam int CFG_M [NCFG] = '{768, 1248, 1664, 1664};
  localparam int CFG_T [NCFG] = '{64, 96, 128, 128};
  localparam int CFG_PUB [NCFG] = '{66053, 132293, 262917, 341125};
  localparam int W = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int turn = -1;

  initial begin
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // public-key word (row r, word w) of configuration g
  function automatic logic [W-1:0] pkw(int g, int r, int w);
    logic [31:0] x;
    x = 32'(r) * 32'h9E3779B1 ^ 32'(w) * 32'h85EBCA77 ^ 32'(g) * 32'hC2B2AE3D;
    x ^= x >> 15; x *= 32'h2C1B3C6D;
    x ^= x >> 12; x *= 32'h297A2D39;
    x ^= x >> 15;
    return x;
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    localparam int N = CFG_N[g], M = CFG_M[g], T = CFG_T[g];
    localparam int MW = M / W, KW = (N - M) / W, NW = N / W;

    logic start, busy, done, rd_pk, rd_e, rd_en_c;
    logic [$clog2(M*KW)-1:0] pk_addr;
    logic [$clog2(M)-1:0]    pk_row;
    logic [$clog2(KW)-1:0]   pk_word;
    logic [W-1:0]            public_key, e_data, c0;
    logic [$clog2(NW)-1:0]   e_addr;
    logic [$clog2(MW)-1:0]   rd_addr_c;

    encode #(.N(N), .M(M), .W(W), .PK_LAT(1)) dut (.*);

    logic [N-1:0] e;

    always @(posedge clk) begin
      if (rd_pk) public_key <= pkw(g, int'(pk_row), int'(pk_word));
      if (rd_e)  e_data     <= e[e_addr * W +: W];
    end

    initial begin
      logic [M-1:0] c_ref;
      logic [W-1:0] acc;
      int cyc, expect_cyc, placed, p;
      start = 0; rd_en_c = 0; rd_addr_c = 0; e = '0;
      public_key = '0; e_data = '0;
      wait (turn == g);
      // random e of weight t
      placed = 0;
      while (placed < T) begin
        p = $urandom_range(0, N - 1);
        if (!e[p]) begin e[p] = 1'b1; placed++; end
      end
      c_ref = e[M-1:0];
      for (int r = 0; r < M; r++) begin
        acc = '0;
        for (int w = 0; w < KW; w++) acc ^= pkw(g, r, w) & e[M + w*W +: W];
        c_ref[r] ^= ^acc;
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      expect_cyc = MW + M * KW + 4;
      checks++;
      if (cyc != expect_cyc) begin
        failures++;
        $display("n=%0d: %0d cycles, expected %0d", N, cyc, expect_cyc);
      end
      for (int w = 0; w < MW; w++) begin
        @(negedge clk); rd_en_c = 1; rd_addr_c = w[$clog2(MW)-1:0];
        @(negedge clk); rd_en_c = 0;
        checks++;
        if (c0 !== c_ref[w*W +: W]) begin
          failures++;
          if (failures < 20)
            $display("n=%0d: C0 word %0d = %h expected %h", N, w, c0, c_ref[w*W +: W]);
        end
      end
      $display("n=%0d n-k=%0d t=%0d: Encode %0d cycles (published 32-bit design: %0d)",
               N, M, T, cyc, CFG_PUB[g]);
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
