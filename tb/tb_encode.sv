// Self-checking testbench of encode.
//
// Instance n = 48, n-k = 16, 4-bit words and a public-key memory with three
// clocks of read latency.  The testbench models the key memory (random T,
// row-major words) and the e memory (one clock of latency), runs Encode and
// compares every word of C0 with [I | T] e computed independently here.
// Vectors of weight 0, weight 1 and random weight are used; the number of
// clocks from start to done is checked against MW + M*KW + PK_LAT + 3.
module tb_encode;
  localparam int N = 48, M = 16, W = 4, PK_LAT = 3;
  localparam int MW = M / W, KW = (N - M) / W, NW = N / W;
  localparam int TRIALS = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, rd_pk, rd_e, rd_en_c;
  logic [$clog2(M*KW)-1:0] pk_addr;
  logic [$clog2(M)-1:0]    pk_row;
  logic [$clog2(KW)-1:0]   pk_word;
  logic [W-1:0] public_key, e_data, c0;
  logic [$clog2(NW)-1:0] e_addr;
  logic [$clog2(MW)-1:0] rd_addr_c;

  encode #(.N(N), .M(M), .W(W), .PK_LAT(PK_LAT)) dut (.*);

  logic [N-M-1:0] Tm [M];
  logic [N-1:0]   e;
  logic [W-1:0]   pk_pipe [PK_LAT];
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // key memory with PK_LAT clocks of latency, e memory with one
  always @(posedge clk) begin
    pk_pipe[0] <= Tm[pk_addr / KW][(pk_addr % KW) * W +: W];
    for (int i = 1; i < PK_LAT; i++) pk_pipe[i] <= pk_pipe[i-1];
    if (rd_e) e_data <= e[e_addr * W +: W];
  end
  assign public_key = pk_pipe[PK_LAT-1];

  initial begin
    logic [M-1:0] c_ref;
    int cyc;
    start = 0; rd_en_c = 0; rd_addr_c = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int tr = 0; tr < TRIALS; tr++) begin
      for (int r = 0; r < M; r++) Tm[r] = {$urandom, $urandom};
      e = {$urandom, $urandom};
      if (tr == 0) e = '0;
      if (tr == 1) e = N'(1) << (M + 5);
      c_ref = e[M-1:0];
      for (int r = 0; r < M; r++) c_ref[r] ^= ^(Tm[r] & e[N-1:M]);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != MW + M * KW + PK_LAT + 3) begin
        failures++;
        $display("trial %0d: %0d cycles, expected %0d", tr, cyc, MW + M * KW + PK_LAT + 3);
      end
      for (int w = 0; w < MW; w++) begin
        @(negedge clk); rd_en_c = 1; rd_addr_c = w[$clog2(MW)-1:0];
        @(negedge clk); rd_en_c = 0;
        checks++;
        if (c0 !== c_ref[w*W +: W]) begin
          failures++;
          $display("trial %0d: C0 word %0d = %h expected %h", tr, w, c0, c_ref[w*W +: W]);
        end
      end
      if (tr == 0) $display("encode: %0d cycles", cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
