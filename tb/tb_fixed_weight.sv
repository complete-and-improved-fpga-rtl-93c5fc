// Self-checking testbench of fixed_weight.
//
// Small instance: n = 40, t = 4, m = 6, sigma1 = 8, 16 candidate fields drawn
// from 16-bit random words.  For every trial the testbench keeps the random
// words it supplied and recomputes FIXEDWEIGHT itself: the first t in-range
// candidates, the error flag (too few candidates or a repeated index) and,
// when there is no error, the weight-t vector e, which is read back from
// e_RAM and compared word by word.  One trial supplies only out-of-range
// candidates to force the "too few" restart; repeated indices occur by
// chance and are counted.  The number of cycles is checked against the
// block's fixed schedule.
module tb_fixed_weight;
  localparam int N = 40, T = 4, MB = 6, SIGMA1 = 8, NCHUNK = 16, RNDW = 16, W = 4;
  localparam int NW = N / W;
  localparam int FPW = RNDW / SIGMA1;
  localparam int NWORDS = NCHUNK / FPW;
  localparam int TRIALS = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            start, rnd_valid, rnd_ready, busy, done, error, rd_e;
  logic [RNDW-1:0] rnd_data;
  logic [$clog2(NW)-1:0] e_addr;
  logic [W-1:0]    e_data;

  fixed_weight #(.N(N), .T(T), .MB(MB), .SIGMA1(SIGMA1), .NCHUNK(NCHUNK),
                 .RNDW(RNDW), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  int n_ok = 0, n_few = 0, n_dup = 0;
  logic [RNDW-1:0] words [NWORDS];
  int widx;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // supply words on handshake
  always @(posedge clk) if (rnd_valid && rnd_ready) widx <= widx + 1;
  assign rnd_valid = busy && (widx < NWORDS);
  assign rnd_data  = words[(widx < NWORDS) ? widx : 0];

  initial begin
    logic [N-1:0] e_ref;
    int cnt, cyc, d;
    bit err_ref, few;
    int a [T];
    start = 0; rd_e = 0; e_addr = 0; widx = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int tr = 0; tr < TRIALS; tr++) begin
      for (int k = 0; k < NWORDS; k++) words[k] = RNDW'($urandom);
      if (tr == 3)
        for (int k = 0; k < NWORDS; k++) words[k] = {FPW{8'h3f}};  // all >= n
      // reference FIXEDWEIGHT
      cnt = 0;
      for (int k = 0; k < NWORDS; k++)
        for (int f = 0; f < FPW; f++) begin
          d = int'(words[k][f*SIGMA1 +: MB]);
          if (d < N && cnt < T) begin a[cnt] = d; cnt++; end
        end
      few = (cnt < T);
      err_ref = few;
      e_ref = '0;
      if (!few)
        for (int i = 0; i < T; i++) begin
          if (e_ref[a[i]]) err_ref = 1;
          e_ref[a[i]] = 1'b1;
        end
      widx = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (error !== err_ref) begin
        failures++;
        $display("trial %0d: error=%0b expected %0b", tr, error, err_ref);
      end
      if (few) n_few++; else if (err_ref) n_dup++; else n_ok++;
      // schedule: NW clear + (1 + FPW) per word + 3 per index + 2
      checks++;
      if (!few && cyc != NW + NWORDS * (1 + FPW) + 3 * T + 2) begin
        failures++;
        $display("trial %0d: %0d cycles, expected %0d", tr, cyc,
                 NW + NWORDS * (1 + FPW) + 3 * T + 2);
      end
      if (!err_ref)
        for (int w = 0; w < NW; w++) begin
          @(negedge clk); rd_e = 1; e_addr = w[$clog2(NW)-1:0];
          @(negedge clk); rd_e = 0;
          checks++;
          if (e_data !== e_ref[w*W +: W]) begin
            failures++;
            $display("trial %0d: e word %0d = %h expected %h", tr, w, e_data, e_ref[w*W +: W]);
          end
        end
    end
    checks++;
    if (n_ok == 0 || n_few == 0 || n_dup == 0) begin
      failures++;
      $display("not every outcome seen");
    end
    $display("valid e: %0d, too few: %0d, repeated index: %0d", n_ok, n_few, n_dup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
