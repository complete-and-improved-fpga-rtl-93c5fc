// Self-checking testbench of error_index_scan.
//
// Instance n = 40, t = 4, 4-bit words.  The testbench holds e in a model
// memory (one clock of read latency), runs the scan and compares the list of
// indexes written and the weight_ok flag with a reference walk over e.
// Vectors of weight t, weight below t and weight above t are used, so that
// both outcomes of the weight check occur; the scan time must be the same
// N/W * (W + 1) + 1 clocks for every vector.
module tb_error_index_scan;
  localparam int N = 40, T = 4, W = 4, NW = N / W;
  localparam int TRIALS = 30;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, weight_ok, rd_e, idx_we;
  logic [$clog2(NW)-1:0] e_addr;
  logic [W-1:0] e_data;
  logic [$clog2(T)-1:0] idx_addr;
  logic [$clog2(N)-1:0] idx_data;

  error_index_scan #(.N(N), .T(T), .W(W)) dut (.*);

  logic [N-1:0] e;
  int got [T];
  int ngot;
  int checks = 0, failures = 0;
  int n_ok = 0, n_bad = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rd_e) e_data <= e[e_addr * W +: W];
    if (idx_we) begin
      if (int'(idx_addr) != ngot) begin
        failures++;
        $display("index written to slot %0d, expected slot %0d", idx_addr, ngot);
      end
      if (ngot < T) got[ngot] = int'(idx_data);
      ngot++;
    end
  end

  initial begin
    int exp_idx [T];
    int w, cyc, ne;
    start = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int tr = 0; tr < TRIALS; tr++) begin
      w = (tr % 3 == 0) ? T : ((tr % 3 == 1) ? T - 1 : T + 2);
      e = '0;
      while ($countones(e) < w) e[$urandom_range(0, N-1)] = 1'b1;
      ne = 0;
      for (int i = 0; i < N; i++) if (e[i] && ne < T) begin exp_idx[ne] = i; ne++; end
      ngot = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (weight_ok !== (w == T)) begin
        failures++;
        $display("trial %0d: weight_ok=%0b for weight %0d", tr, weight_ok, w);
      end
      if (weight_ok) n_ok++; else n_bad++;
      checks++;
      if (ngot != ne) begin
        failures++;
        $display("trial %0d: %0d indexes written, expected %0d", tr, ngot, ne);
      end
      for (int i = 0; i < ne && i < ngot; i++) begin
        checks++;
        if (got[i] != exp_idx[i]) begin
          failures++;
          $display("trial %0d: index %0d = %0d expected %0d", tr, i, got[i], exp_idx[i]);
        end
      end
      checks++;
      if (cyc != NW * (W + 1) + 2) begin
        failures++;
        $display("trial %0d: %0d cycles, expected %0d", tr, cyc, NW * (W + 1) + 2);
      end
    end
    checks++;
    if (n_ok == 0 || n_bad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
