// Self-checking testbench of ct_compare.
//
// An 8-word stored stream is held in a model RAM (one clock latency); the
// testbench feeds an equal stream, streams differing in one word at various
// positions, and streams with gaps in in_valid, and checks equal and the
// constant completion time (the same for every difference position).
module tb_ct_compare;
  localparam int W = 16, LEN = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, in_valid, rd_en, done, equal;
  logic [W-1:0] in_data, rd_data;
  logic [$clog2(LEN)-1:0] rd_addr;

  ct_compare #(.W(W), .LEN(LEN)) dut (.*);

  logic [W-1:0] mem [LEN];
  logic [W-1:0] str [LEN];
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];

  initial begin
    int cyc, pos, ref_cyc;
    bit gaps;
    start = 0; in_valid = 0; in_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    ref_cyc = -1;
    for (int tr = 0; tr < 40; tr++) begin
      for (int i = 0; i < LEN; i++) begin mem[i] = W'($urandom); str[i] = mem[i]; end
      pos = (tr % 2 == 0) ? -1 : $urandom_range(0, LEN-1);
      if (pos >= 0) str[pos] ^= W'(1) << $urandom_range(0, W-1);
      gaps = (tr % 5 == 4);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 0;
      for (int i = 0; i < LEN; i++) begin
        if (gaps) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_data = str[i];
        @(negedge clk); cyc++;
      end
      in_valid = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (equal !== (pos < 0)) begin
        failures++;
        $display("trial %0d: equal=%0b, difference at %0d", tr, equal, pos);
      end
      if (!gaps) begin
        checks++;
        if (ref_cyc < 0) ref_cyc = cyc;
        else if (cyc != ref_cyc) begin
          failures++;
          $display("trial %0d: %0d cycles, earlier %0d", tr, cyc, ref_cyc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
