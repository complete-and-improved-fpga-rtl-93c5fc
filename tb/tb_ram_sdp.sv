// Self-checking testbench of ram_sdp: random writes and reads against a
// reference array, including a read of the address written in the same
// clock (the old contents must be returned) and reads with re low (the
// output must hold).
module tb_ram_sdp;
  localparam int DW = 12, DEPTH = 24;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [$clog2(DEPTH)-1:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;
  ram_sdp #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] expv, held;
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = i[$clog2(DEPTH)-1:0]; wdata = DW'($urandom);
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); waddr = $urandom_range(0, DEPTH-1); wdata = DW'($urandom);
      re = (n == 0) || ($urandom_range(0, 3) != 0);
      raddr = (n % 7 == 0) ? waddr : $urandom_range(0, DEPTH-1);
      expv = re ? model[raddr] : held;
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 0; re = 0;
      checks++;
      if (rdata !== expv) begin
        failures++;
        $display("read %0d: %h expected %h", n, rdata, expv);
      end
      held = rdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
