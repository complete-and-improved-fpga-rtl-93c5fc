// Simple dual-port RAM: one synchronous write port and one read port with a
// registered output (data appears one clock after re/raddr).  All buffers of
// the design (e_RAM, int_RAM, RAM_Encode, RAM_C1, ...) are instances of it; on
// an FPGA it maps to block or distributed RAM.  Contents are initialised to
// zero at time 0 for simulation only; the design never relies on the initial
// contents, it always writes a location before reading it.
module ram_sdp #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
