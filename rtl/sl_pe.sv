// One processor element (PE) of the combinational systolic line.
//
// PE number J owns column J of the current column block and holds one pivot
// row register r (S bits) plus a "found" flag.  A row word passes through the
// PEs 0..S-1 combinationally in one clock; each PE sees the word already
// reduced by all PEs before it.  Two modes:
//   pivot_en  (operation generation, pivot column block): if the word has a
//             1 in column J and r already holds a pivot, the word is XORed
//             with r and bit J of the operation mask is set; if no pivot is
//             held yet and capture is allowed (cap_en), the word becomes the
//             pivot of column J: it is stored in r at the clock edge, trig
//             pulses and the operation is marked "pivot J" (the word takes no
//             further part in the line).
//   ext_en    (operation replay, every other column block): the operation
//             arriving on op_in decides alone: XOR r if mask bit J is set,
//             capture the word if the operation says "pivot J".
// The back-substitution port lets the line XOR another PE's r into this r
// (bs_en & bs_hit).  fail/check_en form a chain: with check_en_in high a PE
// without a pivot sets fail_out.
// The port set follows the processor element drawn for this design (data,
// op, fail, check_en, pivot_en, ext_en, trig); the exact behaviour of each
// port is this implementation's reading of it.
module sl_pe #(
  parameter int unsigned S = 32,
  parameter int unsigned J = 0,
  localparam int unsigned PW = (S > 1) ? $clog2(S) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,          // drop the held pivot
  input  logic          row_valid,    // a row word is on data_in this cycle
  input  logic          pivot_en,     // generate operations
  input  logic          ext_en,       // replay operations
  input  logic          cap_en,       // pivot capture allowed (pivot_en mode)
  input  logic [S-1:0]  data_in,
  input  logic [S-1:0]  op_xm_in,     // XOR mask built so far / to replay
  input  logic          op_piv_in,    // the row is (already) a pivot row
  input  logic [PW-1:0] op_pidx_in,   // ... of this PE index
  output logic [S-1:0]  data_out,
  output logic [S-1:0]  op_xm_out,
  output logic          op_piv_out,
  output logic [PW-1:0] op_pidx_out,
  output logic          trig,         // pivot captured this cycle (pivot_en)
  input  logic          fail_in,
  input  logic          check_en_in,
  output logic          fail_out,
  output logic          check_en_out,
  input  logic          bs_en,
  input  logic          bs_hit,
  input  logic [S-1:0]  bs_row,
  output logic [S-1:0]  r_out
);
  logic [S-1:0] r;
  logic         found;
  logic         do_xor, do_cap;

  always_comb begin
    do_xor = 1'b0;
    do_cap = 1'b0;
    if (pivot_en && !op_piv_in && data_in[J]) begin
      if (found)       do_xor = 1'b1;
      else if (cap_en) do_cap = 1'b1;
    end else if (ext_en) begin
      do_xor = op_xm_in[J];
      do_cap = op_piv_in && (op_pidx_in == PW'(J));
    end
    data_out    = do_xor ? (data_in ^ r) : data_in;
    op_xm_out   = op_xm_in;
    op_piv_out  = op_piv_in;
    op_pidx_out = op_pidx_in;
    if (pivot_en) begin
      op_xm_out[J] = op_xm_in[J] | do_xor;
      if (do_cap) begin
        op_piv_out  = 1'b1;
        op_pidx_out = PW'(J);
      end
    end
    trig         = row_valid && pivot_en && do_cap;
    check_en_out = check_en_in;
    fail_out     = fail_in || (check_en_in && !found);
    r_out        = r;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r     <= '0;
      found <= 1'b0;
    end else if (clr) begin
      r     <= '0;
      found <= 1'b0;
    end else if (row_valid && do_cap) begin
      r     <= data_in;
      found <= 1'b1;
    end else if (bs_en && bs_hit) begin
      r     <= r ^ bs_row;
    end
  end
endmodule
