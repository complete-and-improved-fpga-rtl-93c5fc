// Combinational systolic line (comb_SL) of the F2 systemizer.
//
// S processor elements (sl_pe) chained so that one S-bit row word of a column
// block is fully reduced in a single clock.  In a pivot pass (pivot_en) the
// line finds up to S pivot rows, stores them in the PEs and emits for every
// row the operation it applied: an S-bit XOR mask (which pivots were added)
// and whether the row itself became pivot number op_pidx.  In an apply pass
// (ext_en) the same operations, read back from the operation memory, are
// replayed on another column block, so the column block is transformed
// exactly like the pivot block was.
//
// Back-substitution (bs_en, one step per clock, bs_j = S-1 down to 1) turns
// the upper-triangular pivot rows into the identity of the pivot block: at
// step j every row i < j with a 1 in column j receives r_j.  In the pivot
// block the line records these decisions in the S x S matrix u; with
// bs_replay it repeats them on the pivot rows of another block.
// fail is the end of the PE fail chain: high when some PE holds no pivot.
// Latency: the reduced word and the operation are combinational outputs in
// the cycle of row_valid; captures and back-substitution act at the clock.
module comb_sl #(
  parameter int unsigned S = 32,
  localparam int unsigned PW = (S > 1) ? $clog2(S) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          row_valid,
  input  logic          pivot_en,
  input  logic          ext_en,
  input  logic          cap_en,
  input  logic [S-1:0]  data_in,
  input  logic [S-1:0]  op_xm_in,
  input  logic          op_piv_in,
  input  logic [PW-1:0] op_pidx_in,
  output logic [S-1:0]  data_out,
  output logic [S-1:0]  op_xm_out,
  output logic          op_piv_out,
  output logic [PW-1:0] op_pidx_out,
  output logic [S-1:0]  trig,
  output logic          fail,
  input  logic          bs_en,
  input  logic          bs_replay,
  input  logic [PW-1:0] bs_j,
  input  logic [PW-1:0] rd_idx,
  output logic [S-1:0]  rd_row
);
  logic [S-1:0]  d   [S+1];
  logic [S-1:0]  xm  [S+1];
  logic          pv  [S+1];
  logic [PW-1:0] pi  [S+1];
  logic          fl  [S+1];
  logic          ce  [S+1];
  logic [S-1:0]  r   [S];
  logic [S-1:0]  u   [S];   // u[i][j]: back-substitution adds r_j to r_i
  logic [S-1:0]  hit;
  logic [S-1:0]  bs_row;

  assign d[0]  = data_in;
  assign xm[0] = pivot_en ? '0 : op_xm_in;
  assign pv[0] = pivot_en ? 1'b0 : op_piv_in;
  assign pi[0] = pivot_en ? '0 : op_pidx_in;
  assign fl[0] = 1'b0;
  assign ce[0] = 1'b1;

  assign bs_row = r[bs_j];
  always_comb begin
    for (int i = 0; i < int'(S); i++) begin
      if (i < int'(bs_j)) hit[i] = bs_replay ? u[i][bs_j] : r[i][bs_j];
      else                hit[i] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(S); i++) u[i] <= '0;
    end else if (bs_en && !bs_replay) begin
      for (int i = 0; i < int'(S); i++) u[i][bs_j] <= hit[i];
    end
  end

  for (genvar g = 0; g < int'(S); g++) begin : g_pe
    sl_pe #(.S(S), .J(g)) u_pe (
      .clk, .rst_n, .clr, .row_valid, .pivot_en, .ext_en, .cap_en,
      .data_in(d[g]), .op_xm_in(xm[g]), .op_piv_in(pv[g]), .op_pidx_in(pi[g]),
      .data_out(d[g+1]), .op_xm_out(xm[g+1]), .op_piv_out(pv[g+1]),
      .op_pidx_out(pi[g+1]), .trig(trig[g]),
      .fail_in(fl[g]), .check_en_in(ce[g]), .fail_out(fl[g+1]),
      .check_en_out(ce[g+1]),
      .bs_en, .bs_hit(hit[g]), .bs_row,
      .r_out(r[g])
    );
  end

  assign data_out    = d[S];
  assign op_xm_out   = xm[S];
  assign op_piv_out  = pv[S];
  assign op_pidx_out = pi[S];
  assign fail        = fl[S];
  assign rd_row      = r[rd_idx];
endmodule
