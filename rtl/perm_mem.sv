// Permutation memory of the systemizer (Perm. Mem. with comparators).
//
// For each of the S pivots of a column block it keeps two registers: the
// stream position ("current cycle", here the logical row index of the row
// being streamed) at which the pivot was found, and the physical memory row
// that holds it.  PE g's trig pulse, qualified by pivot_en, loads entry g
// (the AND gate and multiplexer in front of each register).  S comparators
// compare every stored position with a probe value and give the S-bit
// perm_op vector.  The systemizer uses perm_op during the row swaps at the
// end of a phase: after logical rows a and loc[j] are swapped, every later
// pivot k still recorded at position a moves to loc[j] (upd_en with
// upd_mask).  Registers only; perm_op is combinational.
module perm_mem #(
  parameter int unsigned S  = 32,
  parameter int unsigned RW = 10,
  localparam int unsigned PW = (S > 1) ? $clog2(S) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pivot_en,
  input  logic [S-1:0]  trig,
  input  logic [RW-1:0] cur_pos,     // current stream position
  input  logic [RW-1:0] cur_phys,    // physical row of the current word
  input  logic [RW-1:0] probe,
  output logic [S-1:0]  perm_op,     // perm_op[g] = (loc[g] == probe)
  input  logic          upd_en,
  input  logic [S-1:0]  upd_mask,
  input  logic [RW-1:0] upd_val,
  input  logic [PW-1:0] rd_idx,
  output logic [RW-1:0] rd_loc,
  output logic [RW-1:0] rd_phys
);
  logic [RW-1:0] loc  [S];
  logic [RW-1:0] phys [S];

  always_comb begin
    for (int g = 0; g < int'(S); g++) perm_op[g] = (loc[g] == probe);
  end
  assign rd_loc  = loc[rd_idx];
  assign rd_phys = phys[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < int'(S); g++) begin
        loc[g]  <= '0;
        phys[g] <= '0;
      end
    end else begin
      for (int g = 0; g < int'(S); g++) begin
        if (pivot_en && trig[g]) begin
          loc[g]  <= cur_pos;
          phys[g] <= cur_phys;
        end else if (upd_en && upd_mask[g]) begin
          loc[g]  <= upd_val;
        end
      end
    end
  end
endmodule
