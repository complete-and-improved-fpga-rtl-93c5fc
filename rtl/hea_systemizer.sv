// F2 systemizer with hybrid early abort (HEA).
//
// Brings the (n-k) x n binary parity-check matrix H to systematic form
// [I | T] by Gaussian elimination over GF(2), one column block of S columns
// at a time, and gives T (the public key) out row by row in S-bit words.
//
// Storage.  The data memory holds the matrix as NB = ceil(COLS/S) column
// blocks of ROWS words each (address = block * ROWS + physical row).  When
// COLS is not a multiple of S the last block is padded; whatever the padding
// holds, it never influences the real columns, because every row operation
// is decided in the left part.  ROWS must be a multiple of S.  Row swaps are
// never carried out on the data: a row map (logical row -> physical row)
// is updated instead, so a swap costs a few cycles regardless of COLS.
// The operation memory keeps, for every logical row, the operation the
// combinational systolic line (comb_sl) applied to it in the pivot block.
//
// One phase p (p = 0 .. ROWS/S-1) uses column block p as pivot block:
//   1. pivot pass: stream logical rows pS..ROWS-1 through comb_sl, which picks
//      S pivot rows and records each row's operation; in a full run the rows
//      0..pS-1 follow (they are reduced but may not become pivots).
//   2. early abort: if some column of the block got no pivot the square left
//      part is singular; the run ends at once with fail.
//   3. full run only: back-substitution makes the pivot rows the identity.
//   4. the pivot rows are written back into the slots they came from.
//   5. apply passes: every later column block (up to the left square part in
//      a check run, up to the last block in a full run) is streamed with the
//      stored operations replayed, followed by steps 3 and 4 for that block.
//   6. the row map is updated so that pivot j becomes logical row pS+j,
//      using the perm_mem comparators to follow pivots moved by earlier swaps.
//
// HEA use: a check run (full = 0) performs forward elimination of the left
// square part only, just enough to learn whether it is invertible, and
// aborts early when it is not.  The caller then loads (regenerates) the
// matrix again and starts a full run (full = 1), which produces [I | T].
// The split into a check run and a full run, the early abort and the
// column-block processing follow the described HEA method; the row map, the
// order of the passes and all port details are choices of this design.
//
// Interface.  mat_we/mat_blk/mat_row/mat_data write one S-bit word of H
// (block, row); only while idle.  start pulses begin a run; busy is high
// during it; done pulses at its end with success or fail valid until the
// next start.  pk_rd with pk_row (row of T) and pk_word (S-bit word of that
// row, 0 = columns ROWS..ROWS+S-1) returns pk_data with pk_valid two clocks
// later; only while idle.
// Timing.  A pass over a block takes one clock per row plus 3 clocks of
// pipeline; back-substitution S-1 clocks, write-back S clocks, the row-map
// update 4 clocks per pivot.
module hea_systemizer
  import mce_pkg::*;
#(
  parameter int unsigned ROWS = MCE_NK,
  parameter int unsigned COLS = MCE_N,
  parameter int unsigned S    = MCE_S,
  localparam int unsigned NB  = (COLS + S - 1) / S,
  localparam int unsigned NL  = ROWS / S,
  localparam int unsigned KB  = NB - NL,
  localparam int unsigned RW  = $clog2(ROWS),
  localparam int unsigned BW  = $clog2(NB),
  localparam int unsigned KBW = (KB > 1) ? $clog2(KB) : 1,
  localparam int unsigned AW  = $clog2(NB * ROWS),
  localparam int unsigned PW  = (S > 1) ? $clog2(S) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // matrix load (parity-check matrix input)
  input  logic           mat_we,
  input  logic [BW-1:0]  mat_blk,
  input  logic [RW-1:0]  mat_row,
  input  logic [S-1:0]   mat_data,
  // control
  input  logic           start,
  input  logic           full,
  output logic           busy,
  output logic           done,
  output logic           success,
  output logic           fail,
  // public key read port
  input  logic           pk_rd,
  input  logic [RW-1:0]  pk_row,
  input  logic [KBW-1:0] pk_word,
  output logic [S-1:0]   pk_data,
  output logic           pk_valid
);
  initial begin
    assert (ROWS % S == 0 && COLS > ROWS)
      else $error("hea_systemizer: ROWS must be a multiple of S");
  end

  typedef enum logic [3:0] {
    IDLE, INIT, STREAM, DRAIN, CHECK, BACKSUB, WB, NEXTBLK,
    SWAP_A, SWAP_B, SWAP_C, SWAP_D, SWAP_E, NEXTPH, FINISH
  } state_t;

  state_t state;

  // ---------------------------------------------------------------- memories
  logic [S-1:0]  dmem  [NB * ROWS];
  logic [RW-1:0] rmap  [ROWS];
  logic [S-1:0]  op_xm [ROWS];
  logic          op_pv [ROWS];
  logic [PW-1:0] op_pi [ROWS];

  // ---------------------------------------------------------------- run state
  logic          run_full;
  logic [BW-1:0] phase;      // pivot block index p
  logic [BW-1:0] blk;        // block being streamed
  logic          piv_pass;   // current pass is the pivot pass
  logic [RW:0]   k;          // stream counter
  logic [RW:0]   nrows;      // rows streamed in this pass
  logic [RW-1:0] base;       // pS
  logic [PW-1:0] j;          // pivot index for back-sub, write-back, swaps
  logic [RW-1:0] swap_a, swap_b, map_a;

  assign base = RW'(phase) * RW'(S);

  // stream pipeline registers
  logic          s1_v, s2_v;
  logic [RW-1:0] s1_lr, s2_lr, s2_phys;
  logic          s1_cap, s2_cap;
  logic          pk_s1, pk_s2;
  logic [KBW-1:0] pk_w1;

  // ---------------------------------------------------------------- read ports
  logic [RW-1:0] rmap_raddr, rmap_q;
  logic          rmap_we;
  logic [RW-1:0] rmap_waddr, rmap_wdata;
  logic [AW-1:0] dm_raddr, dm_waddr;
  logic [S-1:0]  dm_q, dm_wdata;
  logic          dm_we;
  logic [S-1:0]  opx_q;
  logic          opp_q;
  logic [PW-1:0] opi_q;

  // line and permutation memory
  logic          sl_clr, sl_pivot_en, sl_ext_en, sl_row_valid;
  logic [S-1:0]  sl_dout, sl_xm;
  logic          sl_pv;
  logic [PW-1:0] sl_pi;
  logic [S-1:0]  sl_trig;
  logic          sl_fail;
  logic          bs_en;
  logic [S-1:0]  sl_rd_row;
  logic [S-1:0]  perm_op;
  logic          pm_upd;
  logic [S-1:0]  pm_mask;
  logic [RW-1:0] pm_loc, pm_phys;

  // logical row of stream position k: pS..ROWS-1 first, then 0..pS-1
  logic [RW-1:0] lr_k;
  always_comb begin
    if (k < (RW+1)'(ROWS) - (RW+1)'(base)) lr_k = RW'(k + (RW+1)'(base));
    else                                   lr_k = RW'(k - ((RW+1)'(ROWS) - (RW+1)'(base)));
  end

  logic issue;
  assign issue = (state == STREAM) && (k < nrows);

  always_comb begin
    rmap_raddr = lr_k;
    unique case (state)
      SWAP_B:  rmap_raddr = swap_a;
      SWAP_C:  rmap_raddr = swap_b;
      IDLE:    rmap_raddr = pk_row;
      default: rmap_raddr = lr_k;
    endcase
  end

  always_comb begin
    if (pk_s1) dm_raddr = AW'((NL + int'(pk_w1)) * ROWS) + AW'(rmap_q);
    else       dm_raddr = AW'(blk) * AW'(ROWS) + AW'(rmap_q);
  end

  always_ff @(posedge clk) begin
    rmap_q <= rmap[rmap_raddr];
    if (rmap_we) rmap[rmap_waddr] <= rmap_wdata;
    dm_q  <= dmem[dm_raddr];
    if (dm_we) dmem[dm_waddr] <= dm_wdata;
    opx_q <= op_xm[s1_lr];
    opp_q <= op_pv[s1_lr];
    opi_q <= op_pi[s1_lr];
    if (s2_v && piv_pass) begin
      op_xm[s2_lr] <= sl_xm;
      op_pv[s2_lr] <= sl_pv;
      op_pi[s2_lr] <= sl_pi;
    end
  end

  // write port of the data memory: load, stream write-back, pivot write-back
  always_comb begin
    dm_we    = 1'b0;
    dm_waddr = AW'(blk) * AW'(ROWS) + AW'(s2_phys);
    dm_wdata = sl_dout;
    if (state == IDLE) begin
      dm_we    = mat_we;
      dm_waddr = AW'(mat_blk) * AW'(ROWS) + AW'(mat_row);
      dm_wdata = mat_data;
    end else if (state == WB) begin
      dm_we    = 1'b1;
      dm_waddr = AW'(blk) * AW'(ROWS) + AW'(pm_phys);
      dm_wdata = sl_rd_row;
    end else if (s2_v && !sl_pv) begin
      dm_we    = 1'b1;
    end
  end

  // row-map writes: identity at INIT, swaps
  always_comb begin
    rmap_we    = 1'b0;
    rmap_waddr = k[RW-1:0];
    rmap_wdata = k[RW-1:0];
    if (state == INIT) begin
      rmap_we = 1'b1;
    end else if (state == SWAP_D) begin
      rmap_we = 1'b1; rmap_waddr = swap_a; rmap_wdata = rmap_q;
    end else if (state == SWAP_E) begin
      rmap_we = 1'b1; rmap_waddr = swap_b; rmap_wdata = map_a;
    end
  end

  assign sl_row_valid = s2_v;
  assign sl_pivot_en  = piv_pass;
  assign sl_ext_en    = !piv_pass;
  assign bs_en        = (state == BACKSUB);

  comb_sl #(.S(S)) u_sl (
    .clk, .rst_n, .clr(sl_clr), .row_valid(sl_row_valid),
    .pivot_en(sl_pivot_en), .ext_en(sl_ext_en), .cap_en(s2_cap),
    .data_in(dm_q), .op_xm_in(opx_q), .op_piv_in(opp_q), .op_pidx_in(opi_q),
    .data_out(sl_dout), .op_xm_out(sl_xm), .op_piv_out(sl_pv), .op_pidx_out(sl_pi),
    .trig(sl_trig), .fail(sl_fail),
    .bs_en, .bs_replay(!piv_pass), .bs_j(j), .rd_idx(j), .rd_row(sl_rd_row)
  );

  // mask for the swap update: only pivots after j
  always_comb begin
    for (int g = 0; g < int'(S); g++) pm_mask[g] = perm_op[g] && (g > int'(j));
  end
  assign pm_upd = (state == SWAP_E);

  perm_mem #(.S(S), .RW(RW)) u_perm (
    .clk, .rst_n, .pivot_en(piv_pass && s2_v), .trig(sl_trig),
    .cur_pos(s2_lr), .cur_phys(s2_phys),
    .probe(swap_a), .perm_op,
    .upd_en(pm_upd), .upd_mask(pm_mask), .upd_val(swap_b),
    .rd_idx(j), .rd_loc(pm_loc), .rd_phys(pm_phys)
  );

  logic [BW-1:0] last_blk;
  assign last_blk = run_full ? BW'(NB - 1) : BW'(NL - 1);

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      run_full <= 1'b0;
      phase    <= '0;
      blk      <= '0;
      piv_pass <= 1'b0;
      k        <= '0;
      nrows    <= '0;
      j        <= '0;
      swap_a   <= '0;
      swap_b   <= '0;
      map_a    <= '0;
      s1_v     <= 1'b0;
      s2_v     <= 1'b0;
      s1_lr    <= '0;
      s2_lr    <= '0;
      s2_phys  <= '0;
      s1_cap   <= 1'b0;
      s2_cap   <= 1'b0;
      sl_clr   <= 1'b0;
      busy     <= 1'b0;
      done     <= 1'b0;
      success  <= 1'b0;
      fail     <= 1'b0;
      pk_s1    <= 1'b0;
      pk_s2    <= 1'b0;
      pk_w1    <= '0;
    end else begin
      done   <= 1'b0;
      sl_clr <= 1'b0;
      // stream pipeline
      s1_v    <= issue;
      s1_lr   <= lr_k;
      s1_cap  <= piv_pass && (k < (RW+1)'(ROWS) - (RW+1)'(base));
      s2_v    <= s1_v;
      s2_lr   <= s1_lr;
      s2_phys <= rmap_q;
      s2_cap  <= s1_cap;
      // public key read pipeline
      pk_s1   <= pk_rd && (state == IDLE);
      pk_w1   <= pk_word;
      pk_s2   <= pk_s1;

      unique case (state)
        IDLE: if (start) begin
          state    <= INIT;
          run_full <= full;
          busy     <= 1'b1;
          success  <= 1'b0;
          fail     <= 1'b0;
          k        <= '0;
        end
        INIT: begin
          if (k == (RW+1)'(ROWS - 1)) begin
            phase    <= '0;
            blk      <= '0;
            piv_pass <= 1'b1;
            k        <= '0;
            nrows    <= (RW+1)'(ROWS);
            sl_clr   <= 1'b1;
            state    <= STREAM;
          end else k <= k + 1'b1;
        end
        STREAM: begin
          if (k < nrows) k <= k + 1'b1;
          else           state <= DRAIN;
        end
        DRAIN: if (!s1_v && !s2_v) begin
          state <= piv_pass ? CHECK : (run_full ? BACKSUB : WB);
          j     <= run_full ? PW'(S - 1) : '0;
        end
        CHECK: begin
          if (sl_fail) begin
            fail  <= 1'b1;
            state <= FINISH;
          end else begin
            state <= run_full ? BACKSUB : WB;
          end
        end
        BACKSUB: begin
          if (j == PW'(1) || S == 1) begin
            j     <= '0;
            state <= WB;
          end else j <= j - 1'b1;
        end
        WB: begin
          if (j == PW'(S - 1)) begin
            j     <= '0;
            state <= NEXTBLK;
          end else j <= j + 1'b1;
        end
        NEXTBLK: begin
          if (blk == last_blk) begin
            j     <= '0;
            state <= SWAP_A;
          end else begin
            blk      <= blk + 1'b1;
            piv_pass <= 1'b0;
            k        <= '0;
            sl_clr   <= 1'b1;
            state    <= STREAM;
          end
        end
        // swap logical rows a = pS + j and b = loc[j] in the row map
        SWAP_A: begin
          swap_a <= base + RW'(j);
          swap_b <= pm_loc;
          state  <= SWAP_B;
        end
        SWAP_B: state <= SWAP_C;        // reading rmap[a]
        SWAP_C: begin                    // reading rmap[b]; rmap_q = rmap[a]
          map_a <= rmap_q;
          state <= SWAP_D;
        end
        SWAP_D: state <= SWAP_E;        // rmap[a] <= rmap[b]
        SWAP_E: begin                    // rmap[b] <= old rmap[a]
          if (j == PW'(S - 1)) state <= NEXTPH;
          else begin
            j     <= j + 1'b1;
            state <= SWAP_A;
          end
        end
        NEXTPH: begin
          if (phase == BW'(NL - 1)) begin
            success <= 1'b1;
            state   <= FINISH;
          end else begin
            phase    <= phase + 1'b1;
            blk      <= phase + 1'b1;
            piv_pass <= 1'b1;
            k        <= '0;
            nrows    <= run_full ? (RW+1)'(ROWS) : (RW+1)'(ROWS) - (RW+1)'(base) - (RW+1)'(S);
            sl_clr   <= 1'b1;
            state    <= STREAM;
          end
        end
        FINISH: begin
          busy     <= 1'b0;
          done     <= 1'b1;
          piv_pass <= 1'b0;
          state    <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign pk_data  = dm_q;
  assign pk_valid = pk_s2;
endmodule
