// FixedWeight: builds a random error vector e of length N and weight T.
//
// Random words from the SHAKE256 PRNG arrive on rnd_data (valid/ready).  Each
// word holds RNDW/SIGMA1 candidate fields of SIGMA1 bits, least significant
// field first; the index candidate d is the low MB bits of a field
// (d = sum of b_{sigma1*j+i} 2^i for i < m).  Range_Check keeps candidates
// d < N and writes the first T of them into int_RAM.  The block always draws
// NCHUNK fields, the number the random stream supplies (sigma1*t plus 512
// extra bits by default), so its running time does not depend on the data.
// OneGen then walks int_RAM: the address decoder splits each index into a
// word address and a bit position of e_RAM, reads the word, flags an error if
// the bit is already 1 (indices not distinct) and otherwise writes the word
// back with the bit set ("put 1 at the index").  e_RAM is cleared first.
// error = fewer than T candidates in range, or a repeated index: the caller
// restarts with fresh randomness, as the FIXEDWEIGHT algorithm prescribes.
// Interface: start pulse; busy; done pulses with error valid until the next
// start.  e is read through rd_e/e_addr, W-bit words, e_data one clock later
// (bit b of word w is e_{w*W+b}); reads are meant for when the block is idle.
// Timing: NW clear cycles, RNDW/SIGMA1 cycles per random word, 3 per index.
// The RAM split and the constant-time draw are this design's reading of the
// block diagram; the handshake is its own choice.
module fixed_weight
  import mce_pkg::*;
#(
  parameter int unsigned N      = MCE_N,
  parameter int unsigned T      = MCE_T,
  parameter int unsigned MB     = MCE_M,
  parameter int unsigned SIGMA1 = MCE_SIGMA1,
  parameter int unsigned NCHUNK = MCE_NCHUNK,
  parameter int unsigned RNDW   = 32,
  parameter int unsigned W      = MCE_S,
  localparam int unsigned NW    = (N + W - 1) / W,
  localparam int unsigned EAW   = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned TW    = $clog2(T + 1),
  localparam int unsigned IAW   = (T > 1) ? $clog2(T) : 1,
  localparam int unsigned FPW   = RNDW / SIGMA1,          // fields per word
  localparam int unsigned CW    = $clog2(NCHUNK + 1),
  localparam int unsigned BPW   = $clog2(W)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            rnd_valid,
  input  logic [RNDW-1:0] rnd_data,
  output logic            rnd_ready,
  output logic            busy,
  output logic            done,
  output logic            error,
  input  logic            rd_e,
  input  logic [EAW-1:0]  e_addr,
  output logic [W-1:0]    e_data
);
  typedef enum logic [2:0] {IDLE, CLEAR, DRAW, SPLIT, ONE_RD, ONE_CHK, ONE_WR, FIN} state_t;
  state_t state;

  logic [RNDW-1:0] word;
  logic [$clog2(FPW+1)-1:0] fld;
  logic [CW-1:0]   nchunk;
  logic [TW-1:0]   cnt;
  logic [IAW-1:0]  oi;
  logic [EAW-1:0]  clr_addr;

  // Range_Check
  logic [SIGMA1-1:0] field;
  logic [MB-1:0]     cand;
  logic              in_range;
  assign field    = word[SIGMA1*fld +: SIGMA1];
  assign cand     = field[MB-1:0];
  assign in_range = (int'(cand) < int'(N));

  // int_RAM
  logic          int_we;
  logic [MB-1:0] int_q;
  assign int_we = (state == SPLIT) && in_range && (cnt < TW'(T));
  ram_sdp #(.DW(MB), .DEPTH(T)) u_int_ram (
    .clk, .we(int_we), .waddr(IAW'(cnt)), .wdata(cand),
    .re(state == ONE_RD), .raddr(oi), .rdata(int_q)
  );

  // address decoder and e_RAM
  logic [EAW-1:0] dec_word;
  logic [BPW-1:0] dec_bit;
  assign dec_word = EAW'(int_q >> BPW);
  assign dec_bit  = int_q[BPW-1:0];

  logic          e_we, e_re;
  logic [EAW-1:0] e_waddr, e_raddr;
  logic [W-1:0]  e_wdata, e_q;
  logic [EAW-1:0] hold_word;
  logic [BPW-1:0] hold_bit;

  always_comb begin
    e_we    = 1'b0;
    e_waddr = clr_addr;
    e_wdata = '0;
    e_re    = rd_e && (state == IDLE);
    e_raddr = e_addr;
    if (state == CLEAR) begin
      e_we = 1'b1;
    end else if (state == ONE_CHK) begin
      e_re    = 1'b1;
      e_raddr = dec_word;
    end else if (state == ONE_WR) begin
      e_we    = 1'b1;
      e_waddr = hold_word;
      e_wdata = e_q | (W'(1) << hold_bit);
    end
  end

  ram_sdp #(.DW(W), .DEPTH(NW)) u_e_ram (
    .clk, .we(e_we), .waddr(e_waddr), .wdata(e_wdata),
    .re(e_re), .raddr(e_raddr), .rdata(e_q)
  );
  assign e_data = e_q;

  assign rnd_ready = (state == DRAW);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      word      <= '0;
      fld       <= '0;
      nchunk    <= '0;
      cnt       <= '0;
      oi        <= '0;
      clr_addr  <= '0;
      hold_word <= '0;
      hold_bit  <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      error     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          busy     <= 1'b1;
          error    <= 1'b0;
          cnt      <= '0;
          nchunk   <= '0;
          oi       <= '0;
          clr_addr <= '0;
          state    <= CLEAR;
        end
        CLEAR: begin
          if (clr_addr == EAW'(NW - 1)) state <= DRAW;
          clr_addr <= clr_addr + 1'b1;
        end
        DRAW: if (rnd_valid) begin
          word  <= rnd_data;
          fld   <= '0;
          state <= SPLIT;
        end
        SPLIT: begin
          if (int_we) cnt <= cnt + 1'b1;
          nchunk <= nchunk + 1'b1;
          if (nchunk == CW'(NCHUNK - 1)) begin
            state <= ONE_RD;
          end else if (fld == ($bits(fld))'(FPW - 1)) begin
            state <= DRAW;
          end else begin
            fld <= fld + 1'b1;
          end
        end
        ONE_RD: begin
          if (cnt < TW'(T)) begin
            error <= 1'b1;        // too few candidates in range
            state <= FIN;
          end else state <= ONE_CHK;
        end
        ONE_CHK: begin            // int_q valid: decode and read e_RAM
          hold_word <= dec_word;
          hold_bit  <= dec_bit;
          state     <= ONE_WR;
        end
        ONE_WR: begin             // e_q valid: check and set the bit
          if (e_q[hold_bit]) error <= 1'b1;
          if (oi == IAW'(T - 1)) state <= FIN;
          else begin
            oi    <= oi + 1'b1;
            state <= ONE_RD;
          end
        end
        FIN: begin
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
