// ReEncrypt index scan: packs the positions of the nonzero bits of e.
//
// After decoding, decapsulation must confirm that the recovered e has weight
// t and that H e equals the received syndrome.  Rather than multiplying by
// the full key, the design scans e once and lists the indexes of its nonzero
// bits (error_bits_indexes); the syndrome unit of the decoder can then be
// reused with that list to form H(2) e.  This block is the scanner.
// It reads e in W-bit words (rd_e/e_addr, data one clock later) and walks
// all N bit positions, one per clock, whatever the data, so its timing does
// not depend on e.  Each 1 found while fewer than T have been seen is written
// to the index list (idx_we/idx_addr/idx_data).  At the end done pulses and
// weight_ok tells whether exactly T ones were present.
// Timing: NW * (W + 1) + 1 clocks from start to done, NW = N/W words.
// The constant-time walk and the port details are this design's choices.
module error_index_scan
  import mce_pkg::*;
#(
  parameter int unsigned N  = MCE_N,
  parameter int unsigned T  = MCE_T,
  parameter int unsigned W  = MCE_S,
  localparam int unsigned NW  = (N + W - 1) / W,
  localparam int unsigned EAW = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned IW  = $clog2(N),
  localparam int unsigned TW  = $clog2(T + 1),
  localparam int unsigned IAW = (T > 1) ? $clog2(T) : 1,
  localparam int unsigned BW  = (W > 1) ? $clog2(W) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic           weight_ok,
  output logic           rd_e,
  output logic [EAW-1:0] e_addr,
  input  logic [W-1:0]   e_data,
  output logic           idx_we,
  output logic [IAW-1:0] idx_addr,
  output logic [IW-1:0]  idx_data
);
  typedef enum logic [1:0] {IDLE, RD, BITS, FIN} state_t;
  state_t state;

  logic [EAW-1:0] wa;
  logic [BW-1:0]  b;
  logic [W-1:0]   word;
  logic           have;      // word register loaded from e_data
  logic [TW-1:0]  cnt;
  logic [IW:0]    pos;
  logic           bit_now;

  assign rd_e     = (state == RD);
  assign e_addr   = wa;
  assign bit_now  = have ? e_data[b] : word[b];
  assign idx_we   = (state == BITS) && bit_now && (pos < (IW+1)'(N)) && (cnt < TW'(T));
  assign idx_addr = IAW'(cnt);
  assign idx_data = IW'(pos);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      wa        <= '0;
      b         <= '0;
      word      <= '0;
      have      <= 1'b0;
      cnt       <= '0;
      pos       <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      weight_ok <= 1'b0;
    end else begin
      done <= 1'b0;
      have <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          busy      <= 1'b1;
          weight_ok <= 1'b0;
          wa        <= '0;
          cnt       <= '0;
          pos       <= '0;
          state     <= RD;
        end
        RD: begin
          have  <= 1'b1;
          b     <= '0;
          state <= BITS;
        end
        BITS: begin
          if (have) word <= e_data;
          if (bit_now && pos < (IW+1)'(N) && cnt != '1) cnt <= cnt + 1'b1;
          pos <= pos + 1'b1;
          if (b == BW'(W - 1) || W == 1) begin
            if (wa == EAW'(NW - 1)) state <= FIN;
            else begin
              wa    <= wa + 1'b1;
              state <= RD;
            end
          end else b <= b + 1'b1;
        end
        FIN: begin
          weight_ok <= (cnt == TW'(T));
          busy      <= 1'b0;
          done      <= 1'b1;
          state     <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
