// Encode: computes the ciphertext part C0 = H e = [I | T] e over GF(2).
//
// The public key T ((n-k) x k bits) is streamed row-major in W-bit column
// blocks, one word per clock, so the module never holds more than one word
// of it (in contrast to a full-width design that buffers the key in
// column-major form).  Datapath, per clock: the key word is ANDed with the
// matching W bits of the right part of e, XOR-reduced to one bit, and that
// bit is XOR-accumulated over the k/W words of the row.  The finished row
// bit is shifted into a W-bit shift register; after W rows the register is
// XORed into RAM_Encode, which was first loaded with the left (identity)
// part of e, the first n-k bits.  RAM_Encode then holds C0.
// Interface: start pulse; busy; done pulses at the end.  The key is read
// through rd_pk/pk_addr (= row * k/W + word; pk_row and pk_word give the
// same address split up) and must arrive on public_key exactly PK_LAT clocks
// after rd_pk.  e is read through rd_e/e_addr with one clock of latency.
// C0 is read through rd_en_c/rd_addr_c, W bits per word, c0 one clock
// later, while the module is idle (bit b of word w is C0 bit w*W+b).
// Timing: MW + M*KW + PK_LAT + 3 clocks from start to done, with
// MW = (n-k)/W and KW = k/W; the row-major streaming and the 32-bit default
// word follow the described design, the exact handshake is this design's.
module encode
  import mce_pkg::*;
#(
  parameter int unsigned N      = MCE_N,
  parameter int unsigned M      = MCE_NK,
  parameter int unsigned W      = MCE_S,
  parameter int unsigned PK_LAT = 1,
  localparam int unsigned MW    = M / W,
  localparam int unsigned KW    = (N - M) / W,
  localparam int unsigned NW    = N / W,
  localparam int unsigned PAW   = $clog2(M * KW),
  localparam int unsigned RW    = $clog2(M),
  localparam int unsigned KWW   = (KW > 1) ? $clog2(KW) : 1,
  localparam int unsigned EAW   = $clog2(NW),
  localparam int unsigned CAW   = (MW > 1) ? $clog2(MW) : 1,
  localparam int unsigned SW    = (W > 1) ? $clog2(W) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  // public key stream
  output logic           rd_pk,
  output logic [PAW-1:0] pk_addr,
  output logic [RW-1:0]  pk_row,
  output logic [KWW-1:0] pk_word,
  input  logic [W-1:0]   public_key,
  // error vector
  output logic           rd_e,
  output logic [EAW-1:0] e_addr,
  input  logic [W-1:0]   e_data,
  // ciphertext read-out
  input  logic           rd_en_c,
  input  logic [CAW-1:0] rd_addr_c,
  output logic [W-1:0]   c0
);
  initial begin
    assert (M % W == 0 && (N - M) % W == 0 && PK_LAT >= 1)
      else $error("encode: n-k and k must be multiples of W");
  end

  typedef enum logic [1:0] {IDLE, LOADE, MAIN, FLUSH} state_t;
  state_t state;

  logic [CAW-1:0] le_cnt;        // LOADE word counter
  logic           le_v;          // LOADE data arriving
  logic [CAW-1:0] le_addr_q;
  logic [RW-1:0]  row;
  logic [KWW-1:0] wd;
  logic           issuing;
  logic [PAW-1:0] lin_addr;

  // issue pipeline: data of an issue arrives PK_LAT clocks later
  logic [PK_LAT-1:0] v_pipe;
  logic [PK_LAT-1:0] last_pipe;  // last word of a row
  logic [PK_LAT-1:0] blk_pipe;   // last row of a group of W rows
  logic [KWW-1:0]    wd_pipe  [PK_LAT];
  logic [CAW-1:0]    grp_pipe [PK_LAT];

  assign issuing = (state == MAIN);
  assign rd_pk   = issuing;
  assign pk_addr = lin_addr;
  assign pk_row  = row;
  assign pk_word = wd;

  // e read: LOADE reads words 0..MW-1; MAIN reads word MW+wd, issued so that
  // it arrives together with the key word (one clock of e latency)
  localparam int unsigned EI = (PK_LAT > 1) ? 1 : 0;   // pipe slot of e read
  always_comb begin
    rd_e   = 1'b0;
    e_addr = EAW'(le_cnt);
    if (state == LOADE) begin
      rd_e = 1'b1;
    end else if (PK_LAT == 1) begin
      rd_e   = issuing;
      e_addr = EAW'(MW) + EAW'(wd);
    end else begin
      rd_e   = v_pipe[EI];
      e_addr = EAW'(MW) + EAW'(wd_pipe[EI]);
    end
  end

  // arrival stage
  logic          arr_v, arr_last, arr_blk;
  logic [CAW-1:0] arr_grp;
  assign arr_v    = v_pipe[0];
  assign arr_last = last_pipe[0];
  assign arr_blk  = blk_pipe[0];
  assign arr_grp  = grp_pipe[0];

  logic          acc;
  logic          row_bit;
  logic [W-1:0]  sreg, sreg_next;
  assign row_bit   = acc ^ (^(public_key & e_data));
  assign sreg_next = {row_bit, sreg[W-1:1]};

  // RAM_Encode: read-modify-write of one word per W rows
  logic          rmw_v;
  logic [CAW-1:0] rmw_addr;
  logic [W-1:0]  rmw_sreg;
  logic          ce_we, ce_re;
  logic [CAW-1:0] ce_waddr, ce_raddr;
  logic [W-1:0]  ce_wdata, ce_q;

  always_comb begin
    ce_we    = 1'b0;
    ce_waddr = le_addr_q;
    ce_wdata = e_data;
    ce_re    = rd_en_c && (state == IDLE);
    ce_raddr = rd_addr_c;
    if (le_v) begin
      ce_we = 1'b1;
    end else if (rmw_v) begin
      ce_we    = 1'b1;
      ce_waddr = rmw_addr;
      ce_wdata = ce_q ^ rmw_sreg;
    end
    if (arr_v && arr_last && arr_blk) begin
      ce_re    = 1'b1;
      ce_raddr = arr_grp;
    end
  end

  ram_sdp #(.DW(W), .DEPTH(MW)) u_ram_encode (
    .clk, .we(ce_we), .waddr(ce_waddr), .wdata(ce_wdata),
    .re(ce_re), .raddr(ce_raddr), .rdata(ce_q)
  );
  assign c0 = ce_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      le_cnt    <= '0;
      le_v      <= 1'b0;
      le_addr_q <= '0;
      row       <= '0;
      wd        <= '0;
      lin_addr  <= '0;
      v_pipe    <= '0;
      last_pipe <= '0;
      blk_pipe  <= '0;
      for (int i = 0; i < int'(PK_LAT); i++) begin
        wd_pipe[i]  <= '0;
        grp_pipe[i] <= '0;
      end
      acc       <= 1'b0;
      sreg      <= '0;
      rmw_v     <= 1'b0;
      rmw_addr  <= '0;
      rmw_sreg  <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      // LOADE write stage (e arrives one clock after the read)
      le_v      <= (state == LOADE);
      le_addr_q <= le_cnt;
      // issue pipeline, shifting towards index 0
      for (int i = 0; i < int'(PK_LAT) - 1; i++) begin
        v_pipe[i]    <= v_pipe[i+1];
        last_pipe[i] <= last_pipe[i+1];
        blk_pipe[i]  <= blk_pipe[i+1];
        wd_pipe[i]   <= wd_pipe[i+1];
        grp_pipe[i]  <= grp_pipe[i+1];
      end
      v_pipe[PK_LAT-1]    <= issuing;
      last_pipe[PK_LAT-1] <= (wd == KWW'(KW - 1));
      blk_pipe[PK_LAT-1]  <= (row[SW-1:0] == SW'(W - 1)) || (W == 1);
      wd_pipe[PK_LAT-1]   <= wd;
      grp_pipe[PK_LAT-1]  <= CAW'(row >> SW);
      // arrival: accumulate the row bit, shift it in at the end of a row
      rmw_v <= 1'b0;
      if (arr_v) begin
        if (arr_last) begin
          acc  <= 1'b0;
          sreg <= sreg_next;
          if (arr_blk) begin
            rmw_v    <= 1'b1;
            rmw_addr <= arr_grp;
            rmw_sreg <= sreg_next;
          end
        end else begin
          acc <= row_bit;
        end
      end
      unique case (state)
        IDLE: if (start) begin
          busy   <= 1'b1;
          le_cnt <= '0;
          state  <= LOADE;
        end
        LOADE: begin
          if (le_cnt == CAW'(MW - 1)) begin
            row      <= '0;
            wd       <= '0;
            lin_addr <= '0;
            state    <= MAIN;
          end else le_cnt <= le_cnt + 1'b1;
        end
        MAIN: begin
          lin_addr <= lin_addr + 1'b1;
          if (wd == KWW'(KW - 1)) begin
            wd <= '0;
            if (row == RW'(M - 1)) state <= FLUSH;
            else row <= row + 1'b1;
          end else wd <= wd + 1'b1;
        end
        FLUSH: if (v_pipe == '0 && !rmw_v && !le_v) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
