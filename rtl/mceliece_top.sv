// Classic McEliece hardware core: public-key systemizer, encapsulation
// datapath and decapsulation helpers.
//
// Key generation: the parity-check matrix H (produced outside from the
// Goppa polynomial and support) is written into the HEA systemizer, which
// checks the left square part (sys_full = 0, early abort) and, after H has
// been written again, brings it to [I | T] (sys_full = 1).  T, the public
// key, stays in the systemizer memory and can be read on the pk_* port.
// Encapsulation: encap_start runs FixedWeight on the random words supplied
// on rnd_* (the SHAKE256 output) and, if a valid weight-t vector e resulted,
// runs Encode, which streams T straight out of the systemizer memory and e
// out of FixedWeight's e_RAM and leaves C0 = [I | T] e in RAM_Encode
// (read on c0_*).  encap_done pulses with encap_error set when FixedWeight
// failed; the caller then restarts with fresh randomness.
// Decapsulation helpers: error_index_scan lists the nonzero positions of a
// recovered e supplied on e_rec_* (the Goppa decoder is outside this core),
// and ct_compare checks the C1 words stored in RAM_C1 (c1_* write port)
// against a recomputed stream on cmp_*.
// SHAKE256, the hash processor, the matrix generator and the Goppa decoder
// are not part of this core; their data paths appear as ports.
// Timing: see the individual blocks; Encode reads the systemizer's public
// key port with its two clocks of latency (PK_LAT = 2).  The external pk_*
// port may only be used while no encapsulation is running.
module mceliece_top
  import mce_pkg::*;
#(
  parameter int unsigned ROWS   = MCE_NK,
  parameter int unsigned COLS   = MCE_N,
  parameter int unsigned S      = MCE_S,
  parameter int unsigned T      = MCE_T,
  parameter int unsigned MB     = MCE_M,
  parameter int unsigned SIGMA1 = MCE_SIGMA1,
  parameter int unsigned NCHUNK = MCE_NCHUNK,
  parameter int unsigned RNDW   = 32,
  parameter int unsigned C1LEN  = 8,          // 256-bit C1 in 32-bit words
  localparam int unsigned NB    = (COLS + S - 1) / S,
  localparam int unsigned NL    = ROWS / S,
  localparam int unsigned KB    = NB - NL,
  localparam int unsigned RW    = $clog2(ROWS),
  localparam int unsigned BW    = $clog2(NB),
  localparam int unsigned KBW   = (KB > 1) ? $clog2(KB) : 1,
  localparam int unsigned EAW   = $clog2(NB),
  localparam int unsigned CAW   = (NL > 1) ? $clog2(NL) : 1,
  localparam int unsigned IW    = $clog2(COLS),
  localparam int unsigned IAW   = (T > 1) ? $clog2(T) : 1,
  localparam int unsigned C1AW  = (C1LEN > 1) ? $clog2(C1LEN) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // key generation: systemizer
  input  logic            mat_we,
  input  logic [BW-1:0]   mat_blk,
  input  logic [RW-1:0]   mat_row,
  input  logic [S-1:0]    mat_data,
  input  logic            sys_start,
  input  logic            sys_full,
  output logic            sys_busy,
  output logic            sys_done,
  output logic            sys_success,
  output logic            sys_fail,
  input  logic            pk_rd,
  input  logic [RW-1:0]   pk_row,
  input  logic [KBW-1:0]  pk_word,
  output logic [S-1:0]    pk_data,
  output logic            pk_valid,
  // encapsulation
  input  logic            encap_start,
  input  logic            rnd_valid,
  input  logic [RNDW-1:0] rnd_data,
  output logic            rnd_ready,
  output logic            encap_busy,
  output logic            encap_done,
  output logic            encap_error,
  input  logic            c0_rd,
  input  logic [CAW-1:0]  c0_addr,
  output logic [S-1:0]    c0_data,
  // decapsulation: index scan of the recovered error vector
  input  logic            scan_start,
  output logic            e_rec_rd,
  output logic [EAW-1:0]  e_rec_addr,
  input  logic [S-1:0]    e_rec_data,
  output logic            scan_busy,
  output logic            scan_done,
  output logic            scan_weight_ok,
  output logic            idx_we,
  output logic [IAW-1:0]  idx_addr,
  output logic [IW-1:0]   idx_data,
  // decapsulation: C1 store and constant-time compare
  input  logic            c1_we,
  input  logic [C1AW-1:0] c1_addr,
  input  logic [RNDW-1:0] c1_wdata,
  input  logic            cmp_start,
  input  logic            cmp_valid,
  input  logic [RNDW-1:0] cmp_data,
  output logic            cmp_done,
  output logic            cmp_equal
);
  // ------------------------------------------------------------ systemizer
  logic           sys_pk_rd;
  logic [RW-1:0]  sys_pk_row;
  logic [KBW-1:0] sys_pk_word;
  logic [S-1:0]   sys_pk_data;
  logic           sys_pk_valid;

  logic           enc_busy;
  logic           enc_rd_pk;
  logic [RW-1:0]  enc_pk_row;
  logic [KBW-1:0] enc_pk_word;

  assign sys_pk_rd   = enc_busy ? enc_rd_pk   : pk_rd;
  assign sys_pk_row  = enc_busy ? enc_pk_row  : pk_row;
  assign sys_pk_word = enc_busy ? enc_pk_word : pk_word;
  assign pk_data     = sys_pk_data;
  assign pk_valid    = sys_pk_valid && !enc_busy;

  hea_systemizer #(.ROWS(ROWS), .COLS(COLS), .S(S)) u_systemizer (
    .clk, .rst_n,
    .mat_we, .mat_blk, .mat_row, .mat_data,
    .start(sys_start), .full(sys_full), .busy(sys_busy), .done(sys_done),
    .success(sys_success), .fail(sys_fail),
    .pk_rd(sys_pk_rd), .pk_row(sys_pk_row), .pk_word(sys_pk_word),
    .pk_data(sys_pk_data), .pk_valid(sys_pk_valid)
  );

  // ------------------------------------------------------------ encapsulation
  typedef enum logic [1:0] {E_IDLE, E_FW, E_ENC} encap_state_t;
  encap_state_t est;

  logic           fw_start, fw_busy, fw_done, fw_error;
  logic           enc_start, enc_done;
  logic           fw_rd_e;
  logic [EAW-1:0] fw_e_addr;
  logic [S-1:0]   fw_e_data;
  logic [$clog2(ROWS * KB)-1:0] enc_pk_addr;

  fixed_weight #(
    .N(COLS), .T(T), .MB(MB), .SIGMA1(SIGMA1), .NCHUNK(NCHUNK),
    .RNDW(RNDW), .W(S)
  ) u_fixed_weight (
    .clk, .rst_n, .start(fw_start),
    .rnd_valid, .rnd_data, .rnd_ready,
    .busy(fw_busy), .done(fw_done), .error(fw_error),
    .rd_e(fw_rd_e), .e_addr(fw_e_addr), .e_data(fw_e_data)
  );

  encode #(.N(COLS), .M(ROWS), .W(S), .PK_LAT(2)) u_encode (
    .clk, .rst_n, .start(enc_start), .busy(enc_busy), .done(enc_done),
    .rd_pk(enc_rd_pk), .pk_addr(enc_pk_addr), .pk_row(enc_pk_row),
    .pk_word(enc_pk_word), .public_key(sys_pk_data),
    .rd_e(fw_rd_e), .e_addr(fw_e_addr), .e_data(fw_e_data),
    .rd_en_c(c0_rd), .rd_addr_c(c0_addr), .c0(c0_data)
  );

  // Control logic of encapsulation: FixedWeight, then Encode
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est         <= E_IDLE;
      fw_start    <= 1'b0;
      enc_start   <= 1'b0;
      encap_done  <= 1'b0;
      encap_error <= 1'b0;
    end else begin
      fw_start   <= 1'b0;
      enc_start  <= 1'b0;
      encap_done <= 1'b0;
      unique case (est)
        E_IDLE: if (encap_start) begin
          encap_error <= 1'b0;
          fw_start    <= 1'b1;
          est         <= E_FW;
        end
        E_FW: if (fw_done) begin
          if (fw_error) begin
            encap_error <= 1'b1;
            encap_done  <= 1'b1;
            est         <= E_IDLE;
          end else begin
            enc_start <= 1'b1;
            est       <= E_ENC;
          end
        end
        E_ENC: if (enc_done) begin
          encap_done <= 1'b1;
          est        <= E_IDLE;
        end
        default: est <= E_IDLE;
      endcase
    end
  end
  assign encap_busy = (est != E_IDLE);

  // ------------------------------------------------------------ decapsulation

  error_index_scan #(.N(COLS), .T(T), .W(S)) u_scan (
    .clk, .rst_n, .start(scan_start), .busy(scan_busy), .done(scan_done),
    .weight_ok(scan_weight_ok),
    .rd_e(e_rec_rd), .e_addr(e_rec_addr), .e_data(e_rec_data),
    .idx_we, .idx_addr, .idx_data
  );

  logic            c1_rd;
  logic [C1AW-1:0] c1_raddr;
  logic [RNDW-1:0] c1_rdata;
  ram_sdp #(.DW(RNDW), .DEPTH(C1LEN)) u_ram_c1 (
    .clk, .we(c1_we), .waddr(c1_addr), .wdata(c1_wdata),
    .re(c1_rd), .raddr(c1_raddr), .rdata(c1_rdata)
  );

  ct_compare #(.W(RNDW), .LEN(C1LEN)) u_compare (
    .clk, .rst_n, .start(cmp_start), .in_valid(cmp_valid), .in_data(cmp_data),
    .rd_en(c1_rd), .rd_addr(c1_raddr), .rd_data(c1_rdata),
    .done(cmp_done), .equal(cmp_equal)
  );
endmodule
