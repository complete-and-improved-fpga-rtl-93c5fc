// Constant-time comparison of a stored word stream with a recomputed one.
//
// During decapsulation the hash C1 that arrived with the ciphertext (held in
// RAM_C1) is compared with the value recomputed by SHAKE256 from the
// re-encryption.  This block reads the stored words itself (rd_en/rd_addr,
// data one clock later) in step with the incoming words (in_valid/in_data),
// ORs the XOR of each pair into a difference flag and never stops early, so
// the time taken does not depend on where the streams differ.  After LEN
// words done pulses and equal is valid until the next start.
// The comparison itself is named by the design; streaming it word by word
// against the RAM is this implementation's choice.
module ct_compare #(
  parameter int unsigned W   = 32,
  parameter int unsigned LEN = 8,
  localparam int unsigned AW = (LEN > 1) ? $clog2(LEN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          in_valid,
  input  logic [W-1:0]  in_data,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  logic [W-1:0]  rd_data,
  output logic          done,
  output logic          equal
);
  logic          active, cmp_v, last_q;
  logic [AW-1:0] cnt;
  logic [W-1:0]  in_q;
  logic          diff;

  assign rd_en   = active && in_valid;
  assign rd_addr = cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cmp_v  <= 1'b0;
      last_q <= 1'b0;
      cnt    <= '0;
      in_q   <= '0;
      diff   <= 1'b0;
      done   <= 1'b0;
      equal  <= 1'b0;
    end else begin
      done  <= 1'b0;
      cmp_v <= rd_en;
      in_q  <= in_data;
      last_q <= rd_en && (cnt == AW'(LEN - 1));
      if (start) begin
        active <= 1'b1;
        cnt    <= '0;
        diff   <= 1'b0;
        equal  <= 1'b0;
      end else if (rd_en) begin
        cnt <= cnt + 1'b1;
        if (cnt == AW'(LEN - 1)) active <= 1'b0;
      end
      if (cmp_v) begin
        if (last_q) begin
          equal <= !(diff || (in_q != rd_data));
          done  <= 1'b1;
        end
        diff <= diff || (in_q != rd_data);
      end
    end
  end
endmodule
