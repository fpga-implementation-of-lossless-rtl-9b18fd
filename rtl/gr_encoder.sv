// gr_encoder: computing part of the Golomb-Rice coder.
//
// A mapped error M is coded with parameter k as the unary quotient
// U = M >> k (U ones closed by a zero) followed by the k-bit binary
// remainder V = M & (2**k - 1); division, modulo and powers are done by
// shifts and masks as the source description asks. A codeword goes out in
// pieces of at most CHUNK_W bits, the most the packer takes per cycle: while
// the ones still owed plus the closing zero and V do not fit, a piece of
// ones is sent (CHUNK_W of them, or all that remain when fewer); the piece
// that fits carries the rest. Splitting long codewords over cycles is this
// design's reading of the source's "operations separated into distinct clock
// cycles".
//
// Interface: cw_valid/cw_m/cw_k are held by the caller until cw_done, which
// is high in the cycle the final piece is offered. Each cycle with cw_valid
// offers one piece on chunk_*: the low chunk_len bits of chunk_bits, most
// significant first. The piece counts as sent only when chunk_take is high;
// otherwise the same piece is offered again next cycle.
module gr_encoder
  import ecg_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cw_valid,
  input  mapped_t            cw_m,
  input  kparam_t            cw_k,
  input  logic               chunk_take,
  output logic               cw_done,
  output logic               chunk_valid,
  output logic [CHUNK_W-1:0] chunk_bits,
  output logic [CLEN_W-1:0]  chunk_len,
  output logic               mon_split   // a piece of ones only was sent
);

  mapped_t q_sent;     // unary ones already sent for this codeword
  mapped_t q, q_rem, v;
  logic [CHUNK_W:0] ones;

  always_comb begin
    q     = cw_m >> cw_k;
    v     = cw_m & ((mapped_t'(1) << cw_k) - mapped_t'(1));
    q_rem = q - q_sent;
    chunk_valid = cw_valid;
    cw_done     = 1'b0;
    mon_split   = 1'b0;
    chunk_bits  = '0;
    chunk_len   = '0;
    ones        = '0;
    if (cw_valid) begin
      if (32'(q_rem) + 32'(cw_k) + 32'd1 <= 32'(CHUNK_W)) begin
        // ones, closing zero, remainder
        ones       = ((CHUNK_W + 1)'(1) << q_rem[CLEN_W-1:0]) - (CHUNK_W + 1)'(1);
        chunk_bits = CHUNK_W'((ones << (cw_k + 1)) | (CHUNK_W + 1)'(v));
        chunk_len  = CLEN_W'(q_rem) + CLEN_W'(cw_k) + CLEN_W'(1);
        cw_done    = 1'b1;
      end else if (q_rem >= mapped_t'(CHUNK_W)) begin
        chunk_bits = '1;
        chunk_len  = CLEN_W'(CHUNK_W);
        mon_split  = 1'b1;
      end else begin
        ones       = ((CHUNK_W + 1)'(1) << q_rem[CLEN_W-1:0]) - (CHUNK_W + 1)'(1);
        chunk_bits = CHUNK_W'(ones);
        chunk_len  = CLEN_W'(q_rem);
        mon_split  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                q_sent <= '0;
    else if (cw_valid && chunk_take && cw_done) q_sent <= '0;
    else if (cw_valid && chunk_take)            q_sent <= q_sent + mapped_t'(chunk_len);
  end

endmodule
