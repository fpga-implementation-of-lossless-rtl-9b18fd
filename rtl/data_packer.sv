// data_packer: packs the variable-length pieces of the Golomb-Rice stage
// into OUT_W-bit words (16 bits) through a PACK_W-bit temporary register
// (26 bits), both sizes as in the source description.
//
// Two controllers share the register, as the source describes. The output
// controller sends the oldest OUT_W bits as a word whenever OUT_W or more
// bits are held. The input controller appends the incoming piece behind
// the bits that remain after that. Bits are kept left-aligned (oldest at the
// top) and sent most significant first. Since at most OUT_W-1 bits remain
// after an output and a piece is at most PACK_W-OUT_W+1 bits, a piece is
// accepted every cycle and there is no input back-pressure. The output is
// assumed never to stall (this design's choice).
//
// End of stream: while flush is high and no piece arrives, full words are
// sent first; the last bits are then sent zero-padded to a full word, and
// flush_ack pulses for one cycle with or after that final word.
module data_packer
  import ecg_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [CHUNK_W-1:0] in_bits,
  input  logic [CLEN_W-1:0]  in_len,
  input  logic               flush,
  output logic               flush_ack,
  output logic               out_valid,
  output logic [OUT_W-1:0]   out_word,
  output logic [$clog2(PACK_W+1)-1:0] mon_fill  // bits held
);

  localparam int unsigned CW = $clog2(PACK_W + 1);

  logic [PACK_W-1:0] tmp;   // temporary register, oldest bit at the top
  logic [CW-1:0]     cnt;   // bits held

  logic              emit_full, emit_pad;
  logic [PACK_W-1:0] tmp_a, tmp_n;
  logic [CW-1:0]     cnt_a, cnt_n;
  logic [PACK_W-1:0] piece;

  assign mon_fill = cnt;

  always_comb begin
    // Output controller.
    emit_full = (cnt >= CW'(OUT_W));
    emit_pad  = !emit_full && flush && !in_valid && (cnt != '0);
    flush_ack = !emit_full && flush && !in_valid;
    out_valid = emit_full || emit_pad;
    out_word  = tmp[PACK_W-1 -: OUT_W];
    if (emit_full || emit_pad) begin
      tmp_a = tmp << OUT_W;
      cnt_a = emit_full ? cnt - CW'(OUT_W) : '0;
    end else begin
      tmp_a = tmp;
      cnt_a = cnt;
    end
    // Input controller.
    piece = PACK_W'(in_bits) & ((PACK_W'(1) << in_len) - PACK_W'(1));
    if (in_valid) begin
      tmp_n = tmp_a | (piece << (CW'(PACK_W) - cnt_a - CW'(in_len)));
      cnt_n = cnt_a + CW'(in_len);
    end else begin
      tmp_n = tmp_a;
      cnt_n = cnt_a;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmp <= '0;
      cnt <= '0;
    end else begin
      tmp <= tmp_n;
      cnt <= cnt_n;
    end
  end

  // A piece must always fit behind what remains after an output.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> (32'(cnt_a) + 32'(in_len) <= PACK_W));

endmodule
