// ecg_compressor: lossless ECG compressor, top level.
//
// 11-bit ECG samples enter one per clock. The adaptive linear prediction
// stage (alp) turns each sample into a prediction error mapped to a
// non-negative value; the Golomb-Rice stage (golomb_rice) codes the values
// in windows of WINDOW with a per-window parameter k; the packer
// (data_packer) gathers the codes into 16-bit words. This chain is the one
// of the source description. A compressed stream is: the first sample raw
// (11 bits), then per window a 3-bit k followed by the Golomb-Rice codes of
// its values (q ones, a zero, k remainder bits), zero-padded at the end to a
// whole word.
//
// Interface: in_valid/in_ready/in_sample with in_last on the final sample
// of a stream. out_valid marks each 16-bit word (no back-pressure);
// out_done pulses once the last word of a stream has left. in_ready drops
// while a window header or a long codeword takes extra cycles, and during
// the drain at the end of a stream. The mon_* outputs expose internal
// events for monitoring.
module ecg_compressor
  import ecg_pkg::*;
#(
  parameter int unsigned WINDOW = 40
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  sample_t          in_sample,
  input  logic             in_last,
  output logic             out_valid,
  output logic [OUT_W-1:0] out_word,
  output logic             out_done,
  // monitoring
  output logic             mon_adaptive,
  output psel_e            mon_sel,
  output logic             mon_neg,
  output logic             mon_clamped,
  output logic             mon_header,
  output logic             mon_hdr_merged,
  output kparam_t          mon_k,
  output logic             mon_split,
  output logic             mon_drain
);

  logic      a_valid, a_ready;
  alp_item_t a_item;

  logic               c_valid, c_flush, flush_ack;
  logic [CHUNK_W-1:0] c_bits;
  logic [CLEN_W-1:0]  c_len;
  logic [$clog2(PACK_W+1)-1:0] fill;

  alp u_alp (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_sample(in_sample),
    .in_last(in_last),
    .out_valid(a_valid), .out_ready(a_ready), .out_item(a_item),
    .mon_adaptive(mon_adaptive), .mon_sel(mon_sel), .mon_neg(mon_neg),
    .mon_clamped(mon_clamped)
  );

  golomb_rice #(.DEPTH(WINDOW)) u_gr (
    .clk(clk), .rst_n(rst_n),
    .s_valid(a_valid), .s_ready(a_ready), .s_item(a_item),
    .c_valid(c_valid), .c_bits(c_bits), .c_len(c_len),
    .c_flush(c_flush), .flush_ack(flush_ack),
    .mon_header(mon_header), .mon_hdr_merged(mon_hdr_merged), .mon_k(mon_k), .mon_split(mon_split),
    .mon_drain(mon_drain)
  );

  data_packer u_pack (
    .clk(clk), .rst_n(rst_n),
    .in_valid(c_valid), .in_bits(c_bits), .in_len(c_len),
    .flush(c_flush), .flush_ack(flush_ack),
    .out_valid(out_valid), .out_word(out_word), .mon_fill(fill)
  );

  assign out_done = flush_ack;

endmodule
