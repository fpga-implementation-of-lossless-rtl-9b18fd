// ecg_pkg: widths, types and small shared functions of the lossless ECG
// compressor (adaptive linear prediction followed by Golomb-Rice coding and
// bit packing).
//
// Sizes that follow the source description: 11-bit samples, a 40-sample
// coding window held as 13-bit values, a 3-bit Golomb-Rice parameter k, a
// 26-bit packing register and 16-bit output words. The remaining widths are
// derived from those. The k selection rule is this design's own choice.
package ecg_pkg;

  localparam int unsigned SAMPLE_W = 11;  // ECG sample width
  localparam int unsigned MAP_W    = 13;  // stored (mapped) prediction error width
  localparam int unsigned K_W      = 3;   // Golomb-Rice parameter width
  localparam int unsigned PACK_W   = 26;  // packing register width
  localparam int unsigned OUT_W    = 16;  // output word width
  // Longest piece the packer accepts every cycle without overflowing:
  // PACK_W - (OUT_W - 1) bits.
  localparam int unsigned CHUNK_W  = PACK_W - OUT_W + 1;          // 11
  localparam int unsigned CLEN_W   = $clog2(CHUNK_W + 1);          // 4

  localparam int unsigned DIFF_W   = SAMPLE_W + 1;  // D1_2 .. D3_4
  localparam int unsigned PRED_W   = SAMPLE_W + 4;  // unclamped prediction
  localparam int unsigned ERR_W    = SAMPLE_W + 1;  // error after clamping

  typedef logic        [SAMPLE_W-1:0] sample_t;
  typedef logic signed [DIFF_W-1:0]   diff_t;
  typedef logic signed [PRED_W-1:0]   pred_t;
  typedef logic signed [ERR_W-1:0]    err_t;
  typedef logic        [MAP_W-1:0]    mapped_t;
  typedef logic        [K_W-1:0]      kparam_t;

  // Which prediction equation produced a prediction.
  typedef enum logic [1:0] {
    PSEL_P1 = 2'd0,   // x(n-1)
    PSEL_P2 = 2'd1,   // 2x(n-1) - x(n-2)
    PSEL_P3 = 2'd2    // 3x(n-1) - 3x(n-2) + x(n-3)
  } psel_e;

  // One item leaving the prediction stage: either the raw first sample of a
  // stream or a mapped prediction error.
  typedef struct packed {
    logic    first;  // value holds the raw first sample (low SAMPLE_W bits)
    logic    last;   // final item of the stream
    mapped_t value;
  } alp_item_t;

  // Golomb-Rice parameter of a window of n mapped errors summing to sum:
  // the smallest k (capped at 2**K_W-1) with n*2**k >= sum, computed with
  // shifts only.
  function automatic kparam_t select_k(input logic [31:0] sum,
                                       input logic [31:0] n);
    kparam_t k;
    k = kparam_t'((1 << K_W) - 1);
    for (int i = (1 << K_W) - 1; i >= 0; i--) begin
      if ((n << i) >= sum) k = kparam_t'(i);
    end
    return k;
  endfunction

endpackage
