// error_predictor: turns a prediction into the non-negative value the
// Golomb-Rice coder codes.
//
// The prediction is first clamped to the sample range 0..2**SAMPLE_W-1 (this
// design's choice; it keeps the error within SAMPLE_W+1 signed bits so the
// mapped value fits the 13-bit window register). The error e = x - pred is
// then checked by its sign bit, as the source description states, and mapped
// to M = 2e for e >= 0 and M = -2e-1 for e < 0 (the usual interleaving;
// the exact mapping is this design's choice).
// Purely combinational.
module error_predictor
  import ecg_pkg::*;
(
  input  sample_t x,       // current sample
  input  pred_t   pred,    // unclamped prediction
  output err_t    err,     // signed prediction error
  output logic    neg,     // sign bit of err
  output logic    clamped, // prediction lay outside the sample range
  output mapped_t mapped   // non-negative mapped error
);

  localparam pred_t PMAX = pred_t'((1 << SAMPLE_W) - 1);

  pred_t pc;
  pred_t e_wide;

  always_comb begin
    clamped = 1'b0;
    pc      = pred;
    if (pred[PRED_W-1]) begin
      pc      = '0;
      clamped = 1'b1;
    end else if (pred > PMAX) begin
      pc      = PMAX;
      clamped = 1'b1;
    end
    e_wide = pred_t'({1'b0, x}) - pc;
    err    = err_t'(e_wide);
    neg    = err[ERR_W-1];
    if (neg) mapped = mapped_t'((~e_wide) <<< 1) | mapped_t'(1);  // -2e-1
    else     mapped = mapped_t'(e_wide <<< 1);                    // 2e
  end

endmodule
