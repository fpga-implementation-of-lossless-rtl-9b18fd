// lp_startup: linear predictor for the start of a stream, before four
// previous samples exist.
//
// The source description says the first four inputs are predicted
// differently from the rest and uses a separate predictor for them. Sample 0
// is sent raw, so this unit serves samples 1..3. This design uses the
// highest-order fixed predictor the available history allows: P1 for sample
// 1, P2 for sample 2 and P3 for sample 3.
// Purely combinational; pred is the unclamped signed prediction.
module lp_startup
  import ecg_pkg::*;
(
  input  logic [1:0] index,  // sample index within the stream, 1..3
  input  sample_t    x1,     // x(n-1)
  input  sample_t    x2,     // x(n-2), used from index 2
  input  sample_t    x3,     // x(n-3), used at index 3
  output pred_t      pred,
  output psel_e      sel
);

  pred_t p1, p2, p3;

  always_comb begin
    p1 = pred_t'({1'b0, x1});
    p2 = (p1 <<< 1) - pred_t'({1'b0, x2});
    p3 = (p1 <<< 1) + p1 - (pred_t'({1'b0, x2}) <<< 1) - pred_t'({1'b0, x2})
         + pred_t'({1'b0, x3});
    unique case (index)
      2'd2:    begin sel = PSEL_P2; pred = p2; end
      2'd3:    begin sel = PSEL_P3; pred = p3; end
      default: begin sel = PSEL_P1; pred = p1; end
    endcase
  end

endmodule
