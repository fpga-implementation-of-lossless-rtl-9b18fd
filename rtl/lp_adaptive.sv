// lp_adaptive: adaptive linear predictor used once four previous samples are
// known.
//
// From the four previous samples x(n-1)..x(n-4) it forms the differences
//   D1_2 = x(n-1)-x(n-2), D1_3 = x(n-1)-x(n-3),
//   D2_3 = x(n-2)-x(n-3), D3_4 = x(n-3)-x(n-4)
// and the three fixed predictors
//   P1 = x(n-1), P2 = 2x(n-1)-x(n-2), P3 = 3x(n-1)-3x(n-2)+x(n-3),
// all as in the source description, using shifts and adds only.
// The rule that picks one predictor is this design's own: each predictor is
// applied one step back (predicting x(n-1) from the older samples), which
// gives backward errors D1_2, 2*D1_2-D1_3 and D1_2-2*D2_3+D3_4; the one with
// the smallest magnitude wins, ties going to the lower order.
// Purely combinational; pred is the unclamped signed prediction.
module lp_adaptive
  import ecg_pkg::*;
(
  input  sample_t x1,   // x(n-1)
  input  sample_t x2,   // x(n-2)
  input  sample_t x3,   // x(n-3)
  input  sample_t x4,   // x(n-4)
  output pred_t   pred,
  output psel_e   sel
);

  diff_t d12, d13, d23, d34;
  pred_t be1, be2, be3;       // backward errors of P1..P3
  pred_t a1, a2, a3;          // their magnitudes
  pred_t p1, p2, p3;

  always_comb begin
    d12 = diff_t'({1'b0, x1}) - diff_t'({1'b0, x2});
    d13 = diff_t'({1'b0, x1}) - diff_t'({1'b0, x3});
    d23 = diff_t'({1'b0, x2}) - diff_t'({1'b0, x3});
    d34 = diff_t'({1'b0, x3}) - diff_t'({1'b0, x4});

    be1 = pred_t'(d12);
    be2 = (pred_t'(d12) <<< 1) - pred_t'(d13);
    be3 = pred_t'(d12) - (pred_t'(d23) <<< 1) + pred_t'(d34);
    a1  = be1[PRED_W-1] ? -be1 : be1;
    a2  = be2[PRED_W-1] ? -be2 : be2;
    a3  = be3[PRED_W-1] ? -be3 : be3;

    p1 = pred_t'({1'b0, x1});
    p2 = p1 + pred_t'(d12);                         // 2x1 - x2
    p3 = p1 + (pred_t'(d12) <<< 1) - pred_t'(d23);  // 3x1 - 3x2 + x3

    if (a1 <= a2 && a1 <= a3) begin
      sel  = PSEL_P1;
      pred = p1;
    end else if (a2 <= a3) begin
      sel  = PSEL_P2;
      pred = p2;
    end else begin
      sel  = PSEL_P3;
      pred = p3;
    end
  end

endmodule
