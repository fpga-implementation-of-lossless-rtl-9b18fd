// alp: adaptive linear prediction stage with its control unit.
//
// The control unit counts the samples of a stream and keeps the four most
// recent samples. Sample 0 is passed on raw (it heads the bit stream);
// samples 1..3 are predicted by lp_startup and every later sample by
// lp_adaptive, as the source description splits the work between two
// predictors. The selected prediction goes to error_predictor, whose mapped
// error is registered in the output stage. A sample flagged in_last ends the
// stream; the next sample starts a new one.
//
// Interface: valid/ready on both sides (this design's choice). One sample is
// accepted per clock while the downstream stage is ready; the result appears
// on the output register one cycle later. The predictor selection and
// clamping of the accepted sample are exported for monitoring.
module alp
  import ecg_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // sample input
  input  logic      in_valid,
  output logic      in_ready,
  input  sample_t   in_sample,
  input  logic      in_last,
  // prediction error output
  output logic      out_valid,
  input  logic      out_ready,
  output alp_item_t out_item,
  // monitoring of the sample accepted this cycle
  output logic      mon_adaptive,  // adaptive predictor in use
  output psel_e     mon_sel,       // equation chosen
  output logic      mon_neg,       // negative prediction error
  output logic      mon_clamped    // prediction clamped to the sample range
);

  logic [2:0] count;               // samples seen in this stream, saturates at 4
  sample_t    x1, x2, x3, x4;      // x(n-1) .. x(n-4)

  pred_t   pred_s, pred_a, pred;
  psel_e   sel_s, sel_a;
  err_t    err;
  mapped_t mapped;
  logic    neg, clamped;
  logic    accept;

  lp_startup u_startup (
    .index(count[1:0]), .x1(x1), .x2(x2), .x3(x3), .pred(pred_s), .sel(sel_s)
  );

  lp_adaptive u_adaptive (
    .x1(x1), .x2(x2), .x3(x3), .x4(x4), .pred(pred_a), .sel(sel_a)
  );

  // Control: select the linear predictor for the current position.
  always_comb begin
    mon_adaptive = (count == 3'd4);
    pred         = mon_adaptive ? pred_a : pred_s;
    mon_sel      = mon_adaptive ? sel_a  : sel_s;
  end

  error_predictor u_err (
    .x(in_sample), .pred(pred), .err(err), .neg(neg), .clamped(clamped),
    .mapped(mapped)
  );

  assign mon_neg     = neg && (count != 3'd0);
  assign mon_clamped = clamped && (count != 3'd0);

  assign in_ready = !out_valid || out_ready;
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      x1        <= '0;
      x2        <= '0;
      x3        <= '0;
      x4        <= '0;
      out_valid <= 1'b0;
      out_item  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (accept) begin
        out_valid      <= 1'b1;
        out_item.first <= (count == 3'd0);
        out_item.last  <= in_last;
        out_item.value <= (count == 3'd0) ? mapped_t'(in_sample) : mapped;
        x1 <= in_sample;
        x2 <= x1;
        x3 <= x2;
        x4 <= x3;
        if (in_last)             count <= '0;
        else if (count != 3'd4)  count <= count + 3'd1;
      end
    end
  end

endmodule
