// tb_error_predictor: checks clamping, the signed error, its sign flag and
// the mapping to a non-negative value against the reference model, over
// the full range of predictions the predictors can produce.
module tb_error_predictor;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  logic clk = 1'b0;
  sample_t x;
  pred_t pred;
  err_t err;
  logic neg, clamped;
  mapped_t mapped;
  int checks = 0, failures = 0;

  error_predictor dut (.x(x), .pred(pred), .err(err), .neg(neg), .clamped(clamped),
                       .mapped(mapped));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input int xs, input int p);
    int e = xs - clampp(p);
    x = sample_t'(xs);
    pred = pred_t'(p);
    @(posedge clk);
    checks++;
    if (int'(err) != e || neg != (e < 0) || int'(mapped) != map_err(e) ||
        clamped != (p < 0 || p > SMAX)) begin
      failures++;
      $display("FAIL x=%0d pred=%0d: err=%0d neg=%0d clamped=%0d mapped=%0d", xs, p,
               int'(err), neg, clamped, int'(mapped));
    end
  endtask

  initial begin
    try(0, 0); try(2047, 0); try(0, 2047); try(2047, 2047);
    try(0, -4094); try(2047, 8188); try(100, 2048); try(100, -1);
    for (int i = 0; i < 4000; i++)
      try(int'($urandom % 2048), int'($urandom % 12283) - 4094);
    for (int i = 0; i < 2000; i++)
      try(int'($urandom % 2048), int'($urandom % 2048));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
