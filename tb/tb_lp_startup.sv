// tb_lp_startup: checks the start-of-stream predictor for samples 1..3
// against the integer reference model.
module tb_lp_startup;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  logic clk = 1'b0;
  logic [1:0] index;
  sample_t x1, x2, x3;
  pred_t pred;
  psel_e sel;
  int checks = 0, failures = 0;

  lp_startup dut (.index(index), .x1(x1), .x2(x2), .x3(x3), .pred(pred), .sel(sel));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input int n, input int a1, a2, a3);
    intq_t h;
    int p;
    // h[n-1] = x(n-1), h[n-2] = x(n-2), ...
    if (n == 1) h = {a1, 0};
    else if (n == 2) h = {a2, a1, 0};
    else h = {a3, a2, a1, 0};
    p = predict_raw(h, n);
    index = 2'(n);
    x1 = sample_t'(a1); x2 = sample_t'(a2); x3 = sample_t'(a3);
    @(posedge clk);
    checks++;
    if (int'(pred) != p || int'(sel) + 1 != n) begin
      failures++;
      $display("FAIL n=%0d x=%0d %0d %0d: pred=%0d sel=%0d, expected %0d", n, a1, a2, a3,
               int'(pred), int'(sel), p);
    end
  endtask

  initial begin
    for (int n = 1; n <= 3; n++) begin
      try(n, 2047, 0, 2047);
      try(n, 0, 2047, 0);
      for (int i = 0; i < 500; i++)
        try(n, int'($urandom % 2048), int'($urandom % 2048), int'($urandom % 2048));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
