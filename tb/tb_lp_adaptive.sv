// tb_lp_adaptive: random and corner-case check of the adaptive predictor
// against the integer reference model (prediction equation chosen and the
// prediction itself).
module tb_lp_adaptive;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  logic clk = 1'b0;
  sample_t x1, x2, x3, x4;
  pred_t pred;
  psel_e sel;
  int checks = 0, failures = 0;
  int seen[3] = '{0, 0, 0};

  lp_adaptive dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .pred(pred), .sel(sel));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input int a1, a2, a3, a4);
    intq_t h;
    int c, p;
    h = {a4, a3, a2, a1, 0};  // history, oldest first; slot 4 is predicted
    c = choose(h, 4);
    p = predict_raw(h, 4);
    x1 = sample_t'(a1); x2 = sample_t'(a2); x3 = sample_t'(a3); x4 = sample_t'(a4);
    @(posedge clk);
    checks++;
    if (int'(sel) + 1 != c || int'(pred) != p) begin
      failures++;
      $display("FAIL x=%0d %0d %0d %0d: sel=%0d pred=%0d, expected P%0d %0d",
               a1, a2, a3, a4, int'(sel) + 1, int'(pred), c, p);
    end
    seen[c-1]++;
  endtask

  initial begin
    try(0, 0, 0, 0);
    try(2047, 0, 2047, 0);
    try(0, 2047, 0, 2047);
    try(2047, 2047, 0, 0);
    try(10, 8, 6, 4);       // straight line: P2 exact
    try(16, 9, 4, 1);       // parabola: P3 exact
    try(0, 1023, 2047, 2047);
    for (int i = 0; i < 3000; i++) begin
      int b = int'($urandom % 2048);
      if (i % 2 == 0)
        try(int'($urandom % 2048), int'($urandom % 2048), int'($urandom % 2048), int'($urandom % 2048));
      else
        try(b, (b + int'($urandom % 9)) % 2048, (b + int'($urandom % 17)) % 2048, (b + int'($urandom % 33)) % 2048);
    end
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) begin
      failures++;
      $display("FAIL: not every predictor was chosen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
