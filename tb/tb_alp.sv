// tb_alp: streams of random and ECG-like samples go through the prediction
// stage with random input gaps and random downstream stalls. Every item
// leaving it is compared with the reference model (raw first sample, then
// mapped prediction errors, and the last flag). With the downstream always
// ready each sample must be taken every clock and leave one clock later.
module tb_alp;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, in_last = 1'b0;
  sample_t in_sample = '0;
  logic out_valid, out_ready = 1'b1;
  alp_item_t out_item;
  logic mon_adaptive, mon_neg, mon_clamped;
  psel_e mon_sel;
  int checks = 0, failures = 0;
  alp_item_t expq[$];
  bit stall_ready = 1'b0;
  int accepted_at = -10;

  alp dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
           .in_sample(in_sample), .in_last(in_last), .out_valid(out_valid),
           .out_ready(out_ready), .out_item(out_item), .mon_adaptive(mon_adaptive),
           .mon_sel(mon_sel), .mon_neg(mon_neg), .mon_clamped(mon_clamped));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Downstream: random stalls when enabled, compare on each transfer.
  always @(negedge clk) out_ready <= stall_ready ? ($urandom % 3 != 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) accepted_at = $time / 10;
    if (out_valid && out_ready) begin
      alp_item_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected item");
      end else begin
        e = expq.pop_front();
        if (out_item != e) begin
          failures++;
          $display("FAIL: item first=%0d last=%0d value=%0d, expected %0d %0d %0d",
                   out_item.first, out_item.last, out_item.value, e.first, e.last, e.value);
        end
      end
    end
  end

  // Latency: with no stalls, the item is on the output the cycle after.
  always @(posedge clk) if (rst_n && !stall_ready && accepted_at == $time / 10 - 1) begin
    checks++;
    if (!out_valid) begin
      failures++;
      $display("FAIL: no output one cycle after accepting a sample");
    end
  end

  task automatic stream(const ref intq_t x, input bit gaps);
    intq_t m = errors(x);
    for (int i = 0; i < x.size(); i++) begin
      alp_item_t e;
      e.first = (i == 0);
      e.last  = (i == x.size() - 1);
      e.value = (i == 0) ? mapped_t'(x[0]) : mapped_t'(m[i-1]);
      expq.push_back(e);
    end
    for (int i = 0; i < x.size(); i++) begin
      while (gaps && $urandom % 4 == 0) begin
        @(negedge clk); in_valid = 1'b0;
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_sample = sample_t'(x[i]);
      in_last = (i == x.size() - 1);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_last = 1'b0;
  endtask

  initial begin
    intq_t x;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 60; s++) begin
      int len;
      len = 1 + int'($urandom % 120);
      stall_ready = (s % 2 == 1);
      x = {};
      for (int i = 0; i < len; i++)
        x.push_back(s % 3 == 0 ? int'($urandom % 2048) : ecg_sample(i + s * 17, 150, int'($urandom % 7) - 3));
      stream(x, s % 4 == 2);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL: %0d items never came out", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
