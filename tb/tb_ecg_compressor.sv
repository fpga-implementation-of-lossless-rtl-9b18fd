// tb_ecg_compressor: end-to-end test of the lossless ECG compressor at its
// default parameters.
//
// Several streams are compressed back to back: a synthetic ECG record, a
// stream of exactly two windows, a single sample, a short stream, and a
// stress stream with flat stretches, spikes and rail-to-rail jumps. For each
// stream the 16-bit words are compared with the bit stream of the reference
// model, and the words are decoded back to the samples to show nothing is
// lost. Input gaps are inserted at random except in the ECG record, which is
// fed back to back to measure the input rate. Each mechanism of the design
// (both predictors, each prediction equation, negative errors, clamping,
// window headers sent alone and merged with a codeword, split codewords,
// input stalls, the end-of-stream drain)
// is counted and must occur.
module tb_ecg_compressor;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  localparam int WINDOW = 40;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, in_last = 1'b0;
  sample_t in_sample = '0;
  logic out_valid, out_done;
  logic [OUT_W-1:0] out_word;
  logic mon_adaptive, mon_neg, mon_clamped, mon_header, mon_hdr_merged, mon_split, mon_drain;
  psel_e mon_sel;
  kparam_t mon_k;

  int checks = 0, failures = 0;
  int n_adaptive = 0, n_startup = 0, n_p1 = 0, n_p2 = 0, n_p3 = 0;
  int n_merged = 0;
  int n_neg = 0, n_clamp = 0, n_header = 0, n_split = 0, n_stall = 0, n_drain = 0;
  bit k_seen[8];

  bitq_t got;        // bits received for the current stream
  bit    done_seen;

  ecg_compressor dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_sample(in_sample), .in_last(in_last), .out_valid(out_valid),
    .out_word(out_word), .out_done(out_done),
    .mon_adaptive(mon_adaptive), .mon_sel(mon_sel), .mon_neg(mon_neg),
    .mon_clamped(mon_clamped), .mon_header(mon_header), .mon_hdr_merged(mon_hdr_merged), .mon_k(mon_k),
    .mon_split(mon_split), .mon_drain(mon_drain)
  );

  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output collector and event counters.
  always @(posedge clk) if (rst_n) begin
    if (out_valid) for (int i = OUT_W - 1; i >= 0; i--) got.push_back(out_word[i]);
    if (out_done) done_seen = 1'b1;
    if (in_valid && in_ready) begin
      if (mon_adaptive) begin
        n_adaptive++;
        case (mon_sel)
          PSEL_P1: n_p1++;
          PSEL_P2: n_p2++;
          default: n_p3++;
        endcase
      end else n_startup++;
      if (mon_neg) n_neg++;
      if (mon_clamped) n_clamp++;
    end
    if (in_valid && !in_ready) n_stall++;
    if (mon_header) begin n_header++; k_seen[mon_k] = 1'b1; end
    if (mon_hdr_merged) n_merged++;
    if (mon_split) n_split++;
    if (mon_drain) n_drain++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Send one stream and check its compressed words.
  task automatic run_stream(const ref intq_t x, input bit gaps, input string name);
    bitq_t exp_bits;
    intq_t back;
    int t0, t1, acc;
    int bad = 0;
    got = {};
    done_seen = 1'b0;
    t0 = -1; t1 = 0; acc = 0;
    for (int i = 0; i < x.size(); i++) begin
      while (gaps && ($urandom % 4) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid  <= 1'b1;
      in_sample <= sample_t'(x[i]);
      in_last   <= (i == x.size() - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (t0 < 0) t0 = $time / 10;
      t1 = $time / 10;
      acc++;
    end
    in_valid <= 1'b0;
    in_last  <= 1'b0;
    while (!done_seen) @(posedge clk);
    @(posedge clk);
    exp_bits = encode(x, WINDOW);
    check(got.size() == exp_bits.size(),
          $sformatf("%s: %0d bits, expected %0d", name, got.size(), exp_bits.size()));
    for (int i = 0; i < exp_bits.size() && i < got.size(); i++)
      if (got[i] != exp_bits[i]) bad++;
    check(bad == 0, $sformatf("%s: %0d bits differ", name, bad));
    back = decode(got, x.size(), WINDOW);
    check(back == x, $sformatf("%s: decoded stream differs from input", name));
    $display("%s: %0d samples, %0d bits out, ratio %0.3f, %0d input cycles",
             name, x.size(), got.size(), real'(x.size() * 11) / real'(got.size()),
             t1 - t0 + 1);
    if (!gaps && x.size() > 100)
      // one sample per clock apart from window headers and split codewords
      check(real'(acc) / real'(t1 - t0 + 1) > 0.93,
            $sformatf("%s: input rate %0d samples in %0d cycles", name, acc, t1 - t0 + 1));
  endtask

  initial begin
    intq_t x;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1: synthetic ECG record, fed back to back
    x = {};
    for (int t = 0; t < 1000; t++) x.push_back(ecg_sample(t, 180, int'($urandom % 5) - 2));
    run_stream(x, 1'b0, "ecg");

    // 2: exactly two windows of errors
    x = {};
    for (int t = 0; t < 2 * WINDOW + 1; t++) x.push_back(ecg_sample(t + 50, 120, int'($urandom % 9) - 4));
    run_stream(x, 1'b1, "two_windows");

    // 3: a single sample
    x = {};
    x.push_back(1234);
    run_stream(x, 1'b1, "single");

    // 4: short stream, startup predictor only
    x = {};
    x.push_back(5); x.push_back(2000); x.push_back(3); x.push_back(7);
    run_stream(x, 1'b1, "short");

    // 5: stress: flat stretches, isolated spikes, rail jumps, random runs
    x = {};
    for (int t = 0; t < 300; t++) begin
      if (t % 97 == 50)          x.push_back(2047);
      else if (t % 97 == 51)     x.push_back(0);
      else if (t >= 200 && t < 240) x.push_back(int'($urandom % 2048));
      else if (t % 43 == 20)     x.push_back(1500);
      else                       x.push_back(600 + (t / 60));
    end
    run_stream(x, 1'b1, "stress");

    // 6: an ECG record again after all that, with gaps
    x = {};
    for (int t = 0; t < 257; t++) x.push_back(ecg_sample(t, 200, int'($urandom % 3) - 1));
    run_stream(x, 1'b1, "ecg_gaps");

    $display("events: startup=%0d adaptive=%0d P1=%0d P2=%0d P3=%0d neg=%0d clamp=%0d header=%0d (merged %0d) split=%0d stall=%0d drain=%0d",
             n_startup, n_adaptive, n_p1, n_p2, n_p3, n_neg, n_clamp, n_header, n_merged,
             n_split, n_stall, n_drain);
    check(n_startup > 0, "startup predictor never used");
    check(n_adaptive > 0, "adaptive predictor never used");
    check(n_p1 > 0, "P1 never chosen");
    check(n_p2 > 0, "P2 never chosen");
    check(n_p3 > 0, "P3 never chosen");
    check(n_neg > 0, "no negative error");
    check(n_clamp > 0, "prediction never clamped");
    check(n_header > 0, "no window header");
    check(n_merged > 0, "no header merged with a codeword");
    check(n_header > n_merged, "no header sent on its own");
    check(n_split > 0, "no split codeword");
    check(n_stall > 0, "input never stalled");
    check(n_drain > 0, "no end-of-stream drain");
    check(k_seen.sum() with (int'(item)) >= 3, "fewer than three k values seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
