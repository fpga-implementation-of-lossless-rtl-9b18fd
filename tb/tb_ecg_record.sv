// tb_ecg_record: compresses one minute of a synthetic 11-bit ECG sampled at
// 360 Hz (21,600 samples, 72 beats per minute, small noise) through the
// default-size compressor, fed back to back. The output must match the
// reference bit stream and decode to the input; the compression ratio and
// the input rate (samples per clock) are reported, and the rate must stay
// above 0.93 since only window headers and long codewords cost extra cycles.
module tb_ecg_record;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  localparam int WINDOW  = 40;
  localparam int NSAMP   = 21600;
  localparam int PERIOD  = 300;

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
  bitq_t got;
  bit done_seen = 1'b0;

  ecg_compressor dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_sample(in_sample), .in_last(in_last), .out_valid(out_valid),
    .out_word(out_word), .out_done(out_done),
    .mon_adaptive(mon_adaptive), .mon_sel(mon_sel), .mon_neg(mon_neg),
    .mon_clamped(mon_clamped), .mon_header(mon_header), .mon_hdr_merged(mon_hdr_merged), .mon_k(mon_k),
    .mon_split(mon_split), .mon_drain(mon_drain)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid) for (int i = OUT_W - 1; i >= 0; i--) got.push_back(out_word[i]);
    if (out_done) done_seen = 1'b1;
  end

  initial begin
    intq_t x, back;
    bitq_t exp_bits;
    int t0, t1, bad;
    for (int t = 0; t < NSAMP; t++) x.push_back(ecg_sample(t, PERIOD, int'($urandom % 5) - 2));
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    t0 = -1; t1 = 0;
    for (int i = 0; i < NSAMP; i++) begin
      in_valid  <= 1'b1;
      in_sample <= sample_t'(x[i]);
      in_last   <= (i == NSAMP - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (t0 < 0) t0 = int'($time / 10);
      t1 = int'($time / 10);
    end
    in_valid <= 1'b0;
    in_last  <= 1'b0;
    while (!done_seen) @(posedge clk);
    @(posedge clk);
    exp_bits = encode(x, WINDOW);
    bad = 0;
    for (int i = 0; i < exp_bits.size() && i < got.size(); i++) if (got[i] != exp_bits[i]) bad++;
    checks++;
    if (got.size() != exp_bits.size() || bad != 0) begin
      failures++;
      $display("FAIL: %0d bits out, expected %0d, %0d differ", got.size(), exp_bits.size(), bad);
    end
    back = decode(got, NSAMP, WINDOW);
    checks++;
    if (back != x) begin
      failures++;
      $display("FAIL: decoded record differs from input");
    end
    $display("record: %0d samples, %0d bits in, %0d bits out, compression ratio %0.3f",
             NSAMP, NSAMP * SAMPLE_W, got.size(), real'(NSAMP * SAMPLE_W) / real'(got.size()));
    $display("input: %0d samples in %0d cycles (%0.4f per cycle)", NSAMP, t1 - t0 + 1,
             real'(NSAMP) / real'(t1 - t0 + 1));
    checks++;
    if (real'(NSAMP) / real'(t1 - t0 + 1) <= 0.93) begin
      failures++;
      $display("FAIL: input rate too low");
    end
    checks++;
    if (got.size() >= NSAMP * SAMPLE_W) begin
      failures++;
      $display("FAIL: no compression");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
