// tb_golomb_rice: feeds streams of items (raw first sample, then mapped
// errors) with random gaps, answers the flush request after a random delay,
// and compares the collected bits with the reference coding of each stream.
// Stream lengths cover the end-of-stream cases: first sample only, a partial
// window, exactly one and two whole windows, and a whole window plus part of
// the next. In a stream without gaps and with small values the item rate
// must be one per clock apart from one header cycle per window.
module tb_golomb_rice;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  localparam int DEPTH = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic s_valid = 1'b0, s_ready;
  alp_item_t s_item = '0;
  logic c_valid, c_flush, flush_ack = 1'b0;
  logic [CHUNK_W-1:0] c_bits;
  logic [CLEN_W-1:0] c_len;
  logic mon_header, mon_hdr_merged, mon_split, mon_drain;
  kparam_t mon_k;
  int checks = 0, failures = 0;
  bitq_t got;
  int n_header = 0, n_split = 0, n_merged = 0;

  golomb_rice #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .s_valid(s_valid), .s_ready(s_ready), .s_item(s_item),
    .c_valid(c_valid), .c_bits(c_bits), .c_len(c_len), .c_flush(c_flush),
    .flush_ack(flush_ack), .mon_header(mon_header), .mon_hdr_merged(mon_hdr_merged), .mon_k(mon_k), .mon_split(mon_split),
    .mon_drain(mon_drain));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (c_valid) for (int i = int'(c_len) - 1; i >= 0; i--) got.push_back(c_bits[i]);
    if (mon_header) n_header++;
    if (mon_split) n_split++;
    if (mon_hdr_merged) n_merged++;
  end

  task automatic stream(input int first, const ref intq_t m, input bit gaps, input int rate_check);
    bitq_t exp_bits;
    int t0, t1;
    got = {};
    t0 = 0; t1 = 0;
    for (int i = 0; i <= m.size(); i++) begin
      while (gaps && $urandom % 3 == 0) begin
        @(negedge clk); s_valid = 1'b0;
      end
      @(negedge clk);
      s_valid = 1'b1;
      s_item.first = (i == 0);
      s_item.last  = (i == m.size());
      s_item.value = (i == 0) ? mapped_t'(first) : mapped_t'(m[i-1]);
      #1;
      while (!s_ready) begin @(negedge clk); #1; end
      if (i == 0) t0 = $time / 10;
      t1 = $time / 10;
    end
    @(negedge clk);
    s_valid = 1'b0;
    #1;
    while (!c_flush) begin @(negedge clk); #1; end
    repeat ($urandom % 3) @(negedge clk);
    flush_ack = 1'b1;
    @(negedge clk);
    flush_ack = 1'b0;
    exp_bits = encode_errors(first, m, DEPTH);
    checks++;
    if (got != exp_bits) begin
      failures++;
      $display("FAIL: stream of %0d errors: %0d bits, expected %0d", m.size(), got.size(),
               exp_bits.size());
    end
    if (rate_check > 0) begin
      // values below 16 give k <= 3 and first codewords of at most 8 bits,
      // so every header shares a piece: one item per clock
      int expect_cycles = m.size() + 1;
      checks++;
      if (t1 - t0 + 1 != expect_cycles) begin
        failures++;
        $display("FAIL: %0d items took %0d cycles, expected %0d", m.size() + 1, t1 - t0 + 1,
                 expect_cycles);
      end
    end
  endtask

  initial begin
    intq_t m;
    int lens[] = '{0, 1, 5, 39, 40, 41, 79, 80, 81, 200, 333};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (lens[j]) begin
      for (int rep = 0; rep < 4; rep++) begin
        int scale;
        scale = 1 << (rep * 3);
        m = {};
        for (int i = 0; i < lens[j]; i++)
          m.push_back((i % 37 == 36) ? int'($urandom % 8192) : int'($urandom % scale));
        stream(int'($urandom % 2048), m, rep % 2 == 1, 0);
      end
    end
    // k decided by the last value of each window alone
    m = {};
    for (int w = 0; w < 8; w++)
      for (int i = 0; i < DEPTH; i++)
        m.push_back(i == DEPTH - 1 ? DEPTH * (1 << w) - 1 + (w % 2) * 2 : 0);
    stream(7, m, 1'b0, 0);
    // input rate with small values and no gaps
    m = {};
    for (int i = 0; i < 400; i++) m.push_back(int'($urandom % 16));
    stream(100, m, 1'b0, 1);
    checks++;
    if (n_header == 0 || n_split == 0 || n_merged == 0 || n_merged == n_header) begin
      failures++;
      $display("FAIL: headers %0d (merged %0d), split codewords %0d", n_header, n_merged, n_split);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
