// tb_data_packer: random pieces of 1..11 bits, with gaps, go in; the 16-bit
// words coming out must equal the concatenated pieces, zero-padded at the
// end of each stream, and flush_ack must follow the last word. Output
// words must appear in the cycle after the register holds 16 bits.
module tb_data_packer;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, flush = 1'b0, flush_ack, out_valid;
  logic [CHUNK_W-1:0] in_bits = '0;
  logic [CLEN_W-1:0] in_len = '0;
  logic [OUT_W-1:0] out_word;
  logic [$clog2(PACK_W+1)-1:0] fill;
  int checks = 0, failures = 0;
  bitq_t got;
  int max_fill = 0;

  data_packer dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_bits(in_bits),
                   .in_len(in_len), .flush(flush), .flush_ack(flush_ack),
                   .out_valid(out_valid), .out_word(out_word), .mon_fill(fill));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid) for (int i = OUT_W - 1; i >= 0; i--) got.push_back(out_word[i]);
    if (int'(fill) > max_fill) max_fill = int'(fill);
    // a full word is always sent at once
    if (fill >= OUT_W && !out_valid) begin
      failures++;
      $display("FAIL: %0d bits held but no word sent", fill);
    end
  end

  task automatic stream(input int npieces, input int maxlen, input bit gaps);
    bitq_t exp_bits;
    got = {};
    for (int i = 0; i < npieces; i++) begin
      int len = 1 + int'($urandom % maxlen);
      int val = int'($urandom % (2**len));
      while (gaps && $urandom % 3 == 0) begin
        @(negedge clk); in_valid = 1'b0;
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_len = CLEN_W'(len);
      // bits above the length are garbage the packer must ignore
      in_bits = CHUNK_W'(val) | (CHUNK_W'($urandom) << len);
      push_bits(exp_bits, val, len);
    end
    @(negedge clk);
    in_valid = 1'b0;
    flush = 1'b1;
    #1;
    while (!flush_ack) begin @(negedge clk); #1; end
    @(negedge clk);
    flush = 1'b0;
    @(negedge clk);
    exp_bits = pad(exp_bits);
    checks++;
    if (got != exp_bits) begin
      failures++;
      $display("FAIL: stream of %0d pieces: %0d bits out, expected %0d", npieces, got.size(),
               exp_bits.size());
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    stream(0, 11, 1'b0);
    stream(1, 11, 1'b0);
    for (int i = 0; i < 200; i++) stream(1 + int'($urandom % 60), 11, i % 2 == 1);
    for (int i = 0; i < 20; i++) stream(200, 11, 1'b0);  // full-rate worst case
    checks++;
    if (max_fill < 20) begin
      failures++;
      $display("FAIL: register never filled beyond %0d bits", max_fill);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
