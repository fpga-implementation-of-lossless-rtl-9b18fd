// tb_gr_encoder: codes random values with every k, collects the pieces and
// compares the bits with the reference Golomb-Rice code; the number of
// cycles per codeword is checked against the piece count worked out from
// the 11-bit piece limit. Pieces are refused at random (chunk_take low) to
// check that a refused piece is offered again unchanged.
module tb_gr_encoder;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cw_valid = 1'b0, cw_done, chunk_valid, mon_split;
  logic chunk_take = 1'b1;
  mapped_t cw_m = '0;
  kparam_t cw_k = '0;
  logic [CHUNK_W-1:0] chunk_bits;
  logic [CLEN_W-1:0] chunk_len;
  int checks = 0, failures = 0;

  gr_encoder dut (.clk(clk), .rst_n(rst_n), .cw_valid(cw_valid), .cw_m(cw_m), .cw_k(cw_k),
                  .chunk_take(chunk_take), .cw_done(cw_done), .chunk_valid(chunk_valid), .chunk_bits(chunk_bits),
                  .chunk_len(chunk_len), .mon_split(mon_split));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pieces(int m, int k);
    int r = m / (2**k);
    int n = 0;
    forever begin
      n++;
      if (r + 1 + k <= 11) return n;
      if (r >= 11) r -= 11;
      else r = 0;
    end
  endfunction

  task automatic code(input int m, input int k);
    bitq_t exp_bits, got;
    int cyc = 0;
    push_code(exp_bits, m, k);
    @(negedge clk);
    cw_valid = 1'b1; cw_m = mapped_t'(m); cw_k = kparam_t'(k);
    forever begin
      // some offers are refused; the same piece must come again
      chunk_take = ($urandom % 4) != 0;
      #1;
      if (!chunk_valid) break;
      if (chunk_take) begin
        for (int i = int'(chunk_len) - 1; i >= 0; i--) got.push_back(chunk_bits[i]);
        cyc++;
        if (cw_done) break;
      end
      @(negedge clk);
    end
    @(negedge clk);
    cw_valid = 1'b0;
    checks++;
    if (got != exp_bits) begin
      failures++;
      $display("FAIL m=%0d k=%0d: %0d bits, expected %0d", m, k, got.size(), exp_bits.size());
    end
    checks++;
    if (cyc != pieces(m, k)) begin
      failures++;
      $display("FAIL m=%0d k=%0d: %0d cycles, expected %0d", m, k, cyc, pieces(m, k));
    end
    repeat ($urandom % 2) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 8; k++) begin
      code(0, k); code(8191, k); code(4094, k);
      for (int q = 0; q < 30; q++) code(q * (2**k) + int'($urandom % (2**k)), k);
      for (int i = 0; i < 150; i++) code(int'($urandom % 8192) >> int'($urandom % 13), k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
