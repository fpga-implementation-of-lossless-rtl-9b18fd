// tb_gr_window_buffer: random writes and reads of the window register,
// compared with an array model, including a read of the slot being written
// in the same cycle (the old value must come out).
module tb_gr_window_buffer;
  import ecg_pkg::*;

  localparam int DEPTH = 40;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  mapped_t wdata = '0, rdata;
  int model[DEPTH];
  int checks = 0, failures = 0;

  gr_window_buffer #(.DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr),
                                         .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      we    = ($urandom % 3) != 0;
      waddr = AW'($urandom % DEPTH);
      raddr = (i % 4 == 0) ? waddr : AW'($urandom % DEPTH);
      wdata = mapped_t'($urandom);
      #1;
      checks++;
      if (int'(rdata) != model[raddr]) begin
        failures++;
        $display("FAIL read %0d: %0d, expected %0d", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) model[waddr] = int'(wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
