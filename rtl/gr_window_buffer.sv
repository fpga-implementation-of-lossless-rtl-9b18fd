// gr_window_buffer: the window register of the Golomb-Rice coder, DEPTH
// words of MAP_W bits (40 x 13 bits in the source description).
//
// One synchronous write port and one asynchronous read port on separate
// addresses. The coder uses it as a one-window delay line: the slot being
// refilled with a new mapped error is read out in the same cycle, so the
// previous window's value leaves as the new one enters. Contents are cleared
// by reset so nothing uninitialised is ever read.
module gr_window_buffer
  import ecg_pkg::*;
#(
  parameter int unsigned DEPTH = 40,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  mapped_t       wdata,
  input  logic [AW-1:0] raddr,
  output mapped_t       rdata
);

  mapped_t mem [DEPTH];

  assign rdata = mem[raddr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

endmodule
