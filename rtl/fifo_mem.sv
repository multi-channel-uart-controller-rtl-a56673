// Storage of the asynchronous FIFO: 2^AW words of W bits (16 x 7 by
// default), one write port in the write clock domain and one read port in
// the read clock domain.
//
// A write with we=1 stores wdata at waddr on the rising edge of wclk. A read
// with re=1 copies the word at raddr into the output register rdata on the
// rising edge of rclk, so rdata is valid the rclk cycle after re, as in the
// design's "data_out <= fifo[rd_pointer]" step. rdata is cleared by reset
// (asynchronous, active low, read domain); the array itself is not reset,
// and a location is only read after it has been written. The 16 x 7 size and
// the registered read follow the specification.
module fifo_mem #(
  parameter int unsigned AW = uart_pkg::FIFO_AW,
  parameter int unsigned W  = uart_pkg::DATA_W
) (
  input  logic          wclk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] ram [2**AW];

  always_ff @(posedge wclk) begin
    if (we) ram[waddr] <= wdata;
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n)  rdata <= '0;
    else if (re)  rdata <= ram[raddr];
  end
endmodule
