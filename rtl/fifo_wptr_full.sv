// Write pointer and full detector of the asynchronous FIFO (write clock
// domain).
//
// The write pointer is kept both as a binary count of AW+1 bits (its low AW
// bits address the memory) and as its Gray code, which is what the read
// domain sees. A write request winc is accepted only while the FIFO is not
// full. The FIFO is full when the next Gray write pointer differs from the
// synchronized read pointer in its two most significant bits and equals it
// in all the others (WPtr(4) /= rptr(4), WPtr(3) /= rptr(3),
// WPtr(2:0) = rptr(2:0) for AW=4): the writer is exactly one lap ahead.
// wfull is registered, computed from the pointer value after this clock's
// write, so it rises in the same clock edge as the write that fills the
// FIFO. It falls two or three write clocks after a read frees a location,
// the delay of the pointer synchronizer. Reset (asynchronous, active low)
// zeroes the pointers and clears wfull. The Gray pointers and the full rule
// follow the specification; registering the flag from the next pointer value
// is this implementation's choice.
module fifo_wptr_full #(
  parameter int unsigned AW = uart_pkg::FIFO_AW
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          winc,
  input  logic [AW:0]   wq2_rptr,
  output logic [AW-1:0] waddr,
  output logic [AW:0]   wptr,
  output logic          wfull,
  output logic          wen
);
  logic [AW:0] wbin, wbin_next, wgray_next;

  assign wen        = winc && !wfull;
  assign wbin_next  = wbin + (AW+1)'(wen);
  assign wgray_next = (wbin_next >> 1) ^ wbin_next;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wptr  <= '0;
      wfull <= 1'b0;
    end else begin
      wbin  <= wbin_next;
      wptr  <= wgray_next;
      wfull <= (wgray_next == {~wq2_rptr[AW:AW-1], wq2_rptr[AW-2:0]});
    end
  end

  assign waddr = wbin[AW-1:0];

  // The Gray pointer changes in at most one bit per clock.
  a_gray_step: assert property (@(posedge wclk) disable iff (!wrst_n)
                                $onehot0(wptr ^ wgray_next));
endmodule
