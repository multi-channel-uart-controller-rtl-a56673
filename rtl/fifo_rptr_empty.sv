// Read pointer and empty detector of the asynchronous FIFO (read clock
// domain).
//
// The read pointer is kept as a binary count of AW+1 bits (its low AW bits
// address the memory) and as its Gray code, which the write domain sees. A
// read request rinc is accepted only while the FIFO is not empty. The FIFO is
// empty when the Gray read pointer equals the synchronized Gray write
// pointer (rptr = rsync_wptr). rempty is registered, computed from the
// pointer value after this clock's read, so it rises in the same edge as the
// read that takes the last word. It falls two or three read clocks after a
// write, the delay of the pointer synchronizer. Reset (asynchronous, active
// low) zeroes the pointers and sets rempty. The empty rule follows the
// specification; registering the flag from the next pointer value is this
// implementation's choice.
module fifo_rptr_empty #(
  parameter int unsigned AW = uart_pkg::FIFO_AW
) (
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rinc,
  input  logic [AW:0]   rq2_wptr,
  output logic [AW-1:0] raddr,
  output logic [AW:0]   rptr,
  output logic          rempty,
  output logic          ren
);
  logic [AW:0] rbin, rbin_next, rgray_next;

  assign ren        = rinc && !rempty;
  assign rbin_next  = rbin + (AW+1)'(ren);
  assign rgray_next = (rbin_next >> 1) ^ rbin_next;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin   <= '0;
      rptr   <= '0;
      rempty <= 1'b1;
    end else begin
      rbin   <= rbin_next;
      rptr   <= rgray_next;
      rempty <= (rgray_next == rq2_wptr);
    end
  end

  assign raddr = rbin[AW-1:0];

  a_gray_step: assert property (@(posedge rclk) disable iff (!rrst_n)
                                $onehot0(rptr ^ rgray_next));
endmodule
