// Asynchronous FIFO: 2^AW words of W bits (16 x 7 by default) between a
// write clock domain (wclk, "clock1") and an unrelated read clock domain
// (rclk, "clock2").
//
// Structure: a dual-port memory (fifo_mem), a write pointer with full
// detector (fifo_wptr_full), a read pointer with empty detector
// (fifo_rptr_empty), and two Gray-pointer synchronizers (ptr_sync) that carry
// each pointer into the other domain. Pointers are AW+1 bits wide in Gray
// code, so the extra top bit tells a full FIFO from an empty one.
//
// Interface: wr with data_in writes one word per wclk edge unless wfull=1
// (a write to a full FIFO is ignored). rd reads one word per rclk edge
// unless rempty=1; data_out is registered and shows the word the clock after
// rd. The flags are active high. wptr and rptr are the Gray pointers, brought
// out for observation.
// Reset: rst_n (0 = reset) and clr_n (0 = erase the contents) both act as
// an asynchronous, active-low reset of pointers, flags and data_out in both
// domains; they must be held low for at least two clocks of each domain.
// Treating clear as a reset of the pointers, and the active-high polarity of
// the flags, are choices of this implementation.
module async_fifo #(
  parameter int unsigned AW = uart_pkg::FIFO_AW,
  parameter int unsigned W  = uart_pkg::DATA_W
) (
  input  logic          rst_n,
  input  logic          clr_n,
  input  logic          wclk,
  input  logic          wr,
  input  logic [W-1:0]  data_in,
  output logic          wfull,
  input  logic          rclk,
  input  logic          rd,
  output logic [W-1:0]  data_out,
  output logic          rempty,
  output logic [AW:0]   wptr,
  output logic [AW:0]   rptr
);
  logic          arst_n;
  logic [AW-1:0] waddr, raddr;
  logic [AW:0]   wq2_rptr, rq2_wptr;
  logic          wen, ren;

  assign arst_n = rst_n & clr_n;

  fifo_wptr_full #(.AW(AW)) u_wfull (
    .wclk(wclk), .wrst_n(arst_n), .winc(wr), .wq2_rptr(wq2_rptr),
    .waddr(waddr), .wptr(wptr), .wfull(wfull), .wen(wen)
  );

  fifo_rptr_empty #(.AW(AW)) u_rempty (
    .rclk(rclk), .rrst_n(arst_n), .rinc(rd), .rq2_wptr(rq2_wptr),
    .raddr(raddr), .rptr(rptr), .rempty(rempty), .ren(ren)
  );

  ptr_sync #(.W(AW + 1)) u_sync_r2w (
    .clk(wclk), .rst_n(arst_n), .d(rptr), .q(wq2_rptr)
  );

  ptr_sync #(.W(AW + 1)) u_sync_w2r (
    .clk(rclk), .rst_n(arst_n), .d(wptr), .q(rq2_wptr)
  );

  fifo_mem #(.AW(AW), .W(W)) u_mem (
    .wclk(wclk), .we(wen), .waddr(waddr), .wdata(data_in),
    .rclk(rclk), .rrst_n(arst_n), .re(ren), .raddr(raddr), .rdata(data_out)
  );
endmodule
