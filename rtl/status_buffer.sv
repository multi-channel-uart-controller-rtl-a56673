// Status buffer of the controller: collects the status of the receiver and
// of every channel FIFO into one register in the controller's clock domain.
//
// Per channel it holds the FIFO full flag (already in this domain), the
// FIFO empty flag (brought over from the channel's clock domain by a
// two-flop synchronizer) and a sticky overflow bit that is set when a
// character was offered to a full FIFO and therefore lost for that channel.
// For the receiver it holds sticky parity-error and framing-error bits.
// Sticky bits are cleared by clr (a one-clock strobe; an event in the same
// clock wins over clr). The design names a status buffer and status
// detectors but does not define their contents; this register is the
// simplest one that reports the conditions the design names (full, empty,
// data loss, parity check).
//
// Timing: fifo_full and the sticky bits appear one clock after the event;
// fifo_empty two clocks after the FIFO's own flag changes plus one clock.
// Reset is asynchronous, active low.
module status_buffer #(
  parameter int unsigned N_CH = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic [N_CH-1:0] wfull,
  input  logic [N_CH-1:0] rempty,      // from the channels' clock domains
  input  logic            ch_write,    // a character is offered to all FIFOs
  input  logic            parity_err,
  input  logic            frame_err,
  output logic [N_CH-1:0] fifo_full,
  output logic [N_CH-1:0] fifo_empty,
  output logic [N_CH-1:0] overflow,
  output logic            rx_parity_err,
  output logic            rx_frame_err
);
  logic [N_CH-1:0] empty_s;

  ptr_sync #(.W(N_CH), .RST_VAL({N_CH{1'b1}})) u_empty_sync (
    .clk(clk), .rst_n(rst_n), .d(rempty), .q(empty_s)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fifo_full     <= '0;
      fifo_empty    <= '1;
      overflow      <= '0;
      rx_parity_err <= 1'b0;
      rx_frame_err  <= 1'b0;
    end else begin
      fifo_full     <= wfull;
      fifo_empty    <= empty_s;
      overflow      <= (clr ? '0 : overflow) | ({N_CH{ch_write}} & wfull);
      rx_parity_err <= (clr ? 1'b0 : rx_parity_err) | parity_err;
      rx_frame_err  <= (clr ? 1'b0 : rx_frame_err)  | frame_err;
    end
  end
endmodule
