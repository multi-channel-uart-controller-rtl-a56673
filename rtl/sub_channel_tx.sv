// Output channel towards one sub-equipment: takes characters from the read
// side of that channel's asynchronous FIFO and sends them on the channel's
// serial line at the channel's own baud rate.
//
// Everything here runs in the channel's clock domain (the FIFO's read
// clock). A small sequencer waits until the FIFO is not empty and the
// transmitter is ready, pulses fifo_rd for one clock (FETCH), then, with the
// registered FIFO output valid, pulses wr of the transmitter (LOAD) and goes
// back to IDLE. The channel's baud_gen runs with divisor DIV, so each
// channel has its own bit rate; the transmitter is uart_tx.
// The FIFO-to-transmitter path follows the specification; the sequencer is
// this implementation's simplest way of driving it.
//
// Interface: fifo_rempty/fifo_rd/fifo_data connect to the FIFO read port;
// tx is the serial line; busy is high while a character is being fetched or
// sent. Timing: a character leaves the FIFO two clocks before the
// transmitter loads it; consecutive frames are separated by at most one bit
// time of idle line (the transmitter's wait for the next baud tick).
// Reset is asynchronous, active low.
module sub_channel_tx
  import uart_pkg::*;
#(
  parameter int unsigned DIV = uart_pkg::BAUD_DIV
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  fifo_rempty,
  output logic  fifo_rd,
  input  char_t fifo_data,
  output logic  tx,
  output logic  busy
);
  typedef enum logic [1:0] {IDLE, FETCH, LOAD} seq_state_t;

  seq_state_t state;
  logic       baud_tick;
  logic       txrdy;
  logic       tx_sts;
  logic       tx_wr;

  baud_gen #(.DIV(DIV)) u_baud (
    .clk(clk), .rst_n(rst_n), .restart(1'b0), .baud_tick(baud_tick)
  );

  uart_tx u_tx (
    .clk(clk), .rst_n(rst_n), .baud_tick(baud_tick), .wr(tx_wr),
    .data(fifo_data), .txrdy(txrdy), .tx_sts(tx_sts), .tx(tx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= IDLE;
    else begin
      unique case (state)
        IDLE:    if (!fifo_rempty && txrdy) state <= FETCH;
        FETCH:   state <= LOAD;
        LOAD:    state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign fifo_rd = (state == FETCH);
  assign tx_wr   = (state == LOAD);
  assign busy    = (state != IDLE) || tx_sts;
endmodule
