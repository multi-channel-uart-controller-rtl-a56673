// Multi-channel UART controller.
//
// A master control unit (MCU) sends 7-bit characters over one serial line at
// its own baud rate; N_CH sub-equipments each listen on their own serial
// line at their own, different, baud rates. The controller decouples the
// rates with one asynchronous FIFO per sub-equipment:
//
//   mcu_rx -> uart_rx (MCU side, clk) -> bus channel 1 (7-bit broadcast)
//          -> async_fifo[i] (write: clk, read: sub_clk[i])
//          -> sub_channel_tx[i] (baud_gen + uart_tx, sub_clk[i]) -> sub_tx[i]
//
// Every character received from the MCU is written into all FIFOs in the same
// clock ("bus channel 1"). Each channel drains its FIFO at its own rate
// ("bus channels 21, 22, 23"). When a slow channel's FIFO is full, the
// character is lost for that channel only and its overflow bit is set in the
// status buffer; the other channels still receive it. A parity or framing
// error on the MCU line is flagged in the status buffer and the character is
// still forwarded.
// Three channels, 16 x 7 FIFOs, 7-bit characters with a 10-bit frame and a
// baud divisor of 4 on the MCU side follow the design. The per-channel
// divisors in SUB_DIV (4, 8, 16) are this implementation's choice: the
// design only says that the sub-equipment rates differ from each other and
// from the MCU rate. Only the MCU-to-sub-equipment direction is built.
//
// Interface: clk is the controller/MCU-side clock, sub_clk[i] the clock of
// channel i. rst_n is an asynchronous active-low reset for all domains and
// must be held for at least two clocks of the slowest domain. bus_wr/bus_data
// show the broadcast of each received character. Status outputs are in the
// clk domain; status_clr clears their sticky bits. sub_busy[i] (sub_clk[i]
// domain) is high while channel i fetches or sends a character.
// The receiver's det_rx output and the FIFOs' Gray pointer outputs exist for
// observation and are deliberately left unconnected here.
// Timing: a character is broadcast 3 clocks after the receiver's rxrdy
// rises (read strobe, registered data, write); it appears on sub_tx[i] after
// the FIFO synchronization delay (2-3 sub_clk cycles), 2 sequencer clocks and
// up to one bit time of that channel.
module mc_uart_ctrl
  import uart_pkg::*;
#(
  parameter int unsigned N_CH          = 3,
  parameter int unsigned MCU_DIV       = uart_pkg::BAUD_DIV,
  parameter int unsigned SUB_DIV[N_CH] = '{4, 8, 16}
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            mcu_rx,
  input  logic [N_CH-1:0] sub_clk,
  output logic [N_CH-1:0] sub_tx,
  output logic [N_CH-1:0] sub_busy,
  output logic            bus_wr,
  output char_t           bus_data,
  input  logic            status_clr,
  output logic [N_CH-1:0] fifo_full,
  output logic [N_CH-1:0] fifo_empty,
  output logic [N_CH-1:0] overflow,
  output logic            rx_parity_err,
  output logic            rx_frame_err
);
  logic            rxrdy, rx_rd, parity_err, frame_err;
  logic [N_CH-1:0] wfull, rempty;

  // MCU-side receiver (RSR -> RHR -> data line).
  uart_rx #(.DIV(MCU_DIV)) u_mcu_rx (
    .clk(clk), .rst_n(rst_n), .rx(mcu_rx), .rd(rx_rd), .data(bus_data),
    .rxrdy(rxrdy), .det_rx(), .parity_err(parity_err),
    .frame_err(frame_err)
  );

  // Read each character as soon as it is ready; it is on bus_data one
  // clock later, when it is written into every FIFO.
  assign rx_rd = rxrdy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bus_wr <= 1'b0;
    else        bus_wr <= rx_rd;
  end

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    logic  fifo_rd;
    char_t fifo_data;

    async_fifo #(.AW(FIFO_AW), .W(DATA_W)) u_fifo (
      .rst_n(rst_n), .clr_n(1'b1),
      .wclk(clk), .wr(bus_wr), .data_in(bus_data), .wfull(wfull[i]),
      .rclk(sub_clk[i]), .rd(fifo_rd), .data_out(fifo_data),
      .rempty(rempty[i]), .wptr(), .rptr()
    );

    sub_channel_tx #(.DIV(SUB_DIV[i])) u_chan (
      .clk(sub_clk[i]), .rst_n(rst_n), .fifo_rempty(rempty[i]),
      .fifo_rd(fifo_rd), .fifo_data(fifo_data), .tx(sub_tx[i]), .busy(sub_busy[i])
    );
  end

  status_buffer #(.N_CH(N_CH)) u_status (
    .clk(clk), .rst_n(rst_n), .clr(status_clr), .wfull(wfull),
    .rempty(rempty), .ch_write(bus_wr), .parity_err(parity_err),
    .frame_err(frame_err), .fifo_full(fifo_full), .fifo_empty(fifo_empty),
    .overflow(overflow), .rx_parity_err(rx_parity_err),
    .rx_frame_err(rx_frame_err)
  );
endmodule
