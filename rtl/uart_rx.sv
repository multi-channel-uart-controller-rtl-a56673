// UART receiver: receive shift register (RSR, 9 bits) and receiver hold
// register (RHR, 7 bits).
//
// The serial input rx is first passed through two flip-flops. While idle, RSR
// holds all ones. A low level on the line is taken as a start bit (det_rx
// pulses) and restarts the receiver's own baud generator so that its ticks
// fall near the middle of each bit. On every tick the sampled line value is
// shifted into RSR from the top. After nine ticks the start bit, which
// entered first, has reached RSR[0]; RSR[0]=0 is the "whole character
// received" condition. RSR[7:1] (everything but the first and last bit) is
// then copied to RHR, rxrdy is set, the parity bit RSR[8] is checked against
// the XOR of the data bits, and RSR is set back to all ones. One more tick
// samples the stop bit before the receiver looks for the next start bit. A
// low level that is gone by the first sample (a glitch, or the tail of a
// missing stop bit) is dropped as a false start.
// A read strobe rd while rxrdy=1 copies RHR to the data output and clears
// rxrdy.
// The RSR/RHR structure, the all-ones reset value of RSR, the RSR[0]=0 test
// and the rd behaviour follow the design; the input synchronizer, mid-bit
// sampling by restarting the baud counter, and the parity/stop checks are
// this implementation's choices.
//
// Interface: parity_err pulses for one clock together with the rise of
// rxrdy when the received parity is wrong; frame_err pulses when the stop
// bit is sampled low. data is registered and valid the clock after rd.
// Timing: one bit lasts DIV clocks; rxrdy rises about 8.5 bit times after
// the leading edge of the start bit. Reset is asynchronous, active low.
module uart_rx
  import uart_pkg::*;
#(
  parameter int unsigned DIV = uart_pkg::BAUD_DIV
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rx,
  input  logic  rd,
  output char_t data,
  output logic  rxrdy,
  output logic  det_rx,
  output logic  parity_err,
  output logic  frame_err
);
  // Detection of the start bit lags the line by three clocks (two
  // synchronizer stages plus the restart); the counter is preloaded so that
  // the first sample lands about half a bit after the falling edge.
  localparam int unsigned LOAD_RAW = DIV - DIV / 2 + 1;
  localparam int unsigned RESTART_CNT = (LOAD_RAW < DIV) ? LOAD_RAW : DIV - 1;

  typedef enum logic [1:0] {IDLE, RECV, STOP} rx_state_t;

  rx_state_t         state;
  logic [1:0]        rx_meta;
  logic              rx_s;
  logic [RSR_W-1:0]  rsr;
  logic [RSR_W-1:0]  rsr_next;
  char_t             rhr;
  logic              rbaud_tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_meta <= 2'b11;
    else        rx_meta <= {rx_meta[0], rx};
  end
  assign rx_s = rx_meta[1];

  assign det_rx = (state == IDLE) && !rx_s;

  baud_gen #(.DIV(DIV), .RESTART_CNT(RESTART_CNT)) u_rbaud (
    .clk      (clk),
    .rst_n    (rst_n),
    .restart  (det_rx),
    .baud_tick(rbaud_tick)
  );

  assign rsr_next = {rx_s, rsr[RSR_W-1:1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      rsr        <= '1;
      rhr        <= '0;
      data       <= '0;
      rxrdy      <= 1'b0;
      parity_err <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      parity_err <= 1'b0;
      frame_err  <= 1'b0;
      if (rd && rxrdy) begin
        data  <= rhr;
        rxrdy <= 1'b0;
      end
      unique case (state)
        IDLE: if (det_rx) state <= RECV;
        RECV: if (rbaud_tick) begin
          if (&rsr && rx_s) begin
            // Line high again at the first sample: not a start bit.
            state <= IDLE;
          end else if (!rsr_next[0]) begin
            rhr        <= rsr_next[DATA_W:1];
            parity_err <= rsr_next[RSR_W-1] ^ parity_of(rsr_next[DATA_W:1]);
            rxrdy      <= 1'b1;
            rsr        <= '1;
            state      <= STOP;
          end else begin
            rsr <= rsr_next;
          end
        end
        STOP: if (rbaud_tick) begin
          frame_err <= !rx_s;
          state     <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
