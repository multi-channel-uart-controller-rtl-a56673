// UART transmitter: transmit buffer register (TBR), parity generator and
// 10-bit transmit shift register (TSR).
//
// When the transmitter is ready (txrdy=1) a write strobe wr copies the 7-bit
// character on data into TBR and the transmitter becomes busy (tx_sts=1,
// txrdy=0). The next clock loads TSR with the frame
//   TSR[0] start (0), TSR[7:1] TBR, TSR[8] parity = XOR of the TBR bits,
//   TSR[9] stop (1).
// The transmitter then waits for the next baud tick (state SYNCH), drives the
// start bit, and on each following tick shifts TSR right by one, putting
// TSR[0] on tx, counting the shifts in Bct. When Bct reaches 9 (data bits,
// parity and stop bit all sent and the stop bit has lasted one bit time) Bct
// is cleared and the transmitter returns to IDLE with txrdy=1.
// This follows the transmitter flow chart of the design (IDLE, load TSR,
// generate parity, SYNCH, clear TSR(0) as start bit, TDATA, Bct=9). Even
// parity, LSB-first order and a registered tx output are choices of this
// implementation.
//
// Interface: baud_tick is a one-clock enable from a baud_gen in the same
// clock domain; each bit lasts exactly one tick period. tx idles high.
// Timing: txrdy falls the clock after wr; the start bit begins on the first
// tick after the load clock; one frame occupies 10 tick periods on the line.
// Reset is asynchronous, active low.
module uart_tx
  import uart_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  baud_tick,
  input  logic  wr,
  input  char_t data,
  output logic  txrdy,
  output logic  tx_sts,
  output logic  tx
);
  typedef enum logic [1:0] {IDLE, LOAD, SYNCH, TDATA} tx_state_t;

  tx_state_t           state;
  char_t               tbr;
  logic [FRAME_W-1:0]  tsr;
  logic [3:0]          bct;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      tbr   <= '0;
      tsr   <= '1;
      bct   <= '0;
      tx    <= 1'b1;
    end else begin
      unique case (state)
        IDLE: if (wr) begin
          tbr   <= data;
          state <= LOAD;
        end
        LOAD: begin
          tsr   <= {1'b1, parity_of(tbr), tbr, 1'b0};
          bct   <= '0;
          state <= SYNCH;
        end
        SYNCH: if (baud_tick) begin
          tx    <= tsr[0];                 // start bit
          tsr   <= {1'b1, tsr[FRAME_W-1:1]};
          state <= TDATA;
        end
        TDATA: if (baud_tick) begin
          if (bct == 4'd9) begin
            bct   <= '0;
            state <= IDLE;
          end else begin
            tx    <= tsr[0];
            tsr   <= {1'b1, tsr[FRAME_W-1:1]};
            bct   <= bct + 4'd1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign txrdy  = (state == IDLE);
  assign tx_sts = !txrdy;

  // The line is high whenever no frame is in progress.
  a_idle_high: assert property (@(posedge clk) disable iff (!rst_n)
                                (state == IDLE) |-> tx);
endmodule
