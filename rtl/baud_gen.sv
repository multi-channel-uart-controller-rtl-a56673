// Baud rate generator.
//
// Produces a one-clock-wide enable pulse, baud_tick, once every DIV system
// clocks. The transmitter and receiver shift one bit per tick. The default
// divisor of 4 (one baud clock every four clock pulses) is the one the
// controller was specified with; each channel of the controller instantiates
// its own generator with its own divisor so that the channels run at
// different baud rates. Making the baud clock an enable rather than a
// divided clock is this implementation's choice.
//
// A pulse on restart loads the counter with RESTART_CNT, so that the next
// tick comes DIV-RESTART_CNT clocks later and then every DIV clocks. The receiver uses
// this to place its sampling ticks in the middle of each bit once it has seen
// a start bit; the transmitter leaves restart low and uses the free-running
// ticks. The tick is an enable in the clk domain, not a derived clock.
//
// Timing: baud_tick is a registered output. Reset is asynchronous, active low.
module baud_gen #(
  parameter int unsigned DIV         = uart_pkg::BAUD_DIV,
  parameter int unsigned RESTART_CNT = DIV / 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic restart,
  output logic baud_tick
);
  localparam int unsigned CW = (DIV > 2) ? $clog2(DIV) : 1;
  localparam logic [CW-1:0] LAST = CW'(DIV - 1);
  localparam logic [CW-1:0] LOAD = CW'(RESTART_CNT);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      baud_tick <= 1'b0;
    end else if (restart) begin
      cnt       <= LOAD;
      baud_tick <= 1'b0;
    end else if (cnt == LAST) begin
      cnt       <= '0;
      baud_tick <= 1'b1;
    end else begin
      cnt       <= cnt + 1'b1;
      baud_tick <= 1'b0;
    end
  end

  initial begin
    assert (DIV >= 2) else $error("baud_gen: DIV must be at least 2");
    assert (RESTART_CNT < DIV) else $error("baud_gen: RESTART_CNT must be below DIV");
  end
endmodule
