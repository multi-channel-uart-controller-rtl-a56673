// Behavioural serial-line decoder used by the testbenches as an independent
// reference receiver (not synthesizable).
//
// It watches line on every rising edge of clk. A low level after idle marks
// the start of a frame; the frame is then taken to consist of 10 bits of
// exactly DIV clocks each: start (0), 7 data bits LSB first, even parity,
// stop (1). Every clock of every bit is sampled, so a bit that is too short,
// too long or glitching clears timing_ok. At the end of the stop bit it
// pulses valid for one clock with the data, whether parity and stop bit
// were right, and the total number of frames seen in count.
module uart_line_monitor #(
  parameter int unsigned DIV = 4
) (
  input  logic       clk,
  input  logic       line,
  output logic       valid,
  output logic [6:0] data,
  output logic       parity_ok,
  output logic       stop_ok,
  output logic       timing_ok,
  output int         count
);
  logic [9:0] bits;
  logic       tok;

  initial begin
    valid = 0; data = '0; parity_ok = 0; stop_ok = 0; timing_ok = 0; count = 0;
    forever begin
      @(posedge clk);
      valid = 0;
      if (line == 1'b0) begin
        tok = 1'b1;
        // This clock is the first clock of the start bit.
        for (int b = 0; b < 10; b++) begin
          for (int c = 0; c < DIV; c++) begin
            if (!(b == 0 && c == 0)) @(posedge clk);
            if (c == 0) bits[b] = line;
            else if (line != bits[b]) tok = 1'b0;
          end
        end
        data      = bits[7:1];
        parity_ok = (bits[8] == ^bits[7:1]) && (bits[0] == 1'b0);
        stop_ok   = bits[9];
        timing_ok = tok;
        count++;
        valid = 1;
      end
    end
  end
endmodule
