// Two-flip-flop synchronizer for a Gray-coded FIFO pointer (the "synch
// module" of the asynchronous FIFO).
//
// A pointer from the other clock domain is registered twice in the
// destination clock. Because successive Gray values differ in one bit only,
// a sample taken while the pointer changes is either the old or the new
// value, never a mixture. The same module with W=1 synchronizes single
// status bits. Output q lags d by two clk edges. Reset (asynchronous, active
// low) clears both stages to RST_VAL. Synchronizing the Gray pointers follows
// the specification; the number of stages is this implementation's choice.
module ptr_sync #(
  parameter int unsigned W       = uart_pkg::FIFO_AW + 1,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RST_VAL;
      q    <= RST_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
