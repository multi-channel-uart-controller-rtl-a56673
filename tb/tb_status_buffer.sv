// Testbench of status_buffer with 3 channels. Drives full, empty, write,
// parity and framing events and checks: full copied one clock later; empty
// copied three clocks later (two-flop synchronizer plus register); overflow
// set only for channels that were full when a character was offered, and
// held until clr; parity/framing error bits sticky until clr; an event in
// the same clock as clr is kept.
module tb_status_buffer;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [2:0] wfull = '0, rempty = '1;
  logic ch_write = 0, parity_err = 0, frame_err = 0;
  logic [2:0] fifo_full, fifo_empty, overflow;
  logic rx_parity_err, rx_frame_err;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  status_buffer dut (.clk(clk), .rst_n(rst_n), .clr(clr), .wfull(wfull), .rempty(rempty),
      .ch_write(ch_write), .parity_err(parity_err), .frame_err(frame_err),
      .fifo_full(fifo_full), .fifo_empty(fifo_empty), .overflow(overflow),
      .rx_parity_err(rx_parity_err), .rx_frame_err(rx_frame_err));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] e;
    repeat (2) @(negedge clk);
    check(fifo_full == 0 && fifo_empty == 3'b111 && overflow == 0 && !rx_parity_err && !rx_frame_err,
          "reset state");
    rst_n = 1;
    // Full flag path.
    for (int i = 0; i < 20; i++) begin
      @(negedge clk) wfull = 3'($urandom);
      e = wfull;
      @(negedge clk) check(fifo_full == e, "fifo_full not copied");
    end
    // Empty flag path: three clocks.
    for (int i = 0; i < 10; i++) begin
      @(negedge clk) rempty = 3'($urandom);
      e = rempty;
      @(negedge clk); @(negedge clk);
      @(negedge clk) check(fifo_empty == e, $sformatf("fifo_empty %b expected %b", fifo_empty, e));
    end
    // Overflow: channel 1 full while a character is offered.
    @(negedge clk) wfull = 3'b010; ch_write = 0;
    @(negedge clk) check(overflow == 0, "overflow without a write");
    ch_write = 1;
    @(negedge clk) ch_write = 0; wfull = 3'b000;
    check(overflow == 3'b010, $sformatf("overflow %b expected 010", overflow));
    ch_write = 1;
    @(negedge clk) ch_write = 0;
    check(overflow == 3'b010, "overflow not sticky");
    wfull = 3'b101; ch_write = 1; clr = 1;
    @(negedge clk) ch_write = 0; clr = 0; wfull = 0;
    check(overflow == 3'b101, $sformatf("clr with event: %b", overflow));
    clr = 1;
    @(negedge clk) clr = 0;
    check(overflow == 0, "overflow not cleared");
    // Receiver errors.
    parity_err = 1;
    @(negedge clk) parity_err = 0;
    check(rx_parity_err && !rx_frame_err, "parity error not recorded");
    frame_err = 1;
    @(negedge clk) frame_err = 0;
    repeat (3) @(negedge clk);
    check(rx_parity_err && rx_frame_err, "error bits not sticky");
    clr = 1;
    @(negedge clk) clr = 0;
    check(!rx_parity_err && !rx_frame_err, "error bits not cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
