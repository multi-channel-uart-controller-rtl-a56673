// Testbench of baud_gen: checks that the default generator ticks exactly once
// every 4 clocks with one-clock pulses, that a restart places the next tick
// DIV-RESTART_CNT clocks after the restart edge and keeps the period afterwards, and the same
// for a second instance with divisor 16.
module tb_baud_gen;
  logic clk = 0, rst_n = 0, restart = 0;
  logic tick4, tick16;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  baud_gen dut (.clk(clk), .rst_n(rst_n), .restart(restart), .baud_tick(tick4));
  baud_gen #(.DIV(16)) dut16 (.clk(clk), .rst_n(rst_n), .restart(restart), .baud_tick(tick16));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Clocks from now until the given tick is next high (sampled at posedge).
  task automatic clocks_to_tick(input bit which16, output int n);
    n = 0;
    do begin
      @(posedge clk); n++;
    end while (!(which16 ? tick16 : tick4) && n < 100);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    clocks_to_tick(0, n);
    for (int k = 0; k < 20; k++) begin
      clocks_to_tick(0, n);
      check(n == 4, $sformatf("DIV=4 period %0d", n));
    end
    clocks_to_tick(1, n);
    for (int k = 0; k < 6; k++) begin
      clocks_to_tick(1, n);
      check(n == 16, $sformatf("DIV=16 period %0d", n));
    end
    // Pulses last one clock.
    for (int k = 0; k < 40; k++) begin
      @(posedge clk);
      if (tick4) begin @(posedge clk); check(!tick4, "tick4 wider than one clock"); end
    end
    // Restart: counter loaded with DIV/2 at the restart edge.
    @(negedge clk); restart = 1;
    @(posedge clk); #1 restart = 0;
    n = 0;
    while (!tick4 && n < 100) begin @(posedge clk); #1 n++; end
    check(n == 2, $sformatf("DIV=4 restart offset %0d", n));
    clocks_to_tick(0, n);
    clocks_to_tick(0, n);
    check(n == 4, $sformatf("DIV=4 period after restart %0d", n));
    @(negedge clk); restart = 1;
    @(posedge clk); #1 restart = 0;
    n = 0;
    while (!tick16 && n < 100) begin @(posedge clk); #1 n++; end
    check(n == 8, $sformatf("DIV=16 restart offset %0d", n));
    // Reset stops the ticks.
    rst_n = 0;
    repeat (20) begin @(posedge clk); #1 check(!tick4 && !tick16, "tick during reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
