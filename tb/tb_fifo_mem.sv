// Testbench of fifo_mem (16 x 7): writes random words to all locations in
// the write clock domain, then reads them back in random order in a read
// clock domain of a different period. Checks each word one read clock after
// re, that rdata holds while re is low, that a write with we low changes
// nothing, and that reset clears rdata.
module tb_fifo_mem;
  logic wclk = 0, rclk = 0, rrst_n = 0;
  logic we = 0, re = 0;
  logic [3:0] waddr = '0, raddr = '0;
  logic [6:0] wdata = '0, rdata;
  logic [6:0] model [16];
  int checks = 0, failures = 0;

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  fifo_mem dut (.wclk(wclk), .we(we), .waddr(waddr), .wdata(wdata), .rclk(rclk),
                .rrst_n(rrst_n), .re(re), .raddr(raddr), .rdata(rdata));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_all();
    for (int a = 0; a < 16; a++) begin
      @(negedge wclk);
      we = 1; waddr = 4'(a); wdata = 7'($urandom); model[a] = wdata;
    end
    @(negedge wclk) we = 0;
  endtask

  task automatic read_check(input int a);
    @(negedge rclk);
    re = 1; raddr = 4'(a);
    @(negedge rclk);
    re = 0;
    check(rdata == model[a], $sformatf("addr %0d: %h expected %h", a, rdata, model[a]));
    raddr = 4'($urandom);
    @(negedge rclk);
    check(rdata == model[a], "rdata changed without re");
  endtask

  initial begin
    repeat (2) @(posedge rclk);
    #1 check(rdata == '0, "rdata not cleared by reset");
    rrst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      write_all();
      for (int k = 0; k < 16; k++) read_check((k * 5 + pass) % 16);
    end
    // Write with we low must not change a location.
    @(negedge wclk);
    waddr = 4'd3; wdata = ~model[3];
    @(negedge wclk);
    read_check(3);
    rrst_n = 0;
    #1 check(rdata == '0, "asynchronous reset of rdata");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
