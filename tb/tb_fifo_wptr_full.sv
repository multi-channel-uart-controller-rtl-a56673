// Testbench of fifo_wptr_full (AW=4): the testbench plays the read side by
// driving the synchronized read pointer wq2_rptr. Checks the Gray write
// pointer sequence and address against an independent binary count, that
// wfull rises with the 16th write when the reader has not moved, that
// writes while full are ignored, that wfull falls once the read pointer
// advances, and that wen follows winc and wfull.
module tb_fifo_wptr_full;
  logic wclk = 0, wrst_n = 0, winc = 0;
  logic [4:0] wq2_rptr = '0;
  logic [3:0] waddr;
  logic [4:0] wptr;
  logic wfull, wen;
  int checks = 0, failures = 0;
  int wcount = 0, rcount = 0;

  always #5 wclk = ~wclk;

  fifo_wptr_full dut (.wclk(wclk), .wrst_n(wrst_n), .winc(winc), .wq2_rptr(wq2_rptr),
                      .waddr(waddr), .wptr(wptr), .wfull(wfull), .wen(wen));

  function automatic logic [4:0] gray(input int n);
    logic [4:0] b;
    b = 5'(n);
    return b ^ (b >> 1);
  endfunction

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

  // One write clock with winc as given; updates the model.
  task automatic step(input bit inc);
    bit accept;
    @(negedge wclk);
    winc = inc;
    #1 check(wen == (inc && !wfull), "wen wrong");
    accept = inc && (wcount - rcount < 16);
    @(posedge wclk); #1;
    winc = 0;
    if (accept) wcount++;
    check(wptr == gray(wcount), $sformatf("wptr %h expected %h", wptr, gray(wcount)));
    check(waddr == 4'(wcount), "waddr wrong");
    check(wfull == (wcount - rcount == 16), $sformatf("wfull %0b with %0d words", wfull, wcount - rcount));
  endtask

  initial begin
    repeat (2) @(posedge wclk);
    #1 check(wptr == '0 && !wfull, "reset state");
    wrst_n = 1;
    for (int lap = 0; lap < 4; lap++) begin
      // Fill up, try extra writes, then let the reader drain partly.
      while (wcount - rcount < 16) step($urandom_range(0, 3) != 0);
      repeat (3) step(1);
      repeat ($urandom_range(1, 16)) begin
        rcount++;
        wq2_rptr = gray(rcount);
        step(0);
      end
      repeat (10) step(1);
      while (rcount < wcount) begin
        rcount++;
        wq2_rptr = gray(rcount);
        step($urandom_range(0, 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
