// Testbench of fifo_rptr_empty (AW=4): the testbench plays the write side by
// driving the synchronized write pointer rq2_wptr. Checks the Gray read
// pointer sequence (00 01 03 02 06 07 05 04 0C ...) and address against an
// independent binary count, that rempty is high after reset, rises with the
// read that takes the last word, stays high while reads are requested on an
// empty FIFO (which are ignored), and falls when the write pointer moves.
module tb_fifo_rptr_empty;
  logic rclk = 0, rrst_n = 0, rinc = 0;
  logic [4:0] rq2_wptr = '0;
  logic [3:0] raddr;
  logic [4:0] rptr;
  logic rempty, ren;
  int checks = 0, failures = 0;
  int wcount = 0, rcount = 0;
  int wc_q = 0;   // write count as registered into rempty at the last edge
  logic [4:0] seen[$];

  always #5 rclk = ~rclk;

  fifo_rptr_empty dut (.rclk(rclk), .rrst_n(rrst_n), .rinc(rinc), .rq2_wptr(rq2_wptr),
                       .raddr(raddr), .rptr(rptr), .rempty(rempty), .ren(ren));

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
    repeat (5000) @(posedge rclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit inc);
    bit accept;
    @(negedge rclk);
    rinc = inc;
    #1 check(ren == (inc && !rempty), "ren wrong");
    accept = inc && (rcount < wc_q);
    @(posedge rclk); #1;
    wc_q = wcount;
    rinc = 0;
    if (accept) begin rcount++; seen.push_back(rptr); end
    check(rptr == gray(rcount), $sformatf("rptr %h expected %h", rptr, gray(rcount)));
    check(raddr == 4'(rcount), "raddr wrong");
    check(rempty == (rcount == wcount), $sformatf("rempty %0b with %0d words", rempty, wcount - rcount));
  endtask

  initial begin
    logic [4:0] fig_seq[8] = '{5'h01, 5'h03, 5'h02, 5'h06, 5'h07, 5'h05, 5'h04, 5'h0C};
    repeat (2) @(posedge rclk);
    #1 check(rptr == '0 && rempty, "reset state");
    rrst_n = 1;
    // Eight words written, then read back: the Gray sequence of the read pointer.
    wcount = 8; rq2_wptr = gray(8);
    step(0);
    while (rcount < wcount) step(1);
    foreach (fig_seq[k]) check(seen[k] == fig_seq[k], $sformatf("Gray step %0d: %h", k, seen[k]));
    repeat (3) step(1);
    for (int lap = 0; lap < 6; lap++) begin
      repeat ($urandom_range(1, 16 - (wcount - rcount))) begin
        wcount++;
        rq2_wptr = gray(wcount);
        step($urandom_range(0, 1));
      end
      while (rcount < wcount) step($urandom_range(0, 3) != 0);
      repeat (2) step(1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
