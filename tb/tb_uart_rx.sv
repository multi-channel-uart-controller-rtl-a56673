// Testbench of uart_rx at the default divisor 4. The testbench itself
// generates frames (start, 7 data bits LSB first, even parity, stop) with
// exactly 4 clocks per bit, sometimes back to back and sometimes after an
// idle gap, and some with a wrong parity or stop bit. Checks: rxrdy rises
// once per frame, between 8 and 10 bit times after the start edge; det_rx
// pulses at the start bit; rd copies the character to data and clears
// rxrdy; parity_err and frame_err pulse exactly for the corrupted frames;
// one-clock glitches produce no character; a frame directly after a missing
// stop bit is still received.
module tb_uart_rx;
  import uart_pkg::*;
  localparam int unsigned DIV = 4;
  localparam int NCHAR = 40;

  logic clk = 0, rst_n = 0, rx = 1, rd = 0;
  char_t data;
  logic rxrdy, det_rx, parity_err, frame_err;
  int   checks = 0, failures = 0;
  int   clk_no = 0, start_clk = 0;
  int   n_perr = 0, n_ferr = 0, n_det = 0;
  int   exp_perr = 0, exp_ferr = 0;

  always #5 clk = ~clk;
  always @(posedge clk) clk_no++;

  uart_rx dut (.clk(clk), .rst_n(rst_n), .rx(rx), .rd(rd), .data(data), .rxrdy(rxrdy),
               .det_rx(det_rx), .parity_err(parity_err), .frame_err(frame_err));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input char_t d, input bit bad_par, input bit bad_stop);
    logic [9:0] f;
    f = {~bad_stop, (^d) ^ bad_par, d, 1'b0};
    start_clk = clk_no;
    for (int b = 0; b < 10; b++) begin
      rx = f[b];
      repeat (DIV) @(posedge clk);
      #1;
    end
    rx = 1'b1;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (parity_err) n_perr++;
    if (frame_err)  n_ferr++;
    if (det_rx)     n_det++;
  end

  char_t exp_q[$];

  // Reader: waits for rxrdy, checks latency, reads, checks the data line.
  initial begin
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      if (rxrdy) begin
        int lat;
        char_t exp;
        lat = clk_no - start_clk;
        check(lat >= 8 * DIV && lat <= 10 * DIV, $sformatf("rxrdy latency %0d", lat));
        #1 rd = 1;
        @(posedge clk); #1 rd = 0;
        exp = exp_q.pop_front();
        check(data == exp, $sformatf("data %h expected %h", data, exp));
        check(!rxrdy, "rxrdy not cleared by rd");
      end
    end
  end

  initial begin
    char_t d;
    bit bp, bs;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (10) @(posedge clk);
    #1;
    check(!rxrdy && data == '0, "not idle after reset");
    for (int i = 0; i < NCHAR; i++) begin
      d  = (i == 0) ? 7'h07 : char_t'($urandom);
      bp = (i % 7 == 3);
      bs = (i % 11 == 5);
      exp_q.push_back(d);
      if (bp) exp_perr++;
      if (bs) exp_ferr++;
      send(d, bp, bs);
      if (bs) begin
        // Let the line settle high long enough after a missing stop bit.
        repeat (2 * DIV) @(posedge clk);
        #1;
      end else if (i % 3 == 0) begin
        repeat ($urandom_range(1, 30)) @(posedge clk);
        #1;
      end
    end
    // A one-clock glitch is not a start bit.
    for (int g = 0; g < 5; g++) begin
      rx = 0; @(posedge clk); #1 rx = 1;
      repeat (12 * DIV) @(posedge clk);
      #1;
    end
    // A missing stop bit followed directly by the next frame.
    exp_q.push_back(7'h15); exp_ferr++;
    send(7'h15, 0, 1);
    exp_q.push_back(7'h6A);
    send(7'h6A, 0, 0);
    repeat (20 * DIV) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("%0d characters not received", exp_q.size()));
    check(n_perr == exp_perr, $sformatf("parity errors %0d expected %0d", n_perr, exp_perr));
    check(n_ferr == exp_ferr, $sformatf("framing errors %0d expected %0d", n_ferr, exp_ferr));
    check(n_det >= NCHAR, $sformatf("det_rx seen %0d times", n_det));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
