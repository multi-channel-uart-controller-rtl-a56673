// Testbench of async_fifo (16 x 7) with unrelated write (10 ns) and read
// (16 ns) clocks. Phases: fill with no reads until full (exactly 16 words
// accepted, further writes ignored); drain until empty (same 16 words in
// order, read pointer Gray sequence 01 03 02 06 07 05 04 0C ...); random
// simultaneous traffic in both domains checked against a queue model; a
// clear in the middle of traffic (FIFO empty and not full afterwards, then
// correct data again). Also checks that the empty flag falls within 4 read
// clocks of the first write and that the full flag falls within 4 write
// clocks of a read from a full FIFO.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, rst_n = 0, clr_n = 1;
  logic wr = 0, rd = 0;
  logic [6:0] data_in = '0, data_out;
  logic wfull, rempty;
  logic [4:0] wptr, rptr;
  int checks = 0, failures = 0;
  logic [6:0] q[$];
  int n_wr = 0, n_rd = 0;
  bit pending = 0;
  logic [6:0] pend_data;

  always #5 wclk = ~wclk;
  always #8 rclk = ~rclk;

  async_fifo dut (.rst_n(rst_n), .clr_n(clr_n), .wclk(wclk), .wr(wr), .data_in(data_in),
                  .wfull(wfull), .rclk(rclk), .rd(rd), .data_out(data_out),
                  .rempty(rempty), .wptr(wptr), .rptr(rptr));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (40000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Write-side model: a write is taken when wr=1 and wfull=0 at the edge.
  always @(posedge wclk) if (rst_n && clr_n && wr && !wfull) begin
    q.push_back(data_in);
    n_wr++;
    check(q.size() <= 16, "more than 16 words stored");
  end

  // Read-side model: data_out shows the word one read clock after the read.
  always @(posedge rclk) if (rst_n && clr_n) begin
    if (pending) check(data_out == pend_data, $sformatf("read %h expected %h", data_out, pend_data));
    pending = 0;
    if (rd && !rempty) begin
      check(q.size() > 0, "read from an empty FIFO");
      pend_data = (q.size() > 0) ? q.pop_front() : '0;
      pending = 1;
      n_rd++;
    end
  end

  task automatic wait_w(input int n); repeat (n) @(negedge wclk); endtask
  task automatic wait_r(input int n); repeat (n) @(negedge rclk); endtask

  initial begin
    int n;
    logic [4:0] rseq[$];
    logic [4:0] exp_seq[8] = '{5'h01, 5'h03, 5'h02, 5'h06, 5'h07, 5'h05, 5'h04, 5'h0C};
    wait_w(3);
    check(rempty && !wfull && data_out == '0 && wptr == '0 && rptr == '0, "reset state");
    rst_n = 1;
    // Fill.
    wait_w(1);
    wr = 1; data_in = 7'h67;
    fork
      begin
        n = 0;
        while (rempty && n < 20) begin @(posedge rclk); #1 n++; end
        check(n <= 4, $sformatf("empty fell %0d read clocks after the first write", n));
      end
    join_none
    for (int i = 0; i < 24; i++) begin
      wait_w(1);
      data_in = 7'($urandom);
    end
    wr = 0;
    check(wfull, "not full after 24 writes");
    check(n_wr == 16, $sformatf("%0d words accepted", n_wr));
    // One read from the full FIFO clears wfull a few write clocks later.
    wait_r(1); rd = 1; wait_r(1); rd = 0;
    n = 0;
    while (wfull && n < 20) begin @(posedge wclk); #1 n++; end
    check(n <= 4, $sformatf("full fell %0d write clocks after a read", n));
    // Drain, recording the Gray read pointer.
    wait_r(1); rd = 1;
    while (!rempty) begin @(posedge rclk); #1 rseq.push_back(rptr); end
    wait_r(1); rd = 0;
    check(n_rd == 16 && q.size() == 0, $sformatf("%0d reads, %0d left", n_rd, q.size()));
    // One word was read before the drain, so the pointer continues from 01.
    for (int k = 0; k < 7; k++)
      check(rseq[k] == exp_seq[k + 1], $sformatf("read pointer step %0d: %h", k, rseq[k]));
    // Random traffic.
    fork
      for (int i = 0; i < 1500; i++) begin
        @(negedge wclk); wr = ($urandom_range(0, 2) != 0); data_in = 7'($urandom);
      end
      for (int i = 0; i < 1000; i++) begin
        @(negedge rclk); rd = ($urandom_range(0, 1) != 0);
      end
    join
    @(negedge wclk) wr = 0;
    @(negedge rclk) rd = 1;
    while (!rempty) @(negedge rclk);
    wait_r(2); rd = 0;
    check(q.size() == 0, "words left after draining");
    // Clear in the middle of traffic.
    for (int i = 0; i < 10; i++) begin @(negedge wclk); wr = 1; data_in = 7'($urandom); end
    wr = 0;
    @(negedge wclk) clr_n = 0;
    q.delete(); pending = 0;
    wait_w(4);
    check(rempty && !wfull && data_out == '0, "not empty after clear");
    clr_n = 1;
    wait_w(2);
    for (int i = 0; i < 5; i++) begin @(negedge wclk); wr = 1; data_in = 7'(i + 1); end
    @(negedge wclk) wr = 0;
    wait_r(5); rd = 1;
    while (!rempty) @(negedge rclk);
    wait_r(2); rd = 0;
    check(q.size() == 0, "data after clear not read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
