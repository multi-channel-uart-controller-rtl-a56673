// Replays three short reference scenarios of the design at default sizes:
//  1. FIFO: eight writes of 7'h67 on a fast write clock while reads are
//     requested on a slower read clock. All eight come out as 7'h67, the
//     read pointer steps through the Gray values 01 03 02 06 07 05 04 0C,
//     both pointers end at 0C, and the FIFO ends empty and not full.
//  2. Transmitter: the character 7'b0101010 (7'h2A) leaves as the line bits
//     0 | 0 1 0 1 0 1 0 | 1 | 1 (start, data LSB first, parity, stop), each
//     4 clocks long.
//  3. Receiver: a frame carrying 7'h07 ends with rxrdy=1, and a read puts
//     7'h07 on the data line.
module tb_reference_scenarios;
  import uart_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk1 = 0, clk2 = 0, clk = 0, rst_n = 0;
  always #1 clk1 = ~clk1;
  always #2 clk2 = ~clk2;
  always #5 clk  = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 1. FIFO.
  logic f_wr = 0, f_rd = 0, f_full, f_empty;
  logic [6:0] f_in = 7'h67, f_out;
  logic [4:0] f_wptr, f_rptr;
  async_fifo u_fifo (.rst_n(rst_n), .clr_n(1'b1), .wclk(clk1), .wr(f_wr), .data_in(f_in),
                     .wfull(f_full), .rclk(clk2), .rd(f_rd), .data_out(f_out),
                     .rempty(f_empty), .wptr(f_wptr), .rptr(f_rptr));
  logic [4:0] rseq[$];
  int n_out = 0;
  bit rd_q = 0;
  always @(posedge clk2) if (rst_n) begin
    if (rd_q) begin check(f_out == 7'h67, $sformatf("FIFO read %h", f_out)); n_out++; end
    rd_q = f_rd && !f_empty;
  end
  always @(posedge clk2) begin
    #0.1;
    if (rst_n && (rseq.size() == 0 || rseq[$] != f_rptr) && f_rptr != 0) rseq.push_back(f_rptr);
  end

  // 2. Transmitter.
  logic t_tick, t_wr = 0, t_rdy, t_sts, t_tx;
  uart_tx u_tx (.clk(clk), .rst_n(rst_n), .baud_tick(t_tick), .wr(t_wr), .data(7'b0101010),
                .txrdy(t_rdy), .tx_sts(t_sts), .tx(t_tx));
  baud_gen u_tb (.clk(clk), .rst_n(rst_n), .restart(1'b0), .baud_tick(t_tick));

  // 3. Receiver.
  logic r_rx = 1, r_rd = 0, r_rdy, r_det, r_perr, r_ferr;
  char_t r_data;
  uart_rx u_rx (.clk(clk), .rst_n(rst_n), .rx(r_rx), .rd(r_rd), .data(r_data), .rxrdy(r_rdy),
                .det_rx(r_det), .parity_err(r_perr), .frame_err(r_ferr));

  initial begin
    logic [9:0] exp_bits, got_bits, f;
    logic [4:0] exp_seq[8] = '{5'h01, 5'h03, 5'h02, 5'h06, 5'h07, 5'h05, 5'h04, 5'h0C};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // 1.
    @(negedge clk1) f_wr = 1; f_rd = 1;
    repeat (8) @(negedge clk1);
    f_wr = 0;
    repeat (30) @(negedge clk2);
    f_rd = 0;
    check(n_out == 8, $sformatf("%0d words read", n_out));
    check(f_wptr == 5'h0C && f_rptr == 5'h0C, $sformatf("pointers %h %h", f_wptr, f_rptr));
    check(f_empty && !f_full, "FIFO flags at the end");
    foreach (exp_seq[k]) check(k < rseq.size() && rseq[k] == exp_seq[k],
                               $sformatf("read pointer step %0d", k));
    // 2.
    @(negedge clk) t_wr = 1;
    @(negedge clk) t_wr = 0;
    while (t_tx) @(negedge clk);
    exp_bits = 10'b1_1_0101010_0;
    for (int b = 0; b < 10; b++) begin
      got_bits[b] = t_tx;
      repeat (3) begin @(negedge clk); check(t_tx == got_bits[b], "bit shorter than 4 clocks"); end
      @(negedge clk);
    end
    check(got_bits == exp_bits, $sformatf("line bits %b expected %b", got_bits, exp_bits));
    // 3.
    f = {1'b1, ^7'h07, 7'h07, 1'b0};
    for (int b = 0; b < 10; b++) begin
      @(negedge clk) r_rx = f[b];
      repeat (3) @(negedge clk);
    end
    @(negedge clk) r_rx = 1;
    check(r_rdy, "rxrdy not set");
    r_rd = 1;
    @(negedge clk) r_rd = 0;
    check(r_data == 7'h07 && !r_rdy, $sformatf("received %h", r_data));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
