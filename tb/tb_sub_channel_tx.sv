// Testbench of sub_channel_tx with divisor 8. The testbench models the read
// port of a FIFO (registered data one clock after rd, empty flag) holding
// characters it pushes at random times, and decodes the serial output with
// an independent monitor. Checks: every character comes out once, in order,
// with correct framing, parity and exactly 8 clocks per bit; rd is never
// pulsed while empty; busy is high while a frame is on the line; frames
// follow each other with less than two bit times of idle line while the
// FIFO holds data.
module tb_sub_channel_tx;
  import uart_pkg::*;
  localparam int unsigned DIV = 8;

  logic clk = 0, rst_n = 0;
  logic fifo_rempty, fifo_rd, tx, busy;
  char_t fifo_data = '0;
  int checks = 0, failures = 0;
  char_t fifo_q[$], exp_q[$];
  logic       m_valid, m_pok, m_sok, m_tok;
  logic [6:0] m_data;
  int         m_count;
  int         max_idle_busy = 0;

  always #5 clk = ~clk;

  assign fifo_rempty = (fifo_q.size() == 0);

  sub_channel_tx #(.DIV(DIV)) dut (.clk(clk), .rst_n(rst_n), .fifo_rempty(fifo_rempty),
      .fifo_rd(fifo_rd), .fifo_data(fifo_data), .tx(tx), .busy(busy));
  uart_line_monitor #(.DIV(DIV)) mon (.clk(clk), .line(rst_n ? tx : 1'b1), .valid(m_valid),
      .data(m_data), .parity_ok(m_pok), .stop_ok(m_sok), .timing_ok(m_tok), .count(m_count));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO read-port model.
  always @(posedge clk) if (rst_n && fifo_rd) begin
    check(fifo_q.size() > 0, "read while empty");
    if (fifo_q.size() > 0) fifo_data <= fifo_q.pop_front();
  end

  always @(posedge clk) if (m_valid) begin
    char_t exp;
    exp = (exp_q.size() > 0) ? exp_q.pop_front() : '0;
    check(m_data == exp, $sformatf("data %h expected %h", m_data, exp));
    check(m_pok && m_sok && m_tok, "frame format or timing wrong");
  end

  // Idle line time between the end of a frame and the next start bit while
  // characters are waiting.
  int   clk_no = 0, end_clk = -1;
  logic tx_d = 1;
  always @(posedge clk) if (rst_n) begin
    clk_no++;
    tx_d <= tx;
    if (m_valid && fifo_q.size() > 0) end_clk = clk_no;
    if (tx_d && !tx && end_clk >= 0) begin
      if (clk_no - end_clk > max_idle_busy) max_idle_busy = clk_no - end_clk;
      end_clk = -1;
    end
    if (!tx) check(busy, "line active while not busy");
  end

  initial begin
    char_t d;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (20) @(posedge clk);
    check(tx && !busy && !fifo_rd, "idle after reset");
    for (int burst = 0; burst < 8; burst++) begin
      repeat ($urandom_range(1, 6)) begin
        @(negedge clk);
        d = char_t'($urandom);
        fifo_q.push_back(d);
        exp_q.push_back(d);
      end
      repeat ($urandom_range(0, 40 * DIV)) @(posedge clk);
    end
    while (exp_q.size() > 0) @(posedge clk);
    repeat (4 * DIV) @(posedge clk);
    check(m_count > 8, "too few frames");
    check(max_idle_busy <= DIV + 4, $sformatf("line idle %0d clocks with data waiting", max_idle_busy));
    check(max_idle_busy > 0, "no back-to-back frames measured");
    check(!busy && tx, "not idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
