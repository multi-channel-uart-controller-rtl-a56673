// Testbench of uart_tx (driven by a baud_gen with the default divisor 4).
// Sends the character 7'h2A and then random characters, each written as soon
// as txrdy is high, and decodes the line with an independent monitor. Checks
// for every frame: start bit, data, even parity, stop bit, exactly 4 clocks
// per bit; txrdy/tx_sts low/high while busy; the line high when idle; and
// that txrdy returns exactly 40 clocks (10 bits) after the start bit begins.
// A write while busy must be ignored.
module tb_uart_tx;
  import uart_pkg::*;
  localparam int unsigned DIV = 4;
  localparam int NCHAR = 30;

  logic clk = 0, rst_n = 0, wr = 0, tick;
  char_t data = '0;
  logic txrdy, tx_sts, tx;
  int   checks = 0, failures = 0;

  logic       m_valid, m_pok, m_sok, m_tok;
  logic [6:0] m_data;
  int         m_count;
  char_t      sent[$];

  always #5 clk = ~clk;

  baud_gen #(.DIV(DIV)) u_baud (.clk(clk), .rst_n(rst_n), .restart(1'b0), .baud_tick(tick));
  uart_tx dut (.clk(clk), .rst_n(rst_n), .baud_tick(tick), .wr(wr), .data(data),
               .txrdy(txrdy), .tx_sts(tx_sts), .tx(tx));
  uart_line_monitor #(.DIV(DIV)) mon (.clk(clk), .line(rst_n ? tx : 1'b1), .valid(m_valid), .data(m_data),
               .parity_ok(m_pok), .stop_ok(m_sok), .timing_ok(m_tok), .count(m_count));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference check of every decoded frame.
  always @(posedge clk) if (m_valid) begin
    char_t exp;
    exp = (sent.size() > 0) ? sent.pop_front() : '0;
    check(m_data == exp, $sformatf("data %h expected %h", m_data, exp));
    check(m_pok, "parity/start bit wrong");
    check(m_sok, "stop bit wrong");
    check(m_tok, "bit timing wrong");
  end

  // Frame length: clocks from the start bit's first clock until txrdy.
  int start_clk = -1, clk_no = 0;
  logic tx_d = 1;
  always @(posedge clk) begin
    clk_no++;
    tx_d <= tx;
    if (rst_n && start_clk < 0 && tx_d && !tx && tx_sts) start_clk = clk_no;
    if (rst_n && !tx_sts && start_clk >= 0) begin
      check(clk_no - start_clk == 10 * DIV,
            $sformatf("frame lasted %0d clocks", clk_no - start_clk));
      start_clk = -1;
    end
    if (rst_n && txrdy) check(tx, "line low while idle");
    check(tx_sts == !txrdy, "tx_sts not the inverse of txrdy");
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NCHAR; i++) begin
      while (!txrdy) @(posedge clk);
      #1;
      data = (i == 0) ? 7'h2A : char_t'($urandom);
      sent.push_back(data);
      wr = 1;
      @(posedge clk); #1 wr = 0;
      check(!txrdy && tx_sts, "not busy after write");
      if (i == 5) begin
        // A write while busy is ignored.
        repeat (7) @(posedge clk);
        #1 data = 7'h55; wr = 1;
        @(posedge clk); #1 wr = 0;
      end
    end
    while (!txrdy) @(posedge clk);
    repeat (4 * DIV) @(posedge clk);
    check(m_count == NCHAR, $sformatf("%0d frames seen", m_count));
    check(sent.size() == 0, "frames missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
