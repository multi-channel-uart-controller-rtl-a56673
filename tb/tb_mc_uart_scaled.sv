// Scaling test of mc_uart_ctrl: five channels with divisors 4, 6, 8, 12 and
// 16 and five unrelated channel clocks, fed with 30 back-to-back characters.
// Each channel must deliver, in order and with correct framing and bit
// length, exactly the characters its FIFO accepted; the overflow bits must
// match the characters each channel lost.
module tb_mc_uart_scaled;
  import uart_pkg::*;
  localparam int unsigned N = 5;
  localparam int unsigned MCU_DIV = 4;
  localparam int unsigned DIVS[N] = '{4, 6, 8, 12, 16};
  localparam real HALF[N] = '{3.0, 4.5, 5.5, 2.5, 6.0};

  logic clk = 0, rst_n = 0, mcu_rx = 1;
  logic [N-1:0] sub_clk = '0, sub_tx, sub_busy, fifo_full, fifo_empty, overflow;
  logic bus_wr, perr, ferr;
  char_t bus_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mc_uart_ctrl #(.N_CH(N), .MCU_DIV(MCU_DIV), .SUB_DIV(DIVS)) dut (
    .clk(clk), .rst_n(rst_n), .mcu_rx(mcu_rx), .sub_clk(sub_clk), .sub_tx(sub_tx),
    .sub_busy(sub_busy), .bus_wr(bus_wr), .bus_data(bus_data), .status_clr(1'b0),
    .fifo_full(fifo_full), .fifo_empty(fifo_empty), .overflow(overflow),
    .rx_parity_err(perr), .rx_frame_err(ferr));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  char_t exp_q[N][$];
  int    n_drop[N];
  int    n_got[N];

  for (genvar i = 0; i < N; i++) begin : g_sub
    logic       v, pok, sok, tok;
    logic [6:0] d;
    int         cnt;
    always #(HALF[i]) sub_clk[i] = ~sub_clk[i];
    uart_line_monitor #(.DIV(DIVS[i])) mon (.clk(sub_clk[i]), .line(rst_n ? sub_tx[i] : 1'b1),
        .valid(v), .data(d), .parity_ok(pok), .stop_ok(sok), .timing_ok(tok), .count(cnt));
    always @(posedge sub_clk[i]) if (v) begin
      char_t e;
      e = (exp_q[i].size() > 0) ? exp_q[i].pop_front() : '0;
      check(d == e, $sformatf("channel %0d got %h expected %h", i, d, e));
      check(pok && sok && tok, $sformatf("channel %0d framing or bit length", i));
      n_got[i]++;
    end
  end

  always @(posedge clk) if (rst_n && bus_wr)
    for (int i = 0; i < N; i++) begin
      if (dut.wfull[i]) n_drop[i]++;
      else exp_q[i].push_back(bus_data);
    end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] f;
    char_t d;
    int left;
    foreach (n_drop[i]) begin n_drop[i] = 0; n_got[i] = 0; end
    repeat (20) @(posedge clk);
    #1 rst_n = 1;
    repeat (10) @(posedge clk);
    #1;
    for (int c = 0; c < 30; c++) begin
      d = char_t'($urandom);
      f = {1'b1, ^d, d, 1'b0};
      for (int b = 0; b < 10; b++) begin
        mcu_rx = f[b];
        repeat (MCU_DIV) @(posedge clk);
        #1;
      end
      mcu_rx = 1'b1;
    end
    repeat (5) @(posedge clk);
    #1;
    for (int i = 0; i < N; i++)
      check(overflow[i] == (n_drop[i] > 0), $sformatf("overflow[%0d]=%b with %0d lost", i, overflow[i], n_drop[i]));
    do begin
      repeat (100) @(posedge clk);
      left = 0;
      for (int i = 0; i < N; i++) left += exp_q[i].size();
    end while (left != 0 || sub_busy != 0);
    repeat (20) @(posedge clk);
    for (int i = 0; i < N; i++)
      check(n_got[i] == 30 - n_drop[i], $sformatf("channel %0d delivered %0d, lost %0d", i, n_got[i], n_drop[i]));
    check(fifo_empty == '1, "FIFOs not empty at the end");
    check(n_drop[4] > 0, "slowest channel never overflowed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
