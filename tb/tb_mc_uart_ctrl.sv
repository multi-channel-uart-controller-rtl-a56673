// End-to-end testbench of mc_uart_ctrl at its default parameters (3
// channels, MCU divisor 4, channel divisors 4, 8, 16, 16 x 7 FIFOs).
//
// Clocks: controller 10 ns; channels 9, 11 and 13 ns, unrelated to it. The
// testbench plays the MCU (it generates 10-bit frames with 4 clocks per bit)
// and the three sub-equipments (independent decoders at each channel's own
// divisor and clock, which also check every bit's length).
// Phase 1: 12 characters with gaps; every channel must deliver all of them
//   in order, with no overflow.
// Phase 2: 40 characters back to back. Channel 0 keeps up; the slower
//   channels fill their FIFOs and lose characters. Each channel must deliver
//   exactly the characters that were written into its FIFO (offered while
//   not full), in order, and the overflow bits must match.
// Phase 3: one character with a wrong parity bit and one with a wrong stop
//   bit; the status bits must be set and the characters still forwarded.
// Also checked: each character is broadcast within 10 MCU bit times of its
// start bit; all FIFOs are reported empty at the end. Each mechanism (FIFO
// full, overflow, empty again, parity error, framing error, three baud
// rates) is counted, and one that never happened counts as a failure.
module tb_mc_uart_ctrl;
  import uart_pkg::*;
  localparam int unsigned MCU_DIV = 4;
  localparam int unsigned DIV0 = 4, DIV1 = 8, DIV2 = 16;

  logic clk = 0, rst_n = 0, mcu_rx = 1, status_clr = 0;
  logic [2:0] sub_clk = '0, sub_tx, sub_busy;
  logic bus_wr;
  char_t bus_data;
  logic [2:0] fifo_full, fifo_empty, overflow;
  logic rx_parity_err, rx_frame_err;
  int checks = 0, failures = 0;

  always #5    clk = ~clk;
  always #4.5  sub_clk[0] = ~sub_clk[0];
  always #5.5  sub_clk[1] = ~sub_clk[1];
  always #6.5  sub_clk[2] = ~sub_clk[2];

  mc_uart_ctrl dut (
    .clk(clk), .rst_n(rst_n), .mcu_rx(mcu_rx), .sub_clk(sub_clk), .sub_tx(sub_tx),
    .sub_busy(sub_busy), .bus_wr(bus_wr), .bus_data(bus_data), .status_clr(status_clr),
    .fifo_full(fifo_full), .fifo_empty(fifo_empty), .overflow(overflow),
    .rx_parity_err(rx_parity_err), .rx_frame_err(rx_frame_err)
  );

  // Sub-equipment receivers.
  logic [2:0] m_valid, m_pok, m_sok, m_tok;
  logic [6:0] m_data[3];
  int         m_count[3];
  uart_line_monitor #(.DIV(DIV0)) mon0 (.clk(sub_clk[0]), .line(rst_n ? sub_tx[0] : 1'b1),
      .valid(m_valid[0]), .data(m_data[0]), .parity_ok(m_pok[0]), .stop_ok(m_sok[0]),
      .timing_ok(m_tok[0]), .count(m_count[0]));
  uart_line_monitor #(.DIV(DIV1)) mon1 (.clk(sub_clk[1]), .line(rst_n ? sub_tx[1] : 1'b1),
      .valid(m_valid[1]), .data(m_data[1]), .parity_ok(m_pok[1]), .stop_ok(m_sok[1]),
      .timing_ok(m_tok[1]), .count(m_count[1]));
  uart_line_monitor #(.DIV(DIV2)) mon2 (.clk(sub_clk[2]), .line(rst_n ? sub_tx[2] : 1'b1),
      .valid(m_valid[2]), .data(m_data[2]), .parity_ok(m_pok[2]), .stop_ok(m_sok[2]),
      .timing_ok(m_tok[2]), .count(m_count[2]));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // MCU model.
  char_t sent[$];
  int    clk_no = 0, last_start = 0, n_bcast = 0;
  always @(posedge clk) clk_no++;

  task automatic mcu_send(input char_t d, input bit bad_par = 0, input bit bad_stop = 0);
    logic [9:0] f;
    f = {~bad_stop, (^d) ^ bad_par, d, 1'b0};
    sent.push_back(d);
    last_start = clk_no;
    for (int b = 0; b < 10; b++) begin
      mcu_rx = f[b];
      repeat (MCU_DIV) @(posedge clk);
      #1;
    end
    mcu_rx = 1'b1;
  endtask

  // Expected characters per channel: those written into that FIFO.
  char_t exp_q[3][$];
  int    n_drop[3] = '{0, 0, 0};
  int    n_full[3] = '{0, 0, 0};
  always @(posedge clk) if (rst_n) begin
    if (bus_wr) begin
      char_t s;
      n_bcast++;
      s = (sent.size() > 0) ? sent.pop_front() : '0;
      check(bus_data == s, $sformatf("broadcast %h expected %h", bus_data, s));
      check(clk_no - last_start <= 10 * MCU_DIV,
            $sformatf("broadcast %0d clocks after start bit", clk_no - last_start));
      for (int i = 0; i < 3; i++) begin
        if (dut.wfull[i]) n_drop[i]++;
        else exp_q[i].push_back(bus_data);
      end
    end
    for (int i = 0; i < 3; i++) if (fifo_full[i]) n_full[i]++;
  end

  // Checking of what each sub-equipment receives.
  task automatic got(input int i);
    char_t e;
    e = (exp_q[i].size() > 0) ? exp_q[i].pop_front() : '0;
    check(m_data[i] == e, $sformatf("channel %0d got %h expected %h", i, m_data[i], e));
    check(m_pok[i] && m_sok[i], $sformatf("channel %0d frame format", i));
    check(m_tok[i], $sformatf("channel %0d bit length", i));
  endtask
  always @(posedge sub_clk[0]) if (m_valid[0]) got(0);
  always @(posedge sub_clk[1]) if (m_valid[1]) got(1);
  always @(posedge sub_clk[2]) if (m_valid[2]) got(2);

  task automatic wait_drain();
    int n;
    n = 0;
    while ((exp_q[0].size() + exp_q[1].size() + exp_q[2].size() != 0 || sub_busy != 0) && n < 200000) begin
      @(posedge clk); n++;
    end
    repeat (60) @(posedge clk);
    #1;
  endtask

  int n_empty_again = 0, n_perr = 0, n_ferr = 0, n_ovf = 0;

  initial begin
    repeat (20) @(posedge clk);
    #1 rst_n = 1;
    repeat (10) @(posedge clk);
    #1;
    check(fifo_empty == 3'b111 && fifo_full == 0 && overflow == 0, "status after reset");
    // Phase 1.
    for (int i = 0; i < 12; i++) begin
      mcu_send(char_t'($urandom));
      repeat ($urandom_range(0, 80)) @(posedge clk);
      #1;
    end
    wait_drain();
    check(m_count[0] == 12 && m_count[1] == 12 && m_count[2] == 12,
          $sformatf("phase 1 frames %0d %0d %0d", m_count[0], m_count[1], m_count[2]));
    check(overflow == 0, "overflow in phase 1");
    check(fifo_empty == 3'b111, "not empty after phase 1");
    if (fifo_empty == 3'b111) n_empty_again++;
    // Phase 2.
    for (int i = 0; i < 40; i++) mcu_send(char_t'($urandom));
    repeat (5) @(posedge clk);
    #1;
    check(overflow[0] == (n_drop[0] > 0) && overflow[1] == (n_drop[1] > 0) &&
          overflow[2] == (n_drop[2] > 0), $sformatf("overflow %b", overflow));
    check(n_drop[0] == 0, "fastest channel lost characters");
    check(n_drop[2] > 0, "slowest channel never overflowed");
    for (int i = 0; i < 3; i++) if (overflow[i]) n_ovf++;
    wait_drain();
    check(fifo_empty == 3'b111, "not empty after phase 2");
    if (fifo_empty == 3'b111) n_empty_again++;
    check(m_count[0] == 52, $sformatf("channel 0 delivered %0d", m_count[0]));
    for (int i = 0; i < 3; i++)
      check(m_count[i] == 52 - n_drop[i], $sformatf("channel %0d delivered %0d, dropped %0d",
                                                    i, m_count[i], n_drop[i]));
    // Phase 3.
    @(negedge clk) status_clr = 1;
    @(negedge clk) status_clr = 0;
    check(overflow == 0 && !rx_parity_err && !rx_frame_err, "status not cleared");
    mcu_send(7'h2A, 1, 0);
    repeat (20) @(posedge clk);
    #1;
    check(rx_parity_err && !rx_frame_err, "parity error not reported");
    if (rx_parity_err) n_perr++;
    mcu_send(7'h07, 0, 1);
    mcu_send(7'h3C);           // directly after the bad stop bit
    #1;
    check(rx_frame_err, "framing error not reported");
    if (rx_frame_err) n_ferr++;
    repeat (40) @(posedge clk);
    wait_drain();
    check(m_count[2] == 55 - n_drop[2], "characters with errors not forwarded");
    check(n_bcast == 55, $sformatf("%0d broadcasts", n_bcast));
    // Mechanism counts.
    $display("mechanisms: full %0d/%0d/%0d clocks, overflowed channels %0d, empty again %0d, parity %0d, framing %0d, frames %0d/%0d/%0d",
             n_full[0], n_full[1], n_full[2], n_ovf, n_empty_again, n_perr, n_ferr,
             m_count[0], m_count[1], m_count[2]);
    check(n_full[2] > 0, "FIFO full never happened");
    check(n_ovf > 0, "overflow never happened");
    check(n_empty_again > 0, "FIFO never drained empty");
    check(n_perr > 0, "parity error never happened");
    check(n_ferr > 0, "framing error never happened");
    check(m_count[0] > 0 && m_count[1] > 0 && m_count[2] > 0, "a baud rate never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
