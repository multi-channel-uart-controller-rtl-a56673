// Testbench of ptr_sync: drives a 5-bit Gray count and single random bits
// and checks that the output equals the input of exactly two clocks
// earlier, and that reset returns the output to the reset value.
module tb_ptr_sync;
  logic clk = 0, rst_n = 0;
  logic [4:0] d = '0, q;
  logic [0:0] d1 = '0, q1;
  logic [4:0] hist[3];
  logic       hist1[3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ptr_sync dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));
  ptr_sync #(.W(1), .RST_VAL(1'b1)) dut1 (.clk(clk), .rst_n(rst_n), .d(d1), .q(q1));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] bin;
    bin = '0;
    repeat (2) @(posedge clk);
    #1;
    check(q == 5'h00 && q1 == 1'b1, "reset value");
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      hist1[2] = hist1[1]; hist1[1] = hist1[0]; hist1[0] = d1[0];
      @(posedge clk); #1;
      if (i >= 2) begin
        check(q == hist[1], $sformatf("q=%h expected %h", q, hist[1]));
        check(q1[0] == hist1[1], "1-bit q wrong");
      end
      if ($urandom_range(0, 2) != 0) bin = bin + 1;
      d  = (bin >> 1) ^ bin;
      d1 = 1'($urandom);
    end
    rst_n = 0;
    #1 check(q == 5'h00 && q1 == 1'b1, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
