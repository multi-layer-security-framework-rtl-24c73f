// Testbench for freq_down_conv: checks that ce pulses exactly once every DIV clocks and that
// clk_div is a square wave of period DIV, for the 50 MHz -> 12.5 MHz setting (DIV = 4) and
// for DIV = 8 (50 MHz -> 6.25 MHz, a 160 ns slow period).
module tb_freq_down_conv;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ce4, cd4, ce8, cd8;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  freq_down_conv #(.DIV(4)) dut4 (.clk, .rst_n, .ce(ce4), .clk_div(cd4));
  freq_down_conv #(.DIV(8)) dut8 (.clk, .rst_n, .ce(ce8), .clk_div(cd8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n4 = 0, n8 = 0, last4 = -1, last8 = -1, rise4 = 0;
    logic prev_cd4 = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    prev_cd4 = cd4;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if (ce4) begin
        if (last4 >= 0) check(t - last4 == 4, $sformatf("ce (DIV=4) spacing %0d", t - last4));
        last4 = t; n4++;
      end
      if (ce8) begin
        if (last8 >= 0) check(t - last8 == 8, $sformatf("ce (DIV=8) spacing %0d", t - last8));
        last8 = t; n8++;
      end
      if (cd4 && !prev_cd4) rise4++;
      prev_cd4 = cd4;
    end
    check(n4 == 100, $sformatf("ce count DIV=4: %0d", n4));
    check(n8 == 50, $sformatf("ce count DIV=8: %0d", n8));
    check(rise4 == 100, $sformatf("clk_div rising edges DIV=4: %0d", rise4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
