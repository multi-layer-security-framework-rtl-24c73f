// Testbench for serial_to_parallel: streams random bytes MSB first at one bit per clock with
// the slow side enabled every fourth clock, and checks every byte that comes out, in order.
// Then it stops taking bytes and checks that the overrun flag rises.
module tb_serial_to_parallel;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ce, ser_in = 1'b0, ser_valid = 1'b0, out_valid, out_ready = 1'b1, overrun;
  logic [7:0] out_data;
  logic [1:0] div = '0;
  int checks = 0, failures = 0;
  logic [7:0] sent [$];

  always #10 clk = ~clk;
  always_ff @(posedge clk) div <= div + 1'b1;
  assign ce = (div == 2'd3);

  serial_to_parallel dut (.clk, .rst_n, .ce, .ser_in, .ser_valid, .out_data, .out_valid,
                          .out_ready, .overrun);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Collect bytes on slow-side hand-overs.
  int got = 0;
  always @(posedge clk) begin
    if (rst_n && ce && out_valid && out_ready) begin
      if (sent.size() == 0) check(1'b0, "byte out of nothing");
      else begin
        logic [7:0] exp;
        exp = sent.pop_front();
        check(out_data == exp, $sformatf("byte %0d: got %h exp %h", got, out_data, exp));
      end
      got++;
    end
  end

  task automatic send_byte(input logic [7:0] b);
    sent.push_back(b);
    for (int i = 7; i >= 0; i--) begin
      @(negedge clk);
      ser_in = b[i];
      ser_valid = 1'b1;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 40; k++) send_byte(8'($urandom));
    // A gap in the stream.
    @(negedge clk); ser_valid = 1'b0;
    repeat (13) @(negedge clk);
    for (int k = 0; k < 10; k++) send_byte(8'($urandom));
    @(negedge clk); ser_valid = 1'b0;
    repeat (20) @(posedge clk);
    check(got == 50, $sformatf("bytes delivered %0d", got));
    check(!overrun, "no overrun while the slow side keeps up");
    // Stop taking bytes: the second byte that completes must raise overrun.
    out_ready = 1'b0;
    send_byte(8'h5a);
    send_byte(8'ha5);
    @(negedge clk); ser_valid = 1'b0;
    repeat (2) @(posedge clk);
    check(overrun, "overrun after an untaken byte");
    check(out_valid && out_data == 8'h5a, "first untaken byte is kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
