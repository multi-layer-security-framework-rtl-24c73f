// Testbench for block_buffer: writes random blocks on slow-rate cycles until the FIFO is full,
// checks full, in_ready and count, checks that a write while full is refused, then reads
// everything back in order at the board clock, and finally mixes writes and reads.
module tb_block_buffer;
  localparam int DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0, ce;
  logic [127:0] in_data = '0, rd_data;
  logic in_valid = 1'b0, in_ready, rd_en = 1'b0, empty, full;
  logic [$clog2(DEPTH):0] count;
  logic [1:0] div = '0;
  int checks = 0, failures = 0;
  logic [127:0] model [$];

  always #10 clk = ~clk;
  always_ff @(posedge clk) div <= div + 1'b1;
  assign ce = (div == 2'd3);

  block_buffer #(.DEPTH(DEPTH), .W(128)) dut (.clk, .rst_n, .ce, .in_data, .in_valid, .in_ready,
                                              .rd_en, .rd_data, .empty, .full, .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(input logic [127:0] d);
    @(negedge clk);
    while (!ce) @(negedge clk);
    in_data = d; in_valid = 1'b1;
    if (in_ready) model.push_back(d);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic read_one();
    @(negedge clk);
    check(!empty, "read while data expected");
    check(rd_data == model[0], $sformatf("read %h exp %h", rd_data, model[0]));
    void'(model.pop_front());
    rd_en = 1'b1;
    @(negedge clk);
    rd_en = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    for (int i = 0; i < DEPTH; i++) write({$urandom, $urandom, $urandom, $urandom});
    check(full && !in_ready && count == DEPTH, $sformatf("full after %0d writes, count %0d", DEPTH, count));
    write(128'hdead_beef);
    check(model.size() == DEPTH && count == DEPTH, "write refused while full");
    while (model.size() > 0) read_one();
    check(empty && count == 0, "empty after reading all");
    for (int i = 0; i < 20; i++) begin
      write({$urandom, $urandom, $urandom, $urandom});
      if (i % 3 != 0) read_one();
    end
    check(count == model.size(), $sformatf("count %0d exp %0d", count, model.size()));
    while (model.size() > 0) read_one();
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
