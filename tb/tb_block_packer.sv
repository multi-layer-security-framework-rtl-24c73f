// Testbench for block_packer: feeds random bytes on slow-rate cycles and checks that each
// group of 16 comes out as one block, first byte in bits [127:120]. Then it holds out_ready
// low and checks that a second completed block is dropped, counted and flagged.
module tb_block_packer;
  import iov_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, ce;
  byte_t in_data = '0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1, overflow;
  block128_t out_data;
  logic [15:0] drop_count;
  logic [1:0] div = '0;
  int checks = 0, failures = 0, nblocks = 0, novf = 0;
  block128_t expq [$];

  always #10 clk = ~clk;
  always_ff @(posedge clk) div <= div + 1'b1;
  assign ce = (div == 2'd3);

  block_packer dut (.clk, .rst_n, .ce, .in_data, .in_valid, .in_ready, .out_data, .out_valid,
                    .out_ready, .overflow, .drop_count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n && overflow) novf++;
    if (rst_n && ce && out_valid && out_ready) begin
      block128_t e;
      e = expq.pop_front();
      check(out_data == e, $sformatf("block %0d: got %h exp %h", nblocks, out_data, e));
      nblocks++;
    end
  end

  // Present one byte for exactly one slow-rate cycle.
  task automatic put(input byte_t b);
    @(negedge clk);
    while (!ce) @(negedge clk);
    in_data = b; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic put_block(input block128_t blk);
    expq.push_back(blk);
    for (int i = 0; i < 16; i++) put(blk[127 - 8*i -: 8]);
  endtask

  initial begin
    block128_t b;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 6; k++) begin
      b = {$urandom, $urandom, $urandom, $urandom};
      put_block(b);
    end
    repeat (12) @(posedge clk);
    check(nblocks == 6, $sformatf("blocks out %0d", nblocks));
    check(drop_count == 0 && novf == 0, "no drops while the output is taken");
    out_ready = 1'b0;
    b = {$urandom, $urandom, $urandom, $urandom};
    put_block(b);
    put_block({$urandom, $urandom, $urandom, $urandom});
    void'(expq.pop_back());    // this one is dropped
    repeat (8) @(posedge clk);
    check(drop_count == 1, $sformatf("drop_count %0d", drop_count));
    check(novf == 1, $sformatf("overflow pulses %0d", novf));
    check(out_valid && out_data == b, "held block survives the drop");
    out_ready = 1'b1;
    repeat (8) @(posedge clk);
    check(nblocks == 7 && !out_valid, "held block delivered");
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
