// tb_line_memory: unit test of the test memory.
//
// Writes a pattern to every word of a 64-word memory, reads it back and
// checks that a read shows its word one cycle after the request, that
// rdata holds between reads, that addresses wrap modulo the size, and that
// a read and a write of the same word in one cycle return the old word.
module tb_line_memory;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        re = 1'b0, we = 1'b0;
  logic [31:0] addr = '0, wdata = '0, rdata;

  line_memory #(.WORDS(64)) dut (.clk, .re, .we, .addr, .wdata, .rdata);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] pat(int i);
    return 32'h9E37_79B9 * 32'(i + 1);
  endfunction

  initial begin
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      we = 1'b1; addr = 32'(i); wdata = pat(i);
      @(negedge clk);
    end
    we = 1'b0;
    for (int i = 0; i < 64; i++) begin
      re = 1'b1; addr = 32'(63 - i);
      @(negedge clk);
      check(rdata == pat(63 - i), $sformatf("word %0d", 63 - i));
    end
    re = 1'b0; addr = 32'd5;
    @(negedge clk);
    check(rdata == pat(0), "rdata not held without a read");
    // wrap-around: address 64+7 is word 7
    re = 1'b1; addr = 32'd71;
    @(negedge clk);
    check(rdata == pat(7), "address does not wrap");
    // read and write the same word together
    re = 1'b1; we = 1'b1; addr = 32'd9; wdata = 32'h1234_5678;
    @(negedge clk);
    check(rdata == pat(9), "read during write did not return the old word");
    we = 1'b0;
    @(negedge clk);
    check(rdata == 32'h1234_5678, "write during read lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
