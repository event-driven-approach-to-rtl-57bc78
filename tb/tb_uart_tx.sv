// tb_uart_tx: random bytes are sent; the line is decoded in the testbench by
// sampling in the middle of each bit. Checks start bit, data, stop bit, the
// frame length (busy for 10 bit times) and that start is ignored while busy.
module tb_uart_tx;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, start = 0, tx, busy;
  logic [7:0] data = 0;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .start, .data, .tx, .busy);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b, r;
    int busy_cycles;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    checks++; if (tx !== 1'b1 || busy) failures++;
    for (int n = 0; n < 100; n++) begin
      b = 8'($urandom);
      data = b; start = 1;
      @(negedge clk); start = 0;
      data = ~b;                                 // must not matter any more
      // line now at the start bit; sample in the middle of each bit
      repeat (CPB / 2 - 1) @(negedge clk);
      checks++; if (tx !== 1'b0) begin failures++; $display("FAIL start bit"); end
      if (n % 10 == 3) begin start = 1; @(negedge clk); start = 0; repeat (CPB - 1) @(negedge clk); end
      else repeat (CPB) @(negedge clk);
      for (int i = 0; i < 8; i++) begin r[i] = tx; repeat (CPB) @(negedge clk); end
      checks++; if (tx !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      checks++; if (r != b) begin failures++; $display("FAIL got %h exp %h", r, b); end
      busy_cycles = 0;
      while (busy) begin @(negedge clk); busy_cycles++; end
      checks++;
      if (busy_cycles != CPB / 2 + 1) begin failures++; $display("FAIL frame length, tail %0d", busy_cycles); end
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
