// tb_uart_rx: serial frames at CLKS_PER_BIT clocks per bit with random data
// and gaps; every byte must be received once and in order, a frame with a
// low stop bit must be dropped, and a short low glitch must not start a
// frame.
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, rx = 1, valid;
  logic [7:0] data;
  int checks = 0, failures = 0, got = 0;
  logic [7:0] sent [$];

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rx, .data, .valid);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && valid) begin
    checks++; got++;
    if (sent.size() == 0) begin failures++; $display("FAIL unexpected byte %h", data); end
    else begin
      automatic logic [7:0] e = sent.pop_front();
      if (data != e) begin failures++; $display("FAIL got %h exp %h", data, e); end
    end
  end

  task automatic send(input logic [7:0] b, input logic stop_bit = 1);
    logic [9:0] f = {stop_bit, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rx = f[i]; repeat (CPB) @(negedge clk); end
    rx = 1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      b = 8'($urandom);
      if (n % 37 == 5) send(b, 0);            // framing error: dropped
      else begin sent.push_back(b); send(b); end
      repeat ($urandom_range(0, 3 * CPB)) @(negedge clk);
      if (n % 50 == 10) begin rx = 0; repeat (CPB / 4) @(negedge clk); rx = 1; repeat (2 * CPB) @(negedge clk); end
      if (n % 37 == 5) repeat (2 * CPB) @(negedge clk);
    end
    repeat (3 * CPB) @(negedge clk);
    checks++;
    if (sent.size() != 0 || got < 150) begin failures++; $display("FAIL %0d bytes missing", sent.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
