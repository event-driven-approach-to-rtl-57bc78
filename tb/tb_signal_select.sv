// tb_signal_select: random words on the eight inputs and a random select;
// the output must be the selected word one clock later.
module tb_signal_select;
  logic clk = 0, rst_n = 0;
  logic [2:0] sel = 0;
  logic [15:0] sig_in [8];
  logic [15:0] sig_out, expv;
  int checks = 0, failures = 0;

  signal_select dut (.clk, .rst_n, .sel, .sig_in, .sig_out);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) sig_in[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      for (int i = 0; i < 8; i++) sig_in[i] = 16'($urandom);
      sel = 3'($urandom);
      expv = sig_in[sel];
      @(negedge clk);
      checks++;
      if (sig_out != expv) begin failures++; $display("FAIL sel=%0d", sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
