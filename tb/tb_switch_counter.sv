// tb_switch_counter: random switch patterns (held for random times); the
// counts of one-, two- and three-leg changes in each window must match a
// count made in the testbench, and a window must last WINDOW clocks.
module tb_switch_counter;
  localparam int WIN = 2000;
  logic clk = 0, rst_n = 0;
  logic [2:0] vec = 0, prev = 0;
  logic [15:0] n1, n2, n3;
  logic valid;
  int checks = 0, failures = 0;
  int c [4] = '{0, 0, 0, 0};
  int tot [4] = '{0, 0, 0, 0};

  switch_counter #(.WINDOW(WIN), .CW(16)) dut (.clk, .rst_n, .vec, .n1, .n2, .n3, .valid);
  always #5 clk = ~clk;

  initial begin
    repeat (30 * WIN) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wins = 0, cyc = 0, last = -1, hold = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    while (wins < 12) begin
      if (hold == 0) begin vec = 3'($urandom); hold = $urandom_range(1, 8); end
      hold--;
      @(posedge clk);
      #1;
      c[$countones(vec ^ prev)]++;
      prev = vec;
      if (valid) begin
        if (last >= 0) begin
          checks += 4;
          if (n1 != 16'(c[1]) || n2 != 16'(c[2]) || n3 != 16'(c[3])) begin
            failures++;
            $display("FAIL got %0d %0d %0d exp %0d %0d %0d", n1, n2, n3, c[1], c[2], c[3]);
          end
          if (cyc - last != WIN) failures++;
        end
        for (int i = 1; i < 4; i++) tot[i] += c[i];
        c = '{0, 0, 0, 0};
        last = cyc; wins++;
      end
      cyc++;
      @(negedge clk);
    end
    checks++;
    if (tot[1] == 0 || tot[2] == 0 || tot[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
