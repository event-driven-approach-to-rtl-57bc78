// tb_inc_decoder: a random walk of encoder counts is turned into A/B
// quadrature signals (edges a few clocks apart); the decoded position, the
// electrical angle, the step/dir pulses and the Ri index handling are
// compared with the walk.
module tb_inc_decoder;
  logic clk = 0, rst_n = 0, enc_a = 0, enc_b = 0, enc_ri = 0, zero = 0, ri_align = 0;
  logic [11:0] pos;
  logic [15:0] theta;
  logic step, dir, index;
  int checks = 0, failures = 0, count = 0, steps = 0, up_steps = 0, dn_steps = 0, idx = 0;

  inc_decoder #(.CPR_LOG2(12), .POLE_PAIRS(4)) dut (
    .clk, .rst_n, .enc_a, .enc_b, .enc_ri, .zero, .ri_align, .pos, .theta, .step, .dir, .index);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && step) begin steps++; if (dir) up_steps++; else dn_steps++; end
    if (rst_n && index) idx++;
  end

  // A leads B when counting up: 00 -> 10 -> 11 -> 01
  task automatic drive(input int c);
    case (c & 3)
      0: {enc_a, enc_b} = 2'b00;
      1: {enc_a, enc_b} = 2'b10;
      2: {enc_a, enc_b} = 2'b11;
      default: {enc_a, enc_b} = 2'b01;
    endcase
  endtask

  task automatic check_pos();
    repeat (4) @(negedge clk);
    checks++;
    if (int'(pos) != (count & 4095) || theta != 16'((count * 4 * 16) & 16'hFFFF)) begin
      failures++;
      if (failures < 10) $display("FAIL count=%0d pos=%0d theta=%0d", count, pos, theta);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dirn, ups, dns;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ups = 0; dns = 0;
    for (int n = 0; n < 6000; n++) begin
      dirn = ($urandom_range(0, 9) < 7) ? 1 : -1;   // mostly forward, wraps the counter
      count += dirn;
      if (dirn > 0) ups++; else dns++;
      drive(count);
      repeat ($urandom_range(3, 6)) @(negedge clk);
      if (n % 50 == 0) check_pos();
    end
    while ((count & 3) != 0) begin count++; ups++; drive(count); repeat (4) @(negedge clk); end
    check_pos();
    checks++;
    if (up_steps != ups || dn_steps != dns) begin
      failures++; $display("FAIL step pulses up %0d/%0d down %0d/%0d", up_steps, ups, dn_steps, dns);
    end
    // zero input, at a quadrature phase of 00 so the walk can continue from 0
    while ((count & 3) != 0) begin count++; ups++; drive(count); repeat (4) @(negedge clk); end
    @(negedge clk); zero = 1; @(negedge clk); zero = 0;
    count = 0; check_pos();
    // Ri edge: ignored without ri_align, clears position with it
    count = 1; drive(count); check_pos();
    enc_ri = 1; repeat (4) @(negedge clk); enc_ri = 0;
    check_pos();
    ri_align = 1; enc_ri = 1; repeat (4) @(negedge clk); enc_ri = 0; ri_align = 0;
    count = 0; check_pos();
    checks++; if (idx != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
