// tb_ramp_gen: a trapezoidal profile: the output must move toward the target
// by exactly `step` per ce and then settle on it; zero_tgt ramps to zero,
// clear zeroes at once, and with the profile disabled the output follows the
// target directly.
module tb_ramp_gen;
  logic clk = 0, rst_n = 0, ce = 0, enable = 1, zero_tgt = 0, clear = 0;
  logic signed [15:0] target = 0, out;
  logic [15:0] step = 16'd7;
  int checks = 0, failures = 0;
  int model = 0, ramps = 0;

  ramp_gen #(.W(16)) dut (.clk, .rst_n, .ce, .enable, .zero_tgt, .clear, .target, .step, .out);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(input logic do_ce);
    int t;
    @(negedge clk);
    ce = do_ce;
    t = zero_tgt ? 0 : int'(target);
    if (clear) model = 0;
    else if (!enable) model = t;
    else if (do_ce) begin
      if (t - model > int'(step)) begin model += step; ramps++; end
      else if (model - t > int'(step)) begin model -= step; ramps++; end
      else model = t;
    end
    @(negedge clk);
    ce = 0;
    checks++;
    if (int'(out) != model) begin
      failures++;
      if (failures < 10) $display("FAIL got=%0d exp=%0d", out, model);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    target = 16'sd300;
    repeat (60) tick(1);                  // ramp up and hold
    checks++; if (out != 16'sd300) failures++;
    target = -16'sd150;
    repeat (80) tick($urandom_range(0, 1)); // ramp down with gaps in ce
    zero_tgt = 1;
    repeat (40) tick(1);
    checks++; if (out != 16'sd0) failures++;
    zero_tgt = 0; target = 16'sd500;
    repeat (10) tick(1);
    clear = 1; tick(0); clear = 0;
    checks++; if (out != 16'sd0) failures++;
    enable = 0; target = 16'sd1234; tick(0);
    checks++; if (out != 16'sd1234) failures++;
    enable = 1;
    for (int n = 0; n < 500; n++) begin
      if (n % 50 == 0) begin target = 16'($signed($urandom_range(0, 2000)) - 1000); step = 16'($urandom_range(1, 40)); end
      tick($urandom_range(0, 1));
    end
    checks++; if (ramps < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
