// tb_sin3_ref: random angles and amplitudes against Amp*sin(theta - k*120 deg)
// computed in real arithmetic; the tolerance covers the table's angle
// resolution (2*pi/1024) plus rounding. Also checks the one-clock latency
// and that the three outputs sum to about zero.
module tb_sin3_ref;
  import mcs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] theta = 0;
  logic signed [11:0] amp = 0;
  logic signed [11:0] iref [3];
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  sin3_ref dut (.clk, .rst_n, .theta, .amp, .iref);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real exp_v, tol, d;
    int sum;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      theta = 16'($urandom);
      amp   = (n < 20) ? 12'sd1000 : 12'($signed($urandom_range(0, 4000)) - 2000);
      @(negedge clk);
      tol = (amp < 0 ? -amp : amp) * 2.0 * PI / 1024.0 + 2.0;
      sum = 0;
      for (int k = 0; k < 3; k++) begin
        exp_v = amp * $sin(2.0 * PI * theta / 65536.0 - k * 2.0 * PI / 3.0);
        d = iref[k] - exp_v;
        checks++;
        if (d > tol || d < -tol) begin
          failures++;
          if (failures < 10) $display("FAIL th=%0d amp=%0d k=%0d got=%0d exp=%f", theta, amp, k, iref[k], exp_v);
        end
        sum += iref[k];
      end
      checks++;
      if (sum > 3 * int'(tol) || sum < -3 * int'(tol)) failures++;
    end
    // latency: output changes exactly one clock after the input
    @(negedge clk); theta = 16'd16384; amp = 12'sd1000;    // 90 deg
    @(negedge clk); checks++; if (iref[0] < 12'sd995) failures++;
    theta = 16'd49152;                                     // 270 deg
    #1; checks++; if (iref[0] < 12'sd995) failures++;      // not yet
    @(negedge clk); checks++; if (iref[0] > -12'sd995) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
