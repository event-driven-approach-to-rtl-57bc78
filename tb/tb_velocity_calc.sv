// tb_velocity_calc: step pulses at a known rate and direction; each window
// must report the signed number of pulses it saw, with valid once per
// WIN_CYCLES clocks.
module tb_velocity_calc;
  localparam int WIN = 1000;
  logic clk = 0, rst_n = 0, step = 0, dir = 0;
  logic signed [15:0] speed;
  logic valid;
  int checks = 0, failures = 0, acc = 0, last_valid = -1, cyc = 0;

  velocity_calc #(.WIN_CYCLES(WIN)) dut (.clk, .rst_n, .step, .dir, .speed, .valid);
  always #5 clk = ~clk;

  initial begin
    repeat (30 * WIN) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wins = 0, period;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    while (wins < 20) begin
      if (cyc % 100 == 0 && $urandom_range(0, 9) == 0) dir = ~dir;
      period = 3 + (wins % 5) * 4;
      step = (cyc % period == 0);
      @(posedge clk);
      #1;
      if (step) acc += dir ? 1 : -1;
      if (valid) begin
        if (last_valid >= 0) begin
          checks += 2;
          if (int'(speed) != acc) begin failures++; $display("FAIL speed %0d exp %0d", speed, acc); end
          if (cyc - last_valid != WIN) failures++;
        end
        last_valid = cyc; acc = 0; wins++;
      end
      cyc++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
