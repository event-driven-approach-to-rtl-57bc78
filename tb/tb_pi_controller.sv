// tb_pi_controller: random errors and gains against a reference model of the
// PI law (clamped integrator, saturated output), updates only on ce, clear.
module tb_pi_controller;
  logic clk = 0, rst_n = 0, ce = 0, clear = 0;
  logic signed [15:0] ref_in = 0, meas = 0;
  logic [15:0] kp = 0, ki = 0;
  logic signed [11:0] out;
  int checks = 0, failures = 0, n_sat = 0, n_lin = 0;
  longint integ = 0, exp_out = 0;
  localparam int OUT_MAX = 1000, SHIFT = 8;

  pi_controller #(.IN_W(16), .OUT_W(12), .SHIFT(SHIFT), .OUT_MAX(OUT_MAX)) dut (
    .clk, .rst_n, .ce, .clear, .ref_in, .meas, .kp, .ki, .out);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e, s, lim;
    lim = longint'(OUT_MAX) * (1 << SHIFT);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      if (n % 500 == 0) begin
        kp = 16'($urandom_range(0, 1000));
        ki = 16'($urandom_range(0, 50));
      end
      ref_in = 16'($signed($urandom_range(0, 400)) - 200);
      meas   = 16'($signed($urandom_range(0, 400)) - 200);
      ce     = ($urandom_range(0, 2) != 0);
      clear  = (n % 1000 == 999);
      if (clear) begin
        integ = 0; exp_out = 0;
      end else if (ce) begin
        e = longint'(ref_in) - longint'(meas);
        integ += e * longint'(ki);
        if (integ > lim) integ = lim;
        if (integ < -lim) integ = -lim;
        s = (e * longint'(kp) + integ) >>> SHIFT;
        if (s > OUT_MAX) begin s = OUT_MAX; n_sat++; end
        else if (s < -OUT_MAX) begin s = -OUT_MAX; n_sat++; end
        else n_lin++;
        exp_out = s;
      end
      @(negedge clk);
      ce = 0; clear = 0;
      checks++;
      if (longint'(out) != exp_out) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d got=%0d exp=%0d", n, out, exp_out);
      end
    end
    checks++;
    if (n_sat == 0 || n_lin == 0) failures++;
    $display("saturated=%0d linear=%0d", n_sat, n_lin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
