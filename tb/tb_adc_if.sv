// tb_adc_if: three ADC models get random samples; each conversion the driver
// must return the three values captured at the start of conversion, with a
// conversion period of (1 + LEAD + NBITS + 1) serial-clock periods
// (2*CLK_DIV clocks each) = 16 * 8 = 128 clocks for the defaults.
module tb_adc_if;
  logic clk = 0, rst_n = 0;
  logic [2:0] sdo;
  logic adc_clk, adc_conv, valid;
  logic signed [11:0] i_meas [3];
  logic signed [11:0] sample [3] = '{12'sd0, 12'sd0, 12'sd0};
  logic signed [11:0] captured [3] = '{12'sd0, 12'sd0, 12'sd0};
  int checks = 0, failures = 0, convs = 0;
  longint t_last = -1;

  adc_if #(.NBITS(12), .LEAD(2), .CLK_DIV(4)) dut (
    .clk, .rst_n, .sdo, .adc_clk, .adc_conv, .i_meas, .valid);
  for (genvar i = 0; i < 3; i++) begin : g_adc
    adc_model #(.NBITS(12), .LEAD(2)) u_m (.conv(adc_conv), .sclk(adc_clk), .sample(sample[i]), .sdo(sdo[i]));
  end
  always #5 clk = ~clk;

  // new values are set up while conv is high and captured on its next rise
  always @(posedge adc_conv) captured = sample;
  always @(negedge adc_conv)
    for (int i = 0; i < 3; i++) sample[i] = 12'($urandom);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint cyc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (convs < 200) begin
      @(posedge clk); cyc++;
      #1;
      if (valid) begin
        for (int i = 0; i < 3; i++) begin
          checks++;
          if (i_meas[i] !== captured[i]) begin
            failures++;
            if (failures < 10) $display("FAIL ch%0d got %0d exp %0d", i, i_meas[i], captured[i]);
          end
        end
        if (t_last >= 0) begin
          checks++;
          if (cyc - t_last != 128) begin failures++; $display("FAIL period %0d", cyc - t_last); end
        end
        t_last = cyc;
        convs++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
