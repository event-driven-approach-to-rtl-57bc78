// tb_hyst_comparator: random reference/measurement pairs against a reference
// model of a hysteresis comparator (switch above +band, below -band, hold
// inside), with the one-clock output latency.
module tb_hyst_comparator;
  logic clk = 0, rst_n = 0;
  logic signed [11:0] i_ref = 0, i_meas = 0;
  logic [11:0] band = 12'd20;
  logic sd, model = 0;
  int checks = 0, failures = 0, n_set = 0, n_clr = 0, n_hold = 0;

  hyst_comparator #(.W(12)) dut (.clk, .rst_n, .i_ref, .i_meas, .band, .sd);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      i_ref  = 12'($signed($urandom_range(0, 1200)) - 600);
      i_meas = 12'(int'(i_ref) - ($signed($urandom_range(0, 120)) - 60));
      if (n % 100 == 0) band = 12'($urandom_range(0, 50));
      e = int'(i_ref) - int'(i_meas);
      if (e > int'(band)) begin model = 1; n_set++; end
      else if (e < -int'(band)) begin model = 0; n_clr++; end
      else n_hold++;
      @(negedge clk);
      checks++;
      if (sd !== model) begin
        failures++;
        if (failures < 10) $display("FAIL e=%0d band=%0d sd=%b exp=%b", e, band, sd, model);
      end
    end
    // extreme values: no overflow of the difference
    @(negedge clk); i_ref = 12'sd2047; i_meas = -12'sd2048; band = 12'd0;
    @(negedge clk); checks++; if (sd !== 1'b1) failures++;
    @(negedge clk); i_ref = -12'sd2048; i_meas = 12'sd2047;
    @(negedge clk); checks++; if (sd !== 1'b0) failures++;
    checks++;
    if (n_set == 0 || n_clr == 0 || n_hold == 0) failures++;
    $display("set=%0d clear=%0d hold=%0d", n_set, n_clr, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
