// tb_step_response: the drive's speed-step experiment over one second of
// operation at the default parameters. The speed reference alternates
// between 60 and 30 rad/s (mechanical; 39 and 20 encoder counts per ms) at
// 0, 0.25, 0.5 and 0.75 s, and a load torque is applied at 0.4 s. Checks:
// the speed settles near each reference, it recovers after the load step,
// the current amplitude rises with the load, and in every 10 ms window with
// the drive running the switchings that change one inverter leg outnumber
// those that change two or three legs.
module tb_step_response;
  import mcs_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic uart_rxd = 1, uart_txd;
  logic enc_a, enc_b, enc_ri, adc_clk, adc_conv, home_sw, inverter_en, main_sw;
  logic [2:0] adc_sdo, s_out, lamps;
  logic [7:0] sw_out;
  sup_state_t state;
  logic [15:0] scope_out;
  logic dac_sclk, dac_cs_n, dac_sdi;
  logic signed [11:0] i_adc [3];
  real load = 0.0, w_m;
  longint count;
  int checks = 0, failures = 0;
  int win_ok = 0, win_bad = 0, tot1 = 0, tot23 = 0;
  real t0;

  mcs_top dut (.clk, .rst_n, .uart_rxd, .uart_txd, .enc_a, .enc_b, .enc_ri, .adc_sdo,
               .adc_clk, .adc_conv, .home_sw, .limit_sw(2'b00), .udc(12'd3000), .sw_in(8'h00),
               .sw_out, .s_out, .inverter_en, .lamps, .main_sw, .state, .scope_out, .dac_sclk, .dac_cs_n, .dac_sdi);
  blac_plant plant (.clk, .s(s_out), .en(inverter_en), .load, .i_adc, .enc_a, .enc_b,
                    .enc_ri, .home_sw, .w_m, .count);
  for (genvar k = 0; k < 3; k++) begin : g_adc
    adc_model u_adc (.conv(adc_conv), .sclk(adc_clk), .sample(i_adc[k]), .sdo(adc_sdo[k]));
  end
  always #10 clk = ~clk;

  // switching statistics of every 10 ms window while operating
  always @(posedge clk) if (rst_n && dut.sw_valid && state == ST_OPERATE && $realtime - t0 > 20e6) begin
    tot1 += dut.n1; tot23 += dut.n2 + dut.n3;
    if (dut.n1 > 4 * (dut.n2 + dut.n3)) win_ok++; else win_bad++;
  end

  task automatic send_byte(input logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin uart_rxd = f[i]; repeat (434) @(negedge clk); end
  endtask
  task automatic wr(input int a, input logic [15:0] v);
    send_byte(8'(a)); send_byte(v[15:8]); send_byte(v[7:0]);
  endtask
  task automatic wait_until(input real t_s);
    while ($realtime < t0 + t_s * 1.0e9) @(negedge clk);
  endtask
  task automatic expect_speed(input real w, input real tol, input string what);
    checks++;
    $display("%6.3f s  %-26s w = %6.2f rad/s (reference %5.1f), amp = %0d", ($realtime - t0) / 1.0e9,
             what, w_m, w, dut.amp);
    if (w_m < w - tol || w_m > w + tol) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #3s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int amp_noload;
    repeat (5) @(negedge clk);
    rst_n = 1;
    wr(10, 16'd4);                    // profile slope, counts/ms per ms
    wr(1, 16'h0011);                  // main switch ON, profile generator on
    while (state != ST_READY) @(negedge clk);
    wr(0, 16'd39);                    // 60 rad/s
    wr(1, 16'h0013);                  // START
    while (state != ST_OPERATE) @(negedge clk);
    t0 = $realtime;
    wait_until(0.24);  expect_speed(60.0, 4.0, "first step settled");
    wr(0, 16'd20);                    // 30 rad/s
    wait_until(0.39);  expect_speed(30.0, 3.0, "second step settled");
    amp_noload = dut.amp;
    load = -6000.0;
    wait_until(0.41);  checks++;
    if (w_m > 28.0) begin failures++; $display("FAIL no speed dip after load step"); end
    wait_until(0.49);  expect_speed(30.0, 3.0, "recovered under load");
    checks++;
    if (dut.amp < amp_noload + 200) begin failures++; $display("FAIL amplitude did not rise with load"); end
    wr(0, 16'd39);
    wait_until(0.74);  expect_speed(60.0, 4.0, "third step settled");
    wr(0, 16'd20);
    wait_until(0.99);  expect_speed(30.0, 3.0, "fourth step settled");
    $display("10 ms windows with one-leg switchings dominant: %0d of %0d; one-leg %0d, two/three-leg %0d",
             win_ok, win_ok + win_bad, tot1, tot23);
    checks++;
    if (win_ok < 80 || win_bad > win_ok / 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
