// tb_mcs_top: end-to-end run of the whole controller at its default
// parameters (50 MHz clock, 115200 baud, 1 ms speed window, 10 ms switch
// window, 0.5 s stop time-out) against a behavioural inverter/motor/encoder
// model and three serial ADC models. The PC side is emulated over RS232.
// Sequence: main switch ON -> homing to the home switch -> READY -> START at
// 100 counts/ms -> steady speed -> DC-link warning and return -> STOP ->
// READY -> START -> limit switch (critical) -> RESET -> braking -> READY ->
// START with an external load that the drive cannot hold -> time-out ->
// ERROR -> manual intervention -> BEGIN.
// Checks speed tracking, the switching statistics (one-leg switchings must
// dominate) and read-back over RS232, and counts every mechanism of the
// design, and the frames sent to the oscilloscope D/A converter; a mechanism
// that never happens is a failure.
module tb_mcs_top;
  import mcs_pkg::*;
  localparam int CPB = 434;
  logic clk = 0, rst_n = 0;
  logic uart_rxd = 1, uart_txd;
  logic enc_a, enc_b, enc_ri, adc_clk, adc_conv, home_sw, inverter_en, main_sw;
  logic [2:0] adc_sdo, s_out, lamps;
  logic [1:0] limit_sw = 0;
  logic [11:0] udc = 12'd3000;
  logic [7:0] sw_in = 8'h5a, sw_out;
  sup_state_t state;
  logic [15:0] scope_out;
  logic dac_sclk, dac_cs_n, dac_sdi;
  logic signed [11:0] i_adc [3];
  real load = 0.0, w_m;
  longint count;
  int checks = 0, failures = 0;

  mcs_top dut (.clk, .rst_n, .uart_rxd, .uart_txd, .enc_a, .enc_b, .enc_ri, .adc_sdo,
               .adc_clk, .adc_conv, .home_sw, .limit_sw, .udc, .sw_in, .sw_out, .s_out,
               .inverter_en, .lamps, .main_sw, .state, .scope_out, .dac_sclk, .dac_cs_n, .dac_sdi);
  blac_plant plant (.clk, .s(s_out), .en(inverter_en), .load, .i_adc, .enc_a, .enc_b,
                    .enc_ri, .home_sw, .w_m, .count);
  for (genvar k = 0; k < 3; k++) begin : g_adc
    adc_model u_adc (.conv(adc_conv), .sclk(adc_clk), .sample(i_adc[k]), .sdo(adc_sdo[k]));
  end
  always #10 clk = ~clk;   // 50 MHz

  // ---------------- mechanism counters ----------------
  int n_trans [sup_state_t][sup_state_t];
  int n_sector_chg = 0, n_v0 = 0, n_v7 = 0, n_active = 0, n_leg1 = 0, n_leg2 = 0, n_pos_zero = 0;
  int n_amp_sat = 0, n_ramp = 0, n_rx = 0, n_warn_cur = 0;
  bit sector_seen [1:6];
  sup_state_t st_q = ST_BEGIN;
  logic [2:0] vec_q = 0, sec_q = 1;
  logic signed [15:0] ramp_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (state != st_q) n_trans[st_q][state]++;
    st_q <= state;
    if (dut.sector != sec_q) n_sector_chg++;
    sec_q <= dut.sector;
    sector_seen[dut.sector] = 1;
    if (s_out != vec_q) begin
      if (s_out == 3'b000) n_v0++; else if (s_out == 3'b111) n_v7++; else n_active++;
      if ($countones(s_out ^ vec_q) == 1) n_leg1++; else n_leg2++;
    end
    vec_q <= s_out;
    if (dut.pos_zero) n_pos_zero++;
    if (dut.spd_valid && (dut.amp == 12'sd1000 || dut.amp == -12'sd1000)) n_amp_sat++;
    if (dut.w_ramp != ramp_q && dut.w_ramp != dut.regs[0]) n_ramp++;
    ramp_q <= dut.w_ramp;
    if (dut.rx_valid) n_rx++;
  end

  // oscilloscope D/A converter: 16-bit frames, four leading zeros
  int n_dac = 0, n_dac_bad = 0, dac_bits = 0;
  logic [15:0] dac_rx = 0;
  always @(posedge dac_sclk) if (!dac_cs_n) begin dac_rx = {dac_rx[14:0], dac_sdi}; dac_bits++; end
  always @(negedge dac_cs_n) dac_bits = 0;
  always @(posedge dac_cs_n) if (rst_n) begin
    n_dac++;
    if (dac_bits != 16 || dac_rx[15:12] != 4'd0) n_dac_bad++;
  end

  // ---------------- RS232 host ----------------
  task automatic send_byte(input logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin uart_rxd = f[i]; repeat (CPB) @(negedge clk); end
  endtask
  task automatic wr(input int a, input logic [15:0] v);
    send_byte(8'(a)); send_byte(v[15:8]); send_byte(v[7:0]);
  endtask
  task automatic recv_byte(output logic [7:0] b);
    int t = 0;
    while (uart_txd) begin @(negedge clk); t++; if (t > 20 * CPB) begin b = 'x; return; end end
    repeat (CPB + CPB / 2) @(negedge clk);
    for (int i = 0; i < 8; i++) begin b[i] = uart_txd; repeat (CPB) @(negedge clk); end
  endtask
  task automatic rd(input int a, output logic [15:0] v);
    logic [7:0] h, l;
    fork
      send_byte(8'h80 | 8'(a));
      begin recv_byte(h); recv_byte(l); end
    join
    v = {h, l};
  endtask

  task automatic ms(input real t);
    repeat (int'(t * 50000.0)) @(negedge clk);
  endtask
  task automatic expect_state(input sup_state_t s, input string what);
    checks++;
    if (state != s) begin failures++; $display("FAIL %s: state %s expected %s", what, state.name(), s.name()); end
    else $display("%8.1f ms  %-28s %s", $time / 1.0e6, what, state.name());
  endtask
  task automatic wait_state(input sup_state_t s, input real max_ms, input string what);
    int t = 0;
    while (state != s && t < int'(max_ms * 50000.0)) begin @(negedge clk); t++; end
    expect_state(s, what);
  endtask
  function automatic real speed_cpms();   // counts per ms
    return w_m * 4096.0 / (2.0 * 3.14159265358979) / 1000.0;
  endfunction

  initial begin
    #2.5s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v, c1, c2, c3;
    repeat (5) @(negedge clk);
    rst_n = 1;
    ms(0.1);
    expect_state(ST_BEGIN, "power-up");
    wr(0, 16'd100);                 // speed reference, counts per ms
    wr(8, 16'h00c3);                // logical outputs
    checks++; if (sw_out != 8'hc3) begin failures++; $display("FAIL outputs"); end
    rd(16 + 9, v);
    checks++; if (v != 16'h005a) begin failures++; $display("FAIL read inputs %h", v); end
    wr(1, 16'h0011);                // main switch ON, profile generator on
    wait_state(ST_HOMING, 1, "main switch on");
    wait_state(ST_READY, 400, "home switch reached");
    checks++; if (dut.pos > 8) begin failures++; $display("FAIL position after homing %0d", dut.pos); end
    ms(20);
    wr(1, 16'h0013);                // START
    wait_state(ST_OPERATE, 1, "START");
    ms(150);
    $display("speed %f counts/ms (reference 100), measured %0d", speed_cpms(), dut.speed);
    checks++; if (speed_cpms() < 92.0 || speed_cpms() > 108.0) begin failures++; $display("FAIL speed"); end
    rd(16 + 3, c1); rd(16 + 4, c2); rd(16 + 5, c3);
    $display("switchings in 10 ms: one leg %0d, two legs %0d, three legs %0d", c1, c2, c3);
    checks++; if (c1 == 0 || c1 <= 4 * (c2 + c3)) begin failures++; $display("FAIL one-leg switchings do not dominate"); end
    rd(16 + 0, v);
    checks++; if (v != 16'(ST_OPERATE)) begin failures++; $display("FAIL state read-back %0d", v); end
    // DC-link near its critical value and back
    udc = 12'd3500; ms(0.1);
    expect_state(ST_WARNING, "DC link near critical");
    checks++; if (lamps != 3'b010) begin failures++; $display("FAIL yellow lamp"); end
    udc = 12'd3000; ms(0.1);
    expect_state(ST_OPERATE, "DC link back to normal");
    // normal stop
    wr(1, 16'h0015);                // STOP
    wait_state(ST_STOPPING, 1, "STOP");
    wait_state(ST_READY, 300, "rotor stopped");
    // critical value: limit switch
    wr(1, 16'h0013);
    wait_state(ST_OPERATE, 1, "START again");
    ms(60);
    limit_sw = 2'b01;
    wait_state(ST_WARNING, 0.1, "limit switch hit");
    wait_state(ST_RESET, 0.1, "critical -> reset");
    wait_state(ST_STOP_ERR, 0.1, "reset -> stopping (red)");
    checks++; if (dut.regs[0] != 0 || dut.regs[2] != 16'd50) begin failures++; $display("FAIL parameters not reset"); end
    limit_sw = 2'b00;
    wait_state(ST_READY, 400, "braked to standstill");
    // a load the drive cannot hold: stopping fails -> error
    wr(0, 16'd100);
    wr(1, 16'h0013);
    wait_state(ST_OPERATE, 1, "START with load");
    ms(40);
    load = 40000.0;
    wait_state(ST_WARNING, 100, "overspeed warning");
    wait_state(ST_RESET, 100, "overspeed critical");
    wait_state(ST_ERROR, 600, "stop time-out -> error");
    checks++; if (main_sw || inverter_en || lamps != 3'b100) begin failures++; $display("FAIL error outputs"); end
    load = 0.0;
    ms(5);
    wr(1, 16'h0008);                // manual intervention, main switch off
    wait_state(ST_BEGIN, 1, "manual intervention");

    // every mechanism happened
    begin
      string name [13] = '{"sector change", "zero vector V0", "zero vector V7", "active vector",
                           "one-leg switching", "two-leg switching", "position zeroed at home",
                           "speed controller saturated", "profile ramp", "RS232 bytes received",
                           "all six sectors", "supervisor transitions", "D/A frames"};
      int cnt [13];
      int all6 = 0, ntr = 0;
      for (int k = 1; k <= 6; k++) all6 += sector_seen[k];
      foreach (n_trans[a, b]) ntr++;
      cnt = '{n_sector_chg, n_v0, n_v7, n_active, n_leg1, n_leg2, n_pos_zero, n_amp_sat, n_ramp,
              n_rx, (all6 == 6), ntr, n_dac};
      checks++; if (n_dac_bad != 0) begin failures++; $display("FAIL %0d bad D/A frames", n_dac_bad); end
      for (int k = 0; k < 13; k++) begin
        $display("  %-28s %0d", name[k], cnt[k]);
        checks++; if (cnt[k] == 0) begin failures++; $display("FAIL mechanism never happened: %s", name[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
