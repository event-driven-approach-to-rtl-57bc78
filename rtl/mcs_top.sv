// mcs_top: FPGA controller of a brushless AC (BLAC) motor with an
// event-driven supervisor.
//
// Data flow (one current loop, one speed loop, one supervisor, all running in
// parallel):
//   encoder A/B/Ri -> inc_decoder -> electrical angle theta, count pulses
//                  -> velocity_calc -> speed (counts per window, new value per
//                     window = one speed-loop sample)
//   w_ref (RS232) -> ramp_gen -> pi_controller (speed loop) -> Amp
//   theta, Amp -> sin3_ref -> three current references
//   three serial ADCs -> adc_if -> three measured phase currents
//   reference - measurement -> three hyst_comparators -> Sd1 Sd2 Sd3
//   Sd, voltage sector -> vector_table -> switch pattern S1 S2 S3 (inverter)
//   Sd1 Sd2 Sd3 -> pll_sector_filter -> voltage sector (closes the sector loop)
//   S1 S2 S3 -> switch_counter (switchings per 10 ms by number of legs)
//   supervisor_fsm watches current, speed, DC-link voltage and limit switches
//   and gates the references, the integrators and the inverter.
//   uart_rx/param_regs/uart_tx: parameters and commands from the PC and
//   read-back of state and measurements; signal_select picks a word that
//   dac_if sends to the oscilloscope's serial D/A converter.
// During homing the speed reference is HOME_SPEED; the position is zeroed
// when the home switch is reached. The pll_sector_filter is updated once per
// "per" clocks (register 2). It is fed with the requested vector Sd rather
// than with the applied pattern S, which the block diagram suggests: fed
// with S, a request two sectors away is replaced by a zero vector, the filter
// never sees a vector that would move it, and the loop stalls at start-up.
// The homing speed, register map and widths are
// this design's choices; the block structure follows the controller's block
// diagram.
module mcs_top
  import mcs_pkg::*;
#(
  parameter int CLKS_PER_BIT = 434,       // 115200 baud at 50 MHz
  parameter int WIN_CYCLES   = 50000,     // speed window, 1 ms
  parameter int SW_WINDOW    = 500000,    // switch-count window, 10 ms
  parameter int STOP_TIMEOUT = 25000000,  // 0.5 s
  parameter int ADC_CLK_DIV  = 4,
  parameter int HOME_SPEED   = 10,        // counts per speed window
  parameter int CPR_LOG2     = 12,
  parameter int POLE_PAIRS   = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // RS232 to the PC
  input  logic        uart_rxd,
  output logic        uart_txd,
  // incremental encoder
  input  logic        enc_a,
  input  logic        enc_b,
  input  logic        enc_ri,
  // current ADCs
  input  logic [2:0]  adc_sdo,
  output logic        adc_clk,
  output logic        adc_conv,
  // switches and DC link
  input  logic        home_sw,
  input  logic [1:0]  limit_sw,
  input  logic [11:0] udc,
  input  logic [7:0]  sw_in,        // logical inputs shown on the PC
  output logic [7:0]  sw_out,       // logical outputs set from the PC
  // inverter
  output logic [2:0]  s_out,        // S1 S2 S3, lower switches are the complements
  output logic        inverter_en,
  // indication
  output logic [2:0]  lamps,        // {red, yellow, green}
  output logic        main_sw,
  output sup_state_t  state,
  output logic [15:0] scope_out,    // word shown on the oscilloscope
  output logic        dac_sclk,     // serial D/A converter
  output logic        dac_cs_n,
  output logic        dac_sdi
);
  // ---------------- RS232 and parameters ----------------
  logic [7:0]  rx_data, tx_data;
  logic        rx_valid, tx_start, tx_busy;
  logic [15:0] regs [16];
  logic [15:0] status [16];
  logic        cmd_start, cmd_stop, cmd_ack;
  logic        param_reset, ref_clear, ref_en, homing, pos_zero;
  logic        lg, ly, lr;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rx(uart_rxd), .data(rx_data), .valid(rx_valid));
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .start(tx_start), .data(tx_data), .tx(uart_txd), .busy(tx_busy));
  param_regs u_regs (
    .clk, .rst_n, .rx_data, .rx_valid, .tx_data, .tx_start, .tx_busy,
    .param_reset, .status, .regs, .cmd_start, .cmd_stop, .cmd_ack);

  // ---------------- position and speed ----------------
  logic [CPR_LOG2-1:0]     pos;
  logic [ANG_W-1:0]        theta;
  logic                    enc_step, enc_dir, enc_index;
  logic signed [SPD_W-1:0] speed, w_ramp;
  logic                    spd_valid;

  inc_decoder #(.CPR_LOG2(CPR_LOG2), .POLE_PAIRS(POLE_PAIRS)) u_inc (
    .clk, .rst_n, .enc_a, .enc_b, .enc_ri, .zero(pos_zero), .ri_align(1'b0),
    .pos, .theta, .step(enc_step), .dir(enc_dir), .index(enc_index));
  velocity_calc #(.WIN_CYCLES(WIN_CYCLES)) u_vel (
    .clk, .rst_n, .step(enc_step), .dir(enc_dir), .speed, .valid(spd_valid));

  // ---------------- speed loop ----------------
  logic signed [CUR_W-1:0] amp;
  logic signed [CUR_W-1:0] iref [3];
  logic signed [CUR_W-1:0] imeas [3];
  logic                    adc_valid;

  ramp_gen #(.W(SPD_W)) u_ramp (
    .clk, .rst_n, .ce(spd_valid), .enable(regs[1][4]),
    .zero_tgt(!(ref_en || homing)), .clear(ref_clear),
    .target(homing ? SPD_W'(HOME_SPEED) : $signed(regs[0])), .step(regs[10]),
    .out(w_ramp));
  pi_controller #(.IN_W(SPD_W), .OUT_W(CUR_W), .SHIFT(8), .OUT_MAX(1000)) u_pi (
    .clk, .rst_n, .ce(spd_valid), .clear(ref_clear || !inverter_en),
    .ref_in(w_ramp), .meas(speed), .kp(regs[4]), .ki(regs[5]), .out(amp));
  sin3_ref u_sin (.clk, .rst_n, .theta, .amp, .iref);

  // ---------------- current loop ----------------
  vec_t sdi, vec, secu;
  logic [ANG_W-1:0] v_angle;
  logic [2:0]       sector;
  logic [15:0]      per_cnt;
  logic             pll_ce;

  adc_if #(.NBITS(CUR_W), .CLK_DIV(ADC_CLK_DIV)) u_adc (
    .clk, .rst_n, .sdo(adc_sdo), .adc_clk, .adc_conv, .i_meas(imeas), .valid(adc_valid));

  for (genvar i = 0; i < 3; i++) begin : g_hyst
    hyst_comparator #(.W(CUR_W)) u_h (
      .clk, .rst_n, .i_ref(iref[i]), .i_meas(imeas[i]), .band(regs[3][CUR_W-1:0]),
      .sd(sdi[2-i]));
  end

  vector_table u_tab (.clk, .rst_n, .secu, .sdi, .enable(inverter_en), .vec_out(vec));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) per_cnt <= '0;
    else        per_cnt <= (per_cnt + 1'b1 >= regs[2]) ? '0 : per_cnt + 1'b1;
  assign pll_ce = (per_cnt == '0);

  pll_sector_filter u_pll (
    .clk, .rst_n, .ce(pll_ce), .vec_in(sdi), .gain_a(regs[6][7:0]), .gain_b(regs[7][7:0]),
    .angle(v_angle), .sector, .secu);

  assign s_out = vec;

  // ---------------- switch statistics ----------------
  logic [15:0] n1, n2, n3;
  logic        sw_valid;
  switch_counter #(.WINDOW(SW_WINDOW)) u_cnt (
    .clk, .rst_n, .vec, .n1, .n2, .n3, .valid(sw_valid));

  // ---------------- supervisor ----------------
  supervisor_fsm #(.STOP_TIMEOUT(STOP_TIMEOUT)) u_sup (
    .clk, .rst_n, .on_off(regs[1][0]), .start(cmd_start), .stop(cmd_stop),
    .manual_reset(cmd_ack), .home_sw, .limit_sw, .i_meas(imeas), .speed, .udc,
    .state, .lamp_green(lg), .lamp_yellow(ly), .lamp_red(lr), .inverter_en,
    .ref_en, .homing, .ref_clear, .param_reset, .pos_zero, .main_sw);
  assign lamps = {lr, ly, lg};

  // ---------------- read-back and scope ----------------
  assign status[0]  = 16'(state);
  assign status[1]  = {13'd0, lamps};
  assign status[2]  = speed;
  assign status[3]  = n1;
  assign status[4]  = n2;
  assign status[5]  = n3;
  assign status[6]  = 16'(imeas[0]);
  assign status[7]  = 16'(imeas[1]);
  assign status[8]  = 16'(imeas[2]);
  assign status[9]  = {8'd0, sw_in};
  assign status[10] = 16'(pos);
  assign status[11] = theta;
  assign status[12] = 16'(amp);
  assign status[13] = {13'd0, sector};
  assign status[14] = w_ramp;
  assign status[15] = {7'd0, enc_index, adc_valid, sw_valid, home_sw, limit_sw, vec};
  assign sw_out     = regs[8][7:0];

  logic [15:0] scope_sel [8];
  assign scope_sel[0] = 16'(iref[0]);
  assign scope_sel[1] = 16'(imeas[0]);
  assign scope_sel[2] = speed;
  assign scope_sel[3] = w_ramp;
  assign scope_sel[4] = 16'(amp);
  assign scope_sel[5] = v_angle;
  assign scope_sel[6] = {13'd0, vec};
  assign scope_sel[7] = {13'd0, sector};
  signal_select u_scope (.clk, .rst_n, .sel(regs[9][2:0]), .sig_in(scope_sel), .sig_out(scope_out));
  dac_if #(.NBITS(12), .CLK_DIV(ADC_CLK_DIV)) u_dac (
    .clk, .rst_n, .data(scope_out), .sclk(dac_sclk), .cs_n(dac_cs_n), .sdi(dac_sdi), .sent());
endmodule
