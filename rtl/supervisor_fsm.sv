// supervisor_fsm: event-driven supervisor of the drive. A state changes only
// when one of its events is recognised (event-condition-action). States are
// grouped by the colour shown to the user:
//   green : READY, OPERATE, STOPPING      (normal operation)
//   yellow: WARNING                       (a value is near its critical level)
//   red   : RESET, STOP_ERR, ERROR        (a value exceeded its critical level)
// plus BEGIN and HOMING before the drive is ready.
// Transitions:
//   BEGIN    --main switch ON-->            HOMING (drive toward home switch)
//   HOMING   --home switch (position reset)--> READY
//   READY    --START--> OPERATE --STOP--> STOPPING --rotor stopped--> READY
//   READY/OPERATE/STOPPING --value near critical--> WARNING
//   WARNING  --all values back below warning level--> state it came from
//   WARNING  --value exceeds critical level--> RESET
//   RESET    --(parameters and references reset)--> STOP_ERR
//   STOP_ERR --rotor stopped--> READY ; --not stopped in STOP_TIMEOUT--> ERROR
//   ERROR    (main switch off) --manual intervention--> BEGIN
// Monitored: largest phase current magnitude, |speed|, DC-link voltage (each
// against a warning and a critical level) and the two limit switches (a hit
// counts as critical). The states, colours and transitions follow the
// supervisor state diagram; the numeric limits, the stop time-out, the
// return from WARNING to its origin state and the output encoding are this
// design's choices. All outputs are decoded from the registered state.
module supervisor_fsm
  import mcs_pkg::*;
#(
  parameter int I_WARN       = 1200,     // current, ADC counts
  parameter int I_CRIT       = 1600,
  parameter int W_WARN       = 300,      // speed, counts per window
  parameter int W_CRIT       = 400,
  parameter int U_WARN       = 3400,     // DC-link voltage, ADC counts
  parameter int U_CRIT       = 3800,
  parameter int STOP_SPEED   = 1,        // |speed| <= this counts as stopped
  parameter int STOP_TIMEOUT = 25000000  // clocks (0.5 s at 50 MHz)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    on_off,        // main switch requested ON
  input  logic                    start,
  input  logic                    stop,
  input  logic                    manual_reset,  // manual intervention after an error
  input  logic                    home_sw,
  input  logic [1:0]              limit_sw,
  input  logic signed [CUR_W-1:0] i_meas [3],
  input  logic signed [SPD_W-1:0] speed,
  input  logic [11:0]             udc,
  output sup_state_t              state,
  output logic                    lamp_green,
  output logic                    lamp_yellow,
  output logic                    lamp_red,
  output logic                    inverter_en,   // switching allowed
  output logic                    ref_en,        // user speed reference applied
  output logic                    homing,        // homing speed applied
  output logic                    ref_clear,     // references and integrators to zero
  output logic                    param_reset,   // parameters back to initial values
  output logic                    pos_zero,      // encoder position reset at home
  output logic                    main_sw        // main switch state
);
  sup_state_t st_nx, origin;
  logic [$clog2(STOP_TIMEOUT+1)-1:0] tmr;
  logic [CUR_W-1:0] ia [3];
  logic [CUR_W-1:0] imax;
  logic [SPD_W-1:0] wabs;
  logic near, crit, stopped, timeout;

  for (genvar i = 0; i < 3; i++) begin : g_abs
    assign ia[i] = i_meas[i][CUR_W-1] ? CUR_W'(-i_meas[i]) : CUR_W'(i_meas[i]);
  end
  always_comb begin
    imax = ia[0];
    if (ia[1] > imax) imax = ia[1];
    if (ia[2] > imax) imax = ia[2];
  end
  assign wabs    = speed[SPD_W-1] ? SPD_W'(-speed) : SPD_W'(speed);
  assign crit    = (32'(imax) > I_CRIT) || (32'(wabs) > W_CRIT) || (32'(udc) > U_CRIT) || (|limit_sw);
  assign near    = crit || (32'(imax) > I_WARN) || (32'(wabs) > W_WARN) || (32'(udc) > U_WARN);
  assign stopped = 32'(wabs) <= STOP_SPEED;
  assign timeout = 32'(tmr) >= STOP_TIMEOUT;

  always_comb begin
    st_nx = state;
    unique case (state)
      ST_BEGIN:    if (on_off)  st_nx = ST_HOMING;
      ST_HOMING:   if (home_sw) st_nx = ST_READY;
      ST_READY:    if (near) st_nx = ST_WARNING; else if (start)   st_nx = ST_OPERATE;
      ST_OPERATE:  if (near) st_nx = ST_WARNING; else if (stop)    st_nx = ST_STOPPING;
      ST_STOPPING: if (near) st_nx = ST_WARNING; else if (stopped) st_nx = ST_READY;
      ST_WARNING:  if (crit) st_nx = ST_RESET;   else if (!near)   st_nx = origin;
      ST_RESET:    st_nx = ST_STOP_ERR;
      ST_STOP_ERR: if (stopped) st_nx = ST_READY; else if (timeout) st_nx = ST_ERROR;
      ST_ERROR:    if (manual_reset) st_nx = ST_BEGIN;
      default:     st_nx = ST_BEGIN;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_BEGIN;
      origin <= ST_READY;
      tmr    <= '0;
    end else begin
      state <= st_nx;
      if (st_nx == ST_WARNING && state != ST_WARNING) origin <= state;
      tmr <= (state == ST_STOP_ERR && !timeout) ? tmr + 1'b1
           : (state == ST_STOP_ERR) ? tmr : '0;
    end
  end

  assign lamp_green  = state inside {ST_READY, ST_OPERATE, ST_STOPPING};
  assign lamp_yellow = state == ST_WARNING;
  assign lamp_red    = state inside {ST_RESET, ST_STOP_ERR, ST_ERROR};
  assign inverter_en = !(state inside {ST_BEGIN, ST_ERROR});
  assign ref_en      = state == ST_OPERATE || (state == ST_WARNING && origin == ST_OPERATE);
  assign homing      = state == ST_HOMING;
  assign ref_clear   = state == ST_RESET;
  assign param_reset = state == ST_RESET;
  assign pos_zero    = state == ST_HOMING && home_sw;
  assign main_sw     = state != ST_ERROR && state != ST_BEGIN;

  // an event-driven FSM only leaves a state through one of its listed events
  a_reset_to_stop: assert property (@(posedge clk) disable iff (!rst_n)
    state == ST_RESET |=> state == ST_STOP_ERR);
  a_err_only_from_stop: assert property (@(posedge clk) disable iff (!rst_n)
    state != ST_ERROR && st_nx == ST_ERROR |-> state == ST_STOP_ERR);
endmodule
