// tb_supervisor_fsm: a directed walk through every transition of the
// supervisor (homing, start, stop, warning and return, critical value ->
// reset -> stopping -> ready or -> error, manual intervention), checking the
// state and the lamp/control outputs, followed by random events compared
// cycle by cycle with a transition-list model. Every transition must occur.
module tb_supervisor_fsm;
  import mcs_pkg::*;
  localparam int TMO = 50;
  logic clk = 0, rst_n = 0;
  logic on_off = 0, start = 0, stop = 0, manual_reset = 0, home_sw = 0;
  logic [1:0] limit_sw = 0;
  logic signed [11:0] i_meas [3] = '{12'sd0, 12'sd0, 12'sd0};
  logic signed [15:0] speed = 0;
  logic [11:0] udc = 12'd3000;
  sup_state_t state;
  logic lamp_green, lamp_yellow, lamp_red, inverter_en, ref_en, homing, ref_clear,
        param_reset, pos_zero, main_sw;
  int checks = 0, failures = 0;
  int seen [sup_state_t][sup_state_t];

  supervisor_fsm #(.STOP_TIMEOUT(TMO)) dut (
    .clk, .rst_n, .on_off, .start, .stop, .manual_reset, .home_sw, .limit_sw, .i_meas,
    .speed, .udc, .state, .lamp_green, .lamp_yellow, .lamp_red, .inverter_en, .ref_en,
    .homing, .ref_clear, .param_reset, .pos_zero, .main_sw);
  always #5 clk = ~clk;

  sup_state_t prev = ST_BEGIN;
  always @(posedge clk) if (rst_n) begin
    #1;
    if (state != prev) seen[prev][state]++;
    prev = state;
  end

  task automatic expect_state(input sup_state_t s, input string what);
    checks++;
    if (state != s) begin
      failures++;
      $display("FAIL %s: state %s expected %s", what, state.name(), s.name());
    end
  endtask
  task automatic cyc(input int n = 1);
    repeat (n) @(negedge clk);
  endtask
  task automatic lamps(input logic g, input logic y, input logic r);
    checks++;
    if ({lamp_green, lamp_yellow, lamp_red} != {g, y, r}) begin
      failures++; $display("FAIL lamps in %s", state.name());
    end
  endtask

  // transition-list model for the random phase
  function automatic sup_state_t model_next(input sup_state_t s, input sup_state_t org,
                                            input logic nr, input logic cr, input logic stp,
                                            input logic tmo);
    case (s)
      ST_BEGIN:    return on_off ? ST_HOMING : s;
      ST_HOMING:   return home_sw ? ST_READY : s;
      ST_READY:    return nr ? ST_WARNING : start ? ST_OPERATE : s;
      ST_OPERATE:  return nr ? ST_WARNING : stop ? ST_STOPPING : s;
      ST_STOPPING: return nr ? ST_WARNING : stp ? ST_READY : s;
      ST_WARNING:  return cr ? ST_RESET : !nr ? org : s;
      ST_RESET:    return ST_STOP_ERR;
      ST_STOP_ERR: return stp ? ST_READY : tmo ? ST_ERROR : s;
      ST_ERROR:    return manual_reset ? ST_BEGIN : s;
      default:     return ST_BEGIN;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sup_state_t m, org;
    int tmr;
    logic nr, cr, stp;
    cyc(2); rst_n = 1; cyc(2);
    expect_state(ST_BEGIN, "after reset"); lamps(0, 0, 0);
    checks++; if (inverter_en || main_sw) failures++;
    on_off = 1; cyc(); expect_state(ST_HOMING, "main switch on");
    checks++; if (!homing || !inverter_en) failures++;
    cyc(5); expect_state(ST_HOMING, "homing waits");
    home_sw = 1; #1; checks++; if (!pos_zero) failures++;
    cyc(); home_sw = 0; expect_state(ST_READY, "home reached"); lamps(1, 0, 0);
    start = 1; cyc(); start = 0; expect_state(ST_OPERATE, "START");
    checks++; if (!ref_en) failures++;
    speed = 200; cyc(3);
    stop = 1; cyc(); stop = 0; expect_state(ST_STOPPING, "STOP");
    checks++; if (ref_en) failures++;
    cyc(3); expect_state(ST_STOPPING, "still turning");
    speed = 0; cyc(); expect_state(ST_READY, "rotor stopped");
    // warning from OPERATE and back
    start = 1; cyc(); start = 0; expect_state(ST_OPERATE, "START 2");
    i_meas[1] = -12'sd1300; cyc(); expect_state(ST_WARNING, "current near critical"); lamps(0, 1, 0);
    checks++; if (!ref_en) failures++;                      // still operates normally
    i_meas[1] = 12'sd100; cyc(); expect_state(ST_OPERATE, "back below warning");
    // warning from READY (DC link) and back
    stop = 1; speed = 0; cyc(); stop = 0; cyc();  expect_state(ST_READY, "stop 2");
    udc = 12'd3500; cyc(); expect_state(ST_WARNING, "udc near critical");
    udc = 12'd3000; cyc(); expect_state(ST_READY, "udc back");
    // warning from STOPPING and back
    start = 1; cyc(); start = 0; speed = 100; stop = 1; cyc(); stop = 0;
    expect_state(ST_STOPPING, "stopping 3");
    speed = 350; cyc(); expect_state(ST_WARNING, "speed near critical");
    speed = 100; cyc(); expect_state(ST_STOPPING, "speed back");
    // critical: warning -> reset -> stopping(red) -> ready
    speed = 350; cyc(); expect_state(ST_WARNING, "speed near 2");
    speed = 450; cyc(); expect_state(ST_RESET, "speed critical"); lamps(0, 0, 1);
    checks++; if (!ref_clear || !param_reset) failures++;
    cyc(); expect_state(ST_STOP_ERR, "reset -> stopping");
    speed = 0; cyc(); expect_state(ST_READY, "stopped after error");
    // limit switch: critical, rotor does not stop -> error
    limit_sw = 2'b01; speed = 50; cyc(); expect_state(ST_WARNING, "limit switch");
    cyc(); expect_state(ST_RESET, "limit switch critical");
    limit_sw = 0; cyc(); expect_state(ST_STOP_ERR, "stopping red");
    cyc(TMO); expect_state(ST_STOP_ERR, "before time-out");
    cyc(); expect_state(ST_ERROR, "time-out -> error"); lamps(0, 0, 1);
    checks++; if (main_sw || inverter_en) failures++;
    cyc(5); expect_state(ST_ERROR, "error holds");
    speed = 0; manual_reset = 1; cyc(); manual_reset = 0;
    expect_state(ST_BEGIN, "manual intervention");

    // random phase against the model
    m = state; org = ST_READY; tmr = 0;
    for (int n = 0; n < 20000; n++) begin
      on_off = $urandom_range(0, 3) != 0;
      start = $urandom_range(0, 9) == 0;
      stop = $urandom_range(0, 9) == 0;
      manual_reset = $urandom_range(0, 29) == 0;
      home_sw = $urandom_range(0, 9) == 0;
      limit_sw = ($urandom_range(0, 49) == 0) ? 2'b10 : 2'b00;
      i_meas[0] = 12'($urandom_range(0, 1700)); i_meas[2] = -12'($urandom_range(0, 1250));
      speed = ($urandom_range(0, 3) == 0) ? 16'sd0 : 16'($signed($urandom_range(0, 820)) - 410);
      udc = 12'($urandom_range(2800, 3850));
      #1;
      cr = (i_meas[0] > 1600) || (speed > 400 || speed < -400) || (udc > 3800) || (limit_sw != 0);
      nr = cr || (i_meas[0] > 1200) || (-i_meas[2] > 1200) || (speed > 300 || speed < -300) || (udc > 3400);
      stp = (speed >= -1 && speed <= 1);
      begin
        automatic sup_state_t nx = model_next(m, org, nr, cr, stp, tmr >= TMO);
        if (nx == ST_WARNING && m != ST_WARNING) org = m;
        tmr = (m == ST_STOP_ERR) ? (tmr < TMO ? tmr + 1 : tmr) : 0;
        m = nx;
      end
      cyc();
      expect_state(m, "random");
      if (failures > 20) break;
    end
    // every transition of the diagram occurred
    begin
      sup_state_t from [15] = '{ST_BEGIN, ST_HOMING, ST_READY, ST_OPERATE, ST_STOPPING, ST_READY,
                                ST_OPERATE, ST_STOPPING, ST_WARNING, ST_WARNING, ST_WARNING,
                                ST_WARNING, ST_RESET, ST_STOP_ERR, ST_STOP_ERR};
      sup_state_t to   [15] = '{ST_HOMING, ST_READY, ST_OPERATE, ST_STOPPING, ST_READY, ST_WARNING,
                                ST_WARNING, ST_WARNING, ST_READY, ST_OPERATE, ST_STOPPING,
                                ST_RESET, ST_STOP_ERR, ST_READY, ST_ERROR};
      for (int i = 0; i < 15; i++) begin
        checks++;
        if (!seen.exists(from[i]) || !seen[from[i]].exists(to[i])) begin
          failures++; $display("FAIL transition %s -> %s never happened", from[i].name(), to[i].name());
        end
      end
      checks++;
      if (!seen.exists(ST_ERROR) || !seen[ST_ERROR].exists(ST_BEGIN)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
