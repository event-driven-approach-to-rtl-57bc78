// blac_plant: behavioural model of the three-phase inverter, the BLAC motor,
// its incremental encoder and the position switches (testbench use only, not
// synthesizable). Integrated once per clock (DT seconds):
//   u_k  = Udc * (S_k - (S1+S2+S3)/3)        phase voltage of a star winding
//   di_k/dt = (u_k - R*i_k - e_k) / L         stator current, all divided by L
//   e_k  = KE * w_e * sin(th_e - (k-1)*120deg)   back EMF
//   dw_m/dt = KT*sum(i_k*sin(th_e - (k-1)*120deg)) - BF*w_m + load
// Currents are in ADC counts. With the inverter disabled the currents are 0.
// The encoder gives 2**CPR_LOG2 counts per revolution as A/B quadrature
// (A leads B when turning forward) and an Ri pulse at count 0 of each turn.
// The home switch is on while the count is in [HOME_COUNT, HOME_COUNT+200);
// HOME_COUNT is a multiple of one electrical period so that zeroing the
// position at the switch keeps the electrical angle aligned.
module blac_plant #(
  parameter int  CPR_LOG2   = 12,
  parameter int  POLE_PAIRS = 4,
  parameter int  HOME_COUNT = 1024,
  parameter real DT    = 20e-9,
  parameter real UDC_L = 3.0e6,    // Udc/L, counts/s
  parameter real R_L   = 1000.0,   // R/L, 1/s
  parameter real KE_L  = 1600.0,   // KE/L, counts/s per electrical rad/s
  parameter real KT_J  = 10.0,     // KT/J, rad/s^2 per count
  parameter real BF_J  = 10.0      // friction/J, 1/s
) (
  input  logic       clk,
  input  logic [2:0] s,            // S1 S2 S3
  input  logic       en,
  input  real        load,         // external acceleration, rad/s^2
  output logic signed [11:0] i_adc [3],
  output logic       enc_a,
  output logic       enc_b,
  output logic       enc_ri,
  output logic       home_sw,
  output real        w_m,          // mechanical speed, rad/s
  output longint     count
);
  localparam real PI = 3.14159265358979;
  real i [3] = '{0.0, 0.0, 0.0};
  real th_m = 0.0;
  initial w_m = 0.0;
  initial count = 0;

  always @(posedge clk) begin
    real th_e, sk, avg, u, e, torque, ang;
    th_e = POLE_PAIRS * th_m;
    avg = (s[2] + s[1] + s[0]) / 3.0;
    torque = 0.0;
    for (int k = 0; k < 3; k++) begin
      sk = s[2 - k];
      ang = th_e - k * 2.0 * PI / 3.0;
      u = UDC_L * (sk - avg);
      e = KE_L * POLE_PAIRS * w_m * $sin(ang);
      if (en) i[k] = i[k] + DT * (u - R_L * i[k] - e);
      else    i[k] = 0.0;
      torque += i[k] * $sin(ang);
    end
    w_m  = w_m + DT * (KT_J * torque - BF_J * w_m + load);
    th_m = th_m + DT * w_m;
    count = longint'($floor(th_m * (2.0 ** CPR_LOG2) / (2.0 * PI)));
  end

  always_comb begin
    for (int k = 0; k < 3; k++)
      i_adc[k] = (i[k] > 2047.0) ? 12'sd2047 : (i[k] < -2048.0) ? -12'sd2048 : 12'(longint'(i[k]));
    case (count & 3)
      0: {enc_a, enc_b} = 2'b00;
      1: {enc_a, enc_b} = 2'b10;
      2: {enc_a, enc_b} = 2'b11;
      default: {enc_a, enc_b} = 2'b01;
    endcase
    enc_ri  = (count & ((1 << CPR_LOG2) - 1)) == 0;
    home_sw = count >= HOME_COUNT && count < HOME_COUNT + 200;
  end
endmodule
