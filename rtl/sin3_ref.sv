// sin3_ref: three-phase sinusoidal current reference ("SIN 3~" and the
// multiplier by the speed controller output Amp).
//   iref1 = Amp*sin(theta), iref2 = Amp*sin(theta - 120 deg),
//   iref3 = Amp*sin(theta - 240 deg)
// theta is the electrical rotor angle from the encoder. The sine is read from
// a 2**LUT_BITS-entry full-wave table of signed Q1.15 values, computed at
// elaboration as round(32767*sin(2*pi*n/2**LUT_BITS)); the product is scaled
// back by 2**-15. The table size and the one-clock registered output are this
// design's choices.
module sin3_ref
  import mcs_pkg::*;
#(
  parameter int LUT_BITS = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [ANG_W-1:0]        theta,
  input  logic signed [CUR_W-1:0] amp,
  output logic signed [CUR_W-1:0] iref [3]
);
  localparam int N = 2**LUT_BITS;
  typedef logic signed [15:0] lut_t [N];

  function automatic lut_t make_lut();
    lut_t t;
    for (int n = 0; n < N; n++)
      t[n] = 16'($rtoi($sin(2.0 * 3.14159265358979 * n / N) * 32767.0
                        + ($sin(2.0 * 3.14159265358979 * n / N) >= 0.0 ? 0.5 : -0.5)));
    return t;
  endfunction
  localparam lut_t SIN_LUT = make_lut();

  localparam logic [ANG_W-1:0] DEG120 = ANG_W'((2**ANG_W + 1) / 3);
  localparam logic [ANG_W-1:0] DEG240 = ANG_W'((2 * 2**ANG_W + 1) / 3);

  logic [ANG_W-1:0]        ph [3];
  logic signed [15:0]      s  [3];
  logic signed [CUR_W+15:0] p [3];

  assign ph[0] = theta;
  assign ph[1] = theta - DEG120;
  assign ph[2] = theta - DEG240;

  for (genvar i = 0; i < 3; i++) begin : g_ph
    assign s[i] = SIN_LUT[ph[i][ANG_W-1 -: LUT_BITS]];
    assign p[i] = (CUR_W+16)'(amp) * (CUR_W+16)'(s[i]);
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) iref[i] <= '0;
      else        iref[i] <= CUR_W'(p[i] >>> 15);
  end
endmodule
