// pll_sector_filter: recovers the voltage sector from a stream of switch
// vectors ("comp / Filter 2.order" block). The top feeds it with the vector
// the hysteresis comparators request (Sd1 Sd2 Sd3); it works the same on the
// applied pattern S1 S2 S3.
//
// Each active vector Vk (k = 1..6) stands for the angle (k-1)*60 degrees. A
// second-order phase-locked loop follows that staircase of angles:
//   eps   = angle(Vk) - phase                 (wraps modulo 360 degrees)
//   integ = integ + A*eps                     (path A, integrator)
//   phase = phase + integ + B*eps             (path B proportional, then the
//                                              wrapping phase integrator)
// and the filtered phase is compared against six 60-degree windows shifted by
// 30 degrees ("comp"): sector k covers (k-1)*60 +/- 30 degrees. The output
// secu is the sign pattern of the three phase voltages in that sector, which
// equals the code of Vk.
// The loop structure (error, A to an integrator, B direct, sum into a wrapping
// integrator fed back) follows the filter diagram. This design's choices:
// zero vectors V0/V7 carry no angle, so while one is applied eps is taken as 0
// and the phase only advances with the integrated frequency; updates happen
// on the ce strobe; A and B are run-time gains scaled by 2**-SHIFT_I and
// 2**-SHIFT_P; the phase carries FRAC fraction bits.
// Timing: angle, sector and secu are registered and follow the ce update by
// one clock. The phase wraps modulo 2**PW, so only the low PW bits of the
// proportional term are used; the unused high bits are expected.
module pll_sector_filter
  import mcs_pkg::*;
#(
  parameter int FRAC    = 16,   // fraction bits of phase and frequency
  parameter int SHIFT_P = 16,   // proportional gain = B * 2**-SHIFT_P (SHIFT_P <= FRAC)
  parameter int SHIFT_I = 30    // integral gain     = A * 2**-SHIFT_I (SHIFT_I >= FRAC)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,        // update strobe
  input  vec_t             vec_in,    // switch vector (requested or applied)
  input  logic [7:0]       gain_a,    // A
  input  logic [7:0]       gain_b,    // B
  output logic [ANG_W-1:0] angle,     // filtered voltage angle
  output logic [2:0]       sector,    // 1..6
  output vec_t             secu       // sector sign pattern
);
  localparam int PW = ANG_W + FRAC;           // phase accumulator width
  localparam int IW = PW + 8;                 // integrator width
  // window edge 30 + j*60 degrees, rounded up to the next angle step
  function automatic logic [ANG_W-1:0] edge_at(input int j);
    return ANG_W'(((2 * j + 1) * (2**ANG_W) + 11) / 12);
  endfunction
  // angle of vector V(kk+1), rounded to the nearest angle step
  function automatic logic [ANG_W-1:0] vec_angle(input logic [2:0] kk);
    return ANG_W'((int'(kk) * (2**ANG_W) + 3) / 6);
  endfunction

  logic [PW-1:0]           phase;
  logic signed [IW-1:0]    integ;
  logic [2:0]              k;
  logic [ANG_W-1:0]        meas;
  logic signed [ANG_W-1:0] eps;
  logic signed [IW-1:0]    prop, inc_i;

  assign k    = vec_num(vec_in);
  assign meas = vec_angle(k - 3'd1);
  assign eps  = (k == 3'd0 || k == 3'd7) ? '0 : $signed(meas - phase[PW-1:FRAC]);
  assign prop  = (IW'(eps) * $signed({1'b0, gain_b})) <<< (FRAC - SHIFT_P);
  assign inc_i = (IW'(eps) * $signed({1'b0, gain_a})) >>> (SHIFT_I - FRAC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= '0;
      integ  <= '0;
      angle  <= '0;
      sector <= 3'd1;
    end else begin
      if (ce) begin
        integ <= integ + inc_i;
        phase <= phase + PW'(integ) + PW'(prop);
      end
      angle <= phase[PW-1:FRAC];
      // comparator: 60-degree windows shifted by 30 degrees
      if      (angle < edge_at(0) || angle >= edge_at(5)) sector <= 3'd1;
      else if (angle < edge_at(1)) sector <= 3'd2;
      else if (angle < edge_at(2)) sector <= 3'd3;
      else if (angle < edge_at(3)) sector <= 3'd4;
      else if (angle < edge_at(4)) sector <= 3'd5;
      else                         sector <= 3'd6;
    end
  end
  assign secu = vec_code(sector);
endmodule
