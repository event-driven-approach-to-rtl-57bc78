// pi_controller: PI speed controller whose output is the amplitude Amp of the
// three-phase current reference.
//   e   = ref - meas
//   I  <= I + Ki*e                      (clamped to +/-OUT_MAX * 2**SHIFT)
//   out = sat((Kp*e + I) * 2**-SHIFT)   (saturated to +/-OUT_MAX)
// One update per ce strobe (each new speed sample); the output register
// changes one clock after ce. clear empties the integrator and zeroes the
// output. Gains are run-time values; the fixed-point scaling, the clamping
// anti-windup and the clear input are this design's choices.
module pi_controller #(
  parameter int IN_W    = 16,
  parameter int OUT_W   = 12,
  parameter int SHIFT   = 8,
  parameter int OUT_MAX = 2000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  logic                    clear,
  input  logic signed [IN_W-1:0]  ref_in,
  input  logic signed [IN_W-1:0]  meas,
  input  logic        [15:0]      kp,
  input  logic        [15:0]      ki,
  output logic signed [OUT_W-1:0] out
);
  localparam int AW = IN_W + 18 + 2;
  localparam logic signed [AW-1:0] LIM = AW'(OUT_MAX) <<< SHIFT;

  logic signed [IN_W:0]  e;
  logic signed [AW-1:0]  integ, integ_nx, sum, sum_sh;

  assign e = (IN_W+1)'(ref_in) - (IN_W+1)'(meas);

  always_comb begin
    integ_nx = integ + AW'(e) * $signed({1'b0, ki});
    if (integ_nx >  LIM) integ_nx =  LIM;
    if (integ_nx < -LIM) integ_nx = -LIM;
    sum    = AW'(e) * $signed({1'b0, kp}) + integ_nx;
    sum_sh = sum >>> SHIFT;
    if (sum_sh >  AW'(OUT_MAX)) sum_sh =  AW'(OUT_MAX);
    if (sum_sh < -AW'(OUT_MAX)) sum_sh = -AW'(OUT_MAX);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ <= '0;
      out   <= '0;
    end else if (clear) begin
      integ <= '0;
      out   <= '0;
    end else if (ce) begin
      integ <= integ_nx;
      out   <= OUT_W'(sum_sh);
    end
  end
endmodule
