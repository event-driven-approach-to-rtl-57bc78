// hyst_comparator: two-level hysteresis comparator on one phase current error.
// e = i_ref - i_meas; sd goes to 1 when e > +band and to 0 when e < -band and
// otherwise keeps its value, so sd says in which direction the phase current
// must be pushed (1 = switch the upper transistor of that leg on). The error
// sign convention follows the controller block diagram (reference '+',
// measurement '-'); the symmetric band set at run time ("hist") and the
// registered output (one clock latency) are this design's choices.
module hyst_comparator #(
  parameter int W = 12                 // width of reference and measurement
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] i_ref,
  input  logic signed [W-1:0] i_meas,
  input  logic        [W-1:0] band,    // hysteresis half-width, >= 0
  output logic                sd
);
  logic signed [W:0] e;
  assign e = (W+1)'(i_ref) - (W+1)'(i_meas);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           sd <= 1'b0;
    else if (e >  $signed({1'b0, band}))  sd <= 1'b1;
    else if (e < -$signed({1'b0, band}))  sd <= 1'b0;
  end
endmodule
