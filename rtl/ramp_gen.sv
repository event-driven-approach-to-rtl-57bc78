// ramp_gen: speed-reference profile generator (trapezoidal profile).
// On each ce strobe the output moves toward the target by at most `step`, so
// a step of the reference becomes a ramp, a hold and a ramp back. With
// enable low the output follows the target directly. zero_tgt makes the
// target 0 (ramped stop); clear zeroes the output at once. The slope limit as
// the realisation of the profile block and both zeroing inputs are this
// design's choices. Output is registered.
module ramp_gen #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic                enable,
  input  logic                zero_tgt,
  input  logic                clear,
  input  logic signed [W-1:0] target,
  input  logic        [W-1:0] step,
  output logic signed [W-1:0] out
);
  logic signed [W-1:0] tgt;
  logic signed [W:0]   diff, st;

  assign tgt  = zero_tgt ? '0 : target;
  assign diff = (W+1)'(tgt) - (W+1)'(out);
  assign st   = $signed({1'b0, step});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          out <= '0;
    else if (clear)      out <= '0;
    else if (!enable)    out <= tgt;
    else if (ce) begin
      if      (diff >  st) out <= W'((W+1)'(out) + st);
      else if (diff < -st) out <= W'((W+1)'(out) - st);
      else                 out <= tgt;
    end
  end
endmodule
