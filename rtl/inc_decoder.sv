// inc_decoder: incremental-encoder interface (A, B quadrature and Ri index).
// A, B and Ri pass through two-flop synchronisers. Every edge of A or B is one
// count (x4 decoding); the direction comes from the A/B phase relation. The
// mechanical position counts modulo 2**CPR_LOG2 and is turned into the
// electrical angle theta = pos * POLE_PAIRS * 2**(ANG_W-CPR_LOG2) (mod 360
// degrees). zero clears the position (used when homing reaches the home
// switch); with ri_align high, a rising edge of Ri also clears it.
// step/dir pulse for one clock per count for the speed measurement. Encoder
// resolution and pole-pair count are not given by the source and are
// assumptions. Latency: 3 clocks from an encoder edge to pos/step.
module inc_decoder
  import mcs_pkg::*;
#(
  parameter int CPR_LOG2   = 12,  // counts per mechanical revolution = 2**CPR_LOG2
  parameter int POLE_PAIRS = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enc_a,
  input  logic                enc_b,
  input  logic                enc_ri,
  input  logic                zero,
  input  logic                ri_align,
  output logic [CPR_LOG2-1:0] pos,
  output logic [ANG_W-1:0]    theta,
  output logic                step,
  output logic                dir,     // 1 = counting up
  output logic                index    // one-clock pulse on a rising edge of Ri
);
  logic [2:0] a_s, b_s, r_s;   // [0],[1] synchroniser, [2] previous value
  logic       cnt_en, up;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_s <= '0; b_s <= '0; r_s <= '0;
    end else begin
      a_s <= {a_s[1:0], enc_a};
      b_s <= {b_s[1:0], enc_b};
      r_s <= {r_s[1:0], enc_ri};
    end
  end

  // a count on any edge; up when A leads B
  assign cnt_en = (a_s[1] ^ a_s[2]) | (b_s[1] ^ b_s[2]);
  assign up     = a_s[1] ^ b_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; step <= 1'b0; dir <= 1'b0; index <= 1'b0;
    end else begin
      index <= r_s[1] & ~r_s[2];
      step  <= cnt_en;
      if (cnt_en) dir <= up;
      if (zero || (ri_align && r_s[1] && !r_s[2])) pos <= '0;
      else if (cnt_en) pos <= up ? pos + 1'b1 : pos - 1'b1;
    end
  end

  assign theta = ANG_W'(32'(pos) * POLE_PAIRS) << (ANG_W - CPR_LOG2);
endmodule
