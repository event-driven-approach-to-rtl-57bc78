// switch_counter: counts inverter switchings in a fixed window and sorts them
// by how many inverter legs change at once (1, 2 or 3), i.e. the number of
// bits that differ between the previous and the new switch pattern. At the
// end of every WINDOW clocks the three counts are latched to the outputs,
// `valid` pulses for one clock and counting restarts. The 10 ms window
// follows the source; the 50 MHz clock behind the default WINDOW of 500000
// and the counter width are this design's choices.
module switch_counter
  import mcs_pkg::*;
#(
  parameter int WINDOW = 500000,
  parameter int CW     = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  vec_t          vec,
  output logic [CW-1:0] n1,   // switchings changing one leg
  output logic [CW-1:0] n2,   // two legs
  output logic [CW-1:0] n3,   // three legs
  output logic          valid
);
  vec_t                       prev;
  vec_t                       d;
  logic [1:0]                 legs;
  logic [$clog2(WINDOW)-1:0]  t;
  logic [CW-1:0]              c1, c2, c3, c1n, c2n, c3n;

  assign d    = prev ^ vec;
  assign legs = 2'(d[0]) + 2'(d[1]) + 2'(d[2]);
  // counters saturate instead of wrapping
  assign c1n = (legs == 2'd1 && c1 != '1) ? c1 + 1'b1 : c1;
  assign c2n = (legs == 2'd2 && c2 != '1) ? c2 + 1'b1 : c2;
  assign c3n = (legs == 2'd3 && c3 != '1) ? c3 + 1'b1 : c3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0; t <= '0; c1 <= '0; c2 <= '0; c3 <= '0;
      n1 <= '0; n2 <= '0; n3 <= '0; valid <= 1'b0;
    end else begin
      prev  <= vec;
      valid <= 1'b0;
      if (t == ($clog2(WINDOW))'(WINDOW - 1)) begin
        t <= '0;
        n1 <= c1n; n2 <= c2n; n3 <= c3n;
        c1 <= '0;  c2 <= '0;  c3 <= '0;
        valid <= 1'b1;
      end else begin
        t <= t + 1'b1;
        c1 <= c1n; c2 <= c2n; c3 <= c3n;
      end
    end
  end
endmodule
