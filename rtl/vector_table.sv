// vector_table: event-driven voltage-vector selection for the hysteresis
// current controller (the "look-up table" between the hysteresis comparators
// and the three-phase inverter).
//
// The voltage sector secU (sign pattern of the three phase voltages, equal to
// the code of the active vector Vk at the sector centre) picks a column; the
// three hysteresis outputs sdi pick a row. In sector k only V(k-1), V(k),
// V(k+1) and the two zero vectors are used:
//   sdi = 000 -> V0, sdi = 111 -> V7,
//   sdi = code of V(k-1), V(k) or V(k+1) -> that vector,
//   any other sdi -> the sector's zero vector Vz (V7 for k = 1,3,5; V0 for
//   k = 2,4,6), chosen so that moving between Vz and the two adjacent vectors
//   toggles only one inverter leg.
// The table is computed from this rule rather than stored.
//
// Timing follows a two-register structure: secU is synchronised into a
// register, and the selected vector is registered, so a change of sdi shows on
// vec_out one clock later and a change of secU two clocks later. A secU value
// that is not a valid sector (000 or 111) selects V0 (this design's choice).
module vector_table
  import mcs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  vec_t secu,     // voltage sector sign pattern
  input  vec_t sdi,      // hysteresis comparator outputs Sd1 Sd2 Sd3
  input  logic enable,   // 0 forces V0 (inverter output idle)
  output vec_t vec_out   // switch pattern S1 S2 S3
);
  vec_t secu_q;

  function automatic vec_t select(input vec_t sec, input vec_t sd);
    logic [2:0] k, km1, kp1;
    vec_t z;
    k = vec_num(sec);
    if (k == 3'd0 || k == 3'd7) return 3'b000;
    km1 = (k == 3'd1) ? 3'd6 : k - 3'd1;
    kp1 = (k == 3'd6) ? 3'd1 : k + 3'd1;
    z   = k[0] ? 3'b111 : 3'b000;
    if (sd == 3'b000 || sd == 3'b111) return sd;
    if (sd == vec_code(k) || sd == vec_code(km1) || sd == vec_code(kp1)) return sd;
    return z;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      secu_q  <= '0;
      vec_out <= '0;
    end else begin
      secu_q  <= secu;
      vec_out <= enable ? select(secu_q, sdi) : 3'b000;
    end
  end
endmodule
