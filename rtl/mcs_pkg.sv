// mcs_pkg: types and helpers shared by the BLAC motor controller.
// Switch vectors are written S1 S2 S3 (MSB = phase 1), '1' = upper transistor on.
// Vector numbering V0..V7 and their codes follow the space-vector diagram of the
// controller: V1=100, V2=110, V3=010, V4=011, V5=001, V6=101, zeros V0=000, V7=111.
// Widths (12-bit currents, 16-bit angle and speed) are this design's own choice.
package mcs_pkg;
  localparam int CUR_W = 12;   // phase current / current reference width (signed)
  localparam int ANG_W = 16;   // angle: 2**ANG_W = 360 degrees
  localparam int SPD_W = 16;   // speed: encoder counts per measurement window (signed)

  typedef logic [2:0] vec_t;   // inverter switch pattern S1 S2 S3

  // Supervisor states (green: READY, OPERATE, STOPPING; yellow: WARNING;
  // red: RESET, STOP_ERR, ERROR; BEGIN and HOMING precede READY).
  typedef enum logic [3:0] {
    ST_BEGIN    = 4'd0,
    ST_HOMING   = 4'd1,
    ST_READY    = 4'd2,
    ST_OPERATE  = 4'd3,
    ST_STOPPING = 4'd4,
    ST_WARNING  = 4'd5,
    ST_RESET    = 4'd6,
    ST_STOP_ERR = 4'd7,
    ST_ERROR    = 4'd8
  } sup_state_t;

  // Code of active vector Vk, k = 1..6; 0 gives V0 and 7 gives V7.
  function automatic vec_t vec_code(input logic [2:0] k);
    case (k)
      3'd1: return 3'b100;
      3'd2: return 3'b110;
      3'd3: return 3'b010;
      3'd4: return 3'b011;
      3'd5: return 3'b001;
      3'd6: return 3'b101;
      3'd7: return 3'b111;
      default: return 3'b000;
    endcase
  endfunction

  // Inverse of vec_code: vector number 0..7 of a switch pattern.
  function automatic logic [2:0] vec_num(input vec_t c);
    case (c)
      3'b100: return 3'd1;
      3'b110: return 3'd2;
      3'b010: return 3'd3;
      3'b011: return 3'd4;
      3'b001: return 3'd5;
      3'b101: return 3'd6;
      3'b111: return 3'd7;
      default: return 3'd0;
    endcase
  endfunction
endpackage
