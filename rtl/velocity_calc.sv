// velocity_calc: rotor speed from encoder counts. Counts (signed by the
// direction) are accumulated over a window of WIN_CYCLES clocks; at the end
// of each window the sum is latched as `speed` (counts per window) and
// `valid` pulses for one clock. The counting method and window length are
// this design's choices (1 ms at a 50 MHz clock by default).
module velocity_calc
  import mcs_pkg::*;
#(
  parameter int WIN_CYCLES = 50000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    step,
  input  logic                    dir,
  output logic signed [SPD_W-1:0] speed,
  output logic                    valid
);
  logic [$clog2(WIN_CYCLES)-1:0] t;
  logic signed [SPD_W-1:0]       acc, acc_nx;

  assign acc_nx = !step ? acc : (dir ? acc + 1'b1 : acc - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t <= '0; acc <= '0; speed <= '0; valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (t == ($clog2(WIN_CYCLES))'(WIN_CYCLES - 1)) begin
        t     <= '0;
        speed <= acc_nx;
        acc   <= '0;
        valid <= 1'b1;
      end else begin
        t   <= t + 1'b1;
        acc <= acc_nx;
      end
    end
  end
endmodule
