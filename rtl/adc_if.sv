// adc_if: driver for the three serial current ADCs (one per phase) that share
// a conversion-start line and a serial clock.
// A conversion cycle: conv is high for one serial-clock period, then
// LEAD+NBITS serial-clock pulses follow; each ADC shifts its result out MSB
// first, a new bit after every falling edge of adc_clk, and the driver samples
// the three data lines on each rising edge. The first LEAD bits are
// discarded. The NBITS-bit two's-complement results are then presented on
// i_meas with a one-clock `valid` pulse and the next conversion starts at
// once. adc_clk runs at clk/(2*CLK_DIV). The serial timing, LEAD and the
// data format are this design's reading of a generic serial ADC; the source
// names the converter and its clk/conv lines but gives no timing.
module adc_if #(
  parameter int NBITS   = 12,
  parameter int LEAD    = 2,
  parameter int CLK_DIV = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [2:0]              sdo,       // serial data of ADC 1..3
  output logic                    adc_clk,
  output logic                    adc_conv,
  output logic signed [NBITS-1:0] i_meas [3],
  output logic                    valid
);
  typedef enum logic [1:0] {S_CONV, S_SHIFT, S_DONE} st_t;
  localparam int NCLK = LEAD + NBITS;

  st_t                          st;
  logic [$clog2(CLK_DIV)-1:0]   div;
  logic [$clog2(NCLK+1)-1:0]    nbit;
  logic                         phase;   // 0: first half (clk low), 1: second half
  logic [NBITS-1:0]             sh [3];
  logic                         tick;

  assign tick = (div == ($clog2(CLK_DIV))'(CLK_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_CONV; div <= '0; nbit <= '0; phase <= 1'b0;
      adc_clk <= 1'b0; adc_conv <= 1'b0; valid <= 1'b0;
      for (int i = 0; i < 3; i++) begin sh[i] <= '0; i_meas[i] <= '0; end
    end else begin
      valid <= 1'b0;
      div   <= tick ? '0 : div + 1'b1;
      if (tick) begin
        phase <= ~phase;
        unique case (st)
          S_CONV: begin
            adc_conv <= ~phase;           // high for one full serial period
            if (phase) begin st <= S_SHIFT; nbit <= '0; end
          end
          S_SHIFT: begin
            adc_clk <= ~phase;            // rising edge in first half
            if (!phase) begin
              for (int i = 0; i < 3; i++) sh[i] <= {sh[i][NBITS-2:0], sdo[i]};
            end else begin
              nbit <= nbit + 1'b1;
              if (nbit == ($clog2(NCLK+1))'(NCLK - 1)) st <= S_DONE;
            end
          end
          S_DONE: begin
            if (!phase) begin
              for (int i = 0; i < 3; i++) i_meas[i] <= $signed(sh[i]);
              valid <= 1'b1;
            end else st <= S_CONV;
          end
          default: st <= S_CONV;
        endcase
      end
    end
  end
endmodule
