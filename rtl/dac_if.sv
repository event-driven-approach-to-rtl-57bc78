// dac_if: driver of a serial D/A converter that shows one internal signal on
// an oscilloscope ("D/A" driver next to the signal selector).
// The 16-bit signed word on `data` is turned into an unsigned NBITS-bit code
// (offset binary: the sign bit inverted, then the top NBITS bits), so that 0
// sits in the middle of the output range. Frames run back to back: cs_n is
// high for one half bit period, at whose end `data` is latched. Then cs_n
// goes low for 16 serial clocks that carry {4'b0000, code} MSB first. sdi
// changes after each falling sclk edge and is stable at each rising edge,
// where the converter takes it. sclk idles low. One half bit period is
// CLK_DIV clocks, so a frame takes 33*CLK_DIV clocks (132 at the default, a
// new output value every 2.64 us at 50 MHz). `sent` pulses for one clock as
// cs_n returns high, that is when the converter updates its output.
// The existence of a D/A driver for the oscilloscope follows the controller's
// block diagram. The converter's type is not known, so the frame format, the
// four leading zero bits, the offset-binary coding and the rates are this
// design's choices; they match common 12-bit serial DACs and are easy to change.
module dac_if #(
  parameter int NBITS   = 12,  // converter resolution
  parameter int CLK_DIV = 4    // clocks per half serial-clock period
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [15:0]       data,    // signed word to display
  output logic              sclk,
  output logic              cs_n,
  output logic              sdi,
  output logic              sent     // frame finished
);
  localparam int DW = $clog2(CLK_DIV);

  typedef enum logic {D_IDLE, D_SHIFT} st_t;
  st_t          st;
  logic [DW-1:0] div;
  logic         tick;
  logic [15:0]  sh;
  logic [3:0]   bitcnt;
  logic [NBITS-1:0] code;

  assign code = {~data[15], data[14 -: NBITS-1]};
  assign tick = div == DW'(CLK_DIV - 1);
  assign sdi  = sh[15];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE; div <= '0; sh <= '0; bitcnt <= '0;
      sclk <= 1'b0; cs_n <= 1'b1; sent <= 1'b0;
    end else begin
      sent <= 1'b0;
      div  <= tick ? '0 : div + 1'b1;
      if (tick) begin
        unique case (st)
          D_IDLE: begin
            sh     <= 16'(code);
            bitcnt <= 4'd15;
            cs_n   <= 1'b0;
            st     <= D_SHIFT;
          end
          D_SHIFT: begin
            if (!sclk) sclk <= 1'b1;          // converter samples sdi here
            else begin
              sclk <= 1'b0;
              if (bitcnt == 4'd0) begin
                cs_n <= 1'b1;
                sent <= 1'b1;
                st   <= D_IDLE;
              end else begin
                sh     <= {sh[14:0], 1'b0};
                bitcnt <= bitcnt - 1'b1;
              end
            end
          end
          default: st <= D_IDLE;
        endcase
      end
    end
  end
endmodule
