// uart_rx: RS232 receiver, 8 data bits, no parity, 1 stop bit, LSB first.
// The line is synchronised by two flops; a falling edge starts a frame, each
// bit is sampled in its middle (CLKS_PER_BIT clocks per bit). A byte with a
// valid stop bit is presented on `data` with a one-clock `valid` pulse about
// half a bit after the stop bit's middle; a frame with a low stop bit is
// dropped. Frame format and baud rate (115200 at 50 MHz) are this design's
// choices.
module uart_rx #(
  parameter int CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid
);
  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} st_t;
  st_t st;
  logic [1:0] sync;
  logic [$clog2(CLKS_PER_BIT)-1:0] cnt;
  logic [2:0] bitn;
  logic [7:0] sh;
  localparam int CW = $clog2(CLKS_PER_BIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= 2'b11; st <= R_IDLE; cnt <= '0; bitn <= '0; sh <= '0;
      data <= '0; valid <= 1'b0;
    end else begin
      sync  <= {sync[0], rx};
      valid <= 1'b0;
      unique case (st)
        R_IDLE: if (!sync[1]) begin st <= R_START; cnt <= '0; end
        R_START:
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt <= '0;
            if (!sync[1]) begin st <= R_DATA; bitn <= '0; end
            else st <= R_IDLE;                  // glitch, not a start bit
          end else cnt <= cnt + 1'b1;
        R_DATA:
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt  <= '0;
            sh   <= {sync[1], sh[7:1]};
            bitn <= bitn + 1'b1;
            if (bitn == 3'd7) st <= R_STOP;
          end else cnt <= cnt + 1'b1;
        R_STOP:
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            st <= R_IDLE;
            if (sync[1]) begin data <= sh; valid <= 1'b1; end
          end else cnt <= cnt + 1'b1;
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
