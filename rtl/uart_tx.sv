// uart_tx: RS232 transmitter, 8 data bits, no parity, 1 stop bit, LSB first.
// A byte is taken when `start` is high and `busy` is low; busy stays high for
// the 10 bit times of the frame. Idle line is high. Frame format and baud
// rate are this design's choices, matching uart_rx.
module uart_tx #(
  parameter int CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       tx,
  output logic       busy
);
  localparam int CW = $clog2(CLKS_PER_BIT);
  logic [9:0]    frame;
  logic [3:0]    nbit;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame <= '1; nbit <= '0; cnt <= '0; busy <= 1'b0; tx <= 1'b1;
    end else if (!busy) begin
      tx <= 1'b1;
      if (start) begin
        frame <= {1'b1, data, 1'b0};
        busy  <= 1'b1;
        nbit  <= '0;
        cnt   <= '0;
        tx    <= 1'b0;
      end
    end else if (cnt == CW'(CLKS_PER_BIT - 1)) begin
      cnt <= '0;
      if (nbit == 4'd9) begin
        busy <= 1'b0;
        tx   <= 1'b1;
      end else begin
        nbit <= nbit + 1'b1;
        tx   <= frame[nbit + 1'b1];
      end
    end else cnt <= cnt + 1'b1;
  end
endmodule
