// signal_select: picks one of eight internal signals for the D/A converter
// that feeds an oscilloscope. The selected 16-bit word is registered (one
// clock latency). The set of signals and the select register are this
// design's choices; the source shows only the block and its place between
// the controller and the D/A driver.
module signal_select (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  sel,
  input  logic [15:0] sig_in [8],
  output logic [15:0] sig_out
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sig_out <= '0;
    else        sig_out <= sig_in[sel];
endmodule
