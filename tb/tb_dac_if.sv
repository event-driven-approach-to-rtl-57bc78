// tb_dac_if: a model converter shifts in sdi at every rising sclk edge while
// cs_n is low. At the end of each frame the 16 received bits must equal
// {4'b0000, code}, where code is the offset-binary top 12 bits of the word
// on `data`. The word is changed at random right after each frame. Also
// checked: exactly 16 rising edges per frame, sclk low while cs_n is high,
// a frame period of 33*CLK_DIV clocks, and one `sent` pulse per frame.
module tb_dac_if;
  localparam int CLK_DIV = 4;
  logic clk = 0, rst_n = 0;
  logic [15:0] data = 0;
  logic sclk, cs_n, sdi, sent;
  int checks = 0, failures = 0;

  dac_if #(.NBITS(12), .CLK_DIV(CLK_DIV)) dut (.clk, .rst_n, .data, .sclk, .cs_n, .sdi, .sent);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model converter
  logic [15:0] rx;
  int nbits;
  always @(posedge sclk) if (!cs_n) begin rx = {rx[14:0], sdi}; nbits++; end
  // sclk must stay low outside a frame
  always @(posedge clk) if (rst_n && cs_n && sclk) begin
    failures++; $display("sclk high while cs_n is high");
  end

  function automatic logic [15:0] expect_word(input logic [15:0] d);
    logic [15:0] u;
    u = d ^ 16'h8000;                 // signed to offset binary
    return {4'b0000, u[15:4]};
  endfunction

  int nsent;
  always @(posedge clk) if (sent) nsent++;

  initial begin
    logic [15:0] expw;
    longint t_fall, t_prev;
    int frames;
    nbits = 0; rx = 0; nsent = 0; frames = 0; t_prev = -1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    data = 16'h0000; expw = expect_word(data);
    for (int n = 0; n < 300; n++) begin
      @(negedge cs_n);
      t_fall = $time / 10;
      if (t_prev >= 0) begin
        checks++;
        if (t_fall - t_prev != 33 * CLK_DIV) begin
          failures++; $display("frame period %0d clocks", t_fall - t_prev);
        end
      end
      t_prev = t_fall;
      nbits = 0;
      @(posedge cs_n);
      checks++;
      if (nbits != 16 || rx != expw) begin
        failures++;
        $display("frame %0d: got %h (%0d bits), expected %h for data %h", n, rx, nbits, expw, data);
      end
      frames++;
      // new word well before the next frame latches it
      @(negedge clk);
      case (n)
        0: data = 16'h7fff;
        1: data = 16'h8000;
        2: data = 16'hffff;
        default: data = 16'($urandom);
      endcase
      expw = expect_word(data);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (nsent != frames) begin
      failures++; $display("sent pulses %0d, frames %0d", nsent, frames);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
