// tb_param_regs: byte-level protocol test. Writes random values to all
// sixteen registers and reads them back, reads the status words, checks the
// reset values, the one-clock command pulses and the parameter reset. A
// simple transmitter model holds tx_busy for a few clocks per byte.
module tb_param_regs;
  logic clk = 0, rst_n = 0;
  logic [7:0] rx_data = 0, tx_data;
  logic rx_valid = 0, tx_start, tx_busy = 0, param_reset = 0;
  logic [15:0] status [16];
  logic [15:0] regs [16];
  logic cmd_start, cmd_stop, cmd_ack;
  int checks = 0, failures = 0, busy_cnt = 0;
  logic [7:0] txq [$];
  logic [15:0] shadow [16];
  localparam logic [15:0] DEF [16] = '{16'd0, 16'h0010, 16'd50, 16'd20, 16'd4000, 16'd200, 16'd255,
                                       16'd255, 16'd0, 16'd0, 16'd2, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0};

  param_regs dut (.clk, .rst_n, .rx_data, .rx_valid, .tx_data, .tx_start, .tx_busy, .param_reset,
                  .status, .regs, .cmd_start, .cmd_stop, .cmd_ack);
  always #5 clk = ~clk;

  // transmitter model: a byte occupies the line for 7 clocks
  always @(posedge clk) begin
    if (tx_start && !tx_busy) begin txq.push_back(tx_data); tx_busy <= 1; busy_cnt <= 6; end
    else if (tx_busy) begin if (busy_cnt == 0) tx_busy <= 0; else busy_cnt <= busy_cnt - 1; end
  end

  task automatic byte_in(input logic [7:0] b);
    @(negedge clk); rx_data = b; rx_valid = 1;
    @(negedge clk); rx_valid = 0;
    repeat ($urandom_range(0, 4)) @(negedge clk);
  endtask
  task automatic wr(input int a, input logic [15:0] v);
    byte_in(8'(a)); byte_in(v[15:8]); byte_in(v[7:0]);
  endtask
  task automatic rd(input int a, output logic [15:0] v);
    byte_in(8'h80 | 8'(a));
    repeat (40) @(negedge clk);
    if (txq.size() != 2) begin failures++; $display("FAIL %0d reply bytes", txq.size()); v = 'x; txq = {}; end
    else begin v[15:8] = txq.pop_front(); v[7:0] = txq.pop_front(); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    int pulses;
    for (int i = 0; i < 16; i++) status[i] = 16'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin checks++; if (regs[i] != DEF[i]) failures++; end
    // write, then read back, every register (register 1 without pulse bits)
    for (int i = 0; i < 16; i++) begin
      shadow[i] = 16'($urandom);
      if (i == 1) shadow[i] &= ~16'h000e;
      wr(i, shadow[i]);
    end
    for (int i = 0; i < 16; i++) begin
      checks++; if (regs[i] != shadow[i]) begin failures++; $display("FAIL reg %0d", i); end
      rd(i, v);
      checks++; if (v != shadow[i]) begin failures++; $display("FAIL read %0d got %h exp %h", i, v, shadow[i]); end
    end
    for (int i = 0; i < 16; i++) begin
      rd(16 + i, v);
      checks++; if (v != status[i]) begin failures++; $display("FAIL status %0d", i); end
    end
    // command pulses last one clock
    pulses = 0;
    byte_in(8'd1); byte_in(8'h00);
    @(negedge clk); rx_data = 8'h0f; rx_valid = 1;
    @(negedge clk); rx_valid = 0;
    checks++; if (!(cmd_start && cmd_stop && cmd_ack && regs[1][0])) failures++;
    @(negedge clk);
    checks++; if (cmd_start || cmd_stop || cmd_ack || !regs[1][0]) failures++;
    // parameter reset: defaults back, main switch bit and outputs kept, speed reference cleared
    wr(8, 16'h00a5);
    @(negedge clk); param_reset = 1; @(negedge clk); param_reset = 0;
    checks++; if (regs[0] != 0) failures++;
    checks++; if (regs[1] != (DEF[1] | 16'h0001)) failures++;
    checks++; if (regs[8] != 16'h00a5) failures++;
    for (int i = 2; i < 16; i++) if (i != 8) begin checks++; if (regs[i] != DEF[i]) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
