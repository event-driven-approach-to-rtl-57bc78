// tb_pll_sector_filter: a voltage vector rotating at constant speed is
// emulated by the vectors an inverter would apply: between Vk and Vk+1 at
// fraction f of the 60-degree step, Vk+1 is applied with probability f, Vk
// otherwise, and a zero vector one update in four. After lock the filtered
// angle must stay within 15 degrees of the true angle, the sector output
// must equal the 30-degree-shifted 60-degree window of the filtered angle
// (one clock later), and away from window edges it must equal the true
// sector. The rotation is reversed halfway; every sector must be visited.
module tb_pll_sector_filter;
  import mcs_pkg::*;
  logic clk = 0, rst_n = 0, ce = 1;
  vec_t vec_in = 3'b100, secu;
  logic [15:0] angle, angle_q = 0;
  logic [2:0] sector;
  int checks = 0, failures = 0, visited = 0, max_err = 0;
  longint theta = 0;           // true angle, 16 integer + 16 fraction bits
  longint rate = 72090;        // about 1.1 LSB per update

  pll_sector_filter dut (.clk, .rst_n, .ce, .vec_in, .gain_a(8'd255), .gain_b(8'd255),
                         .angle, .sector, .secu);
  always #5 clk = ~clk;

  function automatic int sector_of(input real deg);
    real d = deg + 30.0;
    if (d >= 360.0) d -= 360.0;
    return int'($floor(d / 60.0)) + 1;
  endfunction
  function automatic logic [2:0] code(input int n);
    logic [2:0] c [8] = '{3'b000, 3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101, 3'b111};
    return c[n];
  endfunction

  initial begin
    repeat (700000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real deg, est, err, f, d_edge;
    int k, sec_prev;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600000; n++) begin
      @(negedge clk);
      if (n == 300000) rate = -rate;
      theta = (theta + rate) & 64'hFFFF_FFFF;
      deg = real'(theta) / 65536.0 / 65536.0 * 360.0;
      k = int'($floor(deg / 60.0));          // between V(k+1) and V(k+2)
      f = deg / 60.0 - k;
      if ($urandom_range(0, 3) == 0)
        vec_in = ($urandom_range(0, 1) == 0) ? 3'b000 : 3'b111;
      else if ($urandom_range(0, 9999) < int'(f * 10000.0))
        vec_in = code((k + 1) % 6 + 1);
      else
        vec_in = code(k + 1);
      // comparator check: sector follows the registered angle by one clock
      checks++;
      if (int'(sector) != sector_of(real'(angle_q) * 360.0 / 65536.0)) begin
        failures++;
        if (failures < 10) $display("FAIL comparator angle=%0d sector=%0d", angle_q, sector);
      end
      if (secu !== code(int'(sector))) failures++;
      angle_q = angle;
      if ((n > 100000 && n < 300000) || n > 400000) begin
        est = real'(angle) * 360.0 / 65536.0;
        err = est - deg;
        if (err > 180.0) err -= 360.0;
        if (err < -180.0) err += 360.0;
        if ((err < 0.0 ? -err : err) > max_err) max_err = int'((err < 0.0 ? -err : err));
        checks++;
        if ((err < 0.0 ? -err : err) > 15.0) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d true=%f est=%f", n, deg, est);
        end
        d_edge = deg + 30.0 - 60.0 * $floor((deg + 30.0) / 60.0);
        if (d_edge > 15.0 && d_edge < 45.0) begin
          checks++;
          if (int'(sector) != sector_of(deg)) failures++;
        end
        visited |= 1 << sector;
      end
    end
    checks++;
    if (visited != 8'b0111_1110) begin failures++; $display("FAIL sectors visited %b", visited); end
    $display("largest angle error after lock: %0d deg", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
