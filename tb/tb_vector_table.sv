// tb_vector_table: checks the voltage-vector selection table cell by cell
// against the published sector/event table (vector numbers per sector column
// Su1..Su6 and event row Sdi0..Sdi7), the invalid-sector and disabled cases,
// and the register latency (one clock from sdi, two clocks from secu).
module tb_vector_table;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [2:0] secu = 0, sdi = 0, vec_out;
  int checks = 0, failures = 0;

  vector_table dut (.clk, .rst_n, .secu, .sdi, .enable, .vec_out);
  always #5 clk = ~clk;

  // codes of V0..V7
  function automatic logic [2:0] code(input int n);
    logic [2:0] c [8] = '{3'b000, 3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101, 3'b111};
    return c[n];
  endfunction
  // expected vector number: rows in event order Sdi0..Sdi7, columns Su1..Su6
  int exp_tab [8][6] = '{
    '{0, 0, 0, 0, 0, 0},
    '{1, 1, 7, 0, 7, 1},
    '{2, 2, 2, 0, 7, 0},
    '{7, 3, 3, 3, 7, 0},
    '{7, 0, 4, 4, 4, 0},
    '{7, 0, 7, 5, 5, 5},
    '{6, 0, 7, 0, 6, 6},
    '{7, 7, 7, 7, 7, 7}};

  task automatic check(input logic [2:0] exp, input string what);
    checks++;
    if (vec_out !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, vec_out, exp);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; enable = 1;
    for (int col = 0; col < 6; col++) begin
      for (int row = 0; row < 8; row++) begin
        @(negedge clk); secu = code(col + 1); sdi = code(row);
        @(negedge clk); @(negedge clk);
        check(code(exp_tab[row][col]), $sformatf("Su%0d Sdi%0d", col + 1, row));
      end
    end
    // invalid sector codes
    for (int s = 0; s < 8; s += 7) begin
      @(negedge clk); secu = 3'(s); sdi = 3'b100;
      @(negedge clk); @(negedge clk);
      check(3'b000, "invalid sector");
    end
    // disabled inverter
    @(negedge clk); secu = 3'b100; sdi = 3'b100; enable = 0;
    @(negedge clk); @(negedge clk);
    check(3'b000, "disabled");
    enable = 1;
    @(negedge clk); @(negedge clk);
    check(3'b100, "re-enabled");
    // latency: sdi change visible after one clock
    @(negedge clk); sdi = 3'b110;
    check(3'b100, "sdi latency before");
    @(negedge clk);
    check(3'b110, "sdi latency 1 clock");
    // secu change visible after two clocks: Su2 with Sdi=101 -> V0
    sdi = 3'b101;
    @(negedge clk); check(3'b101, "Su1 Sdi6");
    secu = 3'b110;
    @(negedge clk); check(3'b101, "secu latency 1 clock");
    @(negedge clk); check(3'b000, "secu latency 2 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
