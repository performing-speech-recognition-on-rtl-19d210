// tb_fp_mul: random products compared with the exact double-precision
// product (within half an ulp), plus exact directed cases and zero inputs.
module tb_fp_mul;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [31:0] a = 0, b = 0, y;
  int checks = 0, failures = 0;

  fp_mul dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .y);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [31:0] x, logic [31:0] z);
    real ex, got;
    @(negedge clk);
    a = x; b = z; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    ex  = f2r(x) * f2r(z);
    got = f2r(y);
    checks++;
    if (!out_valid || rabs(got - ex) > rabs(ex) / 16777216.0 * 1.000001) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: got %h exp %g", x, z, y, ex);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(32'h4040_0000, 32'h4040_0000);                // 3*3
    checks++; if (y != 32'h4110_0000) failures++;
    run(32'hBFC0_0000, 32'h4000_0000);                // -1.5*2
    checks++; if (y != 32'hC040_0000) failures++;
    run(32'h0, 32'h4000_0000);
    checks++; if (y != 32'h0) failures++;
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] x, z;
      x = $urandom; x[30:23] = 8'(100 + $urandom % 50);
      z = (i % 4 == 0) ? x : $urandom;
      z[30:23] = (i % 4 == 0) ? x[30:23] : 8'(100 + $urandom % 50);
      run(x, z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
