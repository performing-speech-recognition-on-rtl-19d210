// tb_fp_addsub: random and directed additions and subtractions compared with
// exact double-precision results; each result must be within half an ulp.
module tb_fp_addsub;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, sub = 0, out_valid;
  logic [31:0] a = 0, b = 0, y;
  int checks = 0, failures = 0;

  fp_addsub dut (.clk, .rst_n, .in_valid, .sub, .a, .b, .out_valid, .y);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rnd_fp(int emin, int emax);
    logic [31:0] r;
    r = $urandom;
    r[30:23] = 8'(emin + int'($urandom % (emax - emin + 1)));
    return r;
  endfunction

  task automatic run(logic [31:0] x, logic [31:0] z, logic s);
    real ex, got, tol;
    @(negedge clk);
    a = x; b = z; sub = s; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    ex  = s ? f2r(x) - f2r(z) : f2r(x) + f2r(z);
    got = f2r(y);
    tol = rabs(ex) / 16777216.0 * 1.000001;
    checks++;
    if (!out_valid || rabs(got - ex) > tol) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h %s %h: got %h (%g) exp %g", x, s ? "-" : "+", z, y, got, ex);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(32'h3FC0_0000, 32'h4010_0000, 0);            // 1.5 + 2.25
    checks++; if (y != 32'h4070_0000) failures++;    // 3.75 exactly
    run(32'h3FC0_0000, 32'h3FC0_0000, 1);            // x - x = 0
    checks++; if (y != 32'h0) failures++;
    run(32'h3F80_0000, 32'h3380_0000, 0);            // 1 + 2^-24: tie to even
    checks++; if (y != 32'h3F80_0000) failures++;
    run(32'h3F80_0001, 32'h3380_0000, 0);            // tie rounds up to even
    checks++; if (y != 32'h3F80_0002) failures++;
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] x, z;
      x = rnd_fp(110, 140);
      z = (i % 3 == 0) ? {x[31:2], 2'($urandom)} ^ 32'h8000_0000 : rnd_fp(110, 140);
      run(x, z, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
