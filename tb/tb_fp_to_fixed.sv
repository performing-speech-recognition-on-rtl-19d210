// tb_fp_to_fixed: float to fixed-point cost (8 fractional bits) against a
// real-number model: rounding half away from zero, saturation at both ends.
module tb_fp_to_fixed;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [7:0] in_tag = 0, out_tag;
  logic [31:0] x = 0;
  logic signed [31:0] cost;
  int checks = 0, failures = 0;

  fp_to_fixed #(.TAG_W(8)) dut (.clk, .rst_n, .in_valid, .in_tag, .x, .out_valid, .out_tag, .cost);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model(real v);
    real    s;
    longint r;
    s = rabs(v) * 256.0;
    r = longint'($floor(s + 0.5));   // half away from zero
    if (v < 0) begin
      if (r >= 64'h4000_0000) return -64'sh4000_0000;
      return -r;
    end
    if (r >= 64'h3FFF_FFFF) return 64'h3FFF_FFFF;
    return r;
  endfunction

  task automatic run(logic [31:0] f);
    longint e;
    @(negedge clk);
    x = f; in_valid = 1; in_tag = 8'($urandom);
    @(negedge clk);
    in_valid = 0;
    e = model(f2r(f));
    checks++;
    if (!out_valid || longint'(cost) != e || out_tag != in_tag) begin
      failures++;
      if (failures < 10) $display("FAIL %h (%g): got %0d exp %0d", f, f2r(f), cost, e);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(r2f(1.5));           // 384
    run(r2f(-2.0 / 512.0));  // -0.5 lsb -> -1
    run(r2f(1.0 / 512.0));   // +0.5 lsb -> 1
    run(r2f(1.0e12));        // saturate high
    run(r2f(-1.0e12));       // saturate low
    run(32'h0);
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] f;
      f = $urandom;
      f[30:23] = 8'(100 + $urandom % 60);
      run(f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
