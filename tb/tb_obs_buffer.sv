// tb_obs_buffer: loads a 39-element observation (checking the pass-through
// while loading), then replays it in random order; index 39 must read 1.0.
module tb_obs_buffer;
  logic clk = 0, load = 0;
  logic [5:0] idx = 0;
  logic [31:0] din = 0, dout;
  logic [31:0] ref_v [39];
  int checks = 0, failures = 0;

  obs_buffer dut (.clk, .load, .idx, .din, .dout);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 3; v++) begin
      for (int e = 0; e < 39; e++) begin
        @(negedge clk);
        load = 1; idx = 6'(e); din = $urandom; ref_v[e] = din;
        #1 checks++; if (dout != din) failures++;
      end
      @(negedge clk);
      load = 0; idx = 6'd39;
      #1 checks++; if (dout != 32'h3F80_0000) failures++;
      for (int k = 0; k < 200; k++) begin
        @(negedge clk);
        idx = 6'($urandom % 39);
        #1 checks++;
        if (dout != ref_v[idx]) begin
          failures++;
          $display("FAIL idx %0d got %h exp %h", idx, dout, ref_v[idx]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
