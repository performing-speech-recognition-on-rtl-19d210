// tb_model_delay: random beats with random valid; every beat must come out
// exactly DEPTH cycles later with its valid bit.
module tb_model_delay;
  localparam int W = 65, D = 40;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [W-1:0] din = 0, dout;
  logic [W:0] hist [$];
  int checks = 0, failures = 0;

  model_delay #(.W(W), .DEPTH(D)) dut (.clk, .rst_n, .in_valid, .din, .out_valid, .dout);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      in_valid = 1'($urandom);
      din = {1'($urandom), $urandom, $urandom};
      hist.push_back({in_valid, din});
      @(posedge clk); #1;
      if (c >= D - 1) begin  // now in cycle c+1: expect the beat of cycle c+1-D
        logic [W:0] e;
        e = hist[c + 1 - D];
        checks++;
        if ({out_valid, dout} != e) failures++;
      end else begin
        checks++;
        if (out_valid) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
