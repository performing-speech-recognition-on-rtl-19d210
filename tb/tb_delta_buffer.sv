// tb_delta_buffer: fills all files' path-cost entries, then random reads and
// overwrites with read-back comparison (latency 1).
module tb_delta_buffer;
  import hmm_pkg::*;
  localparam int N = 7;
  logic clk = 0, we = 0, rd_en = 0;
  logic [1:0] wr_file = 0, rd_file = 0;
  logic [2:0] wr_hmm = 0, rd_hmm = 0;
  tri_cost_t wr_data = '0, rd_data;
  tri_cost_t ref_d [3][N];
  int checks = 0, failures = 0;

  delta_buffer #(.N_HMM(N)) dut (.clk, .we, .wr_file, .wr_hmm, .wr_data, .rd_en, .rd_file, .rd_hmm, .rd_data);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int f, int m);
    @(negedge clk);
    we = 1; wr_file = 2'(f); wr_hmm = 3'(m);
    wr_data = {$urandom, $urandom, $urandom};
    ref_d[f][m] = wr_data;
    @(negedge clk); we = 0;
  endtask

  initial begin
    for (int f = 0; f < 3; f++) for (int m = 0; m < N; m++) wr(f, m);
    for (int k = 0; k < 300; k++) begin
      int f, m;
      f = $urandom % 3; m = $urandom % N;
      if (k % 3 == 0) wr(f, m);
      @(negedge clk);
      rd_en = 1; rd_file = 2'(f); rd_hmm = 3'(m);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data != ref_d[f][m]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
