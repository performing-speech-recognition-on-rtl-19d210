// tb_prob_buffer: writes costs one state at a time into both pages with a
// small HMM count, then reads whole HMMs back (latency 1) and compares.
module tb_prob_buffer;
  import hmm_pkg::*;
  localparam int N = 5;
  logic clk = 0;
  logic we = 0, wr_page = 0, rd_en = 0, rd_page = 0;
  logic [2:0] wr_hmm = 0, rd_hmm = 0;
  logic [1:0] wr_state = 0;
  cost_t wr_cost = 0;
  tri_cost_t rd_data;
  cost_t ref_c [2][N][3];
  int checks = 0, failures = 0;

  prob_buffer #(.N_HMM(N)) dut (.clk, .we, .wr_page, .wr_hmm, .wr_state, .wr_cost,
    .rd_en, .rd_page, .rd_hmm, .rd_data);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 4; round++) begin
      for (int p = 0; p < 2; p++)
        for (int m = 0; m < N; m++)
          for (int j = 0; j < 3; j++) begin
            @(negedge clk);
            we = 1; wr_page = 1'(p); wr_hmm = 3'(m); wr_state = 2'(j);
            wr_cost = cost_t'($urandom); ref_c[p][m][j] = wr_cost;
          end
      @(negedge clk); we = 0;
      for (int k = 0; k < 40; k++) begin
        int p, m;
        p = $urandom % 2; m = $urandom % N;
        @(negedge clk);
        rd_en = 1; rd_page = 1'(p); rd_hmm = 3'(m);
        @(negedge clk);
        rd_en = 0;
        checks++;
        if (rd_data.s0 != ref_c[p][m][0] || rd_data.s1 != ref_c[p][m][1] ||
            rd_data.s2 != ref_c[p][m][2]) begin
          failures++;
          $display("FAIL page %0d hmm %0d", p, m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
