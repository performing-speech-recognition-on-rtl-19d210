// tb_trans_ram: loads random transition-cost words for every HMM and reads
// them back in random order (latency 1).
module tb_trans_ram;
  import hmm_pkg::*;
  localparam int N = 49;
  logic clk = 0, we = 0, rd_en = 0;
  logic [5:0] waddr = 0, raddr = 0;
  trans_t wdata = '0, rdata;
  trans_t ref_t [N];
  int checks = 0, failures = 0;

  trans_ram #(.N_HMM(N)) dut (.clk, .we, .waddr, .wdata, .rd_en, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < N; m++) begin
      @(negedge clk);
      we = 1; waddr = 6'(m);
      wdata = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      ref_t[m] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 200; k++) begin
      int m;
      m = $urandom % N;
      @(negedge clk); rd_en = 1; raddr = 6'(m);
      @(negedge clk); rd_en = 0;
      checks++;
      if (rdata != ref_t[m]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
