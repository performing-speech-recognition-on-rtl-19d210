// tb_fp_accumulator: streams back-to-back groups of 40 exactly representable
// terms (restart on `first`, result on `last`) and compares each sum and tag
// with the exact sum, and checks the one-cycle result latency.
module tb_fp_accumulator;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, first = 0, last = 0, sum_valid;
  logic [7:0] in_tag = 0, sum_tag;
  logic [31:0] term = 0, sum;
  int checks = 0, failures = 0;
  real exp_q[$];
  int  tag_q[$];

  fp_accumulator #(.TAG_W(8)) dut (.clk, .rst_n, .in_valid, .first, .last,
    .in_tag, .term, .sum_valid, .sum_tag, .sum);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check each result one cycle after its last term
  logic last_d = 0;
  always @(posedge clk) begin
    last_d <= in_valid && last;
    if (rst_n && last_d) begin
      checks++;
      if (!sum_valid || exp_q.size() == 0) failures++;
      else begin
        real e; int t;
        e = exp_q.pop_front(); t = tag_q.pop_front();
        if (f2r(sum) != e || sum_tag != 8'(t)) begin
          failures++;
          $display("FAIL sum %g exp %g tag %0d/%0d", f2r(sum), e, sum_tag, t);
        end
      end
    end else if (rst_n && sum_valid) begin
      checks++; failures++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 30; g++) begin
      real acc;
      acc = 0.0;
      for (int e = 0; e < 40; e++) begin
        real v;
        v = real'(int'($urandom % 4001) - 1000) / 16.0;
        acc += v;
        @(negedge clk);
        in_valid = 1; first = (e == 0); last = (e == 39); in_tag = 8'(g);
        term = r2f(v);
      end
      exp_q.push_back(acc); tag_q.push_back(g);
      if (g % 5 == 4) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
