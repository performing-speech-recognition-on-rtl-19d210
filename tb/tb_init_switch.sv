// tb_init_switch: checks the routing of the selected file's observation
// costs, the pass-through of previous costs, best exit, transition and entry
// costs, and the initialisation at the first frame (COST_INF and 0).
module tb_init_switch;
  import hmm_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, first = 0, out_valid;
  logic [1:0] file = 0;
  tri_cost_t b_all [3];
  tri_cost_t prev_scaled = '0, prev, b;
  cost_t lm_scaled = 0, entry_in = 0, lm_cost, a_entry;
  trans_t trans_in = '0, trans;
  int checks = 0, failures = 0;

  init_switch dut (.clk, .rst_n, .in_valid, .first, .file, .b_all, .prev_scaled, .lm_scaled,
    .trans_in, .entry_in, .out_valid, .prev, .lm_cost, .b, .trans, .a_entry);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 3; f++) b_all[f] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      tri_cost_t eb, ep; cost_t el;
      @(negedge clk);
      in_valid = 1; first = ($urandom % 4 == 0); file = 2'($urandom % 3);
      for (int f = 0; f < 3; f++) b_all[f] = {$urandom, $urandom, $urandom};
      prev_scaled = {$urandom, $urandom, $urandom};
      lm_scaled = $urandom; entry_in = $urandom;
      trans_in = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      eb = b_all[file];
      ep = first ? '{COST_INF, COST_INF, COST_INF} : prev_scaled;
      el = first ? '0 : lm_scaled;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || b != eb || prev != ep || lm_cost != el || trans != trans_in ||
          a_entry != entry_in) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
