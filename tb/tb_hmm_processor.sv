// tb_hmm_processor: random previous path costs (including impossible ones),
// transition, entry and observation costs; the three new path costs, the
// predecessor bits and the exit cost are compared with a reference written
// here with 64-bit arithmetic. Ties are forced regularly (self loop wins).
module tb_hmm_processor;
  import hmm_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  tri_cost_t prev = '0, b = '0, delta;
  cost_t lm_cost = 0, a_entry = 0, exit_cost;
  trans_t trans = '0;
  logic [2:0] psi;
  int checks = 0, failures = 0;

  hmm_processor dut (.clk, .rst_n, .in_valid, .prev, .lm_cost, .a_entry, .trans, .b,
    .out_valid, .delta, .psi, .exit_cost);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cost_t rc(bit allow_inf);
    if (allow_inf && $urandom % 5 == 0) return COST_INF;
    return cost_t'(int'($urandom % 200000) - 20000);
  endfunction

  task automatic node(longint sc, longint st, longint pc, longint pt, longint bb,
                      output longint d, output bit p);
    longint cs, cp;
    cs = cadd(sc, st); cp = cadd(pc, pt);
    p  = cp < cs;
    d  = cadd(p ? cp : cs, bb);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      longint d0, d1, d2, ex;
      bit p0, p1, p2;
      @(negedge clk);
      in_valid = 1;
      prev = '{rc(1), rc(1), rc(1)};
      lm_cost = rc(1); a_entry = rc(0);
      trans = '{rc(0), rc(0), rc(0), rc(0), rc(0), rc(0)};
      b = '{rc(0), rc(0), rc(0)};
      if (k % 7 == 0) begin  // tie on state 1
        trans.a11 = 100; trans.a01 = 100; prev.s0 = 5000; prev.s1 = 5000;
      end
      node(prev.s0, trans.a00, lm_cost, a_entry, b.s0, d0, p0);
      node(prev.s1, trans.a11, prev.s0, trans.a01, b.s1, d1, p1);
      node(prev.s2, trans.a22, prev.s1, trans.a12, b.s2, d2, p2);
      ex = cadd(d2, trans.a2x);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || longint'(delta.s0) != d0 || longint'(delta.s1) != d1 ||
          longint'(delta.s2) != d2 || psi != {p2, p1, p0} || longint'(exit_cost) != ex) begin
        failures++;
        if (failures < 5) $display("FAIL %0d: %0d %0d %0d psi %b", k, delta.s0, delta.s1, delta.s2, psi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
