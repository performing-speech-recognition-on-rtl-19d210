// fp_accumulator: sums the ELEMS weighted terms that make up one state's
// negative log observation probability.
//
// A term is accepted every cycle. `first` marks the first term of a state:
// the running sum restarts from that term instead of adding to the old sum,
// so back-to-back states need no idle cycle. When `last` is set the
// completed sum is presented on `sum` with `sum_valid` one cycle later,
// together with the tag (the state index) that came with the last term.
// The add is done in a single cycle so that the feedback path keeps a
// throughput of one term per cycle; the published design says only that the terms
// go to an accumulator.
module fp_accumulator
  import hmm_pkg::*;
#(
  parameter int TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             first,
  input  logic             last,
  input  logic [TAG_W-1:0] in_tag,
  input  fp_t              term,
  output logic             sum_valid,
  output logic [TAG_W-1:0] sum_tag,
  output fp_t              sum
);
  fp_t acc;
  fp_t acc_next;

  always_comb acc_next = first ? term : fp_add(acc, term);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      sum_valid <= 1'b0;
      sum_tag   <= '0;
      sum       <= '0;
    end else begin
      sum_valid <= in_valid && last;
      if (in_valid) begin
        acc <= acc_next;
        if (last) begin
          sum     <= acc_next;
          sum_tag <= in_tag;
        end
      end
    end
  end
endmodule
