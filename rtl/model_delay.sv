// model_delay: fixed delay line for the model data stream.
//
// The three observation probability units share one stream of means and
// weights read from the board RAM. The three files' observations are read
// one after another, ELEMS cycles apart, so the second unit gets the model
// stream through one of these delay lines and the third through two in
// series. Each beat (valid plus payload) leaves exactly DEPTH cycles after it
// entered. Implemented as a shift register that is cleared by reset.
module model_delay #(
  parameter int W     = 65,
  parameter int DEPTH = 40
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] din,
  output logic         out_valid,
  output logic [W-1:0] dout
);
  logic [W:0] pipe [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= {in_valid, din};
      for (int i = 1; i < DEPTH; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign {out_valid, dout} = pipe[DEPTH-1];
endmodule
