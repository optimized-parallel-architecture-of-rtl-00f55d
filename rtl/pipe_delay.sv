// pipe_delay: a stallable shift register that carries side data alongside a
// pipelined datapath so that it arrives with the datapath's result.
//
// DEPTH register stages of WIDTH bits; all of them shift when en is high and
// hold when it is low. Reset clears every stage. Output = input delayed by
// DEPTH enabled clocks. A helper of this design, not a block of the article.
module pipe_delay #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] stage [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else if (en) begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[DEPTH-1];

endmodule
