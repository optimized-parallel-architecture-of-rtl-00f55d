// bram_sdp: simple dual-port block RAM (one write port, one read port).
//
// DEPTH words of WIDTH bits, written as an array so that synthesis maps it
// to block RAM. The write is synchronous. The read is synchronous with one
// clock of latency: rd_data shows the word at rd_addr on the clock after
// rd_en, and holds its value while rd_en is low, which lets a stalled
// pipeline keep reading the same output. A read and a write of the same
// address in one clock return the old word. The contents are not reset.
// The article only names the block RAMs; the port arrangement and the
// read behaviour are this design's choices.
module bram_sdp #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 128,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
