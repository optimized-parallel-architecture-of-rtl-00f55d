// ddr2_model: behavioural stand-in for the external DDR2 SDRAM and its
// controller, for simulation only (not synthesizable).
//
// A word-addressed memory of DEPTH words of W bits behind the request port
// used by kf_dma: a request is granted in a clock where mem_gnt is high;
// mem_gnt is high with probability GNT_PCT percent each clock (random
// back-pressure). Read data returns on mem_rvalid/mem_rdata exactly LAT
// clocks after the grant, in order. Writes take effect at the grant.
// The testbench fills and inspects the contents through the array `mem`.
module ddr2_model #(
  parameter int W       = 30,
  parameter int ADDR_W  = 24,
  parameter int DEPTH   = 4096,
  parameter int LAT     = 6,
  parameter int GNT_PCT = 70
) (
  input  logic              clk,
  input  logic              mem_req,
  input  logic              mem_we,
  input  logic [ADDR_W-1:0] mem_addr,
  input  logic [W-1:0]      mem_wdata,
  output logic              mem_gnt,
  output logic              mem_rvalid,
  output logic [W-1:0]      mem_rdata
);

  logic [W-1:0] mem [DEPTH];
  logic         pv [LAT];
  logic [W-1:0] pd [LAT];
  int unsigned  grants = 0;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    for (int i = 0; i < LAT; i++) begin
      pv[i] = 1'b0;
      pd[i] = '0;
    end
    mem_gnt = 1'b0;
  end

  assign mem_rvalid = pv[LAT-1];
  assign mem_rdata  = pd[LAT-1];

  always @(posedge clk) begin
    for (int i = LAT - 1; i > 0; i--) begin
      pv[i] <= pv[i-1];
      pd[i] <= pd[i-1];
    end
    pv[0] <= mem_req && mem_gnt && !mem_we;
    pd[0] <= mem[int'(mem_addr) % DEPTH];
    if (mem_req && mem_gnt) begin
      grants <= grants + 1;
      if (mem_we) mem[int'(mem_addr) % DEPTH] <= mem_wdata;
    end
    mem_gnt <= ($urandom_range(99) < GNT_PCT);
  end

endmodule
