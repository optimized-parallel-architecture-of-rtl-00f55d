// tb_kf_dma: runs the DMA against the behavioural external memory (random
// grants, fixed read latency). Checks that a load puts every track record and
// every measurement record, correctly packed, into the RAM write ports, that
// a load without tracks touches only measurements, and that a store writes
// the latch contents word by word to the result area. Also checks that the
// load issues its reads without waiting for data (more than one request in
// flight).
module tb_kf_dma;
  import kf_pkg::*;

  localparam int W = 30, MT = 100, MM = 100, AWX = 24;
  localparam int TAW = $clog2(MT), MAW = $clog2(MM), TCW = $clog2(MT + 1),
                 MCW = $clog2(MM + 1), RW = TRK_WORDS * W;
  localparam int TB = 16, MB = 2000, RB = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start_load = 1'b0, start_store = 1'b0, load_tracks = 1'b0;
  logic [TCW-1:0] n_trk = '0;
  logic [MCW-1:0] n_meas = '0;
  logic [AWX-1:0] trk_base = AWX'(TB), meas_base = AWX'(MB), res_base = AWX'(RB);
  logic busy, done;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [AWX-1:0] mem_addr;
  logic [W-1:0] mem_wdata, mem_rdata;
  logic trk_we, trk_rd_en, meas_we;
  logic [TAW-1:0] trk_waddr, trk_raddr;
  logic [RW-1:0] trk_wdata, trk_rdata;
  logic [MAW-1:0] meas_waddr;
  logic [MEAS_WORDS*W-1:0] meas_wdata;

  logic [RW-1:0] latch [MT];
  logic [MEAS_WORDS*W-1:0] mram [MM];
  int trk_writes = 0, meas_writes = 0, outstanding = 0, max_outstanding = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  kf_dma dut (.*);

  ddr2_model #(.W(W), .ADDR_W(AWX), .DEPTH(4096)) u_mem (
    .clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata
  );

  // On-chip RAM models.
  always @(posedge clk) begin
    if (rst_n && trk_we) begin
      latch[trk_waddr] <= trk_wdata;
      trk_writes <= trk_writes + 1;
    end
    if (rst_n && meas_we) begin
      mram[meas_waddr] <= meas_wdata;
      meas_writes <= meas_writes + 1;
    end
    if (trk_rd_en) trk_rdata <= latch[trk_raddr];
    outstanding <= outstanding + int'(mem_req && mem_gnt && !mem_we) - int'(mem_rvalid);
    if (outstanding > max_outstanding) max_outstanding <= outstanding;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint g, longint e);
    checks++;
    if (g != e) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, g, e);
    end
  endtask

  task automatic run(input bit ld, input bit st);
    @(negedge clk);
    start_load = ld;
    start_store = st;
    @(negedge clk);
    start_load = 1'b0;
    start_store = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
    check("idle after done", longint'(busy), 0);
  endtask

  initial begin
    int nt, nm;
    trk_rdata = '0;
    for (int i = 0; i < MT; i++) latch[i] = '0;
    for (int i = 0; i < MM; i++) mram[i] = '0;
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = W'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Load with tracks.
    nt = 37; nm = 53;
    n_trk = TCW'(nt); n_meas = MCW'(nm); load_tracks = 1'b1;
    run(1'b1, 1'b0);
    check("track writes", trk_writes, nt);
    check("meas writes", meas_writes, nm);
    for (int i = 0; i < nt; i++)
      for (int f = 0; f < TRK_WORDS; f++)
        check("track word", longint'(latch[i][f*W +: W]),
              longint'(u_mem.mem[TB + i*TRK_WORDS + f]));
    for (int i = 0; i < nm; i++)
      for (int f = 0; f < MEAS_WORDS; f++)
        check("meas word", longint'(mram[i][f*W +: W]),
              longint'(u_mem.mem[MB + i*MEAS_WORDS + f]));
    check("reads pipelined", longint'(max_outstanding > 1), 1);

    // Load of measurements only.
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = W'($urandom);
    trk_writes = 0; meas_writes = 0;
    nm = 100; n_meas = MCW'(nm); load_tracks = 1'b0;
    run(1'b1, 1'b0);
    check("no track writes", trk_writes, 0);
    check("meas writes 2", meas_writes, nm);
    for (int i = 0; i < nm; i++)
      check("meas zy", longint'(mram[i][W +: W]), longint'(u_mem.mem[MB + 2*i + 1]));

    // Store.
    for (int i = 0; i < MT; i++)
      for (int f = 0; f < TRK_WORDS; f++) latch[i][f*W +: W] = W'($urandom);
    nt = 100; n_trk = TCW'(nt);
    run(1'b0, 1'b1);
    for (int i = 0; i < nt; i++)
      for (int f = 0; f < TRK_WORDS; f++)
        check("stored word", longint'(u_mem.mem[RB + i*TRK_WORDS + f]),
              longint'(latch[i][f*W +: W]));
    check("word after last untouched",
          longint'(u_mem.mem[RB + nt*TRK_WORDS] == latch[0][0 +: W]), 0);

    // Empty store.
    n_trk = '0;
    run(1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
