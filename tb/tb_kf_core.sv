// tb_kf_core: runs whole frames through the second stage. The track latch
// and the measurement RAM are modelled in the testbench (one-clock reads).
// Targets move in straight lines in all four quadrant directions; each frame
// gives one noisy measurement per target plus clutter. Every record written
// back is compared with the reference model, as are the statistics
// (winning block operation counts, coasting tracks). The frame time is
// checked against n_trk * (n_meas + 4) plus the pipeline fill, and the
// front pipeline must have stalled behind the association unit.
module tb_kf_core;
  import kf_pkg::*;
  import tb_kf_ref_pkg::*;

  localparam int MT = 100, MM = 100, W = 30, RW = TRK_WORDS * W;
  localparam int TAW = $clog2(MT), MAW = $clog2(MM), TCW = $clog2(MT + 1),
                 MCW = $clog2(MM + 1);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [TCW-1:0] n_trk = '0;
  logic [MCW-1:0] n_meas = '0;
  logic signed [W-1:0] dt, q00, q01, q11, r_meas;
  logic trk_rd_en, trk_we, meas_rd_en, busy, done;
  logic [TAW-1:0] trk_raddr, trk_waddr;
  logic [RW-1:0] trk_rdata, trk_wdata;
  logic [MAW-1:0] meas_raddr;
  logic [MEAS_WORDS*W-1:0] meas_rdata;
  logic [31:0] stall_cycles;
  logic [TCW-1:0] coast_cnt;
  logic [TCW-1:0] op_cnt [4];

  logic [RW-1:0] latch [MT];
  logic [MEAS_WORDS*W-1:0] mram [MM];
  int checks = 0, failures = 0, writes = 0;

  always #5 clk = ~clk;

  kf_core dut (.*);

  always @(posedge clk) begin
    if (trk_rd_en) trk_rdata <= latch[trk_raddr];
    if (meas_rd_en) meas_rdata <= mram[meas_raddr];
    if (rst_n && trk_we) begin
      latch[trk_waddr] <= trk_wdata;
      writes <= writes + 1;
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
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

  function automatic logic [RW-1:0] pack(track_t t);
    logic [RW-1:0] r;
    r[F_PX*W +: W] = W'(t.x.p);   r[F_SX*W +: W] = W'(t.x.s);
    r[F_PX00*W +: W] = W'(t.x.c00); r[F_PX01*W +: W] = W'(t.x.c01);
    r[F_PX11*W +: W] = W'(t.x.c11);
    r[F_PY*W +: W] = W'(t.y.p);   r[F_SY*W +: W] = W'(t.y.s);
    r[F_PY00*W +: W] = W'(t.y.c00); r[F_PY01*W +: W] = W'(t.y.c01);
    r[F_PY11*W +: W] = W'(t.y.c11);
    r[F_INFO*W +: W] = W'(t.info);
    return r;
  endfunction

  function automatic track_t unpack(logic [RW-1:0] r);
    track_t t;
    t.x.p = wrap(longint'(r[F_PX*W +: W]));     t.x.s = wrap(longint'(r[F_SX*W +: W]));
    t.x.c00 = wrap(longint'(r[F_PX00*W +: W])); t.x.c01 = wrap(longint'(r[F_PX01*W +: W]));
    t.x.c11 = wrap(longint'(r[F_PX11*W +: W]));
    t.y.p = wrap(longint'(r[F_PY*W +: W]));     t.y.s = wrap(longint'(r[F_SY*W +: W]));
    t.y.c00 = wrap(longint'(r[F_PY00*W +: W])); t.y.c01 = wrap(longint'(r[F_PY01*W +: W]));
    t.y.c11 = wrap(longint'(r[F_PY11*W +: W]));
    t.info = wrap(longint'(r[F_INFO*W +: W]));
    return t;
  endfunction

  function automatic real noise(real a);
    return a * (real'($urandom_range(2000)) / 1000.0 - 1.0);
  endfunction

  // Truth: position and velocity of each target.
  real tx [MT], ty [MT], tvx [MT], tvy [MT];

  task automatic frame(int nt, int nm, int n_clutter);
    track_t ref_t [MT];
    longint zx [], zy [];
    int     exp_op [4], exp_coast, op, cyc;
    bit     has;
    zx = new[nm];
    zy = new[nm];
    for (int i = 0; i < MT; i++) begin
      tx[i] += tvx[i];
      ty[i] += tvy[i];
    end
    // Measurements: targets in a shuffled order, then clutter.
    for (int j = 0; j < nm; j++) begin
      if (j < nm - n_clutter) begin
        int i;
        i = (j * 37) % (nm - n_clutter);
        zx[j] = to_fx(tx[i] + noise(0.3));
        zy[j] = to_fx(ty[i] + noise(0.3));
      end else begin
        zx[j] = to_fx(noise(250.0));
        zy[j] = to_fx(noise(250.0));
      end
      mram[j] = {W'(zy[j]), W'(zx[j])};
    end
    exp_op = '{0, 0, 0, 0};
    exp_coast = 0;
    for (int i = 0; i < nt; i++) begin
      ref_t[i] = step(unpack(latch[i]), nm, zx, zy, dt, q00, q01, q11, r_meas,
                      op, has);
      if (has) exp_op[op]++;
      else     exp_coast++;
    end
    writes = 0;
    @(negedge clk);
    n_trk = TCW'(nt);
    n_meas = MCW'(nm);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check("records written", writes, nt);
    for (int i = 0; i < nt; i++) begin
      track_t g;
      g = unpack(latch[i]);
      check("px", g.x.p, ref_t[i].x.p);     check("sx", g.x.s, ref_t[i].x.s);
      check("Px00", g.x.c00, ref_t[i].x.c00); check("Px01", g.x.c01, ref_t[i].x.c01);
      check("Px11", g.x.c11, ref_t[i].x.c11);
      check("py", g.y.p, ref_t[i].y.p);     check("sy", g.y.s, ref_t[i].y.s);
      check("Py00", g.y.c00, ref_t[i].y.c00); check("Py01", g.y.c01, ref_t[i].y.c01);
      check("Py11", g.y.c11, ref_t[i].y.c11);
      check("info", g.info, ref_t[i].info);
    end
    for (int o = 0; o < 4; o++) check("op count", longint'(op_cnt[o]), exp_op[o]);
    check("coast count", longint'(coast_cnt), exp_coast);
    if (nt > 0) begin
      checks++;
      if (cyc < nt * (nm + 4) || cyc > nt * (nm + 4) + 2 * F + 20) begin
        failures++;
        $display("FAIL frame time %0d for %0d tracks, %0d measurements", cyc, nt, nm);
      end
      if (nt > 1 && nm > 0) check("front stalled", longint'(stall_cycles > 0), 1);
    end
    $display("frame: %0d tracks %0d measurements %0d clocks, ops %0d %0d %0d %0d, coast %0d",
             nt, nm, cyc, op_cnt[0], op_cnt[1], op_cnt[2], op_cnt[3], coast_cnt);
  endtask

  initial begin
    meas_rdata = '0;
    trk_rdata = '0;
    dt = W'(to_fx(1.0));
    q00 = W'(to_fx(0.05)); q01 = '0; q11 = W'(to_fx(0.02));
    r_meas = W'(to_fx(0.1));
    for (int i = 0; i < MT; i++) begin
      track_t t;
      tx[i] = noise(150.0); ty[i] = noise(150.0);
      tvx[i] = ((i % 4) < 2 ? -1.0 : 1.0) * (0.5 + real'(i % 7) * 0.3);
      tvy[i] = ((i % 4) == 0 || (i % 4) == 2 ? 1.0 : -1.0) * (0.5 + real'(i % 5) * 0.4);
      // Initial state: true position, speed magnitude along each axis.
      t.x = '{p: to_fx(tx[i]), s: to_fx(tvx[i] < 0 ? -tvx[i] : tvx[i]),
              c00: to_fx(1.0), c01: 0, c11: to_fx(1.0)};
      t.y = '{p: to_fx(ty[i]), s: to_fx(tvy[i] < 0 ? -tvy[i] : tvy[i]),
              c00: to_fx(1.0), c01: 0, c11: to_fx(1.0)};
      t.info = 0;
      latch[i] = pack(t);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    frame(8, 10, 2);
    frame(8, 10, 2);
    frame(20, 24, 4);
    frame(5, 0, 0);     // no measurements: every track coasts
    frame(0, 5, 5);     // no tracks
    frame(MT, MM, 0);   // full size
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
