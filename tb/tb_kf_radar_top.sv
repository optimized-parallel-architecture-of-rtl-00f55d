// tb_kf_radar_top: end-to-end test of the tracking filter at its default
// size (100 tracks, 100 measurements, 10.20 fixed point), through the
// external-memory port, with a behavioural memory that grants requests at
// random. Several frames are run:
//   1. tracks loaded from memory (initial values), 100 targets measured;
//   2.-4. tracks kept in the on-chip latch, new measurements each frame;
//   5. no measurements: every track coasts on its prediction;
//   6. a reload of a smaller set of tracks with clutter.
// After each frame the result area of the memory is compared word for word
// with the reference model, and the frame statistics with the model's
// counts. At the end it checks that every mechanism was exercised (each
// block operation winning, coasting, pipeline stalls, latched and reloaded
// tracks, memory back-pressure) and that the filter follows the true
// targets to within a small error.
module tb_kf_radar_top;
  import kf_pkg::*;
  import tb_kf_ref_pkg::*;

  localparam int MT = 100, MM = 100, AWX = 24;
  localparam int TCW = $clog2(MT + 1), MCW = $clog2(MM + 1);
  localparam int TB = 0, MB = 2000, RB = 4000, MEMD = 8192;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, load_tracks = 1'b0;
  logic [TCW-1:0] n_trk = '0;
  logic [MCW-1:0] n_meas = '0;
  logic [AWX-1:0] trk_base = AWX'(TB), meas_base = AWX'(MB), res_base = AWX'(RB);
  logic signed [W-1:0] dt, q00, q01, q11, r_meas;
  logic busy, done;
  logic [31:0] frame_cycles, stall_cycles;
  logic [TCW-1:0] coast_cnt;
  logic [TCW-1:0] op_cnt [4];
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [AWX-1:0] mem_addr;
  logic [W-1:0] mem_wdata, mem_rdata;

  int checks = 0, failures = 0;
  int n_op [4] = '{0, 0, 0, 0};
  int n_coast = 0, n_stall = 0, n_latched = 0, n_reload = 0, n_backpressure = 0;

  always #5 clk = ~clk;

  kf_radar_top dut (.*);

  ddr2_model #(.W(W), .ADDR_W(AWX), .DEPTH(MEMD)) u_mem (
    .clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata
  );

  always @(posedge clk) if (rst_n && mem_req && !mem_gnt) n_backpressure++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint g, longint e);
    checks++;
    if (g != e) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, g, e);
    end
  endtask

  function automatic real noise(real a);
    return a * (real'($urandom_range(2000)) / 1000.0 - 1.0);
  endfunction

  function automatic longint rd(int a);
    return wrap(longint'(u_mem.mem[a]));
  endfunction

  function automatic void put_track(int base, int i, track_t t);
    int a;
    a = base + i * TRK_WORDS;
    u_mem.mem[a + F_PX]   = W'(t.x.p);   u_mem.mem[a + F_SX]   = W'(t.x.s);
    u_mem.mem[a + F_PX00] = W'(t.x.c00); u_mem.mem[a + F_PX01] = W'(t.x.c01);
    u_mem.mem[a + F_PX11] = W'(t.x.c11);
    u_mem.mem[a + F_PY]   = W'(t.y.p);   u_mem.mem[a + F_SY]   = W'(t.y.s);
    u_mem.mem[a + F_PY00] = W'(t.y.c00); u_mem.mem[a + F_PY01] = W'(t.y.c01);
    u_mem.mem[a + F_PY11] = W'(t.y.c11);
    u_mem.mem[a + F_INFO] = W'(t.info);
  endfunction

  real tx [MT], ty [MT], tvx [MT], tvy [MT];
  track_t st [MT];   // reference state of every track

  task automatic frame(bit reload, int nt, int nm, int n_clutter);
    longint zx [], zy [];
    int     exp_op [4], exp_coast, op;
    bit     has;
    zx = new[nm];
    zy = new[nm];
    for (int i = 0; i < MT; i++) begin
      tx[i] += tvx[i];
      ty[i] += tvy[i];
    end
    if (reload) begin
      for (int i = 0; i < nt; i++) begin
        st[i].x = '{p: to_fx(tx[i] - tvx[i] + noise(0.5)),
                    s: to_fx(tvx[i] < 0 ? -tvx[i] : tvx[i]),
                    c00: to_fx(1.0), c01: 0, c11: to_fx(1.0)};
        st[i].y = '{p: to_fx(ty[i] - tvy[i] + noise(0.5)),
                    s: to_fx(tvy[i] < 0 ? -tvy[i] : tvy[i]),
                    c00: to_fx(1.0), c01: 0, c11: to_fx(1.0)};
        st[i].info = 0;
        put_track(TB, i, st[i]);
      end
    end
    for (int j = 0; j < nm; j++) begin
      if (j < nm - n_clutter) begin
        int i;
        i = (j * 37) % (nm - n_clutter);
        zx[j] = to_fx(tx[i] + noise(0.2));
        zy[j] = to_fx(ty[i] + noise(0.2));
      end else begin
        zx[j] = to_fx(noise(300.0));
        zy[j] = to_fx(noise(300.0));
      end
      u_mem.mem[MB + 2*j]     = W'(zx[j]);
      u_mem.mem[MB + 2*j + 1] = W'(zy[j]);
    end
    exp_op = '{0, 0, 0, 0};
    exp_coast = 0;
    for (int i = 0; i < nt; i++) begin
      st[i] = step(st[i], nm, zx, zy, dt, q00, q01, q11, r_meas, op, has);
      if (has) exp_op[op]++;
      else     exp_coast++;
    end
    @(negedge clk);
    load_tracks = reload;
    n_trk = TCW'(nt);
    n_meas = MCW'(nm);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    for (int i = 0; i < nt; i++) begin
      int a;
      a = RB + i * TRK_WORDS;
      check("px", rd(a + F_PX), st[i].x.p);       check("sx", rd(a + F_SX), st[i].x.s);
      check("Px00", rd(a + F_PX00), st[i].x.c00); check("Px01", rd(a + F_PX01), st[i].x.c01);
      check("Px11", rd(a + F_PX11), st[i].x.c11);
      check("py", rd(a + F_PY), st[i].y.p);       check("sy", rd(a + F_SY), st[i].y.s);
      check("Py00", rd(a + F_PY00), st[i].y.c00); check("Py01", rd(a + F_PY01), st[i].y.c01);
      check("Py11", rd(a + F_PY11), st[i].y.c11);
      check("info", rd(a + F_INFO), st[i].info);
    end
    for (int o = 0; o < 4; o++) begin
      check("op count", longint'(op_cnt[o]), exp_op[o]);
      n_op[o] += int'(op_cnt[o]);
    end
    check("coast count", longint'(coast_cnt), exp_coast);
    n_coast += int'(coast_cnt);
    n_stall += int'(stall_cycles > 0);
    if (reload) n_reload++;
    else        n_latched++;
    $display("frame: %s %0d tracks %0d measurements: %0d clocks, ops %0d %0d %0d %0d coast %0d",
             reload ? "loaded " : "latched", nt, nm, frame_cycles,
             op_cnt[0], op_cnt[1], op_cnt[2], op_cnt[3], coast_cnt);
  endtask

  initial begin
    real err, worst;
    int  close;
    dt = W'(to_fx(1.0));
    q00 = W'(to_fx(0.01)); q01 = '0; q11 = W'(to_fx(0.01));
    r_meas = W'(to_fx(0.04));
    for (int i = 0; i < MT; i++) begin
      tx[i] = noise(150.0);
      ty[i] = noise(150.0);
      tvx[i] = ((i % 4) < 2 ? -1.0 : 1.0) * (0.5 + real'(i % 7) * 0.3);
      tvy[i] = ((i % 4) == 0 || (i % 4) == 2 ? 1.0 : -1.0) * (0.5 + real'(i % 5) * 0.4);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    frame(1'b1, MT, MM, 0);
    frame(1'b0, MT, MM, 0);
    frame(1'b0, MT, MM, 0);
    frame(1'b0, MT, MM, 0);
    // Tracking accuracy after four frames: estimated position against truth.
    close = 0;
    worst = 0.0;
    for (int i = 0; i < MT; i++) begin
      err = (to_real(st[i].x.p) - tx[i]) ** 2 + (to_real(st[i].y.p) - ty[i]) ** 2;
      if (err < 1.0) close++;
      if (err > worst) worst = err;
    end
    $display("tracks within 1.0 of the truth: %0d of %0d", close, MT);
    checks++;
    if (close < MT * 9 / 10) begin
      failures++;
      $display("FAIL tracking accuracy");
    end
    frame(1'b0, MT, 0, 0);
    frame(1'b1, 40, 60, 20);
    // Mechanisms.
    for (int o = 0; o < 4; o++) begin
      checks++;
      if (n_op[o] == 0) begin
        failures++;
        $display("FAIL block operation %0d never won", o + 1);
      end
    end
    checks++; if (n_coast == 0)        begin failures++; $display("FAIL no coasting"); end
    checks++; if (n_stall == 0)        begin failures++; $display("FAIL no stall"); end
    checks++; if (n_latched == 0)      begin failures++; $display("FAIL no latched frame"); end
    checks++; if (n_reload < 2)        begin failures++; $display("FAIL no reload"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("FAIL no back-pressure"); end
    $display("mechanisms: ops %0d %0d %0d %0d, coast %0d, stalled frames %0d, latched frames %0d, loaded frames %0d, memory waits %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_coast, n_stall, n_latched, n_reload,
             n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
