// tb_kf_workloads: the tracker in its medium-precision format (8 integer,
// 12 fraction bits) on scenes of 25, 50 and 100 targets, four frames each,
// with one noisy measurement per target. The bit-exact reference model is
// written for the default format, so this test judges the results against
// the true target motion instead: after four frames at least 90 % of the
// tracks must be within 1.0 of the true position, the speed estimates within
// 0.5 of the true speed, every track must have been updated with a
// measurement, and each frame's filter time must stay within
// n_trk * (n_meas + 4) plus the pipeline fill. The frame times are printed.
module tb_kf_workloads;
  import kf_pkg::*;

  localparam int IB = 8, FB = 12, W = IB + FB;
  localparam int MT = 100, MM = 100, AWX = 24;
  localparam int TCW = $clog2(MT + 1), MCW = $clog2(MM + 1);
  localparam int TB = 0, MB = 2000, RB = 4000, MEMD = 8192;
  localparam real ONE = real'(1 << FB);

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

  always #5 clk = ~clk;

  kf_radar_top #(.INT_BITS(IB), .FRAC_BITS(FB)) dut (.*);

  ddr2_model #(.W(W), .ADDR_W(AWX), .DEPTH(MEMD)) u_mem (
    .clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata
  );

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] fx(real r);
    return W'(longint'($floor(r * ONE + 0.5)));
  endfunction

  function automatic real rl(int a);
    return real'(signed'(u_mem.mem[a])) / ONE;
  endfunction

  function automatic real noise(real a);
    return a * (real'($urandom_range(2000)) / 1000.0 - 1.0);
  endfunction

  real tx [MT], ty [MT], tvx [MT], tvy [MT];

  task automatic run_frame(bit reload, int nt);
    int cyc0, cyc;
    for (int i = 0; i < nt; i++) begin
      tx[i] += tvx[i];
      ty[i] += tvy[i];
    end
    for (int j = 0; j < nt; j++) begin
      int i;
      i = (j * 37) % nt;
      u_mem.mem[MB + 2*j]     = fx(tx[i] + noise(0.2));
      u_mem.mem[MB + 2*j + 1] = fx(ty[i] + noise(0.2));
    end
    @(negedge clk);
    load_tracks = reload;
    n_trk = TCW'(nt);
    n_meas = MCW'(nt);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    check_true("all tracks updated", op_cnt[0] + op_cnt[1] + op_cnt[2] + op_cnt[3] == TCW'(nt));
    check_true("no coasting", coast_cnt == 0);
    // The filter step alone is bounded by the association time; the frame
    // adds the DMA transfers (at most 11 + 2 words per target, each granted
    // within a few clocks).
    check_true("frame time", frame_cycles >= 32'(nt * (nt + 4)) &&
               frame_cycles <= 32'(nt * (nt + 4) + 2 * FB + 60 + 13 * nt * 4));
    $display("%0d targets, medium precision: frame %0d clocks (filter step bound %0d)",
             nt, frame_cycles, nt * (nt + 4) + 2 * FB + 20);
  endtask

  task automatic check_true(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic scene(int nt);
    int close, sclose;
    for (int i = 0; i < nt; i++) begin
      int a;
      tx[i] = noise(90.0);
      ty[i] = noise(90.0);
      tvx[i] = ((i % 4) < 2 ? -1.0 : 1.0) * (0.4 + real'(i % 5) * 0.2);
      tvy[i] = ((i % 4) == 0 || (i % 4) == 2 ? 1.0 : -1.0) * (0.4 + real'(i % 3) * 0.3);
      a = TB + i * TRK_WORDS;
      u_mem.mem[a + F_PX] = fx(tx[i] + noise(0.3));
      u_mem.mem[a + F_SX] = fx(tvx[i] < 0 ? -tvx[i] : tvx[i]);
      u_mem.mem[a + F_PX00] = fx(1.0); u_mem.mem[a + F_PX01] = '0; u_mem.mem[a + F_PX11] = fx(1.0);
      u_mem.mem[a + F_PY] = fx(ty[i] + noise(0.3));
      u_mem.mem[a + F_SY] = fx(tvy[i] < 0 ? -tvy[i] : tvy[i]);
      u_mem.mem[a + F_PY00] = fx(1.0); u_mem.mem[a + F_PY01] = '0; u_mem.mem[a + F_PY11] = fx(1.0);
      u_mem.mem[a + F_INFO] = '0;
    end
    run_frame(1'b1, nt);
    for (int f = 0; f < 3; f++) run_frame(1'b0, nt);
    close = 0;
    sclose = 0;
    for (int i = 0; i < nt; i++) begin
      int a;
      real ex, ey, sx, sy;
      a = RB + i * TRK_WORDS;
      ex = rl(a + F_PX) - tx[i];
      ey = rl(a + F_PY) - ty[i];
      // The winning direction gives the sign of the speed estimate.
      sx = rl(a + F_SX) * ((u_mem.mem[a + F_INFO][1:0] >= 2) ? 1.0 : -1.0);
      sy = rl(a + F_SY) * ((u_mem.mem[a + F_INFO][1:0] == 0 ||
                            u_mem.mem[a + F_INFO][1:0] == 2) ? 1.0 : -1.0);
      if (ex * ex + ey * ey < 1.0) close++;
      if ((sx - tvx[i]) ** 2 < 0.25 && (sy - tvy[i]) ** 2 < 0.25) sclose++;
    end
    $display("%0d targets: %0d within 1.0 of the true position, %0d with speed within 0.5",
             nt, close, sclose);
    check_true("position accuracy", close >= nt * 9 / 10);
    check_true("speed accuracy", sclose >= nt * 9 / 10);
  endtask

  initial begin
    dt = fx(1.0);
    q00 = fx(0.01); q01 = '0; q11 = fx(0.01);
    r_meas = fx(0.04);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    scene(25);
    scene(50);
    scene(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
