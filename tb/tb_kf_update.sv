// tb_kf_update: random updates (with and without a measurement) checked
// against the reference model, back to back, with the two-clock latency
// checked; plus a directed case with known numbers.
module tb_kf_update;
  import tb_kf_ref_pkg::*;

  localparam int N = 400;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, in_valid = 1'b0, has_meas = 1'b0;
  logic signed [29:0] r_meas, z, pp, sp, cp00, cp01, cp11, k0, k1;
  logic out_valid;
  logic signed [29:0] p, s, c00, c01, c11;
  int checks = 0, failures = 0;
  axis_t  exp_q [$];
  int     cyc = 0, sent_at [$];

  always #5 clk = ~clk;

  kf_update dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
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

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      axis_t e;
      e = exp_q.pop_front();
      check("latency", cyc - sent_at.pop_front(), 2);
      check("p",   p,   e.p);
      check("s",   s,   e.s);
      check("P00", c00, e.c00);
      check("P01", c01, e.c01);
      check("P11", c11, e.c11);
    end
  end

  function automatic longint rnd(real lo, real hi);
    return to_fx(lo + (hi - lo) * real'($urandom_range(1000000)) / 1.0e6);
  endfunction

  initial begin
    axis_t a;
    {r_meas, z, pp, sp, cp00, cp01, cp11, k0, k1} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      has_meas = ($urandom_range(4) != 0);
      r_meas = 30'(rnd(0.1, 5.0));
      z    = 30'(rnd(-100.0, 100.0));
      pp   = 30'(rnd(-100.0, 100.0));
      sp   = 30'(rnd(-10.0, 10.0));
      cp00 = 30'(rnd(0.0, 20.0));
      cp01 = 30'(rnd(-5.0, 5.0));
      cp11 = 30'(rnd(0.0, 10.0));
      k0   = 30'(rnd(0.0, 1.0));
      k1   = 30'(rnd(-0.5, 0.5));
      a = '{p: pp, s: sp, c00: cp00, c01: cp01, c11: cp11};
      exp_q.push_back(update(has_meas, r_meas, z, a, k0, k1));
      sent_at.push_back(cyc);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    // Directed: K = (0.5, 0.25), z - p' = 4, R = 2, P' = [2 1; 1 4]:
    //   p = p' + 2, s = s' + 1, P00 = 0.25*2 + 0.25*2 = 1,
    //   P01 = 0.5*(1 - 0.5) + 0.125*2 = 0.5,
    //   P11 = 0.0625*2 - 0.5 + 4 + 0.0625*2 = 3.75
    in_valid = 1'b1; has_meas = 1'b1;
    r_meas = 30'(to_fx(2.0)); z = 30'(to_fx(14.0)); pp = 30'(to_fx(10.0));
    sp = 30'(to_fx(3.0)); cp00 = 30'(to_fx(2.0)); cp01 = 30'(to_fx(1.0));
    cp11 = 30'(to_fx(4.0)); k0 = 30'(to_fx(0.5)); k1 = 30'(to_fx(0.25));
    exp_q.push_back('{p: to_fx(12.0), s: to_fx(4.0), c00: to_fx(1.0),
                      c01: to_fx(0.5), c11: to_fx(3.75)});
    sent_at.push_back(cyc);
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    check("all outputs seen", exp_q.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
