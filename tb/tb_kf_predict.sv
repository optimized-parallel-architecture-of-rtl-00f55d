// tb_kf_predict: checks the one-axis prediction step against the reference
// model, for both directions, with random states, and checks the one-clock
// latency and that a stall (en low) holds the outputs.
module tb_kf_predict;
  import kf_pkg::*;
  import tb_kf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0;
  dir_e dir = DIR_NEG;
  logic signed [29:0] dt, q00, q01, q11, p, s, c00, c01, c11;
  logic out_valid;
  logic signed [29:0] pp, sp, cp00, cp01, cp11;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  kf_predict dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd(real lo, real hi);
    return to_fx(lo + (hi - lo) * real'($urandom_range(1000000)) / 1.0e6);
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    axis_t a, e;
    {dt, q00, q01, q11, p, s, c00, c01, c11} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      dir = dir_e'($urandom_range(1));
      dt  = 30'(rnd(0.1, 2.0));
      q00 = 30'(rnd(0.0, 1.0));
      q01 = 30'(rnd(-0.5, 0.5));
      q11 = 30'(rnd(0.0, 1.0));
      p   = 30'(rnd(-200.0, 200.0));
      s   = 30'(rnd(-20.0, 20.0));
      c00 = 30'(rnd(0.0, 20.0));
      c01 = 30'(rnd(-5.0, 5.0));
      c11 = 30'(rnd(0.0, 10.0));
      en = 1'b1;
      in_valid = 1'b1;
      a = '{p: p, s: s, c00: c00, c01: c01, c11: c11};
      e = predict(dir == DIR_POS, dt, q00, q01, q11, a);
      @(negedge clk);
      // Stall for a random number of clocks with changed inputs.
      en = 1'b0;
      in_valid = 1'b0;
      p = ~p;
      c00 = ~c00;
      repeat ($urandom_range(2)) @(negedge clk);
      check("valid", longint'(out_valid), 1);
      check("p'",   pp,   e.p);
      check("s'",   sp,   e.s);
      check("P'00", cp00, e.c00);
      check("P'01", cp01, e.c01);
      check("P'11", cp11, e.c11);
    end
    // A directed case: dt = 1, moving away, p=10, s=2 -> p' = 12.
    @(negedge clk);
    dir = DIR_POS; dt = 30'(to_fx(1.0)); p = 30'(to_fx(10.0)); s = 30'(to_fx(2.0));
    c00 = 30'(to_fx(1.0)); c01 = '0; c11 = 30'(to_fx(1.0));
    q00 = '0; q01 = '0; q11 = '0; en = 1'b1; in_valid = 1'b1;
    @(negedge clk);
    check("directed p'", pp, to_fx(12.0));
    check("directed P'00", cp00, to_fx(2.0));
    check("directed P'01", cp01, to_fx(1.0));
    dir = DIR_NEG;
    @(negedge clk);
    check("directed p' neg", pp, to_fx(8.0));
    check("directed P'01 neg", cp01, to_fx(-1.0));
    in_valid = 1'b0;
    @(negedge clk);
    check("valid drops", longint'(out_valid), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
