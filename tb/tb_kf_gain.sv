// tb_kf_gain: streams random predicted covariances through the gain unit,
// one per clock with random stalls, and checks every gain against the
// reference model, the latency of 2*20+3 = 43 enabled clocks and that a
// result comes out on every enabled clock once the pipeline is full
// (initiation interval 1). Also checks the saturated result for S <= 0.
module tb_kf_gain;
  import tb_kf_ref_pkg::*;

  localparam int LAT = 2 * F + 3;
  localparam int N   = 300;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0;
  logic signed [29:0] r_meas, cp00, cp01, k0, k1;
  logic out_valid;
  int checks = 0, failures = 0;
  longint e0 [$], e1 [$];
  int sent = 0, got = 0, en_cycles = 0, first_out_en = -1, last_out_en = -1;

  always #5 clk = ~clk;

  kf_gain dut (.*);

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

  // Output monitor: sampled at the clock edge where the unit is enabled.
  always @(posedge clk) if (rst_n && en) begin
    en_cycles <= en_cycles + 1;
    if (out_valid) begin
      if (first_out_en < 0) first_out_en <= en_cycles;
      last_out_en <= en_cycles;
      if (e0.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        check("k0", k0, e0.pop_front());
        check("k1", k1, e1.pop_front());
      end
      got <= got + 1;
    end
  end

  initial begin
    axis_t a;
    longint x0, x1;
    r_meas = 30'(to_fx(2.0));
    cp00 = '0; cp01 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (sent < N + LAT + 5) begin
      @(negedge clk);
      en = ($urandom_range(9) != 0);
      if (en) begin
        in_valid = (sent < N);
        if (sent == 5) begin
          cp00 = 30'(to_fx(-3.0));  // S = -1: saturates
          cp01 = 30'(to_fx(1.0));
        end else begin
          cp00 = 30'(to_fx(real'($urandom_range(400000)) / 1000.0));
          cp01 = 30'(to_fx(real'($urandom_range(200000)) / 1000.0 - 100.0));
        end
        if (sent < N) begin
          a = '{p: 0, s: 0, c00: cp00, c01: cp01, c11: 0};
          gain(r_meas, a, x0, x1);
          e0.push_back(x0);
          e1.push_back(x1);
        end
        sent++;
      end
    end
    @(negedge clk);
    en = 1'b0;
    check("all results", got, N);
    // First input at enabled clock 0; its result is sampled LAT enabled
    // clocks later; then one result per enabled clock.
    check("latency", first_out_en, LAT);
    check("interval 1", last_out_en - first_out_en, N - 1);
    // Directed: P'00 = 2, R = 2 -> K0 = 0.5.
    begin
      a = '{p: 0, s: 0, c00: to_fx(2.0), c01: to_fx(1.0), c11: 0};
      gain(to_fx(2.0), a, x0, x1);
      check("ref K0 = 0.5", x0, to_fx(0.5));
      check("ref K1 = 0.25", x1, to_fx(0.25));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
