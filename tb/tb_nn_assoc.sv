// tb_nn_assoc: random frames of measurements (including ties, an empty
// frame and a full one) against random four-way predictions; checks the
// chosen block operation, measurement index and values against an
// exhaustive search, the returned payload, and the latency (n_meas + 4
// clocks, 3 for an empty frame).
module tb_nn_assoc;
  import kf_pkg::*;
  import tb_kf_ref_pkg::*;

  localparam int MAXM = 100;
  localparam int AW   = $clog2(MAXM + 1);

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [AW-1:0] n_meas;
  logic in_ready;
  logic signed [29:0] xp_neg, xp_pos, yp_neg, yp_pos, zx, zy;
  logic [7:0] payload, out_payload;
  logic meas_rd_en;
  logic [AW-1:0] meas_rd_addr, meas_idx;
  logic [59:0] meas_rd_data;
  logic out_valid, has_meas;
  blockop_e op;
  int checks = 0, failures = 0;

  longint mx [MAXM], my [MAXM];

  always #5 clk = ~clk;

  nn_assoc #(.MAX_MEAS(MAXM)) dut (.*);

  // Measurement memory, one clock read latency.
  always @(posedge clk)
    if (meas_rd_en) meas_rd_data <= {30'(my[meas_rd_addr]), 30'(mx[meas_rd_addr])};

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic longint rpos();
    return to_fx(real'($urandom_range(40000)) / 100.0 - 200.0);
  endfunction

  initial begin
    int nm, lat, bop, bj;
    longint best, dd, px [2], py [2];
    meas_rd_data = '0;
    n_meas = '0;
    {xp_neg, xp_pos, yp_neg, yp_pos} = '0;
    payload = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      nm = (t == 0) ? 0 : (t == 1) ? MAXM : $urandom_range(1, 20);
      for (int j = 0; j < MAXM; j++) begin
        mx[j] = rpos();
        my[j] = rpos();
      end
      px[0] = rpos(); px[1] = rpos(); py[0] = rpos(); py[1] = rpos();
      if (t == 2) begin
        // Exact ties: measurements 3 and 5 equal, at the OP1 prediction.
        nm = 8;
        mx[3] = px[0]; my[3] = py[1];
        mx[5] = px[0]; my[5] = py[1];
      end
      // Exhaustive search.
      best = 0; bop = 0; bj = 0;
      for (int j = 0; j < nm; j++)
        for (int o = 0; o < 4; o++) begin
          dd = d2(mx[j], my[j], px[op_xpos(o)], py[op_ypos(o)]);
          if ((j == 0 && o == 0) || dd < best) begin
            best = dd; bop = o; bj = j;
          end
        end
      @(negedge clk);
      check("ready when idle", longint'(in_ready), 1);
      n_meas  = AW'(nm);
      xp_neg  = 30'(px[0]); xp_pos = 30'(px[1]);
      yp_neg  = 30'(py[0]); yp_pos = 30'(py[1]);
      payload = 8'(t * 7 + 1);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      xp_neg = ~xp_neg;   // inputs must have been latched
      lat = 1;
      while (!out_valid) begin
        @(negedge clk);
        lat++;
      end
      check("latency", lat, (nm == 0) ? 3 : nm + 4);
      check("has_meas", longint'(has_meas), longint'(nm > 0));
      check("payload", longint'(out_payload), longint'(unsigned'(8'(t * 7 + 1))));
      if (nm > 0) begin
        check("op", longint'(op), bop);
        check("index", longint'(meas_idx), bj);
        check("zx", zx, mx[bj]);
        check("zy", zy, my[bj]);
      end
      if (t == 2) check("tie goes to first", longint'(meas_idx), 3);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
