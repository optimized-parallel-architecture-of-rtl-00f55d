// tb_kf_latch: loads initial records through the initial-value port,
// replaces some through the update port, checks the contents through the
// read port, and checks that the initial-value port wins when both write.
module tb_kf_latch;
  import kf_pkg::*;

  localparam int MT = 100, TAW = $clog2(MT), RW = TRK_WORDS * 30;

  logic clk = 1'b0, init_we = 1'b0, upd_we = 1'b0, rd_en = 1'b0;
  logic [TAW-1:0] init_addr = '0, upd_addr = '0, rd_addr = '0;
  logic [RW-1:0] init_data = '0, upd_data = '0, rd_data;
  logic [RW-1:0] model [MT];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  kf_latch dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [RW-1:0] rrec();
    logic [RW-1:0] r;
    for (int i = 0; i < RW; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  task automatic check_all();
    for (int i = 0; i < MT; i++) begin
      @(negedge clk);
      rd_en = 1'b1;
      rd_addr = TAW'(i);
      @(negedge clk);
      rd_en = 1'b0;
      checks++;
      if (rd_data !== model[i]) begin
        failures++;
        $display("FAIL record %0d", i);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < MT; i++) begin
      @(negedge clk);
      init_we = 1'b1; init_addr = TAW'(i); init_data = rrec(); model[i] = init_data;
    end
    @(negedge clk);
    init_we = 1'b0;
    check_all();
    for (int n = 0; n < 40; n++) begin
      int a;
      a = $urandom_range(MT - 1);
      @(negedge clk);
      upd_we = 1'b1; upd_addr = TAW'(a); upd_data = rrec(); model[a] = upd_data;
    end
    @(negedge clk);
    upd_we = 1'b0;
    check_all();
    // Both ports in one clock: initial value wins.
    @(negedge clk);
    init_we = 1'b1; init_addr = TAW'(5); init_data = rrec(); model[5] = init_data;
    upd_we = 1'b1; upd_addr = TAW'(9); upd_data = rrec();
    @(negedge clk);
    init_we = 1'b0; upd_we = 1'b0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
