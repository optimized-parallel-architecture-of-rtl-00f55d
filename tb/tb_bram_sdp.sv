// tb_bram_sdp: writes random words, reads them back in random order with a
// one-clock latency, checks that the output holds while rd_en is low and
// that a read of the address being written returns the old word.
module tb_bram_sdp;
  localparam int WIDTH = 40, DEPTH = 100, AW = $clog2(DEPTH);

  logic clk = 1'b0, we = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bram_sdp #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [WIDTH-1:0] g, logic [WIDTH-1:0] e);
    checks++;
    if (g !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, g, e);
    end
  endtask

  initial begin
    logic [WIDTH-1:0] held;
    int a;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1;
      wr_addr = AW'(i);
      wr_data = {$urandom, $urandom};
      model[i] = wr_data;
    end
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 500; n++) begin
      a = $urandom_range(DEPTH - 1);
      rd_en = 1'b1;
      rd_addr = AW'(a);
      @(negedge clk);
      check("read", rd_data, model[a]);
      held = rd_data;
      rd_en = 1'b0;
      rd_addr = AW'($urandom_range(DEPTH - 1));
      @(negedge clk);
      check("hold", rd_data, held);
    end
    // Read during write of the same address: old data.
    a = 17;
    we = 1'b1; wr_addr = AW'(a); wr_data = ~model[a];
    rd_en = 1'b1; rd_addr = AW'(a);
    @(negedge clk);
    check("read during write", rd_data, model[a]);
    model[a] = ~model[a];
    we = 1'b0;
    @(negedge clk);
    check("new word", rd_data, model[a]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
