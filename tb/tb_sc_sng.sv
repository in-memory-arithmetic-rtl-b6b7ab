// tb_sc_sng: checks the correlated bit-stream generator.
// For LOG_N = DATA_W = 8 (N = 256) one period must carry exactly x_val and
// y_val ones, must visit every random number once (checked through the
// stream counts for all thresholds), and whenever x_val <= y_val every X 1
// must coincide with a Y 1. A second instance with LOG_N = 4 checks the
// down-scaling of 8-bit values to 16-bit streams (value >> 4 ones).
module tb_sc_sng;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load, en;
  logic [7:0] x_val, y_val;
  logic x_bit, y_bit, x4, y4;
  int checks = 0, failures = 0;

  sc_sng #(.LOG_N(8), .DATA_W(8)) dut (.*);
  sc_sng #(.LOG_N(4), .DATA_W(8)) dut4 (.clk, .rst_n, .load, .en, .x_val, .y_val,
                                        .x_bit(x4), .y_bit(y4));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nx, ny, nx4, ny4, viol;
    load = 0; en = 0; x_val = 0; y_val = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 300; t++) begin
      if (t < 256) begin
        x_val <= 8'(t); y_val <= 8'(255 - t);
      end else begin
        x_val <= 8'($urandom); y_val <= 8'($urandom);
      end
      load <= 1'b1;
      @(posedge clk);
      load <= 1'b0; en <= 1'b1;
      nx = 0; ny = 0; nx4 = 0; ny4 = 0; viol = 0;
      for (int k = 0; k < 256; k++) begin
        #1;
        nx += x_bit; ny += y_bit;
        if (k < 16) begin nx4 += x4; ny4 += y4; end
        if (x_val <= y_val && x_bit && !y_bit) viol++;
        if (x_val >= y_val && y_bit && !x_bit) viol++;
        @(posedge clk);
      end
      en <= 1'b0;
      check("x ones", nx, int'(x_val));
      check("y ones", ny, int'(y_val));
      check("x ones N=16", nx4, int'(x_val >> 4));
      check("y ones N=16", ny4, int'(y_val >> 4));
      check("correlation", viol, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
