// tb_sc_counter: random bit-streams with random enable gaps; the count must
// equal the number of enabled 1s, and clear must zero it.
module tb_sc_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, en, bit_in;
  logic [8:0] count;
  int checks = 0, failures = 0;

  sc_counter #(.LOG_N(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    clear = 0; en = 0; bit_in = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 50; t++) begin
      clear <= 1'b1; @(posedge clk); clear <= 1'b0;
      exp = 0;
      for (int k = 0; k < 300; k++) begin
        en <= ($urandom % 4) != 0;
        bit_in <= 1'($urandom);
        @(posedge clk); #1;
        if (en && bit_in) exp++;
        checks++;
        if (count != 9'(exp)) begin
          failures++;
          $display("FAIL count %0d expected %0d", count, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
