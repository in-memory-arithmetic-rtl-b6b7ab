// tb_lim_gate: checks the logic-level LIM gate model.
// Inputs change while CLK = 0 (preparation); after each rising edge the four
// sense-amplifier outputs must match AND/NAND/OR/NOR of the inputs present
// at the edge, and must not move when the inputs change during the next
// preparation phase. clr must force the stored state to 0. The outputs
// must settle 2.3 ps after the edge (old value at 1 ps, new at 3 ps), and a
// write started less than 1.8 ns before the edge must leave the state as
// it was.
module tb_lim_gate;
  logic clk = 1'b0;
  logic clr, x, y;
  logic and_o, nand_o, or_o, nor_o;
  int checks = 0, failures = 0;

  lim_gate dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ex, ey, ec;
    clr = 1'b0; x = 1'b0; y = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      ex = 1'($urandom); ey = 1'($urandom); ec = ($urandom % 8) == 0;
      x = ex; y = ey; clr = ec;
      if (ec) begin ex = 0; ey = 0; end
      @(posedge clk); #1;
      check("AND",  and_o,  ex & ey);
      check("NAND", nand_o, ~(ex & ey));
      check("OR",   or_o,   ex | ey);
      check("NOR",  nor_o,  ~(ex | ey));
      // change inputs during evaluation: outputs hold
      x = ~x; y = ~y; clr = 1'b0;
      #3;
      check("AND hold", and_o, ex & ey);
      check("OR hold",  or_o,  ex | ey);
    end
    // evaluation delay
    @(negedge clk); x = 1'b1; y = 1'b1; clr = 1'b0;
    @(posedge clk); #3ps;
    check("AND after 3 ps", and_o, 1'b1);
    @(negedge clk); x = 1'b0; y = 1'b0;
    @(posedge clk); #1ps;
    check("AND at 1 ps", and_o, 1'b1);
    check("OR at 1 ps", or_o, 1'b1);
    #2ps;
    check("AND at 3 ps", and_o, 1'b0);
    check("OR at 3 ps", or_o, 1'b0);
    // preparation delay: inputs changed 1 ns before the edge do not write
    @(negedge clk); x = 1'b1; y = 1'b1;
    @(posedge clk); #1;
    check("AND written", and_o, 1'b1);
    @(negedge clk); #4;
    x = 1'b0; y = 1'b0;
    @(posedge clk); #1;
    check("AND after short write", and_o, 1'b1);
    check("OR after short write", or_o, 1'b1);
    @(negedge clk);
    @(posedge clk); #1;
    check("AND after full write", and_o, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
