// tb_sc_divider: checks the three-gate LIM divider bit by bit.
// Streams are applied one bit per cycle after the rising edge. At every
// falling edge the new quotient bit must equal the MUX reference
// (Q = Y ? X : previous Q) of the bit applied 1.5 cycles earlier, and just
// before that edge Q must still hold the previous bit. The first test is the
// N = 16 example X = 8/16, Y = 13/16 whose quotient has 11 ones; it also
// checks that the last quotient bit appears (N + 1/2) cycles after the first
// input bit started. Random correlated and uncorrelated streams follow.
module tb_sc_divider;
  localparam int T = 10;
  logic clk = 1'b0;
  logic clr, x, y, and1, and2, q;
  int checks = 0, failures = 0;

  sc_divider dut (.*);

  always #(T/2) clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one pair of streams; returns the number of 1s seen on q.
  task automatic run(input bit xs[], input bit ys[], output int ones, output realtime t_first,
                     output realtime t_last);
    bit qref[];
    bit qprev;
    int n = xs.size();
    qref = new[n];
    qprev = 0;
    for (int k = 0; k < n; k++) begin
      qref[k] = ys[k] ? xs[k] : qprev;
      qprev = qref[k];
    end
    // clear for two cycles
    @(posedge clk); clr <= 1'b1; x <= 1'b0; y <= 1'b0;
    @(posedge clk); @(posedge clk); clr <= 1'b0;
    ones = 0;
    t_first = $realtime;
    fork
      begin
        for (int k = 0; k < n; k++) begin
          x <= xs[k]; y <= ys[k];
          @(posedge clk);
        end
        x <= 1'b0; y <= 1'b0;
      end
      begin
        @(negedge clk);             // bit 0 not yet evaluated here
        for (int k = 0; k < n; k++) begin
          @(posedge clk);
          #(T/2 - 1);
          check("q before falling edge", q, k == 0 ? 0 : qref[k-1]);
          @(negedge clk); #1;
          check($sformatf("q[%0d]", k), q, qref[k]);
          check($sformatf("and2[%0d]", k), and2, xs[k] & ys[k]);
          check($sformatf("and1[%0d]", k), and1, (k == 0 ? 0 : qref[k-1]) & ~ys[k]);
          ones += q;
          t_last = $realtime - 1;
        end
      end
    join
  endtask

  initial begin
    bit xs[], ys[];
    int ones, nerr;
    realtime t0, t1;
    string xstr, ystr;
    xstr = "1010101010101010";
    ystr = "1111111011101110";
    clr = 1'b1; x = 1'b0; y = 1'b0;

    // Example: X = 8/16, Y = 13/16 -> Q = 11/16
    xs = new[16]; ys = new[16];
    for (int k = 0; k < 16; k++) begin
      xs[k] = xstr[k] == "1";
      ys[k] = ystr[k] == "1";
    end
    run(xs, ys, ones, t0, t1);
    check("example ones", ones, 11);
    check("latency (N+1/2) cycles x2", int'((t1 - t0) * 2 / T), 2 * 16 + 1);

    // Random streams
    for (int t = 0; t < 40; t++) begin
      int n, px, py;
      n = 8 + $urandom % 64;
      px = $urandom % 256;
      py = $urandom % 256;
      xs = new[n]; ys = new[n];
      for (int k = 0; k < n; k++) begin
        int unsigned r;
        r = $urandom % 256;
        ys[k] = r < py;
        xs[k] = (t % 2) ? ($urandom % 256) < px : r < px;
      end
      run(xs, ys, ones, t0, t1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
