// tb_sc_div_unit: binary-in/binary-out stochastic division at N = 256.
// Every result is compared with the reference model (same random sequence,
// MUX rule), covering X < Y, X = Y, X > Y (saturation) and Y = 0. The time
// from the cycle in which start is accepted to the done pulse must be
// N + 2 cycles (N stream bits, the half-cycle LIM pipeline and the counter).
// The mean absolute error against exact X/Y for X < Y is printed; it must be
// below 3.5 % (about 2.9 % is the level reported for N = 256).
module tb_sc_div_unit;
  import tb_ref_pkg::*;
  localparam int LOG_N = 8, N = 1 << LOG_N;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done;
  logic [7:0] x_val, y_val;
  logic [LOG_N:0] q_count;
  int checks = 0, failures = 0;

  sc_div_unit #(.LOG_N(LOG_N), .DATA_W(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned seq[];
    int cyc, nsat, nzero, nmae;
    real mae;
    nsat = 0; nzero = 0; nmae = 0; mae = 0.0;
    rand_seq(LOG_N, seq);
    start = 0; x_val = 0; y_val = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 600; t++) begin
      int unsigned xv, yv, exp;
      xv = $urandom % 256; yv = $urandom % 256;
      if (t % 10 == 0) yv = 0;
      if (t % 10 == 1) yv = xv;
      if (t % 10 == 2 && xv < 255) yv = xv + 1 + $urandom % (255 - xv);
      x_val <= 8'(xv); y_val <= 8'(yv); start <= 1'b1;
      @(posedge clk);                // start accepted at this edge
      start <= 1'b0; x_val <= 8'($urandom); y_val <= 8'($urandom);
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!done && cyc < 2 * N);
      check("start-to-done cycles", cyc, N + 2);
      exp = sc_div_ref(xv, yv, LOG_N, 8, seq);
      check($sformatf("q(%0d/%0d)", xv, yv), int'(q_count), int'(exp));
      if (yv == 0) begin nzero++; check("Y=0 gives 0", int'(q_count), 0); end
      if (xv > yv && yv >= 8) begin
        nsat++;
        checks++;
        if (q_count < N - N / 8) begin failures++; $display("FAIL saturation %0d", q_count); end
      end
      if (xv < yv) begin
        mae += ((real'(q_count) / N) > (real'(xv) / yv)) ? (real'(q_count) / N) - (real'(xv) / yv)
                                                          : (real'(xv) / yv) - (real'(q_count) / N);
        nmae++;
      end
    end
    mae = mae / nmae * 100.0;
    $display("MAE over %0d divisions with X < Y: %0.2f %%  (saturating %0d, zero divisor %0d)",
             nmae, mae, nsat, nzero);
    checks++;
    if (mae > 3.5) begin failures++; $display("FAIL MAE %0.2f", mae); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
