// tb_table1_mae: accuracy sweep of the stochastic divider over stream
// lengths N = 16 .. 1024 (LOG_N = 4 .. 10) with 8-bit operands.
// Seven sc_div_unit instances run the same random X < Y pairs in parallel.
// Every result must equal the reference model exactly, and each must finish
// N + 2 cycles after start. The mean absolute error against exact X / Y is
// printed next to the published figures for the same N. The check on
// accuracy is that the error at N = 256 stays below 3.5 % and that no
// length of 64 or more is worse than 6 %.
module tb_table1_mae;
  import tb_ref_pkg::*;
  localparam int NW = 7;
  localparam int PAIRS = 400;
  localparam real PAPER_MAE [NW] = '{12.51, 8.46, 6.07, 4.24, 2.92, 2.15, 1.61};

  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  logic [7:0] x_val, y_val;
  logic [NW-1:0] done;
  logic [NW-1:0] busy;  // observed only through done
  logic [10:0] q [NW];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NW; g++) begin : g_u
    logic [g + 4:0] qc;
    sc_div_unit #(.LOG_N(g + 4), .DATA_W(8)) u (
      .clk, .rst_n, .start, .x_val, .y_val, .busy(busy[g]), .done(done[g]), .q_count(qc)
    );
    assign q[g] = 11'(qc);
  end

  always #5 clk = ~clk;

  initial begin
    #(10 * PAIRS * 1100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real err [NW];
    int unsigned seqs [NW][];
    int cyc [NW];
    for (int g = 0; g < NW; g++) begin
      err[g] = 0.0;
      rand_seq(g + 4, seqs[g]);
    end
    start = 0; x_val = 0; y_val = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < PAIRS; t++) begin
      int unsigned xv, yv;
      yv = 1 + $urandom % 255;
      xv = $urandom % yv;
      x_val <= 8'(xv); y_val <= 8'(yv); start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      for (int g = 0; g < NW; g++) cyc[g] = 0;
      for (int c = 1; c <= 1030 && cyc[NW-1] == 0; c++) begin
        @(negedge clk);
        for (int g = 0; g < NW; g++) if (done[g]) cyc[g] = c;
      end
      for (int g = 0; g < NW; g++) begin
        int unsigned n, exp;
        real got;
        n = 1 << (g + 4);
        exp = sc_div_ref(xv, yv, g + 4, 8, seqs[g]);
        checks += 2;
        if (int'(q[g]) != int'(exp)) begin
          failures++;
          $display("FAIL N=%0d %0d/%0d: got %0d expected %0d", n, xv, yv, q[g], exp);
        end
        if (cyc[g] != int'(n) + 2) begin
          failures++;
          $display("FAIL N=%0d latency %0d expected %0d", n, cyc[g], n + 2);
        end
        got = real'(q[g]) / n;
        err[g] += (got > real'(xv) / yv) ? got - real'(xv) / yv : real'(xv) / yv - got;
      end
      @(posedge clk);
    end
    for (int g = 0; g < NW; g++) begin
      real mae;
      mae = 100.0 * err[g] / PAIRS;
      $display("N=%5d  MAE %6.2f %%   (published %5.2f %%)", 1 << (g + 4), mae, PAPER_MAE[g]);
      checks++;
      if ((g == 4 && mae > 3.5) || (g >= 2 && mae > 6.0)) begin
        failures++;
        $display("FAIL MAE at N=%0d", 1 << (g + 4));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
