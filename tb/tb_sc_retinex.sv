// tb_sc_retinex: end-to-end Retinex run on a small RGB frame.
// Loads a synthetic low-light image (dark texture, a black patch that makes
// L = 0, isolated bright pixels that make I > L), runs one frame, reads the
// whole output buffer back and compares every pixel and channel with the
// reference (replicated-border 3x3 Gaussian, stochastic MUX division over
// the same random sequence, saturating count-to-pixel mapping). It counts
// how often each mechanism occurred and fails if any never did: border
// windows, interior windows, division with X < Y, saturation (I > L),
// zero divisor (L = 0), quotient bits held by Y = 0 and bits copied from X.
// The frame must take W*H*(N + 13) + 1 cycles from start to done.
module tb_sc_retinex;
  import tb_ref_pkg::*;
  localparam int W = 7, H = 5, C = 3, LOG_N = 8, N = 1 << LOG_N;
  localparam int NPIX = W * H;
  localparam int AW = $clog2(NPIX);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_we, start, busy, done;
  logic [AW-1:0] in_addr, out_addr;
  logic [C-1:0][7:0] in_pix, out_pix;
  int checks = 0, failures = 0;

  sc_retinex #(.IMG_W(W), .IMG_H(H), .CHANNELS(C), .LOG_N(LOG_N), .DATA_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(10 * (NPIX * (N + 20) + 10000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned pix_val(int x, int y, int c);
    if (c == 0 && x >= 2 && x <= 4 && y >= 1 && y <= 3) return 0;   // black patch
    if ((x + 2 * y + c) % 11 == 5) return 120 + 40 * c;              // bright spot
    return (x * 7 + y * 13 + c * 5 + (x * y) % 9) % 48;              // dark texture
  endfunction

  initial begin
    int unsigned img[NPIX][C];
    int unsigned seq[];
    int n_border, n_inner, n_div, n_sat, n_zero, n_hold, n_copy;
    int cyc;
    n_border = 0; n_inner = 0; n_div = 0; n_sat = 0; n_zero = 0; n_hold = 0; n_copy = 0;
    rand_seq(LOG_N, seq);
    in_we = 0; start = 0; in_addr = '0; out_addr = '0; in_pix = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int a = 0; a < NPIX; a++) begin
      for (int c = 0; c < C; c++) begin
        img[a][c] = pix_val(a % W, a / W, c);
        in_pix[c] <= 8'(img[a][c]);
      end
      in_we <= 1'b1; in_addr <= AW'(a);
      @(posedge clk);
    end
    in_we <= 1'b0;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!done && cyc < NPIX * (N + 20));
    checks++;
    if (cyc != NPIX * (N + 13) + 1) begin
      failures++;
      $display("FAIL frame cycles %0d expected %0d", cyc, NPIX * (N + 13) + 1);
    end
    // reference and read-back
    for (int a = 0; a < NPIX; a++) begin
      int x, y;
      x = a % W;
      y = a / W;
      out_addr <= AW'(a);
      @(posedge clk); @(negedge clk);
      if (x == 0 || y == 0 || x == W - 1 || y == H - 1) n_border++; else n_inner++;
      for (int c = 0; c < C; c++) begin
        int unsigned p[9];
        int unsigned l, i, cnt, exp;
        bit q;
        for (int k = 0; k < 9; k++) begin
          int nx, ny;
          nx = x + k % 3 - 1;
          ny = y + k / 3 - 1;
          nx = nx < 0 ? 0 : (nx > W - 1 ? W - 1 : nx);
          ny = ny < 0 ? 0 : (ny > H - 1 ? H - 1 : ny);
          p[k] = img[ny * W + nx][c];
        end
        l = gauss_ref(p);
        i = img[a][c];
        cnt = sc_div_ref(i, l, LOG_N, 8, seq);
        exp = count_to_pix(cnt, LOG_N, 8);
        if (l == 0) n_zero++;
        else if (i > l) n_sat++;
        else n_div++;
        q = 0;
        foreach (seq[k]) begin
          if (seq[k] < l) begin q = seq[k] < i; n_copy++; end
          else if (q) n_hold++;
        end
        checks++;
        if (int'(out_pix[c]) != int'(exp)) begin
          failures++;
          $display("FAIL pixel (%0d,%0d) ch %0d: I=%0d L=%0d got %0d expected %0d",
                   x, y, c, i, l, out_pix[c], exp);
        end
      end
    end
    $display("mechanisms: border=%0d inner=%0d div=%0d saturate=%0d zeroL=%0d hold=%0d copy=%0d",
             n_border, n_inner, n_div, n_sat, n_zero, n_hold, n_copy);
    checks++;
    if (n_border == 0 || n_inner == 0 || n_div == 0 || n_sat == 0 || n_zero == 0 ||
        n_hold == 0 || n_copy == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
