// tb_gauss3x3: random and extreme windows against the reference Gaussian.
module tb_gauss3x3;
  import tb_ref_pkg::*;
  logic [8:0][7:0] win;
  logic [7:0] l_out;
  int checks = 0, failures = 0;

  gauss3x3 #(.DATA_W(8)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned p[9];
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < 9; i++) begin
        case (t)
          0: p[i] = 0;
          1: p[i] = 255;
          2: p[i] = (i == 4) ? 255 : 0;
          default: p[i] = $urandom % 256;
        endcase
        win[i] = 8'(p[i]);
      end
      #1;
      checks++;
      if (int'(l_out) != int'(gauss_ref(p))) begin
        failures++;
        $display("FAIL window %0d: got %0d expected %0d", t, l_out, gauss_ref(p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
