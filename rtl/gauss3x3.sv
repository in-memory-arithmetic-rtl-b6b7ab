// gauss3x3: binary Gaussian filter for the illumination estimate of Retinex.
//
// Computes L = sum(w_i * p_i) / 16 over a 3x3 window with the binomial
// kernel [1 2 1; 2 4 2; 1 2 1], rounded to nearest. The Retinex flow asks
// for a Gaussian low-pass computed in ordinary binary arithmetic; the kernel
// size and weights are this design's own choice (the smallest common
// Gaussian approximation, needing only shifts and adds).
// Interface: win[0..8] is the window in row-major order, centre at win[4].
// Timing: purely combinational.
module gauss3x3 #(
  parameter int unsigned DATA_W = 8
) (
  input  logic [8:0][DATA_W-1:0] win,
  output logic [DATA_W-1:0]      l_out
);

  localparam int unsigned SUM_W = DATA_W + 4;

  logic [SUM_W-1:0] corners, edges, centre, total;

  assign corners = SUM_W'(win[0]) + SUM_W'(win[2]) + SUM_W'(win[6]) + SUM_W'(win[8]);
  assign edges   = SUM_W'(win[1]) + SUM_W'(win[3]) + SUM_W'(win[5]) + SUM_W'(win[7]);
  assign centre  = SUM_W'(win[4]);
  assign total   = corners + (edges << 1) + (centre << 2) + SUM_W'(8);
  assign l_out   = DATA_W'(total >> 4);

endmodule
