// sc_sng: correlated stochastic number generator pair.
//
// Converts two binary values X and Y into two bit-streams of length
// N = 2^LOG_N whose fraction of 1s encodes X/2^DATA_W and Y/2^DATA_W.
// A single random source feeds two comparators (bit = r < value), so the
// streams are maximally correlated: whenever X <= Y, every 1 of the X stream
// falls on a 1 of the Y stream, which is what the MUX-type stochastic
// divider needs in order to produce X/Y.
//
// The random source is a LOG_N-bit counter read with its bits reversed
// (van der Corput sequence): one period is exactly N cycles and visits every
// number 0..N-1 once, so a stream carries exactly the scaled value's number
// of 1s, and the 1s of each stream are spread evenly over the period. A
// maximal-length LFSR was the other candidate; its strongly correlated
// successive states made the divider's error about three times larger at
// N = 256. Values are re-scaled from DATA_W to LOG_N bits by shifting. The
// generator itself is this design's own choice; the divider only requires
// correlated streams.
//
// Ports: load restarts the sequence at 0; en advances one step.
// Timing: x_bit/y_bit are combinational from the counter register and change
// right after the rising edge on which en (or load) was high.
module sc_sng #(
  parameter int unsigned LOG_N  = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              en,
  input  logic [DATA_W-1:0] x_val,
  input  logic [DATA_W-1:0] y_val,
  output logic              x_bit,
  output logic              y_bit
);
  import sc_pkg::*;

  logic [LOG_N-1:0] cnt;
  logic [LOG_N-1:0] rnd;
  logic [LOG_N-1:0] x_s, y_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cnt <= '0;
    else if (load) cnt <= '0;
    else if (en)   cnt <= cnt + 1'b1;
  end

  assign rnd = LOG_N'(bit_reverse(16'(cnt), LOG_N));

  generate
    if (LOG_N >= DATA_W) begin : g_up
      assign x_s = LOG_N'(x_val) << (LOG_N - DATA_W);
      assign y_s = LOG_N'(y_val) << (LOG_N - DATA_W);
    end else begin : g_down
      assign x_s = LOG_N'(x_val >> (DATA_W - LOG_N));
      assign y_s = LOG_N'(y_val >> (DATA_W - LOG_N));
    end
  endgenerate

  assign x_bit = (rnd < x_s);
  assign y_bit = (rnd < y_s);

endmodule
