// sc_counter: stochastic-to-binary converter.
//
// A bit-stream of N bits with M ones stands for M/N; this block recovers M
// by counting the 1s while en is high. clear zeroes the count (clear wins
// over en). The count is LOG_N+1 bits wide so that M = N fits.
// Timing: bit_in is sampled on the rising edge; count is registered.
module sc_counter #(
  parameter int unsigned LOG_N = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           en,
  input  logic           bit_in,
  output logic [LOG_N:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= '0;
    else if (en)    count <= count + (LOG_N+1)'(bit_in);
  end

endmodule
