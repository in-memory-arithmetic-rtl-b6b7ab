// sc_divider: stochastic divider Q = X / Y built from three LIM gates.
//
// Stochastic computing encodes a value as the fraction of 1s in a
// bit-stream. The classic stochastic divider is a 2:1 MUX with a D flip-flop
// in its feedback path: Q takes X when Y = 1 and keeps its previous value
// when Y = 0. When the X stream's 1s are a subset of the Y stream's (X <= Y,
// streams made from the same random numbers), the fraction of 1s in Q tends
// to X/Y.
//
// This block follows the in-memory form of that MUX. The MUX is written as
// OR(AND1, AND2) with AND1 = Q & ~Y and AND2 = X & Y, each gate a LIM gate
// (lim_gate). AND1 and AND2 evaluate while CLK = 1; the OR gate gets the
// inverted clock and evaluates while CLK = 0. Each gate's result is
// therefore captured by the next one half a cycle later, and the feedback of
// Q into AND1 is delayed by the phase offset instead of by a flip-flop.
//
// Ports: clk, clr (clears all stored states, Q becomes 0), x, y (one bit per
// cycle, changed after the rising edge); and1, and2, q out.
// Timing: the bit presented during cycle k is captured by AND1/AND2 at the
// next rising edge; the quotient bit q_k appears at the following falling
// edge and stays until the next falling edge. A quotient bit is thus valid
// 1.5 cycles after its inputs started, and N bits complete in N + 1/2 cycles.
module sc_divider (
  input  logic clk,
  input  logic clr,
  input  logic x,
  input  logic y,
  output logic and1,
  output logic and2,
  output logic q
);

  logic clk_n;

  assign clk_n = ~clk;

  // AND1 = Q AND (NOT Y): keeps Q when Y = 0.
  lim_gate u_and1 (
    .clk(clk), .clr(clr), .x(q), .y(~y),
    .and_o(and1), .nand_o(), .or_o(), .nor_o()
  );

  // AND2 = X AND Y: passes X when Y = 1.
  lim_gate u_and2 (
    .clk(clk), .clr(clr), .x(x), .y(y),
    .and_o(and2), .nand_o(), .or_o(), .nor_o()
  );

  // OR on the opposite clock phase.
  lim_gate u_or (
    .clk(clk_n), .clr(clr), .x(and1), .y(and2),
    .and_o(), .nand_o(), .or_o(q), .nor_o()
  );

endmodule
