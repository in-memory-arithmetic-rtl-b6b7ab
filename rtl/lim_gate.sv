// lim_gate: behavioural model of the magnetic logic-in-memory (LIM) gate.
//
// The real part is an analog MTJ/FinFET circuit: two spin-Hall MTJs (MTJ1,
// MTJ2) are written with the inputs X and Y while CLK = 0 (preparation);
// while CLK = 1 (evaluation) a read current flows through MTJ1, MTJ2 and a
// fixed reference MTJ3, and the voltage at the shared node D is compared by
// two sense amplifiers against references, giving AND/NAND (SA_NAND) and
// OR/NOR (SA_NOR) at once. This file is a behavioural model of that
// circuit at logic level: no resistances, but the two delays of the circuit
// are kept.
//
// Model:
//   * The MTJ states take the input values present at the rising edge of
//     clk, i.e. the last value written before evaluation starts. Writing
//     takes PREP_DELAY (1.8 ns, the published preparation delay): if the
//     inputs last changed, or preparation began, less than PREP_DELAY
//     before the edge, the write is incomplete and the MTJs keep their old
//     state. The switching time is modelled as a delay from the write
//     drive to the free layer; synthesis ignores it.
//   * The sense-amplifier outputs settle EVAL_DELAY (2.3 ps, the published
//     evaluation delay) after the rising edge.
//   * Node D is represented by how many of the two input MTJs hold a 1
//     (0, 1 or 2). SA_NOR switches above level 0, SA_NAND above level 1.
//   * The sense-amplifier outputs are held from one evaluation phase to the
//     next, so a consumer that samples them during its own preparation phase
//     sees the last evaluated result.
//   * clr (this model's addition) writes 0 into both input MTJs instead of
//     X and Y, to initialise a circuit built from these gates.
// A gate that must evaluate while CLK = 0 is given the inverted clock, as
// the OR gate of the divider is.
//
// Ports: clk, clr, x, y in; and_o, nand_o, or_o, nor_o out.
// Timing: outputs change EVAL_DELAY after the rising edge of clk and reflect
// the inputs present just before that edge; inputs must be stable for
// PREP_DELAY of the CLK = 0 phase before it. The published delays are for
// the N = 16 design at nominal process; both are parameters.
module lim_gate #(
  parameter realtime PREP_DELAY = 1.8ns,
  parameter realtime EVAL_DELAY = 2.3ps
) (
  input  logic clk,
  input  logic clr,
  input  logic x,
  input  logic y,
  output logic and_o,
  output logic nand_o,
  output logic or_o,
  output logic nor_o
);

  timeunit 1ns;
  timeprecision 100fs;

  logic       mtj1;     // free-layer state of MTJ1 (stores X)
  logic       mtj2;     // free-layer state of MTJ2 (stores Y)
  logic       drive1;   // value the write current drives into MTJ1
  logic       drive2;   // value the write current drives into MTJ2
  logic       free1;    // free layer of MTJ1 after the switching time
  logic       free2;    // free layer of MTJ2 after the switching time
  logic [1:0] node_d;   // abstract voltage level at node D

  // Write transistors conduct only while CLK = 0; during evaluation the
  // free layers simply keep the stored state.
  assign drive1 = clk ? mtj1 : (x & ~clr);
  assign drive2 = clk ? mtj2 : (y & ~clr);

  // A free layer follows its write current after the switching time.
  assign #(PREP_DELAY) free1 = drive1;
  assign #(PREP_DELAY) free2 = drive2;

  // Preparation phase ends at the rising edge: the written state is frozen.
  // A write that began less than PREP_DELAY before the edge has not yet
  // switched the free layer, so the old state is kept.
  always_ff @(posedge clk) begin
    mtj1 <= free1;
    mtj2 <= free2;
  end

  assign node_d = 2'(mtj1) + 2'(mtj2);

  // Dual sense amplifiers, evaluated against two reference levels.
  assign #(EVAL_DELAY) and_o  = (node_d > 2'd1);
  assign #(EVAL_DELAY) or_o   = (node_d > 2'd0);
  assign nand_o = ~and_o;
  assign nor_o  = ~or_o;

endmodule
