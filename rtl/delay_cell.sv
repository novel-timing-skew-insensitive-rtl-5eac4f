// Behavioural model of an analog delay element (not synthesizable logic).
//
// The clock generator derives its internal clocks from the master clock
// through fixed delays: d0 (pre-clk), d1 (counter clock), d2 (post-DFF-clk,
// inverting) and d3 (post-DFF-clk for the post-phase edge blocks). In silicon
// these are inverter chains sized for a delay; here the output simply follows
// the input, optionally inverted, DELAY_PS picoseconds later. The same cell
// models the clock-to-output delay of the counter outputs and the inverter on
// each master output.
//
// Interface: in -> out. Parameters DELAY_PS (delay in ps) and INVERT
// (1: the output is the inverted input, the bubble on d2). Pulses shorter
// than DELAY_PS are swallowed, as in a real gate chain. The delay values are
// choices of this design; only their ordering is constrained (see clkgen_top).
module delay_cell #(
  parameter int unsigned DELAY_PS = 100,
  parameter bit          INVERT   = 1'b0
) (
  input  logic in,
  output logic out
);
  timeunit 1ps;
  timeprecision 1ps;

  assign #(DELAY_PS) out = INVERT ? ~in : in;
endmodule
