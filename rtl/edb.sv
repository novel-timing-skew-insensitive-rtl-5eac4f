// Edge Decision Block (EDB).
//
// A single complex CMOS gate computing  out = !C & !(A & B).
// In the clock generator, C is the slave output of one ring-counter stage
// (low during that stage's one-clock envelope), B is post-DFF-clk (the master
// clock inverted and delayed) and A is either the inverted master output of
// the same stage (post-phase EDB) or pre-clk (pre-phase EDB). While C is low
// the output is the NAND of A and B, so a phase rises on the falling edge of
// post-DFF-clk and a pre-phase falls on the rising edge of pre-clk: both
// critical edges come from the master clock, not from the counter.
//
// Interface: a, b, c inputs, out output. Purely combinational, zero delay.
// The logic function is the published one (pull-up: C in series with A
// parallel B; pull-down: A series B, in parallel with C).
module edb (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic out
);
  timeunit 1ps;
  timeprecision 1ps;

  assign out = ~c & ~(a & b);
endmodule
