// Master-slave D flip-flop with master output.
//
// A positive-edge flip-flop built, as in a transmission-gate design, from two
// level-sensitive latches. The master latch is transparent while clk is low
// and closes on the rising edge; the slave latch is transparent while clk is
// high. Besides the usual Q and Q_n, the master latch node is brought out as
// M. When D changes right after a rising edge (as it does inside a ring
// counter), M takes the new value at the following falling edge, half a clock
// period before Q does, so M leads Q. The clock generator uses M to tell apart
// the first and the second half of the clock period in which Q is low.
//
// Interface and timing:
//   clk         clock; master open when low, slave open when high
//   d           data, sampled by the master latch until the rising edge
//   set_n/clr_n asynchronous set and clear, active low, acting on both
//               latches; clear wins when both are active
//   m           master latch output (same polarity as d)
//   q, q_n      slave outputs, updated on the rising edge of clk
// Zero-delay logic: the clock-to-output delay of a real cell is modelled
// outside this module.
//
// The latch pair, the switch phases (master input switch on the inverted
// clock, slave switch on the clock), the master output tap and the active-low
// set/clear follow the published flip-flop. Which of set and clear wins and
// the polarity of M are choices of this design.
//
// Both latches are intentional: M only exists because the master latch is a
// separate, observable latch. When flip-flops are chained into a ring, lint
// and synthesis report a combinational loop through the latches. It stands:
// every path around the loop passes a master latch (open only while clk is
// low) and a slave latch (open only while clk is high), which are never
// transparent at the same time.
module ms_dff_m (
  input  logic clk,
  input  logic d,
  input  logic set_n,
  input  logic clr_n,
  output logic m,
  output logic q,
  output logic q_n
);
  timeunit 1ps;
  timeprecision 1ps;

  logic master_q;
  logic slave_q;

  // Master latch: transparent while clk is low.
  always_latch begin
    if (!clr_n)      master_q = 1'b0;
    else if (!set_n) master_q = 1'b1;
    else if (!clk)   master_q = d;
  end

  // Slave latch: transparent while clk is high.
  always_latch begin
    if (!clr_n)      slave_q = 1'b0;
    else if (!set_n) slave_q = 1'b1;
    else if (clk)    slave_q = master_q;
  end

  assign m   = master_q;
  assign q   = slave_q;
  assign q_n = ~slave_q;
endmodule
