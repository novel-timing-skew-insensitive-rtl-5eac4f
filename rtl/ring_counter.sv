// Self-starting mod-N ring counter with master outputs.
//
// N master-slave flip-flops (ms_dff_m) form a shift ring in which a single
// low level circulates: slave[k] is low for exactly one clock period, then
// slave[k+1], and so on, wrapping from stage N to stage 1. These shifted
// negative pulses are the envelopes inside which the edge blocks place the
// N non-overlapping clock phases. Each stage also brings out its master
// output; master[k] goes low at the falling edge before slave[k] does and
// rises again at the falling edge before slave[k] rises.
//
// Self-start: stage 1 does not simply take stage N's output. It takes a
// low only when stages 1..N-1 are all high, i.e. when the single low sits in
// stage N or there is no low at all. Any extra lows shift out and, from an
// arbitrary power-up state, the ring reaches the one-low pattern within N
// clocks without a reset.
//
// Interface (index 0 is stage/phase 1):
//   clk       counter clock (the master clock after delay d1)
//   load_n    optional asynchronous load, active low, through the flip-flops'
//             set and clear; tie high when not used
//   load_val  the pattern loaded while load_n is low
//   slave     Q outputs, one low at a time once running
//   master    M outputs
//
// The mod-N ring of master-slave flip-flops with M outputs, the negative
// pulses and the self-starting property follow the published counter. The
// exact self-start gating and the load port are choices of this design; the
// dummy gates of the published layout only balance electrical loading and
// have no logic function, so they are not modelled. Lint and synthesis see
// the ring as a combinational loop through the flip-flops' latches; it
// stands, because a master and a slave latch are never open together (see
// ms_dff_m).
module ring_counter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         load_n,
  input  logic [N-1:0] load_val,
  output logic [N-1:0] slave,
  output logic [N-1:0] master
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N-1:0] d;

  // Feedback: a new low enters stage 1 only when stages 1..N-1 are all high.
  always_comb begin
    d[0] = ~(&slave[N-2:0]);
    for (int k = 1; k < N; k++) d[k] = slave[k-1];
  end

  for (genvar k = 0; k < N; k++) begin : g_stage
    ms_dff_m u_ff (
      .clk   (clk),
      .d     (d[k]),
      .set_n (load_n | ~load_val[k]),
      .clr_n (load_n |  load_val[k]),
      .m     (master[k]),
      .q     (slave[k]),
      .q_n   ()
    );
  end

  initial begin
    assert (N >= 2) else $error("ring_counter: N must be at least 2");
  end
endmodule
