// Timing-skew-insensitive multi-phase non-overlapping clock generator.
//
// Produces N post-phases phi[k] and N pre-phases phi_p[k] for the switches of
// a time-interleaved switched-capacitor DAC multiplexer or an N-path
// sampled-data filter. Phase k is high once every N master-clock periods,
// phases never overlap, and each pre-phase falls shortly before its
// post-phase.
//
// The edges that set the sampling instants are the rising edges of the
// phases and the falling edges of the pre-phases. None of them is produced
// by the ring counter, whose per-path delays differ from path to path.
// Instead, each is taken from one of two delayed copies of the master clock
// that every path shares (clock edge reassignment):
//   pre_clk       = clk delayed by d0
//   post_dff_clk  = clk inverted and delayed by d2
//   post_dff_clk3 = post_dff_clk delayed again by d3 (post-phase blocks only)
// A self-starting mod-N ring counter, clocked by clk delayed by d1, supplies
// the slow envelopes: slave[k] is low for one period. Per path, two Edge
// Decision Blocks (out = !C & !(A & B), C = slave[k]) cut the phases out of
// the envelope:
//   pre-phase EDB:  A = pre_clk,     B = post_dff_clk
//   post-phase EDB: A = ~master[k],  B = post_dff_clk3
// With clk rising at t0 and slave[k] falling at t0+d1+dS:
//   phi_p[k] rises at t0+d2       (falling edge of post_dff_clk)
//   phi[k]   rises at t0+d2+d3    (falling edge of post_dff_clk3)
//   phi_p[k] falls at t0+T+d0     (rising edge of pre_clk)
//   phi[k]   falls at t0+T+d1+dS  (end of the envelope, not critical)
// The inverted master output keeps the post-phase high through the second
// half of the envelope, where pre_clk and post_dff_clk would otherwise cut
// it. Phase k+1 follows one period later; the gap between a post-phase and
// the next is d2+d3-d1-dS.
//
// The delays are behavioural (delay_cell), so this top is a timing model,
// not synthesizable logic. The loop that lint reports through the counter
// is the latch ring explained in ms_dff_m and stands. dS, the clock-to-output delay of the counter
// together with the inverter on each master output, is modelled per path as
// DS_PS + k*DS_STEP_PS, so a non-zero DS_STEP_PS gives every path a different
// delay to show that the critical edges do not move. The delays must satisfy
//   D0 < D1+dS < D2,  D2 < D0+T/2,  D2+D3 < T/2+D1+dS
// for every path, which is checked at start-up against T_CLK_PS.
//
// Ports (index 0 is phase 1):
//   clk     master clock, period T_CLK_PS
//   init_n  optional asynchronous initialisation, active low: sets every
//           counter stage high, from which the counter starts by itself.
//           Tie high to rely on self-starting alone.
//   phi     post-phases 1..N
//   phi_p   pre-phases 1..N
//
// The structure (delays d0..d3, inverting d2, the counter on d1, the two EDBs
// per path and their inputs, the inverters on the master outputs) follows the
// published block and timing diagrams, as do N = 4 and the 160 MHz master
// clock of its simulations. The delay values and the init_n input are this
// design's own.
module clkgen_top #(
  parameter int unsigned N          = 4,
  parameter int unsigned T_CLK_PS   = 6250,
  parameter int unsigned D0_PS      = 150,
  parameter int unsigned D1_PS      = 200,
  parameter int unsigned D2_PS      = 450,
  parameter int unsigned D3_PS      = 50,
  parameter int unsigned DS_PS      = 100,
  parameter int unsigned DS_STEP_PS = 0
) (
  input  logic         clk,
  input  logic         init_n,
  output logic [N-1:0] phi,
  output logic [N-1:0] phi_p
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DS_MIN = DS_PS;
  localparam int unsigned DS_MAX = DS_PS + (N - 1) * DS_STEP_PS;

  logic         pre_clk;        // master clock delayed by d0
  logic         cnt_clk;        // master clock delayed by d1
  logic         post_dff_clk;   // master clock inverted and delayed by d2
  logic         post_dff_clk3;  // post_dff_clk delayed by d3
  logic [N-1:0] slave_raw;      // counter Q outputs, zero delay
  logic [N-1:0] master_raw;     // counter M outputs, zero delay
  logic [N-1:0] slave;          // Q outputs after the path delay dS
  logic [N-1:0] master_n;       // inverted M outputs after the path delay dS

  delay_cell #(.DELAY_PS(D0_PS), .INVERT(1'b0)) u_d0 (.in(clk),          .out(pre_clk));
  delay_cell #(.DELAY_PS(D1_PS), .INVERT(1'b0)) u_d1 (.in(clk),          .out(cnt_clk));
  delay_cell #(.DELAY_PS(D2_PS), .INVERT(1'b1)) u_d2 (.in(clk),          .out(post_dff_clk));
  delay_cell #(.DELAY_PS(D3_PS), .INVERT(1'b0)) u_d3 (.in(post_dff_clk), .out(post_dff_clk3));

  ring_counter #(.N(N)) u_counter (
    .clk      (cnt_clk),
    .load_n   (init_n),
    .load_val ({N{1'b1}}),
    .slave    (slave_raw),
    .master   (master_raw)
  );

  for (genvar k = 0; k < N; k++) begin : g_path
    delay_cell #(.DELAY_PS(DS_PS + k * DS_STEP_PS), .INVERT(1'b0)) u_ds (
      .in (slave_raw[k]), .out(slave[k])
    );
    delay_cell #(.DELAY_PS(DS_PS + k * DS_STEP_PS), .INVERT(1'b1)) u_minv (
      .in (master_raw[k]), .out(master_n[k])
    );
    edb u_edb_pre (
      .a   (pre_clk),
      .b   (post_dff_clk),
      .c   (slave[k]),
      .out (phi_p[k])
    );
    edb u_edb_post (
      .a   (master_n[k]),
      .b   (post_dff_clk3),
      .c   (slave[k]),
      .out (phi[k])
    );
  end

  initial begin
    assert (D0_PS < D1_PS + DS_MIN)
      else $error("clkgen_top: d0 must be shorter than d1+dS");
    assert (D1_PS + DS_MAX < D2_PS)
      else $error("clkgen_top: d1+dS must be shorter than d2");
    assert (D2_PS < D0_PS + T_CLK_PS / 2)
      else $error("clkgen_top: d2 must be shorter than d0+T/2");
    assert (D2_PS + D3_PS < T_CLK_PS / 2 + D1_PS + DS_MIN)
      else $error("clkgen_top: d2+d3 must be shorter than T/2+d1+dS");
  end
endmodule
