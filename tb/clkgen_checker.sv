// Timing checker for clkgen_top, shared by the top-level testbenches.
//
// Watches the phases and checks every edge against the master clock, whose
// rising edges the testbench places at T/2 + n*T:
//   pre-phase rises    at a clock rising edge + D2
//   post-phase rises   at a clock rising edge + D2 + D3
//   pre-phase falls    at a clock rising edge + D0 (rising edge of pre-clk)
//   post-phase falls   at a clock rising edge + D1 + dS(k), dS(k) = DS + k*DS_STEP
// It also checks that phases follow each other in order, one master period
// apart, that no two post-phases and no two pre-phases are high together,
// and that in the short interval where pre-clk is high again but the
// envelope is still open, the post-phase is high while the pre-phase is low.
// Self-start is seen as the first phase after initialisation (all counter
// stages high) being phase 1. The checker only looks at the top's ports and
// builds its own copy of pre-clk from the master clock.
// It counts how often each of these happened; at `done` a mechanism that
// never happened counts as a failure.
module clkgen_checker #(
  parameter int N       = 4,
  parameter int T       = 6250,
  parameter int D0      = 150,
  parameter int D1      = 200,
  parameter int D2      = 450,
  parameter int D3      = 50,
  parameter int DS      = 100,
  parameter int DS_STEP = 0
) (
  input  logic         check_en,
  input  logic         done,
  input  logic         clk,
  input  logic [N-1:0] phi,
  input  logic [N-1:0] phi_p,
  output int           checks,
  output int           failures
);
  timeunit 1ps;
  timeprecision 1ps;

  int n_pre_rise, n_post_rise, n_pre_fall, n_post_fall, n_order, n_split, n_self_start;
  int rise_cnt [N];
  int last_idx;
  longint last_t;
  logic [N-1:0] phi_q, phi_p_q;
  logic         pre_clk;

  assign #(D0) pre_clk = clk;

  initial begin
    checks = 0; failures = 0;
    n_pre_rise = 0; n_post_rise = 0; n_pre_fall = 0; n_post_fall = 0;
    n_order = 0; n_split = 0; n_self_start = 0;
    last_idx = -1; last_t = 0;
    for (int k = 0; k < N; k++) rise_cnt[k] = 0;
    phi_q = '0; phi_p_q = '0;
  end

  function automatic bit on_grid(longint t, longint off);
    longint r;
    r = t - off - T / 2;
    return (r >= 0) && (r % T == 0);
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(phi or phi_p) begin
    longint t;
    t = longint'($time);
    if (check_en) begin
      check("at most one post-phase high", $countones(phi) <= 1);
      check("at most one pre-phase high", $countones(phi_p) <= 1);
      for (int k = 0; k < N; k++) begin
        if (phi_p[k] && !phi_p_q[k]) begin
          check($sformatf("pre-phase %0d rises on clock edge + d2", k + 1), on_grid(t, D2));
          n_pre_rise++;
          rise_cnt[k]++;
          if (last_idx < 0) begin
            check("first phase after initialisation is phase 1", k == 0);
            if (k == 0) n_self_start++;
          end
          if (last_idx >= 0) begin
            check($sformatf("phase %0d follows phase %0d one period later", k + 1, last_idx + 1),
                  k == (last_idx + 1) % N && t == last_t + T);
            n_order++;
          end
          last_idx = k; last_t = t;
        end
        if (phi[k] && !phi_q[k]) begin
          check($sformatf("post-phase %0d rises on clock edge + d2 + d3", k + 1), on_grid(t, D2 + D3));
          check($sformatf("pre-phase %0d already high when post-phase rises", k + 1), phi_p[k]);
          n_post_rise++;
        end
        if (!phi_p[k] && phi_p_q[k]) begin
          check($sformatf("pre-phase %0d falls on clock edge + d0", k + 1), on_grid(t, D0));
          check($sformatf("post-phase %0d still high when pre-phase falls", k + 1), phi[k]);
          n_pre_fall++;
        end
        if (!phi[k] && phi_q[k]) begin
          check($sformatf("post-phase %0d falls at end of envelope", k + 1), on_grid(t, D1 + DS + k * DS_STEP));
          check($sformatf("pre-phase %0d low when post-phase falls", k + 1), !phi_p[k]);
          n_post_fall++;
        end
      end
    end
    phi_q = phi;
    phi_p_q = phi_p;
  end

  // The interval between the rising edge of pre-clk and the end of the
  // envelope, where only the master output keeps the post-phase high.
  always @(posedge pre_clk) begin
    #((D1 + DS - D0) / 2);
    if (check_en) begin
      if (last_idx >= 0) begin
        check("split interval: one post-phase high", $countones(phi) == 1);
        check("split interval: all pre-phases low", phi_p == '0);
        n_split++;
      end
    end
  end

  always @(posedge done) begin
    $display("mechanisms: self_start=%0d pre_rise=%0d post_rise=%0d pre_fall=%0d post_fall=%0d order=%0d split=%0d",
             n_self_start, n_pre_rise, n_post_rise, n_pre_fall, n_post_fall, n_order, n_split);
    check("self-start happened", n_self_start > 0);
    check("pre-phase rising edges seen", n_pre_rise > 0);
    check("post-phase rising edges seen", n_post_rise > 0);
    check("pre-phase falling edges seen", n_pre_fall > 0);
    check("post-phase falling edges seen", n_post_fall > 0);
    check("phase order seen", n_order > 0);
    check("split interval seen", n_split > 0);
    for (int k = 0; k < N; k++)
      check($sformatf("phase %0d active", k + 1), rise_cnt[k] > 0);
  end
endmodule
