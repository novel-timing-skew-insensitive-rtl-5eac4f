// Sampling testbench for clkgen_top: four-path time-interleaved
// sample-and-hold at a 160 MHz overall rate, sampling a 75 MHz sine.
//
// The counter path delays are deliberately mismatched (dS of path k is
// 60 + 40*k ps). A behavioural sample-and-hold per path takes the input at
// the falling edge of its pre-phase (the sampling edge of an input S/H) and
// the sample is played out on the rising edge of its post-phase (the edge
// that starts charge transfer in an output multiplexer). For each edge type
// the timing skew of paths 2..4 against path 1 (edge time minus path-1 edge
// time minus k*T) is measured and its rms printed. For both critical edges
// the skew must be exactly zero and every sample must equal the ideal
// uniformly sampled sine. For comparison the same skew is measured on the
// falling edges of the post-phases, which follow the mismatched counter, and
// must equal the programmed mismatch of 40 ps per path.
module tb_clkgen_sampling;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int    N       = 4;
  localparam int    T       = 6250;
  localparam int    D0      = 150;
  localparam int    DS      = 60;
  localparam int    DS_STEP = 40;
  localparam int    ROUNDS  = 40;
  localparam real   F_IN    = 75.0e6;
  localparam real   PI      = 3.14159265358979;

  logic         clk, init_n;
  logic [N-1:0] phi, phi_p, phi_q, phi_p_q;
  int checks = 0;
  int failures = 0;
  longint t_samp [N], t_play [N], t_env [N];
  int     n_samp [N], n_play [N], n_env [N];
  real    held [N];
  real    sk2_samp, sk2_play, sk2_env;
  int     n_sk;
  longint t0;
  bit     started;

  clkgen_top #(
    .N(N), .T_CLK_PS(T), .D0_PS(D0), .D1_PS(200), .D2_PS(450), .D3_PS(50),
    .DS_PS(DS), .DS_STEP_PS(DS_STEP)
  ) dut (.clk(clk), .init_n(init_n), .phi(phi), .phi_p(phi_p));

  function automatic real vin(longint t);
    return $sin(2.0 * PI * F_IN * real'(t) * 1.0e-12);
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    clk = 1'b0;
    forever #(T / 2) clk = ~clk;
  end

  initial begin
    #(longint'(T) * (N * ROUNDS + 50));
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Edge capture. Path 1 starts a new round; paths 2..N are compared with it.
  always @(phi or phi_p) begin
    longint t;
    real ideal;
    t = longint'($time);
    for (int k = 0; k < N; k++) begin
      if (started && !phi_p[k] && phi_p_q[k]) begin
        // Input S/H: sample at the pre-phase falling edge.
        held[k] = vin(t);
        t_samp[k] = t;
        n_samp[k]++;
        // Ideal uniform sampling instants: clock rising edge + d0.
        ideal = vin(((t - D0 - T / 2) / T) * T + T / 2 + D0);
        check($sformatf("path %0d sample equals uniform sampling", k + 1), held[k] == ideal);
        if (k > 0 && n_samp[k] == n_samp[0]) sk2_samp += real'((t - t_samp[0] - k * T) ** 2);
        if (k > 0 && n_samp[k] == n_samp[0])
          check($sformatf("sampling skew path %0d", k + 1), t - t_samp[0] == k * T);
      end
      if (started && phi[k] && !phi_q[k]) begin
        t_play[k] = t;
        n_play[k]++;
        if (k > 0 && n_play[k] == n_play[0]) begin
          sk2_play += real'((t - t_play[0] - k * T) ** 2);
          check($sformatf("play-out skew path %0d", k + 1), t - t_play[0] == k * T);
          n_sk++;
        end
      end
      if (started && !phi[k] && phi_q[k]) begin
        t_env[k] = t;
        n_env[k]++;
        if (k > 0 && n_env[k] == n_env[0]) begin
          sk2_env += real'((t - t_env[0] - k * T) ** 2);
          check($sformatf("non-critical edge follows the path mismatch, path %0d", k + 1),
                t - t_env[0] - k * T == k * DS_STEP);
        end
      end
    end
    phi_q = phi;
    phi_p_q = phi_p;
  end

  initial begin
    started = 1'b0;
    sk2_samp = 0.0; sk2_play = 0.0; sk2_env = 0.0; n_sk = 0;
    for (int k = 0; k < N; k++) begin
      n_samp[k] = 0; n_play[k] = 0; n_env[k] = 0; held[k] = 0.0;
    end
    phi_q = '0; phi_p_q = '0;
    init_n = 1'b1;
    #100 init_n = 1'b0;
    #900 init_n = 1'b1;
    started = 1'b1;
    #(longint'(T) * N * ROUNDS);
    $display("rms skew of paths 2..%0d vs path 1 over %0d rounds: sampling %0.3f ps, play-out %0.3f ps, envelope edge %0.3f ps",
             N, n_sk / (N - 1), $sqrt(sk2_samp / real'(n_sk)), $sqrt(sk2_play / real'(n_sk)),
             $sqrt(sk2_env / real'(n_sk)));
    check("rounds completed", n_sk >= (N - 1) * (ROUNDS - 2));
    check("sampling rms skew is zero", sk2_samp == 0.0);
    check("play-out rms skew is zero", sk2_play == 0.0);
    check("envelope edges show the mismatch", sk2_env > 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
