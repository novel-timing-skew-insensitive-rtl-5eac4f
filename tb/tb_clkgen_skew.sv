// Testbench for clkgen_top with six phases and a different delay in every
// path: the counter output delay of path k is 60 + 25*k ps, so the paths
// differ by up to 125 ps. The critical edges (rising edges of both phases,
// falling edges of the pre-phases) must still sit exactly on the master
// clock edges plus the shared delays; only the non-critical falling edges of
// the post-phases move with the path delay. Runs 60 master periods.
module tb_clkgen_skew;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N      = 6;
  localparam int T      = 6250;
  localparam int CYCLES = 60;

  logic         clk, init_n, check_en, done;
  logic [N-1:0] phi, phi_p;
  int checks, failures;

  clkgen_top #(
    .N(N), .T_CLK_PS(T), .D0_PS(150), .D1_PS(200), .D2_PS(450), .D3_PS(50),
    .DS_PS(60), .DS_STEP_PS(25)
  ) dut (.clk(clk), .init_n(init_n), .phi(phi), .phi_p(phi_p));

  clkgen_checker #(.N(N), .T(T), .D0(150), .D1(200), .D2(450), .D3(50), .DS(60), .DS_STEP(25)) u_chk (
    .check_en(check_en), .done(done), .clk(clk),
    .phi(phi), .phi_p(phi_p), .checks(checks), .failures(failures)
  );

  initial begin
    clk = 1'b0;
    forever #(T / 2) clk = ~clk;
  end

  initial begin
    #(longint'(T) * (CYCLES + 50));
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    // Raise init_n first so that the initialisation is a real falling edge.
    init_n = 1'b1; check_en = 1'b0; done = 1'b0;
    #100;
    init_n = 1'b0;
    #900;
    init_n = 1'b1;
    check_en = 1'b1;
    #(longint'(T) * CYCLES);
    done = 1'b1;
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
