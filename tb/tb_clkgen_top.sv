// End-to-end testbench for clkgen_top at its default parameters: four
// phases from a 160 MHz master clock (T = 6250 ps). Initialises the counter,
// runs 64 master periods (16 full rounds of the four phases) and has
// clkgen_checker check every phase edge against the master clock, the phase
// order and non-overlap. The expected delays are the top's defaults, written
// out here.
module tb_clkgen_top;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N      = 4;
  localparam int T      = 6250;
  localparam int CYCLES = 64;

  logic         clk, init_n, check_en, done;
  logic [N-1:0] phi, phi_p;
  int checks, failures;

  clkgen_top dut (.clk(clk), .init_n(init_n), .phi(phi), .phi_p(phi_p));

  clkgen_checker #(.N(N), .T(T), .D0(150), .D1(200), .D2(450), .D3(50), .DS(100), .DS_STEP(0)) u_chk (
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
