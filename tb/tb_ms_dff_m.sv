// Testbench for ms_dff_m: drives the clock by hand and changes D in both
// clock phases. Checks that M follows D while the clock is low and holds
// while it is high, that Q and Q_n change only on the rising edge (taking D
// as it was just before the edge), and that the asynchronous set and clear
// act at once, with clear winning.
module tb_ms_dff_m;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk, d, set_n, clr_n, m, q, q_n;
  logic exp_q, exp_m;
  int checks = 0;
  int failures = 0;

  ms_dff_m dut (.clk(clk), .d(d), .set_n(set_n), .clr_n(clr_n), .m(m), .q(q), .q_n(q_n));

  task automatic check(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, want, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0; d = 1'b0; set_n = 1'b1; clr_n = 1'b0;
    #5;
    check("clear q", q, 1'b0);
    check("clear m", m, 1'b0);
    check("clear q_n", q_n, 1'b1);
    clr_n = 1'b1;
    exp_q = 1'b0;
    for (int i = 0; i < 300; i++) begin
      // Clock low: master transparent.
      d = 1'($urandom); #2;
      check("m follows d (clk low)", m, d);
      check("q holds (clk low)", q, exp_q);
      d = 1'($urandom); #2;
      check("m follows d again (clk low)", m, d);
      check("q still holds", q, exp_q);
      // Rising edge.
      exp_m = d;
      clk = 1'b1; #1;
      exp_q = exp_m;
      check("q takes d at rising edge", q, exp_q);
      check("q_n", q_n, ~exp_q);
      d = ~d; #2;
      check("m holds (clk high)", m, exp_m);
      check("q holds (clk high)", q, exp_q);
      d = 1'($urandom); #2;
      check("m holds (clk high, 2)", m, exp_m);
      clk = 1'b0; #1;
      check("m opens at falling edge", m, d);
      check("q holds at falling edge", q, exp_q);
    end
    // Asynchronous set and clear, in both clock phases.
    clk = 1'b1; d = 1'b0; #2;
    set_n = 1'b0; #1;
    check("set q (clk high)", q, 1'b1);
    check("set m (clk high)", m, 1'b1);
    clr_n = 1'b0; #1;
    check("clear wins over set", q, 1'b0);
    check("clear wins over set (m)", m, 1'b0);
    set_n = 1'b1; clr_n = 1'b1; #2;
    clk = 1'b0; #2;
    set_n = 1'b0; #1;
    check("set q (clk low)", q, 1'b1);
    check("set q_n (clk low)", q_n, 1'b0);
    set_n = 1'b1; d = 1'b0; #2;
    check("m follows d after set released", m, 1'b0);
    check("q keeps set value", q, 1'b1);
    clk = 1'b1; #1;
    check("q takes d after set", q, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
