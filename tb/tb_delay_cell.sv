// Testbench for delay_cell: one non-inverting cell (100 ps) and one inverting
// cell (250 ps). After every input edge, checks that the outputs keep their
// old value until 1 ps before the delay and show the new value at the delay.
module tb_delay_cell;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int DA = 100;
  localparam int DB = 250;

  logic in_sig, out_a, out_b;
  logic old_a, old_b;
  int gap;
  int checks = 0;
  int failures = 0;

  delay_cell #(.DELAY_PS(DA), .INVERT(1'b0)) u_a (.in(in_sig), .out(out_a));
  delay_cell #(.DELAY_PS(DB), .INVERT(1'b1)) u_b (.in(in_sig), .out(out_b));

  task automatic check(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, want, $time);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_sig = 1'b0;
    #1000;
    check("settled a", out_a, 1'b0);
    check("settled b", out_b, 1'b1);
    for (int i = 0; i < 200; i++) begin
      old_a = out_a; old_b = out_b;
      in_sig = ~in_sig;
      #(DA - 1);
      check("a before delay", out_a, old_a);
      #1;
      check("a at delay", out_a, in_sig);
      #(DB - DA - 1);
      check("b before delay", out_b, old_b);
      #1;
      check("b at delay", out_b, ~in_sig);
      gap = 50 + int'($urandom_range(0, 400));
      #gap;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
