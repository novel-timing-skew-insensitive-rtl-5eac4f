// Testbench for edb: applies all eight input combinations and compares the
// output with a truth table written out by hand (out high only when C is low
// and A, B are not both high).
module tb_edb;
  timeunit 1ps;
  timeprecision 1ps;

  logic a, b, c, out;
  int checks = 0;
  int failures = 0;

  // Expected output, indexed by {a, b, c}.
  localparam logic [7:0] EXPECTED = 8'b0001_0101;

  edb dut (.a(a), .b(b), .c(c), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 8; i++) begin
        {a, b, c} = 3'(i);
        #10;
        checks++;
        if (out !== EXPECTED[i]) begin
          failures++;
          $display("FAIL a=%b b=%b c=%b out=%b expected %b", a, b, c, out, EXPECTED[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
