// Testbench for ring_counter (N = 4): loads every one of the 2^N states,
// lets the counter run and checks that it reaches the single-low pattern
// within N clocks (self-start), that the low then moves from stage k to
// stage k+1 on every rising edge, wrapping from N to 1, and that in the low
// clock phase each master output already shows the value its slave will take
// at the next rising edge, while in the high phase it equals the slave.
module tb_ring_counter;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N = 4;
  localparam int HALF = 500;

  logic         clk, load_n;
  logic [N-1:0] load_val, slave, master;
  logic [N-1:0] prev;
  int checks = 0;
  int failures = 0;
  int settle;

  ring_counter #(.N(N)) dut (
    .clk(clk), .load_n(load_n), .load_val(load_val), .slave(slave), .master(master)
  );

  function automatic bit one_low(logic [N-1:0] v);
    return $countones(~v) == 1;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: slave=%b master=%b", what, $time, slave, master);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0; load_n = 1'b1; load_val = '1;
    for (int s = 0; s < (1 << N); s++) begin
      load_val = N'(s);
      load_n = 1'b0; #(HALF / 2);
      check("asynchronous load", slave == N'(s));
      load_n = 1'b1; #(HALF / 2);
      // Run until one low remains.
      settle = 0;
      while (!one_low(slave) && settle <= 2 * N) begin
        clk = 1'b1; #HALF; clk = 1'b0; #HALF;
        settle++;
      end
      check($sformatf("self-start from %b within N clocks (took %0d)", N'(s), settle), settle <= N);
      // Steady rotation.
      for (int c = 0; c < 3 * N; c++) begin
        prev = slave;
        // Low phase: master shows the next state.
        check("master leads slave (clk low)", master == {prev[N-2:0], prev[N-1]});
        clk = 1'b1; #(HALF / 2);
        check("single low", one_low(slave));
        check("low moves to next stage", slave == {prev[N-2:0], prev[N-1]});
        check("master equals slave (clk high)", master == slave);
        #(HALF / 2);
        clk = 1'b0; #HALF;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
