// tb_timing_register: with TICK_CYCLES = 5, checks that rt stays at 0 while
// enable is low, then advances exactly once every 5 clocks with a one-clock
// tick at each advance, and wraps at 2^16.
module tb_timing_register;
  import ras_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, tick;
  rtime_t rt;
  always #5 clk = ~clk;
  timing_register #(.TICK_CYCLES(5)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    static int ticks = 0, cyc = 0;
    rtime_t prev;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    check(rt == 0 && !tick, "held while disabled");
    @(negedge clk); enable = 1;
    prev = rt;
    for (int i = 0; i < 5 * 70000; i++) begin
      @(posedge clk); #1;
      cyc++;
      if (tick) begin
        ticks++;
        check(rt == rtime_t'(prev + 1), "advance by one");
        prev = rt;
      end else check(rt == prev, "no advance without tick");
    end
    check(ticks == 70000, $sformatf("tick count %0d", ticks));
    check(rt == rtime_t'(70000), "wrapped value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
