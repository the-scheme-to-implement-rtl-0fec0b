// tb_timing_control: random request patterns and a model of the queue
// control block that stays busy for the function's length; checks that a
// grant only comes when not busy, that it is the highest-priority request
// (ADDTD, ADDPT, Win, SPD), and that every pending request is granted.
module tb_timing_control;
  import ras_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_addtd, req_addpt, req_win, req_spd, busy, go;
  qfn_e fn;
  timing_control dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int busy_left = 0;
  int grants [6] = '{0, 0, 0, 0, 0, 0};
  assign busy = busy_left > 0;
  initial begin
    req_addtd = 0; req_addpt = 0; req_win = 0; req_spd = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if (go) begin
        qfn_e expct;
        if (req_addtd) expct = FN_ADDTD; else if (req_addpt) expct = FN_ADDPT;
        else if (req_win) expct = FN_DECISION; else expct = FN_SPD;
        check(fn == expct, $sformatf("priority: got %0d expected %0d", fn, expct));
        grants[fn]++;
        case (fn)
          FN_ADDTD: begin req_addtd = 0; busy_left = CYC_ADDTD; end
          FN_ADDPT: begin req_addpt = 0; busy_left = CYC_ADDPT; end
          FN_DECISION: begin req_win = 0; busy_left = CYC_DECISION; end
          default: begin req_spd = 0; busy_left = CYC_SPD; end
        endcase
      end else if (busy_left > 0) busy_left--;
      if ($urandom_range(0, 19) == 0) req_addtd = 1;
      if ($urandom_range(0, 9) == 0) req_addpt = 1;
      if ($urandom_range(0, 9) == 0) req_win = 1;
      if ($urandom_range(0, 4) == 0) req_spd = 1;
      @(posedge clk); #1;
      if (go) check(busy_left == 0, "grant while busy");
    end
    check(grants[FN_ADDTD] > 0 && grants[FN_ADDPT] > 0 && grants[FN_DECISION] > 0 && grants[FN_SPD] > 0,
          "every function granted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
