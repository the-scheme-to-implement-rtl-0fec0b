// tb_ear_estimator: a flow-state model (K, EAR, last arrival per flow) is
// wired to the estimator; random arrivals at random times are checked against
// EAR(t) = (1-exp(-T/K))*L/T + exp(-T/K)*EAR(t-1) computed in floating
// point, allowing the error of the 32-entry exponential table (2.5 % of the
// exp term) plus rounding. Also
// checks the T = 1 rule for two arrivals in one timeslot, a zero K (no
// memory), and that an update takes at most 90 clocks.
module tb_ear_estimator;
  import ras_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  rtime_t rt, k, last, est_last;
  logic req_valid, ready, est_we;
  fid_t req_fid, cur_fid, est_fid;
  len_t req_len;
  rate_t ear_prev, est_ear;
  ear_estimator dut (.*);
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
  rtime_t mk [16], ml [16];
  rate_t me [16];
  assign k = mk[cur_fid];
  assign ear_prev = me[cur_fid];
  assign last = ml[cur_fid];
  always @(posedge clk) if (est_we) begin me[est_fid] <= est_ear; ml[est_fid] <= est_last; end

  initial begin
    static int maxlat = 0;
    rt = 0; req_valid = 0; req_fid = 0; req_len = 0;
    for (int f = 0; f < 16; f++) begin mk[f] = rtime_t'((f == 7) ? 0 : $urandom_range(1, 200)); me[f] = 0; ml[f] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int f, lat, T;
      real a, expct, lt, tol;
      f = $urandom_range(0, 15);
      if ($urandom_range(0, 9) != 0) rt = rt + rtime_t'($urandom_range(0, 60));
      @(negedge clk);
      req_valid = 1; req_fid = fid_t'(f); req_len = len_t'($urandom_range(40, 1500));
      T = int'(rtime_t'(rt - ml[f])); if (T == 0) T = 1;
      a = (mk[f] == 0) ? 0.0 : $exp(-real'(T) / real'(mk[f]));
      lt = real'(req_len) * 256.0 / real'(T);
      if (lt > 1048575.0) lt = 1048575.0;
      expct = (1.0 - a) * lt + a * real'(me[f]);
      @(negedge clk); req_valid = 0;
      lat = 1;
      while (!est_we) begin @(negedge clk); lat++; end
      if (lat > maxlat) maxlat = lat;
      check(est_fid == fid_t'(f) && est_last == rt, "flow and arrival time");
      tol = 0.025 * a * ((real'(me[f]) > lt) ? real'(me[f]) - lt : lt - real'(me[f])) + 0.002 * expct + 2.0;
      check(real'(est_ear) <= expct + tol && real'(est_ear) >= expct - tol,
            $sformatf("EAR %0d expected %f (T=%0d K=%0d)", est_ear, expct, T, mk[f]));
      @(negedge clk);
    end
    check(maxlat <= 90, $sformatf("latency %0d clocks", maxlat));
    $display("max latency %0d clocks", maxlat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
