// tb_dt_calculator: random requests (flow, L, BO) with random per-flow
// parameters, EAR and green token levels, in both srRAS and G-srRAS mode;
// the departure time is checked exactly against an integer reference of
//   SR = max(EAR,CIR) | max(EAR, CIR+(MIR-CIR)*(BO-CIR_th)/(MIR_th-CIR_th)) | MIR
//   T1 = t + L*256/SR,  T2 = max(t, t + (L*256-Bc)/CIR_tcm),
//   DT = T1 or min(T1,T2)
// (quotients rounded down, offsets limited to 32767). Checks that all three
// shaping-rate regions and both T1 and T2 outcomes occur, and the number of
// clocks per calculation (at most 3 divisions of 37 clocks plus 5).
module tb_dt_calculator;
  import ras_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  rtime_t rt, res_dt;
  logic req_valid, req_pop, res_valid, res_ack;
  dt_req_t req;
  fid_t cur_fid, res_fid;
  flow_cfg_t cfg;
  rate_t ear;
  bkt_t bc;
  dt_calculator dut (.*);
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
  flow_cfg_t mcfg [16];
  rate_t mear [16];
  bkt_t mbc [16];
  assign cfg = mcfg[cur_fid];
  assign ear = mear[cur_fid];
  assign bc  = mbc[cur_fid];

  function automatic longint lmin(input longint a, input longint b); return a < b ? a : b; endfunction
  function automatic longint lmax(input longint a, input longint b); return a > b ? a : b; endfunction
  function automatic longint qdiv(input longint n, input longint d);
    return (d == 0) ? 32767 : lmin(n / d, 32767);
  endfunction

  initial begin
    static int nreg [3] = '{0, 0, 0};
    static int nt1 = 0, nt2 = 0, maxlat = 0;
    rt = 16'hFF00; req_valid = 0; req = '0; res_ack = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      int f, lat, reg_i;
      longint sr, t1, t2, off, l, bo, fbo;
      f = $urandom_range(0, 15);
      mcfg[f] = '0;
      mcfg[f].cir = rate_t'($urandom_range(1, 4000));
      mcfg[f].mir = rate_t'(mcfg[f].cir + $urandom_range(0, 20000));
      mcfg[f].cir_th = bo_t'($urandom_range(100, 3000));
      mcfg[f].mir_th = bo_t'(mcfg[f].cir_th + $urandom_range(1, 5000));
      mcfg[f].g_mode = $urandom_range(0, 1);
      mcfg[f].tcm_cir = rate_t'($urandom_range(0, 4000));
      mear[f] = rate_t'($urandom_range(0, 20000));
      mbc[f] = bkt_t'($urandom_range(0, 2000 * 256));
      req.fid = fid_t'(f); req.len = len_t'($urandom_range(20, 1500));
      req.bo = bo_t'($urandom_range(0, 9000));
      l = longint'(req.len) * 256; bo = req.bo;
      if (bo < mcfg[f].cir_th) begin sr = lmax(mear[f], mcfg[f].cir); reg_i = 0; end
      else if (bo < mcfg[f].mir_th) begin
        fbo = mcfg[f].cir + (longint'(mcfg[f].mir - mcfg[f].cir) * (bo - mcfg[f].cir_th)) /
              longint'(mcfg[f].mir_th - mcfg[f].cir_th);
        sr = lmax(mear[f], fbo); reg_i = 1;
      end else begin sr = mcfg[f].mir; reg_i = 2; end
      nreg[reg_i]++;
      t1 = qdiv(l, sr);
      t2 = (l <= mbc[f]) ? 0 : qdiv(l - mbc[f], mcfg[f].tcm_cir);
      off = mcfg[f].g_mode ? lmin(t1, t2) : t1;
      if (mcfg[f].g_mode) begin if (t2 < t1) nt2++; else nt1++; end
      @(negedge clk);
      req_valid = 1;
      lat = 0;
      #1; while (!req_pop) begin @(negedge clk); #1; end
      @(negedge clk); req_valid = 0;
      while (!res_valid) begin @(negedge clk); lat++; end
      if (lat > maxlat) maxlat = lat;
      check(res_fid == fid_t'(f) && res_dt == rtime_t'(rt + rtime_t'(off)),
            $sformatf("DT %0d expected %0d (region %0d g %0d)", res_dt, rtime_t'(rt + rtime_t'(off)), reg_i, mcfg[f].g_mode));
      res_ack = 1;
      @(negedge clk); res_ack = 0;
      rt = rt + rtime_t'($urandom_range(0, 5));
    end
    check(nreg[0] > 0 && nreg[1] > 0 && nreg[2] > 0 && nt1 > 0 && nt2 > 0, "all cases seen");
    check(maxlat <= 3 * 37 + 5, $sformatf("latency %0d clocks", maxlat));
    $display("max latency %0d clocks", maxlat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
