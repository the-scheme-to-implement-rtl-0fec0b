// tb_lookup_table: writes every field of every flow with random values
// through cfg_wr and checks the parallel outputs and the read port against a
// reference; checks that writing CBS or EBS pulses bkt_init for that flow
// only, that the estimator port updates EAR and the last arrival time, and
// that the estimator wins over a microprocessor write to the same flow.
module tb_lookup_table;
  import ras_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_wr_t cfg_wr;
  logic est_we;
  fid_t est_fid, rd_fid;
  rate_t est_ear;
  rtime_t est_last;
  logic [3:0] rd_field;
  logic [31:0] rd_data;
  flow_cfg_t cfg [NFLOW];
  rate_t ear [NFLOW];
  rtime_t last [NFLOW];
  logic [NFLOW-1:0] bkt_init;
  lookup_table dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [31:0] refv [NFLOW][13];
  function automatic logic [31:0] mask(input int field, input logic [31:0] v);
    case (field)
      0, 1, 7, 11: return v & 32'hFFFFF;
      2, 3, 4, 5, 12: return v & 32'hFFFF;
      6: return v & 32'h3;
      8, 9: return v & 32'hFFFFF;
      10: return v & 32'h3;
      default: return 0;
    endcase
  endfunction
  initial begin
    cfg_wr = '0; est_we = 0; est_fid = 0; est_ear = 0; est_last = 0; rd_fid = 0; rd_field = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < NFLOW; f++) for (int k = 0; k < 13; k++) begin
      logic [31:0] v;
      v = $urandom;
      @(negedge clk);
      cfg_wr = '{lut_we: 1'b1, srch_we: 1'b0, fid: fid_t'(f), field: 4'(k), data: v};
      refv[f][k] = mask(k, v);
      @(negedge clk);
      cfg_wr = '0;
      check(bkt_init == ((k == 8 || k == 9) ? (NFLOW'(1) << f) : '0), "bkt_init pulse");
    end
    for (int f = 0; f < NFLOW; f++) begin
      check(cfg[f].cir == rate_t'(refv[f][0]) && cfg[f].mir == rate_t'(refv[f][1]), "rates");
      check(cfg[f].cir_th == bo_t'(refv[f][2]) && cfg[f].mir_th == bo_t'(refv[f][3]), "thresholds");
      check(cfg[f].k == rtime_t'(refv[f][4]) && cfg[f].qmax == bo_t'(refv[f][5]), "k, qmax");
      check({cfg[f].color_aware, cfg[f].g_mode} == refv[f][6][1:0], "mode");
      check(cfg[f].tcm_cir == rate_t'(refv[f][7]) && cfg[f].cbs == refv[f][8][19:0] &&
            cfg[f].ebs == refv[f][9][19:0] && cfg[f].af_class == refv[f][10][1:0], "srTCM fields");
      check(ear[f] == rate_t'(refv[f][11]) && last[f] == rtime_t'(refv[f][12]), "state");
      for (int k = 0; k < 13; k++) begin
        rd_fid = fid_t'(f); rd_field = 4'(k); #1;
        check(rd_data == refv[f][k], $sformatf("read flow %0d field %0d", f, k));
      end
    end
    // estimator port, and precedence over a CPU write
    @(negedge clk);
    est_we = 1; est_fid = 4'd5; est_ear = 20'h12345; est_last = 16'h4321;
    cfg_wr = '{lut_we: 1'b1, srch_we: 1'b0, fid: 4'd5, field: 4'(F_EAR), data: 32'h777};
    @(negedge clk);
    est_we = 0; cfg_wr = '0;
    check(ear[5] == 20'h12345 && last[5] == 16'h4321, "estimator write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
