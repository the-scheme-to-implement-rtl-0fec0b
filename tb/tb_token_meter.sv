// tb_token_meter: random ticks and metering requests in both modes against
// an integer reference model of the token-bucket update (Bc then Be, strict
// "<" test against CBS/EBS) and the colour-blind / colour-aware decisions;
// checks colours, discards and bucket levels after every clock.
module tb_token_meter;
  import ras_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init, tick, color_aware, meter_valid, congestion, res_valid, res_discard;
  rate_t cir;
  logic [BYTE_CFG_W-1:0] cbs, ebs;
  len_t meter_len;
  color_e meter_precolor, res_color;
  bkt_t bc, be;
  token_meter dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  longint mbc, mbe;
  int ncol [3] = '{0, 0, 0};
  int ndisc = 0;
  initial begin
    init = 0; tick = 0; color_aware = 0; meter_valid = 0; congestion = 0;
    cir = 0; cbs = 0; ebs = 0; meter_len = 0; meter_precolor = GREEN;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int phase = 0; phase < 4; phase++) begin
      @(negedge clk);
      cir = rate_t'($urandom_range(64, 4000)); cbs = 20'($urandom_range(100, 3000));
      ebs = 20'($urandom_range(0, 3000)); color_aware = phase[0];
      init = 1;
      mbc = longint'(cbs) * 256; mbe = longint'(ebs) * 256;
      @(negedge clk); init = 0;
      check(bc == bkt_t'(mbc) && be == bkt_t'(mbe), "init levels");
      for (int n = 0; n < 5000; n++) begin
        color_e ec;
        bit ed;
        longint l;
        tick = ($urandom_range(0, 3) == 0);
        meter_valid = ($urandom_range(0, 2) == 0);
        meter_len = len_t'($urandom_range(40, 1500));
        meter_precolor = color_e'($urandom_range(0, 2));
        congestion = $urandom_range(0, 1);
        l = longint'(meter_len) * 256;
        ed = 0;
        if (!color_aware) begin
          if (l <= mbc) ec = GREEN; else if (l <= mbe) ec = YELLOW; else ec = RED;
        end else if (congestion && meter_precolor == RED) begin ec = RED; ed = 1; end
        else if (l <= mbc && meter_precolor == GREEN) ec = GREEN;
        else if (l <= mbe && meter_precolor != RED) ec = YELLOW;
        else ec = RED;
        @(negedge clk);
        // reference update: tick first (levels before the tick are metered)
        if (tick) begin
          if (mbc + cir < longint'(cbs) * 256) mbc += cir;
          else if (mbe + cir < longint'(ebs) * 256) mbe += cir;
        end
        if (meter_valid && !ed) begin
          if (ec == GREEN) mbc -= l; else if (ec == YELLOW) mbe -= l;
        end
        if (meter_valid) begin
          check(res_valid && res_color == ec && res_discard == ed,
                $sformatf("colour %0d/%0d expected %0d/%0d", res_color, res_discard, ec, ed));
          if (ed) ndisc++; else ncol[ec]++;
        end
        check(bc == bkt_t'(mbc) && be == bkt_t'(mbe), "bucket levels");
      end
      tick = 0; meter_valid = 0;
    end
    check(ncol[0] > 0 && ncol[1] > 0 && ncol[2] > 0 && ndisc > 0, "all outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
