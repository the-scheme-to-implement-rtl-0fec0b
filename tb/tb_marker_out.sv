// tb_marker_out: feeds packet descriptors for packets stored in a packet
// memory model, answers meter requests with random colours (and sometimes a
// discard), applies random output back-pressure, and checks that each
// non-discarded packet comes out whole with the DSCP set to the AF codepoint
// of the class and colour (CU bits and the rest of word 0 unchanged), that
// the meter is asked with the packet length and the pre-colour of the
// incoming codepoint, and that discarded packets produce no output.
module tb_marker_out;
  import ras_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic desc_valid, desc_ready, meter_valid, res_valid, res_discard, pm_re, pm_rd_first,
        out_valid, out_ready, out_sop, out_eop, mark_valid, mark_discard;
  pkt_desc_t desc;
  logic [1:0] af_class;
  fid_t cur_fid;
  len_t meter_len;
  color_e meter_precolor, res_color, mark_color;
  slot_t pm_rd_slot;
  logic [31:0] pm_rdata, out_data;
  logic [PM_ADDR_W-1:0] raddr;
  marker_out dut (.*);
  io_address u_ioa (.clk, .rst_n, .wr_en(1'b0), .wr_first(1'b0), .wr_slot('0), .wr_addr(),
                    .wr_last_word(), .rd_en(pm_re), .rd_first(pm_rd_first), .rd_slot(pm_rd_slot),
                    .rd_addr(raddr));
  logic [31:0] pmem [1 << PM_ADDR_W];
  always_ff @(posedge clk) if (pm_re) pm_rdata <= pmem[raddr];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  assign af_class = 2'(cur_fid);     // class = flow number mod 4

  // meter model
  color_e pend_c;
  bit pend_d;
  len_t exp_len;
  color_e exp_pre;
  always @(posedge clk) if (rst_n) begin
    res_valid <= 1'b0;
    if (meter_valid) begin
      check(meter_len == exp_len && meter_precolor == exp_pre, "meter request");
      res_valid <= 1'b1; res_color <= pend_c; res_discard <= pend_d;
    end
  end
  always @(negedge clk) out_ready = $urandom_range(0, 2) != 0;

  logic [31:0] got [$];
  always @(posedge clk) if (out_valid && out_ready) begin
    if (out_sop) got = {};
    got.push_back(out_data);
  end
  int nout = 0;
  always @(posedge clk) if (out_valid && out_ready && out_eop) nout++;

  initial begin
    desc_valid = 0; desc = '0; res_valid = 0; res_color = GREEN; res_discard = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int p = 0; p < 300; p++) begin
      int len, nw, n0;
      slot_t s;
      fid_t f;
      logic [5:0] din;
      logic [31:0] w [$];
      len = $urandom_range(20, 1500); nw = (len + 3) / 4;
      s = slot_t'($urandom); f = fid_t'($urandom);
      din = 6'($urandom);
      w = {};
      for (int i = 0; i < nw; i++) begin
        logic [31:0] x;
        x = $urandom;
        if (i == 0) x = {8'h45, din, 2'($urandom), 16'(len)};
        w.push_back(x);
        pmem[{s, PM_OFF_W'(i)}] = x;
      end
      pend_c = color_e'($urandom_range(0, 2)); pend_d = ($urandom_range(0, 7) == 0);
      exp_len = len_t'(len); exp_pre = dscp_color(din);
      n0 = nout;
      @(negedge clk);
      desc_valid = 1; desc = '{fid: f, slot: s, len: len_t'(len)};
      @(posedge clk); while (!desc_ready) @(posedge clk);
      @(negedge clk); desc_valid = 0;
      while (!desc_ready) @(posedge clk);
      repeat (2) @(posedge clk);
      if (pend_d) check(nout == n0, "discarded packet not sent");
      else begin
        check(nout == n0 + 1 && got.size() == nw, $sformatf("packet %0d words %0d of %0d", p, got.size(), nw));
        if (got.size() == nw) begin
          check(got[0] == {w[0][31:24], af_dscp(2'(f), pend_c), w[0][17:0]},
                $sformatf("word 0 %h", got[0]));
          for (int i = 1; i < nw; i++) check(got[i] == w[i], "payload word");
        end
      end
    end
    // Table-1 codepoints
    check(af_dscp(2'd0, GREEN) == 6'b001010 && af_dscp(2'd0, YELLOW) == 6'b001100 &&
          af_dscp(2'd0, RED) == 6'b001110 && af_dscp(2'd3, GREEN) == 6'b100010 &&
          af_dscp(2'd3, RED) == 6'b100110 && af_dscp(2'd1, YELLOW) == 6'b010100, "AF codepoints");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
