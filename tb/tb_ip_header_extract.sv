// tb_ip_header_extract: sends IPv4 packets (TCP, UDP and other protocols,
// with and without options) with random gaps; checks the extracted header
// fields, that every word is written to the reserved slot in order, that a
// new packet waits while the previous arrival is not acknowledged or the slot
// is busy, that packets without a free slot and runts are dropped without
// writes or arrivals.
module tb_ip_header_extract;
  import ras_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_sop, in_eop, slot_valid, slot_busy, pm_we, pm_first,
        pm_last_word, arr_valid, arr_ack, drop;
  logic [31:0] in_data, pm_wdata;
  slot_t slot, pm_slot, arr_slot;
  ip_hdr_t arr_hdr;
  ip_header_extract dut (.*);
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
  assign pm_last_word = 1'b0;

  // write log
  logic [31:0] wlog [$];
  slot_t wslot;
  always @(posedge clk) if (pm_we) begin
    if (pm_first) begin wlog = {}; wslot = pm_slot; end
    check(pm_slot == wslot, "write slot constant");
    wlog.push_back(pm_wdata);
  end
  int drops = 0;
  always @(posedge clk) if (drop) drops++;

  initial begin
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = 0; slot_valid = 1; slot_busy = 0; slot = 0; arr_ack = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int p = 0; p < 400; p++) begin
      int ihl, len, nw, kind, drops0;
      logic [7:0] proto, tos;
      logic [31:0] sa, da, w [$];
      logic [15:0] spn, dpn;
      kind = $urandom_range(0, 9);          // 0: no slot, 1: runt, else normal
      ihl = ($urandom_range(0, 3) == 0) ? $urandom_range(6, 8) : 5;
      proto = ($urandom_range(0, 2) == 0) ? 8'd1 : (($urandom_range(0, 1)) ? 8'd6 : 8'd17);
      tos = 8'($urandom); sa = $urandom; da = $urandom; spn = 16'($urandom); dpn = 16'($urandom);
      nw = ihl + 1 + $urandom_range(0, 20);
      if (kind == 1) nw = $urandom_range(1, 3);
      len = nw * 4 - $urandom_range(0, 3);
      w = {};
      for (int i = 0; i < nw; i++) begin
        logic [31:0] x;
        x = $urandom;
        if (i == 0) x = {4'h4, 4'(ihl), tos, 16'(len)};
        if (i == 2) x[23:16] = proto;
        if (i == 3) x = sa;
        if (i == 4) x = da;
        if (i == ihl) x = {spn, dpn};
        w.push_back(x);
      end
      slot = slot_t'($urandom);
      slot_valid = (kind != 0);
      drops0 = drops;
      wlog = {};
      for (int i = 0; i < nw; i++) begin
        @(negedge clk);
        in_valid = 1; in_data = w[i]; in_sop = (i == 0); in_eop = (i == nw - 1);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 0; @(posedge clk); end
      end
      @(negedge clk); in_valid = 0; in_sop = 0; in_eop = 0;
      repeat (2) @(posedge clk);
      if (kind <= 1) begin
        check(!arr_valid && drops == drops0 + 1, "dropped packet");
        check(kind == 1 || wlog.size() == 0, "no writes for a packet without slot");
      end else begin
        check(arr_valid && drops == drops0, "arrival presented");
        check(arr_hdr.len == 16'(len) && arr_hdr.tos == tos && arr_hdr.proto == proto, "len/tos/proto");
        check(arr_hdr.sa == sa && arr_hdr.da == da, "addresses");
        if (proto != 1) check(arr_hdr.spn == spn && arr_hdr.dpn == dpn, "ports");
        else check(arr_hdr.spn == 0 && arr_hdr.dpn == 0, "no ports for other protocols");
        check(arr_slot == slot && wslot == slot, "slot");
        check(wlog.size() == nw, "all words written");
        for (int i = 0; i < nw && i < wlog.size(); i++) check(wlog[i] == w[i], "word data");
        // the next packet must wait for the acknowledge
        @(negedge clk);
        in_valid = 1; in_sop = 1; in_data = 32'h4500_0000;
        @(posedge clk); #1;
        check(!in_ready, "held while arrival pending");
        @(negedge clk); arr_ack = 1; slot_busy = 1; in_valid = 0; in_sop = 0;
        @(negedge clk); arr_ack = 0;
        in_valid = 1; in_sop = 1;
        @(posedge clk); #1;
        check(!in_ready, "held while slot busy");
        @(negedge clk); in_valid = 0; in_sop = 0; slot_busy = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
