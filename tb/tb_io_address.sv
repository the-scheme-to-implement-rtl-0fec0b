// tb_io_address: random interleaved write and read bursts; checks that each
// packet's words get addresses {slot, 0}, {slot, 1}, ... on both sides, that
// the write side stops advancing at the last word of a slot and flags it.
module tb_io_address;
  import ras_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, wr_first, wr_last_word, rd_en, rd_first;
  slot_t wr_slot, rd_slot;
  logic [PM_ADDR_W-1:0] wr_addr, rd_addr;
  io_address dut (.*);
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
    wr_en = 0; wr_first = 0; rd_en = 0; rd_first = 0; wr_slot = 0; rd_slot = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int p = 0; p < 300; p++) begin
      slot_t ws, rs;
      int wn, rn, wi, ri;
      ws = slot_t'($urandom); rs = slot_t'($urandom);
      wn = (p % 50 == 0) ? 600 : $urandom_range(1, 40);
      rn = $urandom_range(1, 40);
      wi = 0; ri = 0;
      while (wi < wn || ri < rn) begin
        @(negedge clk);
        wr_en = (wi < wn) && $urandom_range(0, 1); wr_first = wr_en && wi == 0; wr_slot = ws;
        rd_en = (ri < rn) && $urandom_range(0, 1); rd_first = rd_en && ri == 0; rd_slot = rs;
        #1;
        if (wr_en) begin
          int off;
          off = (wi > 511) ? 511 : wi;
          check(wr_addr == {ws, PM_OFF_W'(off)}, $sformatf("write address word %0d", wi));
          check(wr_last_word == (wi >= 511), "last word flag");
          wi++;
        end
        if (rd_en) begin
          check(rd_addr == {rs, PM_OFF_W'(ri)}, "read address");
          ri++;
        end
      end
      @(negedge clk); wr_en = 0; rd_en = 0; wr_first = 0; rd_first = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
