// tb_up_interface: random microprocessor cycles; checks that writes become a
// registered cfg_wr strobe of the right region with fid, field and data, that
// reads do not produce a strobe, and that a read returns the addressed
// look-up table word one clock later.
module tb_up_interface;
  import ras_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cpu_cs, cpu_we;
  logic [11:0] cpu_addr;
  logic [31:0] cpu_wdata, cpu_rdata, lut_rdata;
  cfg_wr_t cfg_wr;
  fid_t lut_rfid;
  logic [3:0] lut_rfield;
  up_interface dut (.*);
  assign lut_rdata = {16'hBEEF, 8'(lut_rfid), 8'(lut_rfield)};
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
  initial begin
    cpu_cs = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      logic cs, we;
      logic [11:0] a;
      logic [31:0] d;
      cs = $urandom_range(0, 3) != 0; we = $urandom_range(0, 1); a = 12'($urandom);
      a[11:8] = 4'($urandom_range(0, 2)); d = $urandom;
      @(negedge clk);
      cpu_cs = cs; cpu_we = we; cpu_addr = a; cpu_wdata = d;
      @(negedge clk);
      cpu_cs = 0; cpu_we = 0;
      check(cfg_wr.lut_we == (cs && we && a[11:8] == 0), "lut strobe");
      check(cfg_wr.srch_we == (cs && we && a[11:8] == 1), "search strobe");
      if (cs && we) check(cfg_wr.fid == a[7:4] && cfg_wr.field == a[3:0] && cfg_wr.data == d, "write fields");
      if (cs && !we) check(cpu_rdata == ((a[11:8] == 0) ? {16'hBEEF, 4'd0, a[7:4], 4'd0, a[3:0]} : 32'd0), "read data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
