// tb_fid_search: programs random five-tuples into the 16 entries (some left
// invalid, two entries identical) and checks, for keys equal to entries,
// keys differing in one field and random keys, that fid/hit one clock later
// equal a reference search (lowest matching valid entry).
module tb_fid_search;
  import ras_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_wr_t cfg_wr;
  ip_hdr_t key;
  fid_t fid;
  logic hit;
  fid_search dut (.*);
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
  logic [31:0] sa [16], da [16];
  logic [7:0] pr [16];
  logic [15:0] sp [16], dp [16];
  bit valid [16];
  task automatic wr(input int f, input int field, input logic [31:0] d);
    @(negedge clk);
    cfg_wr = '{lut_we: 1'b0, srch_we: 1'b1, fid: fid_t'(f), field: 4'(field), data: d};
    @(negedge clk);
    cfg_wr = '0;
  endtask
  initial begin
    cfg_wr = '0; key = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 16; f++) begin
      sa[f] = $urandom; da[f] = $urandom; pr[f] = ($urandom_range(0, 1)) ? 8'd6 : 8'd17;
      sp[f] = 16'($urandom); dp[f] = 16'($urandom); valid[f] = (f % 5 != 4);
      if (f == 9) begin sa[9] = sa[3]; da[9] = da[3]; pr[9] = pr[3]; sp[9] = sp[3]; dp[9] = dp[3]; end
      wr(f, S_SA, sa[f]); wr(f, S_DA, da[f]); wr(f, S_PROTO, 32'(pr[f]));
      wr(f, S_PORTS, {sp[f], dp[f]}); wr(f, S_VALID, 32'(valid[f]));
    end
    for (int n = 0; n < 3000; n++) begin
      int e, ef;
      bit eh;
      e = $urandom_range(0, 15);
      key = '0;
      key.sa = sa[e]; key.da = da[e]; key.proto = pr[e]; key.spn = sp[e]; key.dpn = dp[e];
      key.len = 16'($urandom); key.tos = 8'($urandom);
      case ($urandom_range(0, 7))
        0: key.sa[$urandom_range(0, 31)] ^= 1'b1;
        1: key.da = $urandom;
        2: key.dpn ^= 16'h1;
        3: begin key.sa = $urandom; key.spn = 16'($urandom); end
        4: key.proto = (key.proto == 8'd6) ? 8'd17 : 8'd6;
        default: ;
      endcase
      eh = 0; ef = 0;
      for (int i = 15; i >= 0; i--)
        if (valid[i] && sa[i] == key.sa && da[i] == key.da && pr[i] == key.proto &&
            sp[i] == key.spn && dp[i] == key.dpn) begin eh = 1; ef = i; end
      @(negedge clk);
      @(negedge clk);
      check(hit == eh && (!eh || fid == fid_t'(ef)), $sformatf("search: hit %0d fid %0d expected %0d %0d", hit, fid, eh, ef));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
