// tb_vmem: random writes and reads of a 4131 x 16 virtual memory against a
// reference array; checks the one-clock read latency and that a clock with
// en low leaves both the contents and rdata unchanged.
module tb_vmem;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int D = 4131;
  logic en, we;
  logic [12:0] addr;
  logic [15:0] wdata, rdata;
  vmem #(.DEPTH(D), .W(16)) dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] ref_m [D];
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 13'(i); wdata = 16'($urandom); ref_m[i] = wdata;
    end
    for (int n = 0; n < 20000; n++) begin
      int a;
      a = $urandom_range(0, D - 1);
      @(negedge clk);
      en = 1; addr = 13'(a);
      if ($urandom_range(0, 2) == 0) begin
        we = 1; wdata = 16'($urandom); ref_m[a] = wdata;
      end else begin
        we = 0;
        @(negedge clk);
        en = 0; we = 0;
        checks++;
        if (rdata !== ref_m[a]) begin failures++; $display("FAIL addr %0d", a); end
        // en low: rdata holds
        addr = 13'($urandom_range(0, D - 1));
        @(negedge clk);
        checks++;
        if (rdata !== ref_m[a]) begin failures++; $display("FAIL hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
