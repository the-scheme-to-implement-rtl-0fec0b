// vmem: single-port synchronous RAM used for virtual memory 1 (4131 x 16) and
// virtual memory 2 (2083 x 16) of the shaper, and for the packet length RAM.
//
// One access per clock: when we is high, wdata is written to addr; otherwise
// the word at addr appears on rdata one clock later. The two virtual memories
// are separate so that both can be accessed in the same cycle, as the design
// intends; their block layout is given in ras_pkg.
module vmem #(
  parameter int unsigned DEPTH = 4131,
  parameter int unsigned W     = 16
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
