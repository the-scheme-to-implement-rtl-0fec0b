// up_interface: microprocessor interface of the shaper.
//
// The microprocessor only sets the initial parameters of srRAS, srTCM, the
// look-up table and the flow search table; it takes no part in per-packet
// work. A write cycle (cs & we) with address {region[11:8], fid[7:4],
// field[3:0]} is registered into a cfg_wr_t strobe one clock later: region 0
// addresses the per-flow look-up table, region 1 the search table, other
// regions are ignored. A read cycle (cs & !we) returns, one clock later, the
// look-up table word selected by the same address (lut_rfid/lut_rfield drive
// the table's read port combinationally). The address layout is this
// design's choice; the document does not give one.
module up_interface
  import ras_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cpu_cs,
  input  logic        cpu_we,
  input  logic [11:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  output logic [31:0] cpu_rdata,
  output cfg_wr_t     cfg_wr,
  output fid_t        lut_rfid,
  output logic [3:0]  lut_rfield,
  input  logic [31:0] lut_rdata
);
  assign lut_rfid   = cpu_addr[7:4];
  assign lut_rfield = cpu_addr[3:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_wr    <= '0;
      cpu_rdata <= '0;
    end else begin
      cfg_wr.lut_we  <= cpu_cs && cpu_we && (cpu_addr[11:8] == REG_LUT);
      cfg_wr.srch_we <= cpu_cs && cpu_we && (cpu_addr[11:8] == REG_SRCH);
      cfg_wr.fid     <= cpu_addr[7:4];
      cfg_wr.field   <= cpu_addr[3:0];
      cfg_wr.data    <= cpu_wdata;
      if (cpu_cs && !cpu_we)
        cpu_rdata <= (cpu_addr[11:8] == REG_LUT) ? lut_rdata : 32'd0;
    end
  end
endmodule
