// fid_search: flow identifier searching function.
//
// A table of NFLOW entries, each a valid bit and an IPv4 five-tuple (source
// and destination address, protocol, source and destination port), written
// by the microprocessor through cfg_wr (region 1; fields S_SA .. S_VALID, the
// ports as {SPN, DPN}). Every clock the extracted header key is compared with
// all entries in parallel; one clock later fid is the lowest matching entry
// and hit says whether any matched. The document gives the function (the
// header fields that make the flow identifier); the parallel exact-match
// table is this design's choice.
module fid_search
  import ras_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  cfg_wr_t cfg_wr,
  input  ip_hdr_t key,
  output fid_t    fid,
  output logic    hit
);
  typedef struct packed {
    logic        valid;
    logic [31:0] sa;
    logic [31:0] da;
    logic [7:0]  proto;
    logic [15:0] spn;
    logic [15:0] dpn;
  } entry_t;

  entry_t tbl [NFLOW];
  fid_t   m_fid;
  logic   m_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NFLOW; i++) tbl[i] <= '0;
    end else if (cfg_wr.srch_we) begin
      case (srch_field_e'(cfg_wr.field))
        S_SA:    tbl[cfg_wr.fid].sa    <= cfg_wr.data;
        S_DA:    tbl[cfg_wr.fid].da    <= cfg_wr.data;
        S_PROTO: tbl[cfg_wr.fid].proto <= cfg_wr.data[7:0];
        S_PORTS: begin
          tbl[cfg_wr.fid].spn <= cfg_wr.data[31:16];
          tbl[cfg_wr.fid].dpn <= cfg_wr.data[15:0];
        end
        S_VALID: tbl[cfg_wr.fid].valid <= cfg_wr.data[0];
        default: ;
      endcase
    end
  end

  always_comb begin
    m_fid = '0;
    m_hit = 1'b0;
    for (int i = NFLOW - 1; i >= 0; i--) begin
      if (tbl[i].valid && tbl[i].sa == key.sa && tbl[i].da == key.da &&
          tbl[i].proto == key.proto && tbl[i].spn == key.spn && tbl[i].dpn == key.dpn) begin
        m_fid = fid_t'(i);
        m_hit = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fid <= '0; hit <= 1'b0;
    end else begin
      fid <= m_fid; hit <= m_hit;
    end
  end
endmodule
