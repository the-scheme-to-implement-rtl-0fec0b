// marker_out: marking function and output interface.
//
// Takes one departing packet at a time from the departure queue (desc_valid/
// desc_ready with flow, slot and length L). It reads the first word of the
// packet from the packet memory to learn the incoming DS field, asks the
// flow's srTCM meter for a colour (meter_valid, pre-colour taken from the
// drop-precedence bits of the incoming codepoint, used only in colour-aware
// mode) and then streams the packet out with the DSCP (ToS bits 7:2) set to
// the AF codepoint of the flow's class and the colour:
//   class n (1..4) in DSCP bits 5:3, drop precedence 01 green, 10 yellow,
//   11 red in bits 2:1, bit 0 zero (001010 = AF11 ... 100110 = AF43).
// The two currently-unused bits (ToS bits 1:0) are passed unchanged. A packet
// the meter discards is not sent. Each word takes a packet memory read (one
// clock latency) and one output handshake, so the output runs at one word per
// two clocks. mark_valid pulses once per metered packet with its colour and
// discard flag. The codepoint table follows the document; the stream format
// and the read order are this design's choice. The IPv4 header checksum is
// not updated.
// pm_rd_slot is the descriptor's slot wired straight through: the address
// generator registers it with the first read.
module marker_out
  import ras_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        desc_valid,
  output logic        desc_ready,
  input  pkt_desc_t   desc,
  input  logic [1:0]  af_class,   // class of desc.fid (or of the held packet)
  output fid_t        cur_fid,
  output logic        meter_valid,
  output len_t        meter_len,
  output color_e      meter_precolor,
  input  logic        res_valid,
  input  color_e      res_color,
  input  logic        res_discard,
  output logic        pm_re,
  output logic        pm_rd_first,
  output slot_t       pm_rd_slot,
  input  logic [31:0] pm_rdata,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        out_sop,
  output logic        out_eop,
  output logic        mark_valid,
  output color_e      mark_color,
  output logic        mark_discard
);
  typedef enum logic [2:0] {IDLE, RD0, METER, WAITM, SEND, RDN} st_e;
  st_e st;

  pkt_desc_t cur;
  logic [31:0] w0;
  logic [9:0]  nwords, sent;
  color_e      col;

  assign desc_ready = (st == IDLE);
  assign cur_fid    = (st == IDLE) ? desc.fid : cur.fid;
  assign pm_rd_slot = desc.slot;
  assign meter_len  = cur.len;
  assign meter_precolor = dscp_color(w0[23:18]);

  always_comb begin
    pm_re       = 1'b0;
    pm_rd_first = 1'b0;
    if (st == IDLE && desc_valid) begin
      pm_re = 1'b1; pm_rd_first = 1'b1;
    end else if (st == SEND && out_ready && sent + 10'd1 < nwords) begin
      pm_re = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; cur <= '0; w0 <= '0; nwords <= '0; sent <= '0; col <= GREEN;
      meter_valid <= 1'b0; out_valid <= 1'b0; out_data <= '0; out_sop <= 1'b0;
      out_eop <= 1'b0; mark_valid <= 1'b0; mark_color <= GREEN; mark_discard <= 1'b0;
    end else begin
      meter_valid <= 1'b0;
      mark_valid  <= 1'b0;
      case (st)
        IDLE: if (desc_valid) begin
          cur <= desc;
          // words = ceil(L/4), at most one slot
          if (desc.len > 16'd2048) nwords <= 10'd512;
          else nwords <= 10'((desc.len + 16'd3) >> 2);
          st <= RD0;
        end
        RD0: begin
          w0 <= pm_rdata;
          st <= METER;
        end
        METER: begin
          meter_valid <= 1'b1;
          st <= WAITM;
        end
        WAITM: if (res_valid) begin
          mark_valid   <= 1'b1;
          mark_color   <= res_color;
          mark_discard <= res_discard;
          col <= res_color;
          if (res_discard) begin
            st <= IDLE;
          end else begin
            out_valid <= 1'b1;
            out_data  <= {w0[31:24], af_dscp(af_class, res_color), w0[17:0]};
            out_sop   <= 1'b1;
            out_eop   <= (nwords <= 10'd1);
            sent      <= '0;
            st        <= SEND;
          end
        end
        SEND: if (out_ready) begin
          out_valid <= 1'b0;
          out_sop   <= 1'b0;
          out_eop   <= 1'b0;
          if (sent + 10'd1 >= nwords) st <= IDLE;
          else begin
            sent <= sent + 10'd1;
            st   <= RDN;
          end
        end
        RDN: begin
          out_valid <= 1'b1;
          out_data  <= pm_rdata;
          out_eop   <= (sent + 10'd1 >= nwords);
          st        <= SEND;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
