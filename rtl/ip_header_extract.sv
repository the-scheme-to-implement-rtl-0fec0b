// ip_header_extract: input interface and IP header extraction.
//
// Packets arrive as a stream of 32-bit words in network byte order (first
// byte in bits 31:24), framed by in_sop/in_eop, with a valid/ready handshake.
// Every word of an accepted packet is written to the packet memory slot that
// the queue control block has reserved (slot_valid/slot); the words are
// written in the clock they are accepted (pm_we/pm_first/pm_slot go to the
// input/output address block). While the header passes, the fields the flow
// search and the shaper need are extracted: total length (L, bytes 2-3),
// ToS/DS byte, protocol, source and destination address and, for TCP (6) and
// UDP (17), source and destination ports from the first word after the
// options (word IHL). After in_eop the header is presented on arr_valid/arr_hdr
// until arr_ack. A new packet is held at its first word (in_ready low) while
// the previous arrival is not acknowledged or while slot_busy says the queue
// control block is still linking it. If no free slot exists at the first
// word, or a packet ends before its header is complete, the packet is read
// and dropped (drop pulses). Words beyond the slot size are not stored.
// The header fields (DA, SA 32 bits, protocol 8, ports 16, LEN 16) follow the
// document; the stream format and the stalling rules are this design's choice.
module ip_header_extract
  import ras_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  input  logic        in_sop,
  input  logic        in_eop,
  input  logic        slot_valid,
  input  logic        slot_busy,
  input  slot_t       slot,
  output logic        pm_we,
  output logic        pm_first,
  output slot_t       pm_slot,
  output logic [31:0] pm_wdata,
  input  logic        pm_last_word,
  output logic        arr_valid,
  output ip_hdr_t     arr_hdr,
  output slot_t       arr_slot,
  input  logic        arr_ack,
  output logic        drop
);
  logic [8:0] wcnt;       // word index within the packet (saturates)
  logic       in_pkt;     // inside a packet being stored
  logic       dropping;   // inside a packet being discarded
  logic       full;       // slot full: stop storing
  logic [3:0] ihl;
  ip_hdr_t    hdr;
  slot_t      cur_slot;
  logic       hdr_ok;     // all header words seen

  logic start_ok, acc;
  always_comb begin
    start_ok = !arr_valid && !slot_busy;
    in_ready = (in_pkt || dropping) ? 1'b1 : (!in_sop || start_ok);
    acc      = in_valid && in_ready;
    pm_first = acc && in_sop && !in_pkt && !dropping && slot_valid;
    pm_we    = acc && ((pm_first) || (in_pkt && !full));
    pm_slot  = pm_first ? slot : cur_slot;
    pm_wdata = in_data;
  end

  // header fields of the current word
  function automatic ip_hdr_t parse(input ip_hdr_t h, input logic [8:0] idx,
                                    input logic [3:0] hl, input logic [31:0] w);
    ip_hdr_t o = h;
    if (idx == 9'd0) begin
      o.tos = w[23:16];
      o.len = w[15:0];
    end
    if (idx == 9'd2) o.proto = w[23:16];
    if (idx == 9'd3) o.sa = w;
    if (idx == 9'd4) o.da = w;
    if (idx == 9'({5'd0, hl}) && (o.proto == 8'd6 || o.proto == 8'd17)) begin
      o.spn = w[31:16];
      o.dpn = w[15:0];
    end
    return o;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0; in_pkt <= 1'b0; dropping <= 1'b0; full <= 1'b0; ihl <= '0;
      hdr <= '0; cur_slot <= '0; hdr_ok <= 1'b0;
      arr_valid <= 1'b0; arr_hdr <= '0; arr_slot <= '0; drop <= 1'b0;
    end else begin
      drop <= 1'b0;
      if (arr_ack) arr_valid <= 1'b0;
      if (acc) begin
        if (in_sop && !in_pkt && !dropping) begin
          // first word of a packet
          ip_hdr_t h0;
          h0 = parse('0, 9'd0, 4'd5, in_data);
          hdr      <= h0;
          ihl      <= in_data[27:24];
          wcnt     <= 9'd1;
          full     <= 1'b0;
          cur_slot <= slot;
          hdr_ok   <= 1'b0;
          if (!slot_valid) begin
            if (!in_eop) dropping <= 1'b1;
            drop <= 1'b1;
          end else if (in_eop) begin
            drop <= 1'b1;              // runt: no complete header
          end else begin
            in_pkt <= 1'b1;
          end
        end else if (in_pkt) begin
          ip_hdr_t h1;
          logic    ok;
          h1 = parse(hdr, wcnt, ihl, in_data);
          ok = hdr_ok || (wcnt >= 9'd4 && (wcnt >= 9'({5'd0, ihl}) ||
                                             !(h1.proto == 8'd6 || h1.proto == 8'd17)));
          hdr <= h1;
          hdr_ok <= ok;
          if (wcnt != '1) wcnt <= wcnt + 1'b1;
          if (pm_we && pm_last_word) full <= 1'b1;
          if (in_eop) begin
            in_pkt <= 1'b0;
            if (ok && ihl >= 4'd5) begin
              arr_valid <= 1'b1;
              arr_hdr   <= h1;
              arr_slot  <= cur_slot;
            end else begin
              drop <= 1'b1;
            end
          end
        end else if (dropping) begin
          if (in_eop) dropping <= 1'b0;
        end
      end
    end
  end
endmodule
