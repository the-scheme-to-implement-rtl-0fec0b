// io_address: input/output address block for the packet memory.
//
// The packet memory is divided into NSLOT slots of 2^PM_OFF_W 32-bit words;
// one packet occupies one slot, so a packet memory address is {slot, word}.
// Write side: wr_en with wr_first marks the first word of a packet going to
// wr_slot; following wr_en pulses write the next words of the same slot.
// wr_last_word tells the input side that the word at the current address is
// the last one the slot can hold. Read side: the same with rd_en/rd_first/
// rd_slot. Addresses are combinational from the request and the registered
// counters, so the memory sees them in the clock of the request. The slot
// layout is this design's choice: the document only says that the packet
// memory address management differs from ATM because of variable lengths.
module io_address
  import ras_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic                 wr_first,
  input  slot_t                wr_slot,
  output logic [PM_ADDR_W-1:0] wr_addr,
  output logic                 wr_last_word,
  input  logic                 rd_en,
  input  logic                 rd_first,
  input  slot_t                rd_slot,
  output logic [PM_ADDR_W-1:0] rd_addr
);
  slot_t                ws, rs;
  logic [PM_OFF_W-1:0]  wc, rc;

  always_comb begin
    wr_addr      = wr_first ? {wr_slot, {PM_OFF_W{1'b0}}} : {ws, wc};
    wr_last_word = !wr_first && (wc == '1);
    rd_addr      = rd_first ? {rd_slot, {PM_OFF_W{1'b0}}} : {rs, rc};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws <= '0; wc <= '0; rs <= '0; rc <= '0;
    end else begin
      if (wr_en) begin
        if (wr_first) begin ws <= wr_slot; wc <= PM_OFF_W'(1); end
        else if (wc != '1) wc <= wc + 1'b1;
      end
      if (rd_en) begin
        if (rd_first) begin rs <= rd_slot; rc <= PM_OFF_W'(1); end
        else rc <= rc + 1'b1;
      end
    end
  end
endmodule
