// token_meter: token update and metering function of one srTCM.
//
// Two token buckets, c (green) and e (yellow), share the token rate CIR.
// Levels Bc and Be are bytes in Q20.8 so that a CIR of a fraction of a byte
// per timeslot accumulates. init loads Bc = CBS and Be = EBS. On each tick
// (unit time S = one timeslot) the update follows the token counter flow
// chart: if Bc + CIR*S < CBS then Bc grows by CIR*S, else if Be + CIR*S < EBS
// then Be grows by CIR*S, else nothing changes.
// A meter request (meter_valid, length L, pre-colour, congestion) is answered
// one clock later on res_valid/res_color/res_discard:
//   colour-blind: L <= Bc -> green, Bc -= L; else L <= Be -> yellow, Be -= L;
//                 else red.
//   colour-aware: congestion and red pre-colour -> discard; else green only
//                 if pre-coloured green and L <= Bc; yellow if pre-coloured
//                 green or yellow and L <= Be; red otherwise.
// A tick and a meter request in the same clock are both applied: the meter
// compares with the levels before the tick. bc is the green token state that
// the meter reports to G-srRAS. Flow charts and mode rules follow the
// document; the fixed-point formats are this design's choice.
module token_meter
  import ras_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init,
  input  logic   tick,
  input  rate_t  cir,
  input  logic [BYTE_CFG_W-1:0] cbs,
  input  logic [BYTE_CFG_W-1:0] ebs,
  input  logic   color_aware,
  input  logic   meter_valid,
  input  len_t   meter_len,
  input  color_e meter_precolor,
  input  logic   congestion,
  output logic   res_valid,
  output color_e res_color,
  output logic   res_discard,
  output bkt_t   bc,
  output bkt_t   be
);
  bkt_t cbs_q, ebs_q, inc, len_q;
  assign cbs_q = {cbs, {RFRAC{1'b0}}};
  assign ebs_q = {ebs, {RFRAC{1'b0}}};
  assign inc   = bkt_t'(cir);
  assign len_q = bkt_t'({meter_len, {RFRAC{1'b0}}});

  color_e col;
  logic   disc;
  always_comb begin
    disc = 1'b0;
    if (!color_aware) begin
      if (len_q <= bc)      col = GREEN;
      else if (len_q <= be) col = YELLOW;
      else                  col = RED;
    end else begin
      if (congestion && meter_precolor == RED) begin
        col  = RED;
        disc = 1'b1;
      end else if (len_q <= bc && meter_precolor == GREEN) col = GREEN;
      else if (len_q <= be && meter_precolor != RED)       col = YELLOW;
      else                                                  col = RED;
    end
  end

  bkt_t bc_n, be_n;
  always_comb begin
    bc_n = bc;
    be_n = be;
    if (tick) begin
      if ({1'b0, bc} + {1'b0, inc} < {1'b0, cbs_q})      bc_n = bc + inc;
      else if ({1'b0, be} + {1'b0, inc} < {1'b0, ebs_q}) be_n = be + inc;
    end
    if (meter_valid && !disc) begin
      if (col == GREEN)       bc_n = bc_n - len_q;
      else if (col == YELLOW) be_n = be_n - len_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc <= '0; be <= '0; res_valid <= 1'b0; res_color <= GREEN; res_discard <= 1'b0;
    end else begin
      res_valid <= meter_valid;
      if (meter_valid) begin
        res_color   <= col;
        res_discard <= disc;
      end
      if (init) begin
        bc <= cbs_q;
        be <= ebs_q;
      end else begin
        bc <= bc_n;
        be <= be_n;
      end
    end
  end
endmodule
