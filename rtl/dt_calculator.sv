// dt_calculator: departure time (DT) calculator of srRAS and G-srRAS.
//
// Works on one request at a time: a flow whose head-of-line packet changed,
// with the packet length L and the flow's buffer occupancy BO in bytes. It
// reads the flow's parameters (cfg), its Estimated Arrival Rate and, for
// G-srRAS, the green token level Bc of the flow's srTCM, and computes
//   SR(BO) = max(EAR, CIR)                      BO <  CIR_th
//          = max(EAR, F(BO))                    CIR_th <= BO < MIR_th
//            F(BO) = CIR + (MIR-CIR)*(BO-CIR_th)/(MIR_th-CIR_th)
//          = MIR                                BO >= MIR_th
//   T1 = t + L/SR(BO)
//   T2 = max(t, t + (L - Bc)/CIR_tcm)
//   DT = T1 (status off, srRAS) or min(T1, T2) (status on, G-srRAS)
// with t the real time when the request is taken. Rates are bytes per
// timeslot (Q12.8), so the quotients are whole timeslots (rounded down). A
// zero rate gives the largest offset, limited to 2^15-1 timeslots so DT stays
// ahead of t on the wrapping clock. Up to three divisions on one sequential
// divider: about 40 clocks each. The result waits on res_valid until res_ack.
// The formulas and the min(T1,T2) rule follow the document; the fixed-point
// formats and the rounding are this design's choice.
module dt_calculator
  import ras_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  rtime_t    rt,
  input  logic      req_valid,
  input  dt_req_t   req,
  output logic      req_pop,
  output fid_t      cur_fid,
  input  flow_cfg_t cfg,
  input  rate_t     ear,
  input  bkt_t      bc,
  output logic      res_valid,
  output fid_t      res_fid,
  output rtime_t    res_dt,
  input  logic      res_ack
);
  localparam int WN = 36;
  localparam int WD = 20;
  localparam logic [WN-1:0] OFF_MAX = WN'(16'h7FFF);

  typedef enum logic [2:0] {IDLE, LOAD, FDIV, T1DIV, T2DIV, DONE} st_e;
  st_e st;

  dt_req_t       r;
  rtime_t        t;
  rate_t         sr;
  logic [WN-1:0] q1;
  logic          g;

  logic          dv_start, dv_busy, dv_done;
  logic [WN-1:0] dv_n, dv_q;
  logic [WD-1:0] dv_d, dv_r;

  seq_div #(.WN(WN), .WD(WD)) u_div (
    .clk, .rst_n, .start(dv_start), .n(dv_n), .d(dv_d),
    .busy(dv_busy), .done(dv_done), .q(dv_q), .r(dv_r)
  );

  assign req_pop = (st == IDLE) && req_valid && !res_valid;
  assign cur_fid = r.fid;

  function automatic rate_t rmax(input rate_t a, input rate_t b);
    return (a > b) ? a : b;
  endfunction

  logic [WN-1:0] lq;      // L in Q.8
  logic [WN-1:0] q1_c, off;
  assign lq   = WN'({r.len, 8'd0});
  assign q1_c = (dv_q > OFF_MAX) ? OFF_MAX : dv_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; r <= '0; t <= '0; sr <= '0; q1 <= '0; g <= 1'b0;
      dv_start <= 1'b0; dv_n <= '0; dv_d <= '0;
      res_valid <= 1'b0; res_fid <= '0; res_dt <= '0; off <= '0;
    end else begin
      dv_start <= 1'b0;
      if (res_ack) res_valid <= 1'b0;
      case (st)
        IDLE: if (req_pop) begin
          r  <= req;
          t  <= rt;
          st <= LOAD;
        end
        LOAD: begin
          // cfg, ear and bc of r.fid are valid from this clock on
          g <= cfg.g_mode;
          if (r.bo < cfg.cir_th) begin
            sr       <= rmax(ear, cfg.cir);
            dv_n     <= WN'({r.len, 8'd0});
            dv_d     <= rmax(ear, cfg.cir);
            dv_start <= 1'b1;
            st       <= T1DIV;
          end else if (r.bo < cfg.mir_th) begin
            dv_n     <= (cfg.mir > cfg.cir) ? WN'(cfg.mir - cfg.cir) * WN'(r.bo - cfg.cir_th) : '0;
            dv_d     <= WD'(cfg.mir_th - cfg.cir_th);
            dv_start <= 1'b1;
            st       <= FDIV;
          end else begin
            sr       <= cfg.mir;
            dv_n     <= WN'({r.len, 8'd0});
            dv_d     <= cfg.mir;
            dv_start <= 1'b1;
            st       <= T1DIV;
          end
        end
        FDIV: if (dv_done) begin
          sr       <= rmax(ear, rate_t'(cfg.cir + rate_t'(dv_q)));
          dv_n     <= WN'({r.len, 8'd0});
          dv_d     <= rmax(ear, rate_t'(cfg.cir + rate_t'(dv_q)));
          dv_start <= 1'b1;
          st       <= T1DIV;
        end
        T1DIV: if (dv_done) begin
          q1 <= q1_c;
          if (!g) begin
            off <= q1_c;
            st  <= DONE;
          end else if (lq <= WN'(bc)) begin
            off <= '0;                     // enough green tokens: T2 = t
            st  <= DONE;
          end else begin
            dv_n     <= lq - WN'(bc);
            dv_d     <= cfg.tcm_cir;
            dv_start <= 1'b1;
            st       <= T2DIV;
          end
        end
        T2DIV: if (dv_done) begin
          off <= (q1_c < q1) ? q1_c : q1;
          st  <= DONE;
        end
        DONE: begin
          res_valid <= 1'b1;
          res_fid   <= r.fid;
          res_dt    <= t + rtime_t'(off);
          st        <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
