// ear_estimator: Estimated Arrival Rate of each flow.
//
// On every packet arrival of a flow (req_valid with flow and length L) it
// computes
//   EAR(t) = (1 - exp(-T/K)) * L/T + exp(-T/K) * EAR(t-1)
// where T is the time since the flow's previous arrival (timeslots, at least
// 1 so that back-to-back arrivals in one timeslot stay finite) and K is the
// flow's smoothing constant. It reads K, EAR(t-1) and the previous arrival
// time of flow cur_fid from the look-up table and writes EAR(t) and the new
// arrival time back with est_we. Sequence: T/K on a sequential divider
// (Q8.8), exp(-T/K) from exp_neg, L/T on the divider (bytes per timeslot,
// Q12.8, saturated), then the weighted sum; about 2*37 clocks per arrival.
// ready is high when a new arrival can be taken. The formula follows the
// document; the number formats and the T >= 1 rule are this design's choice.
module ear_estimator
  import ras_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  rtime_t rt,
  input  logic   req_valid,
  input  fid_t   req_fid,
  input  len_t   req_len,
  output logic   ready,
  output fid_t   cur_fid,
  input  rtime_t k,
  input  rate_t  ear_prev,
  input  rtime_t last,
  output logic   est_we,
  output fid_t   est_fid,
  output rate_t  est_ear,
  output rtime_t est_last
);
  localparam int WN = 36;
  localparam int WD = 20;

  typedef enum logic [1:0] {IDLE, DIVK, DIVL, UPD} st_e;
  st_e st;

  len_t    len;
  rtime_t  tnow, tdiff;
  logic [16:0] alpha;
  rate_t   lt;

  logic          dv_start, dv_busy, dv_done;
  logic [WN-1:0] dv_n, dv_q;
  logic [WD-1:0] dv_d, dv_r;

  seq_div #(.WN(WN), .WD(WD)) u_div (
    .clk, .rst_n, .start(dv_start), .n(dv_n), .d(dv_d),
    .busy(dv_busy), .done(dv_done), .q(dv_q), .r(dv_r)
  );

  logic [15:0] x;
  logic [16:0] alpha_c;
  assign x = (dv_q > WN'(16'hFFFF)) ? 16'hFFFF : dv_q[15:0];
  exp_neg u_exp (.x(x), .y(alpha_c));

  assign ready   = (st == IDLE);
  assign cur_fid = est_fid;

  rtime_t tdiff_c;
  always_comb begin
    tdiff_c = tnow - last;
    if (tdiff_c == '0) tdiff_c = rtime_t'(1);
  end

  logic [RATE_W+17:0] acc;
  logic [17:0] beta;
  assign beta = 18'h10000 - {1'b0, alpha};
  always_comb acc = ((RATE_W+18)'(beta) * (RATE_W+18)'(lt)) + ((RATE_W+18)'(alpha) * (RATE_W+18)'(ear_prev));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; len <= '0; tnow <= '0; tdiff <= '0; alpha <= '0; lt <= '0;
      dv_start <= 1'b0; dv_n <= '0; dv_d <= '0;
      est_we <= 1'b0; est_fid <= '0; est_ear <= '0; est_last <= '0;
    end else begin
      dv_start <= 1'b0;
      est_we   <= 1'b0;
      case (st)
        IDLE: if (req_valid) begin
          est_fid <= req_fid;
          len     <= req_len;
          st      <= DIVK;
          tnow    <= rt;
        end
        DIVK: if (!dv_busy && !dv_start && !dv_done) begin
          // first clock in DIVK: flow state of est_fid is visible now
          tdiff    <= tdiff_c;
          dv_n     <= WN'({tdiff_c, 8'd0});
          dv_d     <= WD'(k);
          dv_start <= 1'b1;
        end else if (dv_done) begin
          alpha    <= alpha_c;
          dv_n     <= WN'({len, 8'd0});
          dv_d     <= WD'(tdiff);
          dv_start <= 1'b1;
          st       <= DIVL;
        end
        DIVL: if (dv_done) begin
          lt <= (dv_q > WN'({RATE_W{1'b1}})) ? '1 : dv_q[RATE_W-1:0];
          st <= UPD;
        end
        UPD: begin
          est_we   <= 1'b1;
          est_ear  <= rate_t'(acc >> 16);
          est_last <= tnow;
          st       <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
