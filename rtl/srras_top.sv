// srras_top: IP shaper made of a per-flow rate adaptive shaper (srRAS, or
// G-srRAS when a flow's status bit is on) followed by per-flow single rate
// three colour markers (srTCM).
//
// Data path: packets enter as 32-bit words (in_*), are written straight into
// an external packet memory (pm_* write port) while the input interface
// extracts the IPv4 header; the flow search turns the five-tuple into a flow
// identifier (FID). The queue control block links the packet into its flow
// queue (tail drop at the flow's limit) and the arrival-rate estimator
// updates the flow's EAR. Whenever a packet becomes head of its flow queue,
// the DT calculator computes its departure time from the shaping rate
// SR(BO) (and, for G-srRAS, from the green token level Bc of the flow's
// srTCM); ADDPT files the flow in the timing queue of that time, ADDTD moves
// each due timing queue to the departure queue as real time advances, and
// SPD hands the head of the departure queue to the marker. The marker reads
// the packet back from the packet memory (pm_* read port), meters it in the
// flow's srTCM, rewrites the DSCP with the AF codepoint of the flow's class
// and colour, and sends it out (out_*). The timing control block grants the
// queue functions one at a time.
// Configuration: a microprocessor writes all per-flow parameters and the
// flow search table over cpu_* (see up_interface) after init_done rises.
// Packet memory: NSLOT slots of 512 words of 32 bits, address {slot, word};
// the write port writes in the clock of pm_we, the read port returns data
// one clock after pm_re. The packet memory itself is not part of this RTL.
// Timing: one timeslot of real time is TICK_CYCLES clocks.
// pm_wdata is in_data itself: a word is written to packet memory in the
// clock it is accepted, so the write data needs no register of its own.
module srras_top
  import ras_pkg::*;
#(
  parameter int unsigned TICK_CYCLES = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // packet input
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [31:0]          in_data,
  input  logic                 in_sop,
  input  logic                 in_eop,
  // packet output
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [31:0]          out_data,
  output logic                 out_sop,
  output logic                 out_eop,
  // microprocessor
  input  logic                 cpu_cs,
  input  logic                 cpu_we,
  input  logic [11:0]          cpu_addr,
  input  logic [31:0]          cpu_wdata,
  output logic [31:0]          cpu_rdata,
  // congestion indication for colour-aware metering
  input  logic                 congestion,
  // packet memory
  output logic                 pm_we,
  output logic [PM_ADDR_W-1:0] pm_waddr,
  output logic [31:0]          pm_wdata,
  output logic                 pm_re,
  output logic [PM_ADDR_W-1:0] pm_raddr,
  input  logic [31:0]          pm_rdata,
  // status
  output logic                 init_done,
  output rtime_t               rt,
  output logic                 ev_in_drop,
  output logic                 ev_tail_drop,
  output logic                 ev_mark,
  output color_e               ev_mark_color,
  output logic                 ev_mark_discard,
  output qfn_e                 ev_fn
);
  // ------------------------------------------------------------ configuration
  cfg_wr_t     cfg_wr;
  fid_t        lut_rfid;
  logic [3:0]  lut_rfield;
  logic [31:0] lut_rdata;
  flow_cfg_t   cfg  [NFLOW];
  rate_t       ear  [NFLOW];
  rtime_t      last [NFLOW];
  logic [NFLOW-1:0] bkt_init;
  bo_t         qmax [NFLOW];

  logic   est_we;
  fid_t   est_fid;
  rate_t  est_ear;
  rtime_t est_last;

  up_interface u_up (
    .clk, .rst_n, .cpu_cs, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata,
    .cfg_wr, .lut_rfid, .lut_rfield, .lut_rdata
  );

  lookup_table u_lut (
    .clk, .rst_n, .cfg_wr, .est_we, .est_fid, .est_ear, .est_last,
    .rd_fid(lut_rfid), .rd_field(lut_rfield), .rd_data(lut_rdata),
    .cfg, .ear, .last, .bkt_init
  );

  always_comb for (int i = 0; i < NFLOW; i++) qmax[i] = cfg[i].qmax;

  // ------------------------------------------------------------ real time
  logic tick;
  timing_register #(.TICK_CYCLES(TICK_CYCLES)) u_treg (
    .clk, .rst_n, .enable(init_done), .rt, .tick
  );

  // ------------------------------------------------------------ input side
  logic    slot_valid, slot_busy;
  slot_t   slot;
  logic    hx_we, hx_first, pm_last_word;
  slot_t   hx_slot;
  logic    arr_valid, arr_ack;
  ip_hdr_t arr_hdr;
  slot_t   arr_slot;

  ip_header_extract u_hx (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_sop, .in_eop,
    .slot_valid, .slot_busy, .slot,
    .pm_we(hx_we), .pm_first(hx_first), .pm_slot(hx_slot), .pm_wdata,
    .pm_last_word, .arr_valid, .arr_hdr, .arr_slot, .arr_ack, .drop(ev_in_drop)
  );

  logic  mk_re, mk_first;
  slot_t mk_slot;
  io_address u_ioa (
    .clk, .rst_n,
    .wr_en(hx_we), .wr_first(hx_first), .wr_slot(hx_slot), .wr_addr(pm_waddr),
    .wr_last_word(pm_last_word),
    .rd_en(mk_re), .rd_first(mk_first), .rd_slot(mk_slot), .rd_addr(pm_raddr)
  );
  assign pm_we = hx_we;
  assign pm_re = mk_re;

  fid_t s_fid;
  logic s_hit;
  fid_search u_fs (.clk, .rst_n, .cfg_wr, .key(arr_hdr), .fid(s_fid), .hit(s_hit));

  // the search result belongs to arr_hdr once arr_valid has been high for a clock
  logic arr_valid_d, arr_go, ear_ready;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) arr_valid_d <= 1'b0;
    else        arr_valid_d <= arr_valid && !arr_ack;
  assign arr_go  = arr_valid && arr_valid_d && ear_ready && !slot_busy;
  assign arr_ack = arr_go;

  // ------------------------------------------------------------ estimator
  fid_t ear_fid;
  ear_estimator u_ear (
    .clk, .rst_n, .rt, .req_valid(arr_go && s_hit), .req_fid(s_fid), .req_len(arr_hdr.len),
    .ready(ear_ready), .cur_fid(ear_fid),
    .k(cfg[ear_fid].k), .ear_prev(ear[ear_fid]), .last(last[ear_fid]),
    .est_we, .est_fid, .est_ear, .est_last
  );

  // ------------------------------------------------------------ queue control
  logic      dtq_push, dtq_full, dtq_empty, dtq_pop;
  dt_req_t   dtq_data, dtq_head;
  logic      dtr_valid, dtr_ack;
  fid_t      dtr_fid;
  rtime_t    dtr_dt;
  logic      req_addtd, req_addpt, req_win, req_spd, qc_busy, tc_go;
  qfn_e      tc_fn;
  logic      qd_valid, qd_ready;
  pkt_desc_t qd;
  logic [SLOT_W:0] free_slots;

  queue_control u_qc (
    .clk, .rst_n, .init_done, .rt,
    .arr_go, .arr_fid(s_fid), .arr_hit(s_hit), .arr_len(arr_hdr.len),
    .slot_valid, .slot_busy, .slot, .qmax,
    .dtq_push, .dtq_data, .dtq_full,
    .dtr_valid, .dtr_fid, .dtr_dt, .dtr_ack,
    .req_addtd, .req_addpt, .req_win, .req_spd, .busy(qc_busy), .go(tc_go), .fn(tc_fn),
    .out_valid(qd_valid), .out_desc(qd), .out_ready(qd_ready),
    .tail_drop(ev_tail_drop), .cur_fn(ev_fn), .free_slots
  );

  timing_control u_tc (
    .clk, .rst_n, .req_addtd, .req_addpt, .req_win, .req_spd, .busy(qc_busy),
    .go(tc_go), .fn(tc_fn)
  );

  sync_fifo #(.W($bits(dt_req_t)), .DEPTH(NFLOW)) u_dtq (
    .clk, .rst_n, .push(dtq_push), .din(dtq_data), .pop(dtq_pop), .dout(dtq_head),
    .empty(dtq_empty), .full(dtq_full)
  );

  // ------------------------------------------------------------ DT calculator
  fid_t dt_fid;
  bkt_t bc [NFLOW];
  bkt_t be [NFLOW];
  dt_calculator u_dt (
    .clk, .rst_n, .rt, .req_valid(!dtq_empty), .req(dtq_head), .req_pop(dtq_pop),
    .cur_fid(dt_fid), .cfg(cfg[dt_fid]), .ear(ear[dt_fid]), .bc(bc[dt_fid]),
    .res_valid(dtr_valid), .res_fid(dtr_fid), .res_dt(dtr_dt), .res_ack(dtr_ack)
  );

  // ------------------------------------------------------------ srTCM per flow
  fid_t   mk_fid;
  logic   mt_valid;
  len_t   mt_len;
  color_e mt_pre;
  logic   r_valid [NFLOW];
  color_e r_color [NFLOW];
  logic   r_disc  [NFLOW];

  for (genvar i = 0; i < NFLOW; i++) begin : g_tcm
    token_meter u_tm (
      .clk, .rst_n, .init(bkt_init[i]), .tick,
      .cir(cfg[i].tcm_cir), .cbs(cfg[i].cbs), .ebs(cfg[i].ebs),
      .color_aware(cfg[i].color_aware),
      .meter_valid(mt_valid && mk_fid == fid_t'(i)), .meter_len(mt_len),
      .meter_precolor(mt_pre), .congestion,
      .res_valid(r_valid[i]), .res_color(r_color[i]), .res_discard(r_disc[i]),
      .bc(bc[i]), .be(be[i])
    );
  end

  // ------------------------------------------------------------ marker / output
  marker_out u_mk (
    .clk, .rst_n, .desc_valid(qd_valid), .desc_ready(qd_ready), .desc(qd),
    .af_class(cfg[mk_fid].af_class), .cur_fid(mk_fid),
    .meter_valid(mt_valid), .meter_len(mt_len), .meter_precolor(mt_pre),
    .res_valid(r_valid[mk_fid]), .res_color(r_color[mk_fid]), .res_discard(r_disc[mk_fid]),
    .pm_re(mk_re), .pm_rd_first(mk_first), .pm_rd_slot(mk_slot), .pm_rdata,
    .out_valid, .out_ready, .out_data, .out_sop, .out_eop,
    .mark_valid(ev_mark), .mark_color(ev_mark_color), .mark_discard(ev_mark_discard)
  );
endmodule
