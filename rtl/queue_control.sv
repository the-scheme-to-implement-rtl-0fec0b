// queue_control: queue control block of srRAS with its virtual memories.
//
// All queues are linked lists kept in two single-port 16-bit virtual memories
// (maps in ras_pkg), which can be accessed in the same clock:
//  - flow queues: per flow a head (FHPB) and tail (FTPB) pointer to packet
//    memory slots, linked through ADB; FIB holds the bytes queued (BO);
//  - idle-address linked list (IALL): free slots, head IAHPB, tail IATPB,
//    also linked through ADB;
//  - timing queues: one list of flow identifiers per timeslot of a 2k-slot
//    calendar (head THPB, tail TTPB, valid in bit 15), linked through NPB;
//  - departure queue: head DHPB, tail DTPB, linked through NPB.
// A packet's length is kept in a separate 2k x 16 length RAM.
// On reset the block builds the free list and clears the queues (init_done
// rises after 4131 clocks). Then the timing control block grants one function
// at a time (go/fn); each runs a fixed number of clocks:
//  Decision (6): reads BO of the arrival's flow, accepts the packet if the
//    flow was found and BO + L <= the flow's limit (tail drop otherwise).
//  Win (8): links the stored slot at the flow queue tail, adds L to BO,
//    takes the next free slot from the IALL for the next arrival, and asks
//    for a departure time if the packet became head of line.
//  ADDPT (7): puts the flow in the timing queue of its departure time DT,
//    clamped into t+1 .. t+2047.
//  ADDTD (7): appends the timing queue of the next due timeslot as a whole
//    to the departure queue.
//  SPD (9): takes the head flow of the departure queue, unlinks its head
//    packet, hands {flow, slot, L} to the output side, asks for the DT of
//    the next packet of the flow if any, and returns the slot of the packet
//    sent before (now fully read out) to the IALL.
// The queue organisation, memory map and function lengths follow the
// document; the field encodings, the length RAM, the prefetched free slot
// (slot/slot_valid, used by the input while the packet streams in) and the
// deferred slot release are this design's choices.
// The request-queue assertion at the end is disabled during reset, so rst_n
// is also sampled synchronously there; lint notes this and it is intended.
module queue_control
  import ras_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  output logic      init_done,
  input  rtime_t    rt,
  // arrival (after header extraction and flow search)
  input  logic      arr_go,
  input  fid_t      arr_fid,
  input  logic      arr_hit,
  input  len_t      arr_len,
  output logic      slot_valid,
  output logic      slot_busy,
  output slot_t     slot,
  input  bo_t       qmax [NFLOW],
  // departure time requests and results
  output logic      dtq_push,
  output dt_req_t   dtq_data,
  input  logic      dtq_full,
  input  logic      dtr_valid,
  input  fid_t      dtr_fid,
  input  rtime_t    dtr_dt,
  output logic      dtr_ack,
  // timing control
  output logic      req_addtd,
  output logic      req_addpt,
  output logic      req_win,
  output logic      req_spd,
  output logic      busy,
  input  logic      go,
  input  qfn_e      fn,
  // departing packets
  output logic      out_valid,
  output pkt_desc_t out_desc,
  input  logic      out_ready,
  // status
  output logic      tail_drop,
  output qfn_e      cur_fn,
  output logic [SLOT_W:0] free_slots
);
  localparam int A1 = $clog2(VM1_DEPTH);
  localparam int A2 = $clog2(VM2_DEPTH);

  // ---------------------------------------------------------------- memories
  logic          m1_en, m1_we, m2_en, m2_we, ml_en, ml_we;
  logic [A1-1:0] m1_addr;
  logic [A2-1:0] m2_addr;
  slot_t         ml_addr;
  logic [15:0]   m1_wd, m1_rd, m2_wd, m2_rd, ml_wd, ml_rd;

  vmem #(.DEPTH(VM1_DEPTH), .W(VM_W)) u_vm1 (
    .clk, .en(m1_en), .we(m1_we), .addr(m1_addr), .wdata(m1_wd), .rdata(m1_rd));
  vmem #(.DEPTH(VM2_DEPTH), .W(VM_W)) u_vm2 (
    .clk, .en(m2_en), .we(m2_we), .addr(m2_addr), .wdata(m2_wd), .rdata(m2_rd));
  vmem #(.DEPTH(NSLOT), .W(LEN_W)) u_len (
    .clk, .en(ml_en), .we(ml_we), .addr(ml_addr), .wdata(ml_wd), .rdata(ml_rd));

  function automatic logic [A1-1:0] a1(input int base, input logic [15:0] off);
    return A1'(base) + A1'(off);
  endfunction
  function automatic logic [A2-1:0] a2(input int base, input logic [15:0] off);
    return A2'(base) + A2'(off);
  endfunction
  function automatic logic [15:0] vfid(input fid_t f);
    return {1'b1, 11'd0, f};
  endfunction

  // ---------------------------------------------------------------- state
  logic [A1-1:0] icnt;          // initialisation address
  qfn_e          fq;            // running function
  logic [3:0]    step;
  logic [3:0]    last_step;

  // arrival held for Decision / Win
  logic  win_pend;
  fid_t  w_fid;
  logic  w_hit;
  len_t  w_len;
  // free slot handed to the input
  slot_t fslot;
  logic  fvalid;
  logic [SLOT_W:0] fcnt;        // entries in the IALL
  // deferred release of the last departed slot
  logic  rel_valid;
  slot_t rel_slot;
  logic  rdq;                   // departure queue not empty
  rtime_t td_next;              // next timeslot to move to the departure queue

  // per-function working registers
  fid_t        s_fid;
  bo_t         s_bo;
  len_t        s_len, s_lnext;
  logic        s_acc;
  logic [15:0] s_h, s_t, s_dh, s_dt;
  slot_t       s_a, s_na;
  logic [15:0] s_iat;
  logic [TQ_W-1:0] s_tq;
  rtime_t      p_dt;
  logic        s_dep;           // SPD found a packet to send

  assign cur_fn     = fq;
  assign busy       = (fq != FN_NONE) || !init_done;
  assign slot       = fslot;
  assign slot_valid = fvalid;
  assign slot_busy  = win_pend || fq == FN_DECISION || fq == FN_WIN;
  assign free_slots = fcnt + SLOT_W'(fvalid);

  assign req_addtd = init_done && (td_next != rtime_t'(rt + 1'b1));
  assign req_addpt = init_done && dtr_valid;
  assign req_win   = init_done && win_pend;
  assign req_spd   = init_done && (rdq || rel_valid) && out_ready && !out_valid;

  // timing queue slot for a departure time, kept in t+1 .. t+2047
  function automatic logic [TQ_W-1:0] tq_slot(input rtime_t dt, input rtime_t now);
    rtime_t d;
    d = dt - now;
    if (d == '0 || d[TIME_W-1])      return TQ_W'(now + 1'b1);
    else if (d > rtime_t'(NTQ - 1))  return TQ_W'(now + rtime_t'(NTQ - 1));
    else                             return TQ_W'(dt);
  endfunction

  logic [16:0] bo_sum;
  assign bo_sum = {1'b0, s_bo} + {1'b0, w_len};
  bo_t bo_left;
  assign bo_left = s_bo - s_len;

  // ---------------------------------------------------------------- memory control
  always_comb begin
    m1_en = 1'b0; m1_we = 1'b0; m1_addr = '0; m1_wd = '0;
    m2_en = 1'b0; m2_we = 1'b0; m2_addr = '0; m2_wd = '0;
    ml_en = 1'b0; ml_we = 1'b0; ml_addr = '0; ml_wd = '0;
    if (!init_done) begin
      m1_en = 1'b1; m1_we = 1'b1; m1_addr = icnt;
      if (icnt >= A1'(VM1_ADB) && icnt < A1'(VM1_ADB + NSLOT))
        m1_wd = 16'(icnt - A1'(VM1_ADB - 1)) & 16'(NSLOT - 1);
      else if (icnt == A1'(VM1_IAHPB))
        m1_wd = 16'd1;
      if (icnt < A1'(VM2_DEPTH)) begin
        m2_en = 1'b1; m2_we = 1'b1; m2_addr = A2'(icnt);
        m2_wd = (icnt == A1'(VM2_IATPB)) ? 16'(NSLOT - 1) : 16'd0;
      end
    end else begin
      case (fq)
        FN_DECISION: if (step == 4'd0) begin
          m1_en = 1'b1; m1_addr = a1(VM1_FIB, 16'(w_fid));
        end
        FN_WIN: case (step)
          4'd0: begin
            m2_en = 1'b1; m2_addr = a2(VM2_FTPB, 16'(w_fid));
            m1_en = 1'b1; m1_we = 1'b1; m1_addr = a1(VM1_FIB, 16'(w_fid)); m1_wd = bo_sum[15:0];
            ml_en = 1'b1; ml_we = 1'b1; ml_addr = fslot; ml_wd = w_len;
          end
          4'd1: begin
            m1_en = 1'b1; m1_we = 1'b1;
            if (s_bo != '0) begin m1_addr = a1(VM1_ADB, 16'(m2_rd[SLOT_W-1:0])); end
            else            begin m1_addr = a1(VM1_FHPB, 16'(w_fid)); end
            m1_wd = 16'(fslot);
            m2_en = 1'b1; m2_we = 1'b1; m2_addr = a2(VM2_FTPB, 16'(w_fid)); m2_wd = 16'(fslot);
          end
          4'd2: if (fcnt != '0) begin
            m1_en = 1'b1; m1_addr = A1'(VM1_IAHPB);
          end
          4'd3: if (fcnt != '0) begin
            m1_en = 1'b1; m1_addr = a1(VM1_ADB, 16'(m1_rd[SLOT_W-1:0]));
          end
          4'd4: if (fcnt != '0) begin
            m1_en = 1'b1; m1_we = 1'b1; m1_addr = A1'(VM1_IAHPB); m1_wd = m1_rd;
          end
          default: ;
        endcase
        FN_ADDPT: case (step)
          4'd0: begin
            m1_en = 1'b1; m1_addr = a1(VM1_THPB, 16'(tq_slot(p_dt, rt)));
            m2_en = 1'b1; m2_addr = a2(VM2_TTPB, 16'(tq_slot(p_dt, rt)));
          end
          4'd1: begin
            if (m1_rd[VBIT]) begin
              m2_en = 1'b1; m2_we = 1'b1; m2_addr = a2(VM2_NPB, 16'(m2_rd[FID_W-1:0]));
              m2_wd = 16'(s_fid);
            end else begin
              m1_en = 1'b1; m1_we = 1'b1; m1_addr = a1(VM1_THPB, 16'(s_tq)); m1_wd = vfid(s_fid);
            end
          end
          4'd2: begin
            m2_en = 1'b1; m2_we = 1'b1; m2_addr = a2(VM2_TTPB, 16'(s_tq)); m2_wd = vfid(s_fid);
          end
          default: ;
        endcase
        FN_ADDTD: case (step)
          4'd0: begin
            m1_en = 1'b1; m1_addr = a1(VM1_THPB, 16'(s_tq));
            m2_en = 1'b1; m2_addr = a2(VM2_TTPB, 16'(s_tq));
          end
          4'd1: begin
            m1_en = 1'b1; m1_addr = A1'(VM1_DHPB);
            m2_en = 1'b1; m2_addr = A2'(VM2_DTPB);
          end
          4'd2: if (s_h[VBIT]) begin
            if (!m1_rd[VBIT]) begin
              m1_en = 1'b1; m1_we = 1'b1; m1_addr = A1'(VM1_DHPB); m1_wd = s_h;
              m2_en = 1'b1; m2_we = 1'b1; m2_addr = A2'(VM2_DTPB); m2_wd = s_t;
            end else begin
              m2_en = 1'b1; m2_we = 1'b1; m2_addr = a2(VM2_NPB, 16'(m2_rd[FID_W-1:0]));
              m2_wd = 16'(s_h[FID_W-1:0]);
            end
          end
          4'd3: if (s_h[VBIT]) begin
            m1_en = 1'b1; m1_we = 1'b1; m1_addr = a1(VM1_THPB, 16'(s_tq)); m1_wd = 16'd0;
            if (s_dh[VBIT]) begin
              m2_en = 1'b1; m2_we = 1'b1; m2_addr = A2'(VM2_DTPB); m2_wd = s_t;
            end
          end
          default: ;
        endcase
        FN_SPD: case (step)
          4'd0: begin
            m1_en = 1'b1; m1_addr = A1'(VM1_DHPB);
            m2_en = 1'b1; m2_addr = A2'(VM2_DTPB);
          end
          4'd1: if (m1_rd[VBIT]) begin
            m2_en = 1'b1; m2_addr = a2(VM2_NPB, 16'(m1_rd[FID_W-1:0]));
            m1_en = 1'b1; m1_addr = a1(VM1_FHPB, 16'(m1_rd[FID_W-1:0]));
          end
          4'd2: if (s_dep) begin
            m1_en = 1'b1; m1_we = 1'b1; m1_addr = A1'(VM1_DHPB);
            if (s_fid == s_dt[FID_W-1:0]) begin
              m1_wd = 16'd0;
              m2_en = 1'b1; m2_we = 1'b1; m2_addr = A2'(VM2_DTPB); m2_wd = 16'd0;
            end else begin
              m1_wd = vfid(m2_rd[FID_W-1:0]);
            end
            ml_en = 1'b1; ml_addr = m1_rd[SLOT_W-1:0];
          end
          4'd3: begin
            if (s_dep) begin m1_en = 1'b1; m1_addr = a1(VM1_ADB, 16'(s_a)); end
            m2_en = 1'b1; m2_addr = A2'(VM2_IATPB);
          end
          4'd4: if (s_dep) begin
            m1_en = 1'b1; m1_addr = a1(VM1_FIB, 16'(s_fid));
            ml_en = 1'b1; ml_addr = m1_rd[SLOT_W-1:0];
          end
          4'd5: if (s_dep && m1_rd != 16'(s_len)) begin
            m1_en = 1'b1; m1_we = 1'b1; m1_addr = a1(VM1_FHPB, 16'(s_fid)); m1_wd = 16'(s_na);
          end
          4'd6: if (s_dep) begin
            m1_en = 1'b1; m1_we = 1'b1; m1_addr = a1(VM1_FIB, 16'(s_fid)); m1_wd = bo_left;
          end
          4'd7: if (rel_valid && fvalid) begin
            m1_en = 1'b1; m1_we = 1'b1; m1_wd = 16'(rel_slot);
            m1_addr = (fcnt == '0) ? A1'(VM1_IAHPB) : a1(VM1_ADB, 16'(s_iat[SLOT_W-1:0]));
            m2_en = 1'b1; m2_we = 1'b1; m2_addr = A2'(VM2_IATPB); m2_wd = 16'(rel_slot);
          end
          default: ;
        endcase
        default: ;
      endcase
    end
  end

  // ---------------------------------------------------------------- sequencing
  always_comb begin
    case (fq)
      FN_DECISION: last_step = 4'(CYC_DECISION - 1);
      FN_WIN:      last_step = 4'(CYC_WIN - 1);
      FN_ADDPT:    last_step = 4'(CYC_ADDPT - 1);
      FN_ADDTD:    last_step = 4'(CYC_ADDTD - 1);
      FN_SPD:      last_step = 4'(CYC_SPD - 1);
      default:     last_step = 4'd0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt <= '0; init_done <= 1'b0; fq <= FN_NONE; step <= '0;
      win_pend <= 1'b0; w_fid <= '0; w_hit <= 1'b0; w_len <= '0;
      fslot <= '0; fvalid <= 1'b0; fcnt <= '0; rel_valid <= 1'b0; rel_slot <= '0;
      rdq <= 1'b0; td_next <= '0;
      s_fid <= '0; s_bo <= '0; s_len <= '0; s_lnext <= '0; s_acc <= 1'b0;
      s_h <= '0; s_t <= '0; s_dh <= '0; s_dt <= '0; s_a <= '0; s_na <= '0; s_iat <= '0;
      s_tq <= '0; p_dt <= '0; s_dep <= 1'b0;
      dtq_push <= 1'b0; dtq_data <= '0; dtr_ack <= 1'b0;
      out_valid <= 1'b0; out_desc <= '0; tail_drop <= 1'b0;
    end else begin
      dtq_push  <= 1'b0;
      dtr_ack   <= 1'b0;
      tail_drop <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;

      if (arr_go) begin
        win_pend <= 1'b1;
        w_fid    <= arr_fid;
        w_hit    <= arr_hit;
        w_len    <= arr_len;
      end

      if (!init_done) begin
        icnt <= icnt + 1'b1;
        if (icnt == A1'(VM1_DEPTH - 1)) begin
          init_done <= 1'b1;
          fslot     <= '0;
          fvalid    <= 1'b1;
          fcnt      <= (SLOT_W+1)'(NSLOT - 1);
          td_next   <= rt + 1'b1;
        end
      end else if (fq == FN_NONE) begin
        if (go) begin
          fq   <= fn;
          step <= '0;
          case (fn)
            FN_DECISION: win_pend <= 1'b0;
            FN_ADDPT: begin
              s_fid   <= dtr_fid;
              p_dt    <= dtr_dt;
              dtr_ack <= 1'b1;
            end
            FN_ADDTD: s_tq <= td_next[TQ_W-1:0];
            default: ;
          endcase
        end
      end else begin
        step <= step + 1'b1;
        // ------------------------------------------------ per-step updates
        case (fq)
          FN_DECISION: case (step)
            4'd1: s_bo <= m1_rd;
            4'd2: s_acc <= w_hit && fvalid && (bo_sum <= {1'b0, qmax[w_fid]});
            default: ;
          endcase
          FN_WIN: case (step)
            4'd2: if (fcnt == '0) fvalid <= 1'b0;
            4'd3: if (fcnt != '0) s_a <= m1_rd[SLOT_W-1:0];
            4'd4: if (fcnt != '0) begin
              fslot <= s_a;
              fcnt  <= fcnt - 1'b1;
            end
            4'd5: if (s_bo == '0) begin
              dtq_push <= 1'b1;
              dtq_data <= '{fid: w_fid, len: w_len, bo: bo_sum[15:0]};
            end
            default: ;
          endcase
          FN_ADDPT: case (step)
            4'd0: s_tq <= tq_slot(p_dt, rt);
            default: ;
          endcase
          FN_ADDTD: case (step)
            4'd1: begin s_h <= m1_rd; s_t <= m2_rd; end
            4'd2: begin s_dh <= m1_rd; if (s_h[VBIT]) rdq <= 1'b1; end
            4'd4: td_next <= td_next + 1'b1;
            default: ;
          endcase
          FN_SPD: case (step)
            4'd1: begin
              s_dh  <= m1_rd;
              s_dt  <= m2_rd;
              s_fid <= m1_rd[FID_W-1:0];
              s_dep <= m1_rd[VBIT];
            end
            4'd2: if (s_dep) begin
              s_a <= m1_rd[SLOT_W-1:0];
              if (s_fid == s_dt[FID_W-1:0]) rdq <= 1'b0;
            end
            4'd3: if (s_dep) s_len <= ml_rd;
            4'd4: begin
              s_iat <= m2_rd;
              if (s_dep) s_na <= m1_rd[SLOT_W-1:0];
            end
            4'd5: if (s_dep) begin
              s_bo    <= m1_rd;
              s_lnext <= ml_rd;
            end
            4'd7: begin
              if (rel_valid) begin
                if (!fvalid) begin
                  fslot  <= rel_slot;
                  fvalid <= 1'b1;
                end else begin
                  fcnt <= fcnt + 1'b1;
                end
              end
              rel_valid <= s_dep;
              rel_slot  <= s_a;
            end
            4'd8: if (s_dep) begin
              out_valid <= 1'b1;
              out_desc  <= '{fid: s_fid, slot: s_a, len: s_len};
              if (bo_left != '0) begin
                dtq_push <= 1'b1;
                dtq_data <= '{fid: s_fid, len: s_lnext, bo: bo_left};
              end
            end
            default: ;
          endcase
          default: ;
        endcase
        if (step == last_step) begin
          step <= '0;
          if (fq == FN_DECISION && s_acc) fq <= FN_WIN;
          else begin
            fq <= FN_NONE;
            if (fq == FN_DECISION) tail_drop <= 1'b1;
          end
        end
      end
    end
  end

  // a departure time request is only made for a flow that has none pending
  a_dtq_room: assert property (@(posedge clk) disable iff (!rst_n) dtq_push |-> !dtq_full)
    else $error("queue_control: departure time request queue overflow");
endmodule
