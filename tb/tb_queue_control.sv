// tb_queue_control: the queue control block with a timing control arbiter, a
// real-time counter in the test (one timeslot per 64 clocks), a model of the
// DT calculator (answers each request with t + a random delay) and a model of
// the output side (takes a descriptor and stays busy for a while).
// Checks: after initialisation all 2048 slots are free; arrivals are accepted
// or tail-dropped exactly as a per-flow byte-count model says; packets leave
// per flow in arrival order with their slot and length; none leaves before
// its departure time; a DT request is made exactly when a packet becomes head
// of its flow; Decision, Win, ADDPT, ADDTD and SPD take 6, 8, 7, 7 and 9
// clocks; when departures are held the free slots run out (slot_valid low)
// and all come back once the queues drain.
module tb_queue_control;
  import ras_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init_done, arr_go, arr_hit, slot_valid, slot_busy, dtq_push, dtq_full, dtr_valid,
        dtr_ack, req_addtd, req_addpt, req_win, req_spd, busy, go, out_valid, out_ready, tail_drop;
  rtime_t rt, dtr_dt;
  fid_t arr_fid, dtr_fid;
  len_t arr_len;
  slot_t slot;
  bo_t qmax [NFLOW];
  dt_req_t dtq_data;
  qfn_e fn, cur_fn;
  pkt_desc_t out_desc;
  logic [SLOT_W:0] free_slots;

  queue_control dut (.*);
  timing_control u_tc (.clk, .rst_n, .req_addtd, .req_addpt, .req_win, .req_spd, .busy, .go, .fn);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // real time
  int pre = 0;
  always @(posedge clk) if (init_done) begin
    if (pre == 63) begin pre <= 0; rt <= rt + 1'b1; end else pre <= pre + 1;
  end

  // DT calculator model
  dt_req_t dq [$];
  rtime_t  flow_dt [NFLOW];
  int      dt_wait = 0;
  int      maxdelay = 30;
  assign dtq_full = dq.size() >= NFLOW;
  always @(posedge clk) if (rst_n) begin
    if (dtq_push) dq.push_back(dtq_data);
    if (dtr_ack) begin
      flow_dt[dtr_fid] = dtr_dt;
      void'(dq.pop_front());
      dtr_valid <= 1'b0;
      dt_wait = $urandom_range(2, 20);
    end else if (!dtr_valid && dq.size() > 0) begin
      if (dt_wait > 0) dt_wait--;
      else begin
        dtr_valid <= 1'b1; dtr_fid <= dq[0].fid;
        dtr_dt <= rt + rtime_t'($urandom_range(0, maxdelay));
      end
    end
  end

  // reference flow queues
  typedef struct { slot_t s; len_t l; } ent_t;
  ent_t fq [NFLOW][$];
  int   bo [NFLOW];
  bit   hold = 0;
  // arrival counted in the model but not yet in the design
  bit   pend = 0;
  int   pend_f = 0, pend_l = 0;
  int   out_busy = 0;
  int   ndep = 0, nreq_exp = 0, nreq = 0;
  assign out_ready = !hold && out_busy == 0;
  // a departure is taken off the model when its descriptor appears, which is
  // when the design has taken it off its flow information word
  bit ov_q = 0;
  always @(posedge clk) if (rst_n) begin
    ov_q <= out_valid && !(out_valid && out_ready);
    if (out_busy > 0) out_busy <= out_busy - 1;
    if (out_valid && !ov_q) begin
      ent_t e;
      int f;
      f = int'(out_desc.fid);
      ndep++;
      check(fq[f].size() > 0, "departure of a queued flow");
      if (fq[f].size() > 0) begin
        e = fq[f].pop_front();
        check(out_desc.slot == e.s && out_desc.len == e.l,
              $sformatf("departure in arrival order: flow %0d slot %0d len %0d", f, out_desc.slot, out_desc.len));
        bo[f] -= int'(e.l);
        if (fq[f].size() > 0) nreq_exp++;
      end
      check(rtime_t'(rt - flow_dt[f]) < 16'h8000, $sformatf("departed at %0d before DT %0d", rt, flow_dt[f]));
    end
    if (out_valid && out_ready) out_busy <= $urandom_range(0, 60);
    // checked after the departure of the same clock has been taken off
    if (dtq_push) begin
      nreq++;
      check(fq[dtq_data.fid].size() > 0 && dtq_data.len == fq[dtq_data.fid][0].l &&
            int'(dtq_data.bo) == bo[dtq_data.fid] - ((pend && pend_f == int'(dtq_data.fid) && fq[dtq_data.fid].size() > 1) ? pend_l : 0),
            $sformatf("DT request flow %0d len %0d bo %0d", dtq_data.fid, dtq_data.len, dtq_data.bo));
    end
  end

  // function lengths
  qfn_e prev_fn = FN_NONE;
  int   run = 0;
  always @(posedge clk) if (rst_n) begin
    if (cur_fn != prev_fn) begin
      if (prev_fn != FN_NONE) begin
        int want;
        case (prev_fn)
          FN_DECISION: want = CYC_DECISION; FN_WIN: want = CYC_WIN; FN_ADDPT: want = CYC_ADDPT;
          FN_ADDTD: want = CYC_ADDTD; default: want = CYC_SPD;
        endcase
        check(run == want, $sformatf("function %0d took %0d clocks", prev_fn, run));
      end
      run = 1;
    end else run++;
    prev_fn = cur_fn;
  end

  task automatic arrive(input int f, input bit hit, input int len, output bit acc);
    slot_t s;
    while (slot_busy || !slot_valid) @(negedge clk);
    s = slot;
    @(negedge clk);
    arr_go = 1; arr_fid = fid_t'(f); arr_hit = hit; arr_len = len_t'(len);
    // the design decides when Decision runs, after any departure in progress
    @(negedge clk); arr_go = 0;
    while (dut.fq != FN_DECISION) @(negedge clk);
    acc = hit && (bo[f] + len <= int'(qmax[f]));
    if (acc) begin
      fq[f].push_back('{s, len_t'(len)});
      if (fq[f].size() == 1) nreq_exp++;
      bo[f] += len;
      pend = 1; pend_f = f; pend_l = len;
    end
    while (slot_busy) @(negedge clk);
    pend = 0;
  endtask

  initial begin
    static int ntail = 0;
    bit acc;
    arr_go = 0; arr_fid = 0; arr_hit = 0; arr_len = 0; rt = 0; dtr_valid = 0; dtr_fid = 0; dtr_dt = 0;
    for (int f = 0; f < NFLOW; f++) begin qmax[f] = bo_t'((f < 4) ? 1500 : 60000); bo[f] = 0; flow_dt[f] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    wait (init_done);
    @(negedge clk);
    check(free_slots == (SLOT_W + 1)'(NSLOT), "all slots free after init");
    // phase 1: random traffic
    for (int n = 0; n < 1500; n++) begin
      int f, len;
      bit hit;
      f = $urandom_range(0, 7); len = $urandom_range(40, 600); hit = ($urandom_range(0, 19) != 0);
      arrive(f, hit, len, acc);
      if (!acc) ntail++;
      repeat ($urandom_range(0, 40)) @(negedge clk);
    end
    // phase 2: hold the output and fill the packet memory
    hold = 1; maxdelay = 3;
    begin
      static int n = 0;
      while (slot_valid && n < 2200) begin
        arrive(4 + (n % 4), 1, 40, acc);
        n++;
      end
      repeat (10) @(negedge clk);
      check(!slot_valid && free_slots == 0, $sformatf("free slots exhausted after %0d arrivals", n));
    end
    hold = 0;
    // drain
    begin
      static int idle = 0;
      while (idle < 20000) begin
        @(negedge clk);
        if (out_valid || dut.rdq || dq.size() > 0 || dtr_valid) idle = 0; else idle++;
      end
    end
    for (int f = 0; f < NFLOW; f++) check(fq[f].size() == 0, $sformatf("flow %0d not drained", f));
    check(free_slots >= (SLOT_W + 1)'(NSLOT - 1), $sformatf("free slots back: %0d", free_slots));
    check(nreq == nreq_exp, $sformatf("DT requests %0d expected %0d", nreq, nreq_exp));
    check(ntail > 0, "tail drops seen");
    $display("departures %0d tail drops %0d", ndep, ntail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
