// tb_srras_top: end-to-end test of the shaper at its default sizes.
//
// A packet memory model (2^20 words) sits on the pm_* ports. After the queue
// memories are initialised the test configures four flows over the
// microprocessor bus: flow 0 srRAS colour-blind, flow 1 G-srRAS colour-blind,
// flow 2 colour-aware with a small tail-drop limit, flow 3 colour-aware with
// congestion raised for red pre-coloured packets. It then sends bursts of UDP
// packets of these flows plus packets of an unknown flow, receives the output
// with a random ready pattern and checks: every packet that was neither
// dropped nor discarded comes out once, in order within its flow, with its
// payload intact, and with the DSCP equal to the AF codepoint of its flow's
// class and the colour reported by the meter. It counts how often each
// mechanism happened (tail drop, unknown flow, the three shaping-rate
// regions, G-srRAS choosing T2, green/yellow/red marks, discard, timing queue
// and departure queue appends, input drop once the output has been held until
// every packet-memory slot is taken) and fails for any that never did.
module tb_srras_top;
  import ras_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_sop, in_eop, out_valid, out_ready, out_sop, out_eop;
  logic [31:0] in_data, out_data, cpu_wdata, cpu_rdata, pm_wdata, pm_rdata;
  logic cpu_cs, cpu_we, congestion, pm_we, pm_re, init_done;
  logic [11:0] cpu_addr;
  logic [PM_ADDR_W-1:0] pm_waddr, pm_raddr;
  rtime_t rt;
  logic ev_in_drop, ev_tail_drop, ev_mark, ev_mark_discard;
  color_e ev_mark_color;
  qfn_e ev_fn;

  srras_top dut (.*);

  // packet memory model
  logic [31:0] pmem [1 << PM_ADDR_W];
  always_ff @(posedge clk) begin
    if (pm_we) pmem[pm_waddr] <= pm_wdata;
    if (pm_re) pm_rdata <= pmem[pm_raddr];
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (rdq=%0d dt_state=%0d fn=%0d pending=%0d/%0d/%0d/%0d)", dut.u_qc.rdq,
             dut.u_dt.st, dut.u_qc.fq, exp_q[0].size(), exp_q[1].size(), exp_q[2].size(), exp_q[3].size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cpu_write(input logic [3:0] region, input int fid, input int field, input int data);
    @(negedge clk);
    cpu_cs = 1; cpu_we = 1; cpu_addr = {region, 4'(fid), 4'(field)}; cpu_wdata = data;
    @(negedge clk);
    cpu_cs = 0; cpu_we = 0;
  endtask

  localparam int NF = 4;
  int cls [NF] = '{0, 1, 2, 3};

  task automatic config_flow(input int f, input bit g, input bit aware, input int qmax);
    cpu_write(REG_LUT, f, F_CIR, 16 * 256);
    cpu_write(REG_LUT, f, F_MIR, 64 * 256);
    cpu_write(REG_LUT, f, F_CIR_TH, 400);
    cpu_write(REG_LUT, f, F_MIR_TH, 1200);
    cpu_write(REG_LUT, f, F_K, 16);
    cpu_write(REG_LUT, f, F_QMAX, qmax);
    cpu_write(REG_LUT, f, F_MODE, {30'd0, aware, g});
    cpu_write(REG_LUT, f, F_TCM_CIR, 8 * 256);
    cpu_write(REG_LUT, f, F_CBS, 600);
    cpu_write(REG_LUT, f, F_EBS, 600);
    cpu_write(REG_LUT, f, F_CLASS, cls[f]);
    cpu_write(REG_SRCH, f, S_SA, 32'h0a00_0000 + f);
    cpu_write(REG_SRCH, f, S_DA, 32'h0b00_0001);
    cpu_write(REG_SRCH, f, S_PROTO, 17);
    cpu_write(REG_SRCH, f, S_PORTS, {16'(1000 + f), 16'd2000});
    cpu_write(REG_SRCH, f, S_VALID, 1);
  endtask

  // expected packets per flow: sequence numbers in order
  int exp_q [NF][$];
  int sent_cnt = 0, unknown_cnt = 0;

  task automatic send_pkt(input int f, input int seq, input int len, input logic [5:0] dscp);
    int nw;
    logic [31:0] w;
    nw = (len + 3) / 4;
    for (int i = 0; i < nw; i++) begin
      case (i)
        0: w = {8'h45, dscp, 2'b00, 16'(len)};
        1: w = 32'h0000_4000;
        2: w = {8'd64, 8'd17, 16'h0};
        3: w = 32'h0a00_0000 + f;
        4: w = 32'h0b00_0001;
        5: w = {16'(1000 + f), 16'd2000};
        default: w = {8'(f), 12'(seq), 12'(i)};
      endcase
      @(negedge clk);
      in_valid = 1; in_data = w; in_sop = (i == 0); in_eop = (i == nw - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0; in_sop = 0; in_eop = 0;
  endtask

  // an arrival is decided once the header is taken and Decision/Win are over
  task automatic wait_decided();
    repeat (3) @(posedge clk);
    while (dut.arr_valid || dut.slot_busy) @(posedge clk);
    @(posedge clk);
  endtask

  // ------------------------------------------------------------ event counts
  int n_tail = 0, n_reg1 = 0, n_reg2 = 0, n_reg3 = 0, n_t2 = 0, n_green = 0,
      n_yellow = 0, n_red = 0, n_disc = 0, n_tq_app = 0, n_dq_app = 0, n_marks = 0, n_in_drop = 0;
  int disc_fifo [$];

  always @(posedge clk) if (rst_n) begin
    if (ev_tail_drop) n_tail++;
    if (ev_in_drop) n_in_drop++;
    if (dut.u_dt.st == dut.u_dt.LOAD) begin
      if (dut.u_dt.r.bo < dut.u_dt.cfg.cir_th)      n_reg1++;
      else if (dut.u_dt.r.bo < dut.u_dt.cfg.mir_th) n_reg2++;
      else                                          n_reg3++;
    end
    if (dut.u_dt.st == dut.u_dt.T2DIV && dut.u_dt.dv_done && dut.u_dt.q1_c < dut.u_dt.q1) n_t2++;
    if (dut.u_dt.st == dut.u_dt.T1DIV && dut.u_dt.dv_done && dut.u_dt.g &&
        dut.u_dt.lq <= 36'(dut.u_dt.bc) && dut.u_dt.q1_c != 0) n_t2++;
    if (dut.u_qc.fq == FN_ADDPT && dut.u_qc.step == 1 && dut.u_qc.m1_rd[VBIT]) n_tq_app++;
    if (dut.u_qc.fq == FN_ADDTD && dut.u_qc.step == 3 && dut.u_qc.s_h[VBIT] && dut.u_qc.s_dh[VBIT]) n_dq_app++;
    if (ev_mark) begin
      n_marks++;
      if (ev_mark_discard) n_disc++;
      else case (ev_mark_color)
        GREEN: n_green++;
        YELLOW: n_yellow++;
        default: n_red++;
      endcase
    end
  end

  // colours reported by the meter, in output order (discarded packets removed)
  color_e col_q [$];
  int     fid_of_mark [$];
  always @(posedge clk) if (rst_n && ev_mark) begin
    if (!ev_mark_discard) begin
      col_q.push_back(ev_mark_color);
      fid_of_mark.push_back(int'(dut.u_mk.cur.fid));
    end else begin
      disc_fifo.push_back(int'(dut.u_mk.cur.fid));
    end
  end

  // ------------------------------------------------------------ receiver
  int rx_pkts = 0;
  logic [31:0] rx_words [$];
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      if (out_sop) rx_words = {};
      rx_words.push_back(out_data);
      if (out_eop) begin
        int f, len, seq;
        color_e c;
        logic [5:0] d;
        rx_pkts++;
        len = int'(rx_words[0][15:0]);
        check(rx_words.size() == (len + 3) / 4, "packet word count");
        f = int'(rx_words[3] - 32'h0a00_0000);
        seq = (rx_words.size() > 6) ? int'(rx_words[6][23:12]) : -1;
        check(col_q.size() > 0, "a colour for every output packet");
        if (col_q.size() > 0) begin
          c = col_q.pop_front();
          void'(fid_of_mark.pop_front());
          d = af_dscp(2'(cls[f]), c);
          check(rx_words[0][23:18] == d, $sformatf("DSCP of flow %0d: %b expected %b", f, rx_words[0][23:18], d));
        end
        // order within the flow: drop expected entries that were discarded
        while (exp_q[f].size() > 0 && exp_q[f][0] != seq && disc_pending(f)) void'(exp_q[f].pop_front());
        check(exp_q[f].size() > 0 && exp_q[f][0] == seq,
              $sformatf("flow %0d order: got seq %0d", f, seq));
        if (exp_q[f].size() > 0 && exp_q[f][0] == seq) void'(exp_q[f].pop_front());
        for (int i = 6; i < rx_words.size(); i++)
          check(rx_words[i] == {8'(f), 12'(seq), 12'(i)}, "payload");
      end
    end
  end

  function automatic bit disc_pending(input int f);
    for (int i = 0; i < disc_fifo.size(); i++)
      if (disc_fifo[i] == f) begin
        disc_fifo.delete(i);
        return 1;
      end
    return 0;
  endfunction

  bit hold_out = 0;
  always @(negedge clk) out_ready = !hold_out && ($urandom_range(0, 3) != 0);

  // ------------------------------------------------------------ stimulus
  int seqn [NF] = '{0, 0, 0, 0};
  int tail_before;

  initial begin
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = 0;
    cpu_cs = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0; congestion = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    check(dut.u_qc.free_slots == (SLOT_W + 1)'(NSLOT), "all slots free after init");
    config_flow(0, 0, 0, 4000);
    config_flow(1, 1, 0, 4000);
    config_flow(2, 0, 1, 700);
    config_flow(3, 0, 1, 4000);

    // bursts
    for (int round = 0; round < 3; round++) begin
      for (int k = 0; k < 12; k++) begin
        for (int f = 0; f < NF; f++) begin
          int len;
          logic [5:0] pre;
          len = 64 + 4 * $urandom_range(0, 60);
          pre = (f == 3 && (k % 3 == 2)) ? 6'b001110 : ((k % 2) ? 6'b001100 : 6'b001010);
          tail_before = n_tail;
          congestion = (f == 3);
          send_pkt(f, seqn[f], len, pre);
          sent_cnt++;
          wait_decided();
          if (n_tail == tail_before) exp_q[f].push_back(seqn[f]);
          seqn[f]++;
        end
        if (k % 4 == 0) begin
          tail_before = n_tail;
          send_pkt(9, 0, 100, 6'b001010);
          unknown_cnt++;
          wait_decided();
          check(n_tail == tail_before + 1, "unknown flow dropped");
        end
      end
      repeat (20000) @(posedge clk);
      $display("round %0d done at rt=%0d", round, rt);
    end

    // long burst on flow 0 with slow rate estimation: the queue passes MIR_th
    cpu_write(REG_LUT, 0, F_K, 2000);
    for (int k = 0; k < 16; k++) begin
      tail_before = n_tail;
      send_pkt(0, seqn[0], 400, 6'b001010);
      sent_cnt++;
      wait_decided();
      if (n_tail == tail_before) exp_q[0].push_back(seqn[0]);
      seqn[0]++;
    end

    // fill the packet memory: output held, minimum-size packets on flow 1
    // until the input has to drop for want of a free slot
    hold_out = 1;
    cpu_write(REG_LUT, 1, F_QMAX, 65535);
    begin
      static int n = 0, drop_before;
      while (n_in_drop == 0 && n < NSLOT + 16) begin
        drop_before = n_in_drop;
        send_pkt(1, seqn[1], 28, 6'b001010);
        sent_cnt++;
        wait_decided();
        if (n_in_drop == drop_before) exp_q[1].push_back(seqn[1]);
        seqn[1]++;
        n++;
      end
      check(dut.u_qc.free_slots == 0, $sformatf("packet memory full after %0d packets", n));
    end
    hold_out = 0;

    // drain
    begin
      static int idle = 0;
      while (idle < 40000) begin
        @(posedge clk);
        if (out_valid || dut.u_qc.rdq || dut.u_dt.st != dut.u_dt.IDLE || !dut.dtq_empty || dut.qd_valid) idle = 0;
        else idle++;
      end
    end
    for (int f = 0; f < NF; f++)
      while (exp_q[f].size() > 0 && disc_pending(f)) void'(exp_q[f].pop_front());
    for (int f = 0; f < NF; f++)
      check(exp_q[f].size() == 0, $sformatf("flow %0d: %0d packets never left", f, exp_q[f].size()));
    check(dut.u_qc.free_slots == (SLOT_W + 1)'(NSLOT) || dut.u_qc.free_slots == (SLOT_W + 1)'(NSLOT - 1),
          "slots returned to the idle list");

    $display("sent=%0d unknown=%0d out=%0d tail_drop=%0d input_drop=%0d marks=%0d", sent_cnt, unknown_cnt, rx_pkts, n_tail, n_in_drop, n_marks);
    $display("SR regions %0d/%0d/%0d  T2 chosen %0d  green %0d yellow %0d red %0d discard %0d  tq-append %0d dq-append %0d",
             n_reg1, n_reg2, n_reg3, n_t2, n_green, n_yellow, n_red, n_disc, n_tq_app, n_dq_app);
    check(n_tail > unknown_cnt, "mechanism: tail drop at the flow limit");
    check(n_reg1 > 0, "mechanism: SR region BO < CIR_th");
    check(n_reg2 > 0, "mechanism: SR region CIR_th <= BO < MIR_th");
    check(n_reg3 > 0, "mechanism: SR region BO >= MIR_th");
    check(n_t2 > 0, "mechanism: G-srRAS departs at T2 before T1");
    check(n_green > 0, "mechanism: green mark");
    check(n_yellow > 0, "mechanism: yellow mark");
    check(n_red > 0, "mechanism: red mark");
    check(n_disc > 0, "mechanism: discard under congestion");
    check(n_tq_app > 0, "mechanism: timing queue append");
    check(n_dq_app > 0, "mechanism: departure queue append");
    check(n_in_drop > 0, "mechanism: input drop with the packet memory full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
