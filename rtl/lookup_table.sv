// lookup_table: per-flow look-up table of the shaper.
//
// Holds, for each of the NFLOW flows, the srRAS parameters (CIR, MIR, CIR_th,
// MIR_th), the smoothing constant K, the srTCM parameters (CIR, CBS, EBS,
// colour mode), the AF class used when marking, the mode bit (G-srRAS status
// on/off), the tail-drop limit, and the estimator state EAR(t-1) and the time
// of the previous arrival. The microprocessor writes any field through
// cfg_wr; the arrival-rate estimator writes the state through its own port
// (which wins if both hit the same flow in one clock). All flows are read in
// parallel through the array outputs. bkt_init pulses for a flow whenever its
// CBS or EBS is written, so that its token buckets restart full (Bc=CBS,
// Be=EBS). Field numbering is this design's choice (lut_field_e).
module lookup_table
  import ras_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  cfg_wr_t   cfg_wr,
  input  logic      est_we,
  input  fid_t      est_fid,
  input  rate_t     est_ear,
  input  rtime_t    est_last,
  input  fid_t      rd_fid,
  input  logic [3:0] rd_field,
  output logic [31:0] rd_data,
  output flow_cfg_t cfg  [NFLOW],
  output rate_t     ear  [NFLOW],
  output rtime_t    last [NFLOW],
  output logic [NFLOW-1:0] bkt_init
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NFLOW; i++) begin
        cfg[i] <= '0; ear[i] <= '0; last[i] <= '0;
      end
      bkt_init <= '0;
    end else begin
      bkt_init <= '0;
      if (cfg_wr.lut_we) begin
        case (lut_field_e'(cfg_wr.field))
          F_CIR:     cfg[cfg_wr.fid].cir     <= rate_t'(cfg_wr.data);
          F_MIR:     cfg[cfg_wr.fid].mir     <= rate_t'(cfg_wr.data);
          F_CIR_TH:  cfg[cfg_wr.fid].cir_th  <= bo_t'(cfg_wr.data);
          F_MIR_TH:  cfg[cfg_wr.fid].mir_th  <= bo_t'(cfg_wr.data);
          F_K:       cfg[cfg_wr.fid].k       <= rtime_t'(cfg_wr.data);
          F_QMAX:    cfg[cfg_wr.fid].qmax    <= bo_t'(cfg_wr.data);
          F_MODE: begin
            cfg[cfg_wr.fid].g_mode      <= cfg_wr.data[0];
            cfg[cfg_wr.fid].color_aware <= cfg_wr.data[1];
          end
          F_TCM_CIR: cfg[cfg_wr.fid].tcm_cir <= rate_t'(cfg_wr.data);
          F_CBS: begin
            cfg[cfg_wr.fid].cbs <= cfg_wr.data[BYTE_CFG_W-1:0];
            bkt_init[cfg_wr.fid] <= 1'b1;
          end
          F_EBS: begin
            cfg[cfg_wr.fid].ebs <= cfg_wr.data[BYTE_CFG_W-1:0];
            bkt_init[cfg_wr.fid] <= 1'b1;
          end
          F_CLASS:   cfg[cfg_wr.fid].af_class <= cfg_wr.data[1:0];
          F_EAR:     ear[cfg_wr.fid]  <= rate_t'(cfg_wr.data);
          F_LAST:    last[cfg_wr.fid] <= rtime_t'(cfg_wr.data);
          default: ;
        endcase
      end
      if (est_we) begin
        ear[est_fid]  <= est_ear;
        last[est_fid] <= est_last;
      end
    end
  end

  always_comb begin
    case (lut_field_e'(rd_field))
      F_CIR:     rd_data = 32'(cfg[rd_fid].cir);
      F_MIR:     rd_data = 32'(cfg[rd_fid].mir);
      F_CIR_TH:  rd_data = 32'(cfg[rd_fid].cir_th);
      F_MIR_TH:  rd_data = 32'(cfg[rd_fid].mir_th);
      F_K:       rd_data = 32'(cfg[rd_fid].k);
      F_QMAX:    rd_data = 32'(cfg[rd_fid].qmax);
      F_MODE:    rd_data = {30'd0, cfg[rd_fid].color_aware, cfg[rd_fid].g_mode};
      F_TCM_CIR: rd_data = 32'(cfg[rd_fid].tcm_cir);
      F_CBS:     rd_data = 32'(cfg[rd_fid].cbs);
      F_EBS:     rd_data = 32'(cfg[rd_fid].ebs);
      F_CLASS:   rd_data = 32'(cfg[rd_fid].af_class);
      F_EAR:     rd_data = 32'(ear[rd_fid]);
      F_LAST:    rd_data = 32'(last[rd_fid]);
      default:   rd_data = 32'd0;
    endcase
  end
endmodule
