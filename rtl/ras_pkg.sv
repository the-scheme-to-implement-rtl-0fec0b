// ras_pkg: types and constants shared by the srRAS / G-srRAS shaper.
//
// Sizes that follow the design description: 16 flows, 16-bit virtual memory
// words, a 2k-entry address-management list (ADB) and a 2k-slot timing queue
// (THPB/TTPB), virtual memory 1 of 4131 words and virtual memory 2 of 2083
// words laid out block by block as in the memory map.
//
// Choices of this implementation: time is counted in timeslots of the real
// time counter (TIME_W bits, wrapping); rates are bytes per timeslot in
// unsigned Q12.8 fixed point; token bucket levels are bytes in Q20.8; buffer
// occupancy and packet length are whole bytes (16 bits); a packet memory slot
// holds up to 512 words of 32 bits (2048 bytes).
package ras_pkg;

  localparam int NFLOW   = 16;
  localparam int FID_W   = 4;
  localparam int SLOT_W  = 11;            // packet memory slots / ADB entries
  localparam int NSLOT   = 1 << SLOT_W;   // 2048
  localparam int TQ_W    = 11;            // timing queue slots (THPB/TTPB)
  localparam int NTQ     = 1 << TQ_W;     // 2048
  localparam int TIME_W  = 16;
  localparam int LEN_W   = 16;
  localparam int BO_W    = 16;
  localparam int RFRAC   = 8;
  localparam int RATE_W  = 20;            // Q12.8 bytes per timeslot
  localparam int BKT_W   = 28;            // Q20.8 bytes
  localparam int BYTE_CFG_W = 20;         // CBS / EBS in bytes
  localparam int WORD_W  = 32;
  localparam int PM_OFF_W = 9;            // words per packet memory slot = 512
  localparam int PM_ADDR_W = SLOT_W + PM_OFF_W;
  localparam int VM_W    = 16;

  // Virtual memory 1 map (4131 x 16)
  localparam int VM1_DEPTH = 4131;
  localparam int VM1_THPB  = 0;      // 2k timing queue head pointers
  localparam int VM1_ADB   = 2048;   // 2k next-address links
  localparam int VM1_FHPB  = 4096;   // 16 flow queue head pointers
  localparam int VM1_FIB   = 4112;   // 16 flow information words (bytes queued)
  localparam int VM1_IFHPB = 4128;   // reserved
  localparam int VM1_IAHPB = 4129;   // idle address list head
  localparam int VM1_DHPB  = 4130;   // departure queue head
  // Virtual memory 2 map (2083 x 16)
  localparam int VM2_DEPTH = 2083;
  localparam int VM2_TTPB  = 0;      // 2k timing queue tail pointers
  localparam int VM2_NPB   = 2048;   // 16 next-FID links
  localparam int VM2_FTPB  = 2064;   // 16 flow queue tail pointers
  localparam int VM2_IFTPB = 2080;   // reserved
  localparam int VM2_IATPB = 2081;   // idle address list tail
  localparam int VM2_DTPB  = 2082;   // departure queue tail

  // Valid flag of a FID-holding word (THPB, TTPB, DHPB, DTPB)
  localparam int VBIT = 15;

  typedef logic [FID_W-1:0]  fid_t;
  typedef logic [SLOT_W-1:0] slot_t;
  typedef logic [TIME_W-1:0] rtime_t;
  typedef logic [LEN_W-1:0]  len_t;
  typedef logic [BO_W-1:0]   bo_t;
  typedef logic [RATE_W-1:0] rate_t;
  typedef logic [BKT_W-1:0]  bkt_t;

  typedef enum logic [1:0] {GREEN = 2'd0, YELLOW = 2'd1, RED = 2'd2} color_e;

  // Per-flow configuration held in the look-up table
  typedef struct packed {
    rate_t  cir;          // srRAS committed information rate
    rate_t  mir;          // srRAS maximum information rate
    bo_t    cir_th;       // bytes
    bo_t    mir_th;       // bytes
    rtime_t k;            // smoothing constant K, timeslots
    bo_t    qmax;         // tail-drop limit of the flow queue, bytes
    logic   g_mode;       // 1: G-srRAS (status on), 0: srRAS (status off)
    logic   color_aware;  // srTCM mode
    rate_t  tcm_cir;      // srTCM committed information rate
    logic [BYTE_CFG_W-1:0] cbs;
    logic [BYTE_CFG_W-1:0] ebs;
    logic [1:0] af_class; // AF class 1..4 coded 0..3
  } flow_cfg_t;

  // Look-up table field numbers (microprocessor address bits [3:0])
  typedef enum logic [3:0] {
    F_CIR = 4'd0, F_MIR = 4'd1, F_CIR_TH = 4'd2, F_MIR_TH = 4'd3, F_K = 4'd4,
    F_QMAX = 4'd5, F_MODE = 4'd6, F_TCM_CIR = 4'd7, F_CBS = 4'd8, F_EBS = 4'd9,
    F_CLASS = 4'd10, F_EAR = 4'd11, F_LAST = 4'd12
  } lut_field_e;

  // Search table field numbers
  typedef enum logic [3:0] {
    S_SA = 4'd0, S_DA = 4'd1, S_PROTO = 4'd2, S_PORTS = 4'd3, S_VALID = 4'd4
  } srch_field_e;

  // Microprocessor address regions (address bits [11:8])
  localparam logic [3:0] REG_LUT  = 4'd0;
  localparam logic [3:0] REG_SRCH = 4'd1;

  // Registered configuration write, decoded by the microprocessor interface
  typedef struct packed {
    logic        lut_we;
    logic        srch_we;
    fid_t        fid;
    logic [3:0]  field;
    logic [31:0] data;
  } cfg_wr_t;

  // Fields extracted from the IPv4 header
  typedef struct packed {
    logic [31:0] sa;
    logic [31:0] da;
    logic [7:0]  proto;
    logic [15:0] spn;
    logic [15:0] dpn;
    len_t        len;
    logic [7:0]  tos;
  } ip_hdr_t;

  // Packet handed from the departure queue to the output side
  typedef struct packed {
    fid_t  fid;
    slot_t slot;
    len_t  len;
  } pkt_desc_t;

  // Request to the DT calculator: a packet has become head of its flow queue
  typedef struct packed {
    fid_t fid;
    len_t len;
    bo_t  bo;
  } dt_req_t;

  // Queue control functions and their lengths in clocks (Table-3 timing)
  typedef enum logic [2:0] {
    FN_NONE = 3'd0, FN_DECISION = 3'd1, FN_WIN = 3'd2, FN_ADDPT = 3'd3,
    FN_ADDTD = 3'd4, FN_SPD = 3'd5
  } qfn_e;
  localparam int CYC_DECISION = 6;
  localparam int CYC_WIN      = 8;
  localparam int CYC_ADDPT    = 7;
  localparam int CYC_ADDTD    = 7;
  localparam int CYC_SPD      = 9;

  // AF codepoint of Table-1 style: class in bits 5:3, drop precedence in 2:1
  function automatic logic [5:0] af_dscp(input logic [1:0] cls, input color_e c);
    logic [1:0] dp;
    case (c)
      GREEN:   dp = 2'b01;
      YELLOW:  dp = 2'b10;
      default: dp = 2'b11;
    endcase
    return {3'({1'b0, cls}) + 3'd1, dp, 1'b0};
  endfunction

  // Colour carried by an incoming AF codepoint (drop precedence bits 2:1)
  function automatic color_e dscp_color(input logic [5:0] dscp);
    case (dscp[2:1])
      2'b10:   return YELLOW;
      2'b11:   return RED;
      default: return GREEN;
    endcase
  endfunction

endpackage
