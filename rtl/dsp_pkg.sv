// dsp_pkg: constants, instruction encodings and the structs shared by the
// four-way VLIW DSP (two control/load-store fields 0/1, two SIMD ALU/MAC
// fields 2/3, ring-structure register file, hierarchical VLIW encoding).
//
// Fixed by the architecture: four fields, 1024-bit instruction bundles,
// 12-bit packet caps holding a 2-bit kind, 4-bit valid mask and 2-bit ring
// offset, at most 32 packets per bundle (so a 386-bit cap shifter), eight
// private plus eight shared registers per field, 32-bit data and 40-bit
// accumulators. This design's own choices: the bit order inside a cap, the
// 20-bit head {op, rd, ra, rb, tsz}, the opcode numbers, the tail layouts
// of the dispatcher instructions and the 30-bit program position format.
package dsp_pkg;

  localparam int NFU       = 4;
  localparam int BUNDLE_W  = 1024;
  localparam int CAP_W     = 12;
  localparam int MAX_PKTS  = 32;
  localparam int CAP_SR_W  = MAX_PKTS * CAP_W + 2;   // 386
  localparam int HEAD_W    = 20;
  localparam int REGS      = 8;                      // per sub-block
  localparam int DW        = 32;
  localparam int ACCW      = 40;
  localparam int BADDR_W   = 15;                     // 7-bit page, 8-bit bundle
  localparam int PIDX_W    = 5;
  localparam int PTR_W     = 10;
  localparam int POS_W     = BADDR_W + PIDX_W + PTR_W; // 30
  localparam int HADDR_W   = 14;                     // 16384 half-words = 32 KB

  // Leading two bits of a cap.
  typedef enum logic [1:0] {
    CAP_END = 2'b00,
    CAP_PKT = 2'b01,
    CAP_CTL = 2'b10,
    CAP_RSV = 2'b11
  } cap_kind_e;

  // Dispatcher instructions (cap bits [9:7]).
  typedef enum logic [2:0] {
    CTL_RPT  = 3'd0,
    CTL_J    = 3'd1,
    CTL_JAL  = 3'd2,
    CTL_JR   = 3'd3,
    CTL_BNEZ = 3'd4,
    CTL_TRAP = 3'd5
  } ctl_op_e;

  // Field opcodes (head bits [19:14]).
  typedef enum logic [5:0] {
    OP_NOP      = 6'd0,
    OP_ADDI     = 6'd1,
    OP_XOR      = 6'd2,
    OP_MOV32    = 6'd3,
    // fields 0/1
    OP_LH       = 6'd8,
    OP_SH       = 6'd9,
    OP_LW       = 6'd10,
    OP_SW       = 6'd11,
    OP_LH_D     = 6'd12,
    OP_SH_D     = 6'd13,
    OP_LW_D     = 6'd14,
    OP_SW_D     = 6'd15,
    OP_LH_V     = 6'd16,
    OP_SH_V     = 6'd17,
    // fields 2/3
    OP_MUL      = 6'd32,
    OP_MAC      = 6'd33,
    OP_ADD      = 6'd34,
    OP_SUB      = 6'd35,
    OP_AND      = 6'd36,
    OP_OR       = 6'd37,
    OP_SLL      = 6'd38,
    OP_SRL      = 6'd39,
    OP_SRA      = 6'd40,
    OP_BF2      = 6'd41,
    OP_MUL_V    = 6'd42,
    OP_MUL_16V  = 6'd43,
    OP_MAC_V    = 6'd44,
    OP_ADD_V    = 6'd45,
    OP_SUB_V    = 6'd46,
    OP_ABS_V    = 6'd47,
    OP_SRA_V    = 6'd48,
    OP_MIN_V    = 6'd49,
    OP_MAX_V    = 6'd50,
    OP_PACK     = 6'd51,
    // enhanced field only (uses all four multipliers)
    OP_CMUL     = 6'd52,
    OP_CMUL_16V = 6'd53,
    OP_CMAC     = 6'd54,
    OP_MUL32    = 6'd55,
    OP_MAC32    = 6'd56
  } op_e;

  // Program position: bundle, packet (cap) index and bit pointer of the
  // packet's first head measured from bit 0 of the bundle.
  typedef struct packed {
    logic [BADDR_W-1:0] bundle;
    logic [PIDX_W-1:0]  idx;
    logic [PTR_W-1:0]   ptr;
  } pos_t;

  // One field's decoded instruction word (head plus sign-extended tail).
  typedef struct packed {
    logic        valid;
    op_e         op;
    logic [3:0]  rd;
    logic [3:0]  ra;
    logic [3:0]  rb;
    logic [31:0] imm;
  } fu_ins_t;

  // A packet as issued to the datapath.
  typedef struct packed {
    logic                valid;      // a packet executes this cycle
    logic [1:0]          ring_off;
    fu_ins_t [NFU-1:0]   ins;
    logic                br_en;      // BNEZ/JR resolved by field 0 this cycle
    logic                br_is_jr;
    logic [3:0]          br_reg;
    pos_t                br_target;
    logic                link_we;    // JAL/TRAP link into r7 of field 0
    logic [31:0]         link_val;
  } packet_t;

  // Requests and responses of one 2R/2W register sub-block port group. Read
  // addresses and writes are kept apart so that read data never appears to
  // feed back into the read address.
  typedef struct packed {
    logic [1:0][2:0]      raddr;
  } rf_rreq_t;

  typedef struct packed {
    logic [1:0]           we;
    logic [1:0][2:0]      waddr;
    logic [1:0][ACCW-1:0] wdata;
  } rf_wreq_t;

  typedef struct packed {
    logic [1:0][ACCW-1:0] rdata;
  } rf_rsp_t;

  // One data-memory channel.
  typedef struct packed {
    logic               en;
    logic               we;
    logic               word;      // 1: 32-bit, 0: 16-bit
    logic [HADDR_W-1:0] addr;      // half-word address
    logic [31:0]        wdata;     // half-word stores use [15:0]
  } mem_req_t;

  // Multiplier operands are 17-bit signed so that unsigned 16-bit halves fit.
  typedef logic signed [16:0] mop_t;
  typedef logic signed [33:0] mprod_t;

  // 40-bit to 32-bit saturation used when a result lands in a 32-bit register.
  function automatic logic [31:0] sat32(input logic [ACCW-1:0] v);
    logic signed [ACCW-1:0] s;
    s = v;
    if (s > 40'sh007FFFFFFF)      return 32'h7FFF_FFFF;
    else if (s < -40'sh0080000000) return 32'h8000_0000;
    else                          return v[31:0];
  endfunction

  function automatic logic [ACCW-1:0] sext32(input logic [31:0] v);
    return {{(ACCW-32){v[31]}}, v};
  endfunction

endpackage
