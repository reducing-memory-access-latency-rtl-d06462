// emc_pkg: types and constants shared by the enhanced memory controller (EMC)
// and the core-side dependence-chain generation unit.
//
// A chain is a short list of decoded, renamed integer micro-ops (uops) that the
// home core ships to the EMC together with a vector of live-in values. Inside a
// chain every uop writes EMC physical register number == its position in the
// chain (the renaming counter of the chain generator), so a uop names its
// sources either as an earlier chain position (EPR) or as a live-in slot.
// The packed emc_uop_t is 48 bits (6 bytes), the micro-op size the design
// budgets on the interconnect in addition to the live-in data.
// Widths (64-bit data, 48-bit virtual, 40-bit physical address, 4 KB pages,
// 64-byte lines) are choices of this design except the 64-byte line size.
package emc_pkg;

  localparam int unsigned XLEN       = 64;  // integer register width
  localparam int unsigned VA_W       = 48;  // virtual address width
  localparam int unsigned PA_W       = 40;  // physical address width
  localparam int unsigned PAGE_W     = 12;  // 4 KB pages
  localparam int unsigned VPN_W      = VA_W - PAGE_W;
  localparam int unsigned PPN_W      = PA_W - PAGE_W;
  localparam int unsigned LINE_BYTES = 64;  // cache line size
  localparam int unsigned OFF_W      = 6;
  localparam int unsigned LINE_W     = LINE_BYTES * 8;
  localparam int unsigned LADDR_W    = PA_W - OFF_W;  // line address width

  localparam int unsigned NUM_CTX    = 2;   // issue contexts (quad-core system)
  localparam int unsigned CTX_W      = 1;
  localparam int unsigned CHAIN_LEN  = 16;  // uops per chain = EMC PRF size
  localparam int unsigned SLOT_W     = 4;
  localparam int unsigned LIVEIN_N   = 16;  // live-in slots per chain
  localparam int unsigned IMM_W      = 20;
  localparam int unsigned PCH_W      = 10;  // PC bits carried for the miss predictor
  localparam int unsigned CPR_W      = 8;   // 256 core physical registers

  // Operation codes. Integer add/sub/move/load/store, logical
  // and/or/xor/not/shift/sign-extend, and conditional branches (control uops
  // are shipped so the EMC can detect a wrong path). OP_OTHER stands for every
  // core uop the EMC cannot run (floating point, vector, ...).
  typedef enum logic [4:0] {
    OP_ADD  = 5'd0,
    OP_SUB  = 5'd1,
    OP_MOV  = 5'd2,   // dst = src1, or the immediate when src1 is absent
    OP_AND  = 5'd3,
    OP_OR   = 5'd4,
    OP_XOR  = 5'd5,
    OP_NOT  = 5'd6,
    OP_SHL  = 5'd7,
    OP_SHR  = 5'd8,
    OP_SAR  = 5'd9,
    OP_SEXT = 5'd10,  // sign-extend src1 from (8 << imm[1:0]) bits
    OP_LD   = 5'd11,  // dst = mem[src1 + src2 + imm]  (src2 optional)
    OP_ST   = 5'd12,  // mem[src1 + imm] = src2
    OP_BEQ  = 5'd13,  // branches compare src1 with src2 (or imm)
    OP_BNE  = 5'd14,
    OP_BLT  = 5'd15,  // signed
    OP_BGE  = 5'd16,  // signed
    OP_OTHER = 5'd31
  } emc_op_e;

  // Source operand of an EMC uop.
  typedef struct packed {
    logic              valid;   // operand used
    logic              livein;  // 1: live-in slot, 0: chain position (EPR)
    logic [SLOT_W-1:0] idx;
  } emc_src_t;

  // The 48-bit micro-op shipped to the EMC.
  typedef struct packed {
    emc_op_e            op;         // 5
    emc_src_t           src1;       // 6
    emc_src_t           src2;       // 6
    logic [IMM_W-1:0]   imm;        // 20, sign-extended on use
    logic               pred_taken; // 1, predicted direction of a branch
    logic [PCH_W-1:0]   pc;         // 10, low PC bits of the uop
  } emc_uop_t;

  // Uop as it leaves the front end: operands already read or tagged.
  typedef struct packed {
    logic [CTX_W-1:0]  ctx;
    logic [SLOT_W-1:0] slot;
    emc_uop_t          uop;
    logic              s1_rdy;
    logic [XLEN-1:0]   s1_val;
    logic              s2_rdy;
    logic [XLEN-1:0]   s2_val;
  } emc_disp_t;

  // Result / tag broadcast on one common data bus.
  typedef struct packed {
    logic              valid;
    logic [CTX_W-1:0]  ctx;
    logic [SLOT_W-1:0] slot;
    logic [XLEN-1:0]   data;
  } emc_cdb_t;

  // A ROB entry of the home core as the chain generator sees it. Operand
  // values of ready sources are readable (they become live-ins).
  typedef struct packed {
    logic              valid;
    emc_op_e           op;          // OP_OTHER: the EMC cannot execute it
    logic [1:0]        src_v;
    logic [1:0][CPR_W-1:0] src_cpr;     // core physical register tags
    logic [1:0]        src_rdy;     // value already computed at the core
    logic [1:0][XLEN-1:0] src_val;
    logic              dst_v;
    logic [CPR_W-1:0]  dst_cpr;
    logic [IMM_W-1:0]  imm;
    logic              pred_taken;
    logic [PCH_W-1:0]  pc;
  } rob_uop_t;

  function automatic logic is_mem(emc_op_e op);
    return op == OP_LD || op == OP_ST;
  endfunction

  function automatic logic is_branch(emc_op_e op);
    return op == OP_BEQ || op == OP_BNE || op == OP_BLT || op == OP_BGE;
  endfunction

  // Uops whose result is a register value broadcast on the CDB.
  function automatic logic writes_reg(emc_op_e op);
    return !(op == OP_ST || is_branch(op) || op == OP_OTHER);
  endfunction

  function automatic logic [XLEN-1:0] sext_imm(logic [IMM_W-1:0] imm);
    return {{(XLEN-IMM_W){imm[IMM_W-1]}}, imm};
  endfunction

endpackage
