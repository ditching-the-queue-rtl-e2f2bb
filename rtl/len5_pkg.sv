// len5_pkg: types and constants shared by the out-of-order core and its
// Configurable-Latency Coprocessor (CLC).
//
// The core is a 64-bit RISC-V (RV64I subset plus a subset of M) Tomasulo
// machine: instructions are issued in order into per-unit reservation
// stations (RS), tagged with the index of their ReOrder Buffer (ROB) entry,
// and results are broadcast on a single Common Data Bus (CDB). The sizes below
// are the "maximum performance" configuration the design is evaluated with:
// 32-entry ROB, 8-entry ALU RS, 4-entry branch, mul/div and coprocessor RSs,
// 16-entry store buffer and 8-entry load buffer. Operation encodings,
// exception causes and the custom-instruction opcode are this design's own
// choices.
package len5_pkg;

  localparam int unsigned XLEN      = 64;
  localparam int unsigned ROB_DEPTH = 32;
  localparam int unsigned ROB_IDX_W = $clog2(ROB_DEPTH);
  // RS entry index carried through the execution units (RSs up to 8 entries)
  localparam int unsigned RS_IDX_W  = 3;

  // Default RS / buffer sizes
  localparam int unsigned ALU_RS_DEPTH    = 8;
  localparam int unsigned BU_RS_DEPTH     = 4;
  localparam int unsigned MULDIV_RS_DEPTH = 4;
  localparam int unsigned CLC_RS_DEPTH    = 4;
  localparam int unsigned LB_DEPTH        = 8;
  localparam int unsigned SB_DEPTH        = 16;

  // Custom opcode of the CLC instructions (RISC-V custom-0 space), I-type
  localparam logic [6:0] OPC_CUSTOM0 = 7'b0001011;
  localparam logic [2:0] F3_XDUMMY_ITER = 3'b000;
  localparam logic [2:0] F3_XDUMMY_PIPE = 3'b001;

  typedef logic [ROB_IDX_W-1:0] rob_idx_t;
  typedef logic [RS_IDX_W-1:0]  rs_idx_t;
  typedef logic [XLEN-1:0]      xlen_t;

  // Execution unit selected by the decoder
  typedef enum logic [2:0] {
    EU_ALU    = 3'd0,
    EU_MULDIV = 3'd1,
    EU_BU     = 3'd2,
    EU_CLC    = 3'd3,
    EU_LSU    = 3'd4,
    EU_NONE   = 3'd5   // completes at issue (e.g. exceptions)
  } eu_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_XOR, ALU_OR, ALU_AND, ALU_SLL, ALU_SRL, ALU_SRA,
    ALU_SLT, ALU_SLTU, ALU_ADDW, ALU_SUBW, ALU_SLLW, ALU_SRLW, ALU_SRAW
  } alu_op_e;

  typedef enum logic [3:0] {
    MD_MUL, MD_MULH, MD_MULHU, MD_MULW, MD_DIV, MD_DIVU, MD_REM, MD_REMU
  } muldiv_op_e;

  typedef enum logic [3:0] {
    BU_BEQ, BU_BNE, BU_BLT, BU_BGE, BU_BLTU, BU_BGEU, BU_JAL, BU_JALR,
    BU_CALL,   // JAL  linking x1/x5
    BU_CALLR,  // JALR linking x1/x5
    BU_RET     // JALR through x1/x5, no link
  } bu_op_e;

  typedef enum logic [3:0] {
    CLC_ITER, CLC_PIPE
  } clc_op_e;

  typedef enum logic [3:0] {
    LSU_LW, LSU_LWU, LSU_LD, LSU_SW, LSU_SD
  } lsu_op_e;

  // Exception causes (RISC-V mcause encoding)
  localparam logic [4:0] EXC_ILLEGAL     = 5'd2;
  localparam logic [4:0] EXC_LD_MISALIGN = 5'd4;
  localparam logic [4:0] EXC_ST_MISALIGN = 5'd6;
  localparam logic [4:0] EXC_ECALL_M     = 5'd11;

  // Instruction as written into a reservation station
  typedef struct packed {
    logic [3:0] op;          // unit-specific operation
    rob_idx_t   rob_tag;     // ROB entry = instruction tag
    logic       a_ready;
    rob_idx_t   a_tag;
    xlen_t      a_val;
    logic       b_ready;
    rob_idx_t   b_tag;
    xlen_t      b_val;
    xlen_t      imm;
    xlen_t      pc;
    logic       pred_taken;
    xlen_t      pred_target;
  } rs_data_t;

  // Request from an RS to its execution unit
  typedef struct packed {
    logic [3:0] op;
    rs_idx_t    rs_idx;
    xlen_t      a;
    xlen_t      b;
    xlen_t      imm;
    xlen_t      pc;
    logic       pred_taken;
    xlen_t      pred_target;
  } eu_req_t;

  // Response from an execution unit to its RS
  typedef struct packed {
    rs_idx_t    rs_idx;
    xlen_t      result;
    logic       exc;
    logic [4:0] cause;
    logic       mispred;     // branch unit only
  } eu_rsp_t;

  // One CDB broadcast
  typedef struct packed {
    rob_idx_t   rob_tag;
    xlen_t      result;
    logic       exc;
    logic [4:0] cause;
    logic       mispred;
  } cdb_t;

  // Branch resolution sent to the frontend predictor
  typedef struct packed {
    xlen_t pc;
    xlen_t target;
    logic  taken;
    logic  is_cond;
    logic  is_call;
    logic  is_ret;
    logic  mispred;
  } bu_res_t;

  // Decoded instruction
  typedef struct packed {
    eu_e        eu;
    logic [3:0] op;
    logic [4:0] rs1;
    logic [4:0] rs2;
    logic [4:0] rd;
    logic       uses_rs1;   // operand a = rs1 (else see a_pc)
    logic       a_pc;       // operand a = PC (AUIPC); zero if neither
    logic       uses_rs2;   // operand b = rs2 (else immediate)
    logic       has_rd;
    xlen_t      imm;
    logic       is_ctrl;    // branch, jump, load or store
    logic       is_store;
    logic       exc;
    logic [4:0] cause;
  } dec_t;

endpackage
