// decoder: RV64 instruction decoder for the supported subset.
//
// Supported: LUI, AUIPC, JAL, JALR, conditional branches, LW/LWU/LD, SW/SD,
// the OP-IMM / OP / OP-IMM-32 / OP-32 integer groups, MUL/MULH/MULHU/MULW,
// DIV/DIVU/REM/REMU, FENCE (as a no-op), ECALL (raises an environment-call
// exception) and the two coprocessor instructions
//   xdummy.iter rd, rs1, imm   custom-0 opcode, funct3 = 000 (iterative)
//   xdummy.pipe rd, rs1, imm   custom-0 opcode, funct3 = 001 (pipelined)
// which are I-type: rs1 is the data operand, the 12-bit immediate the
// latency (pipeline register used as output). Anything else is an illegal
// instruction. The decoder selects the execution unit and its operation,
// the operand sources and the destination, and marks branches, jumps, loads
// and stores as speculation barriers for out-of-order commit. JAL/JALR that
// link x1 or x5 are calls and a JALR through x1/x5 without link is a return
// (standard RISC-V hints), which the return address stack uses.
// Purely combinational. The I-type format of the coprocessor instructions
// follows their description; the opcode, funct3 values and the instruction
// subset are this design's own choices.
module decoder
  import len5_pkg::*;
(
  input  logic [31:0] instr,
  output dec_t        dec
);

  logic [6:0] opc, f7;
  logic [2:0] f3;
  xlen_t      imm_i, imm_s, imm_b, imm_u, imm_j;
  logic       rd_link, rs1_link;

  assign opc = instr[6:0];
  assign f3  = instr[14:12];
  assign f7  = instr[31:25];
  assign imm_i = {{52{instr[31]}}, instr[31:20]};
  assign imm_s = {{52{instr[31]}}, instr[31:25], instr[11:7]};
  assign imm_b = {{52{instr[31]}}, instr[7], instr[30:25], instr[11:8], 1'b0};
  assign imm_u = {{32{instr[31]}}, instr[31:12], 12'b0};
  assign imm_j = {{44{instr[31]}}, instr[19:12], instr[20], instr[30:21], 1'b0};
  assign rd_link  = (instr[11:7] == 5'd1) || (instr[11:7] == 5'd5);
  assign rs1_link = (instr[19:15] == 5'd1) || (instr[19:15] == 5'd5);

  always_comb begin
    logic ill;
    ill = 1'b0;
    dec          = '0;
    dec.eu       = EU_ALU;
    dec.rs1      = instr[19:15];
    dec.rs2      = instr[24:20];
    dec.rd       = instr[11:7];
    case (opc)
      7'b0110111: begin // LUI: 0 + imm
        dec.op = ALU_ADD; dec.imm = imm_u; dec.has_rd = 1'b1;
      end
      7'b0010111: begin // AUIPC: pc + imm
        dec.op = ALU_ADD; dec.imm = imm_u; dec.a_pc = 1'b1; dec.has_rd = 1'b1;
      end
      7'b1101111: begin // JAL
        dec.eu = EU_BU; dec.op = rd_link ? BU_CALL : BU_JAL; dec.imm = imm_j;
        dec.has_rd = 1'b1; dec.is_ctrl = 1'b1;
      end
      7'b1100111: begin // JALR
        dec.eu = EU_BU; dec.imm = imm_i; dec.uses_rs1 = 1'b1;
        dec.has_rd = 1'b1; dec.is_ctrl = 1'b1;
        if (rd_link)                               dec.op = BU_CALLR;
        else if (instr[11:7] == 5'd0 && rs1_link)  dec.op = BU_RET;
        else                                       dec.op = BU_JALR;
        ill = (f3 != 3'b000);
      end
      7'b1100011: begin // branches
        dec.eu = EU_BU; dec.imm = imm_b; dec.uses_rs1 = 1'b1; dec.uses_rs2 = 1'b1;
        dec.is_ctrl = 1'b1;
        case (f3)
          3'b000: dec.op = BU_BEQ;
          3'b001: dec.op = BU_BNE;
          3'b100: dec.op = BU_BLT;
          3'b101: dec.op = BU_BGE;
          3'b110: dec.op = BU_BLTU;
          3'b111: dec.op = BU_BGEU;
          default: ill = 1'b1;
        endcase
      end
      7'b0000011: begin // loads
        dec.eu = EU_LSU; dec.imm = imm_i; dec.uses_rs1 = 1'b1; dec.has_rd = 1'b1;
        dec.is_ctrl = 1'b1;
        case (f3)
          3'b010: dec.op = LSU_LW;
          3'b110: dec.op = LSU_LWU;
          3'b011: dec.op = LSU_LD;
          default: ill = 1'b1;
        endcase
      end
      7'b0100011: begin // stores
        dec.eu = EU_LSU; dec.imm = imm_s; dec.uses_rs1 = 1'b1; dec.uses_rs2 = 1'b1;
        dec.is_ctrl = 1'b1; dec.is_store = 1'b1;
        case (f3)
          3'b010: dec.op = LSU_SW;
          3'b011: dec.op = LSU_SD;
          default: ill = 1'b1;
        endcase
      end
      7'b0010011: begin // OP-IMM
        dec.imm = imm_i; dec.uses_rs1 = 1'b1; dec.has_rd = 1'b1;
        case (f3)
          3'b000: dec.op = ALU_ADD;
          3'b010: dec.op = ALU_SLT;
          3'b011: dec.op = ALU_SLTU;
          3'b100: dec.op = ALU_XOR;
          3'b110: dec.op = ALU_OR;
          3'b111: dec.op = ALU_AND;
          3'b001: begin dec.op = ALU_SLL; ill = (instr[31:26] != 6'b0); end
          3'b101: begin
            dec.op = instr[30] ? ALU_SRA : ALU_SRL;
            ill = (instr[31] != 1'b0) || (instr[29:26] != 4'b0);
          end
          default: ill = 1'b1;
        endcase
      end
      7'b0011011: begin // OP-IMM-32
        dec.imm = imm_i; dec.uses_rs1 = 1'b1; dec.has_rd = 1'b1;
        case (f3)
          3'b000: dec.op = ALU_ADDW;
          3'b001: begin dec.op = ALU_SLLW; ill = (f7 != 7'b0); end
          3'b101: begin
            dec.op = instr[30] ? ALU_SRAW : ALU_SRLW;
            ill = (f7 != 7'b0) && (f7 != 7'b0100000);
          end
          default: ill = 1'b1;
        endcase
      end
      7'b0110011: begin // OP and M
        dec.uses_rs1 = 1'b1; dec.uses_rs2 = 1'b1; dec.has_rd = 1'b1;
        if (f7 == 7'b0000001) begin
          dec.eu = EU_MULDIV;
          case (f3)
            3'b000: dec.op = MD_MUL;
            3'b001: dec.op = MD_MULH;
            3'b011: dec.op = MD_MULHU;
            3'b100: dec.op = MD_DIV;
            3'b101: dec.op = MD_DIVU;
            3'b110: dec.op = MD_REM;
            3'b111: dec.op = MD_REMU;
            default: ill = 1'b1;
          endcase
        end else if (f7 == 7'b0000000) begin
          case (f3)
            3'b000: dec.op = ALU_ADD;
            3'b001: dec.op = ALU_SLL;
            3'b010: dec.op = ALU_SLT;
            3'b011: dec.op = ALU_SLTU;
            3'b100: dec.op = ALU_XOR;
            3'b101: dec.op = ALU_SRL;
            3'b110: dec.op = ALU_OR;
            default: dec.op = ALU_AND;
          endcase
        end else if (f7 == 7'b0100000) begin
          case (f3)
            3'b000: dec.op = ALU_SUB;
            3'b101: dec.op = ALU_SRA;
            default: ill = 1'b1;
          endcase
        end else ill = 1'b1;
      end
      7'b0111011: begin // OP-32 and MULW
        dec.uses_rs1 = 1'b1; dec.uses_rs2 = 1'b1; dec.has_rd = 1'b1;
        if (f7 == 7'b0000001 && f3 == 3'b000) begin
          dec.eu = EU_MULDIV; dec.op = MD_MULW;
        end else if (f7 == 7'b0000000) begin
          case (f3)
            3'b000: dec.op = ALU_ADDW;
            3'b001: dec.op = ALU_SLLW;
            3'b101: dec.op = ALU_SRLW;
            default: ill = 1'b1;
          endcase
        end else if (f7 == 7'b0100000) begin
          case (f3)
            3'b000: dec.op = ALU_SUBW;
            3'b101: dec.op = ALU_SRAW;
            default: ill = 1'b1;
          endcase
        end else ill = 1'b1;
      end
      7'b0001111: begin // FENCE: no-op (single hart, in-order memory)
        dec.op = ALU_ADD; dec.rd = 5'd0;
      end
      OPC_CUSTOM0: begin // xdummy.iter / xdummy.pipe
        dec.eu = EU_CLC; dec.imm = imm_i; dec.uses_rs1 = 1'b1; dec.has_rd = 1'b1;
        case (f3)
          F3_XDUMMY_ITER: dec.op = CLC_ITER;
          F3_XDUMMY_PIPE: dec.op = CLC_PIPE;
          default: ill = 1'b1;
        endcase
      end
      7'b1110011: begin // SYSTEM: only ECALL
        if (instr == 32'h0000_0073) begin
          dec.eu = EU_NONE; dec.exc = 1'b1; dec.cause = EXC_ECALL_M; dec.is_ctrl = 1'b1;
        end else ill = 1'b1;
      end
      default: ill = 1'b1;
    endcase
    if (!dec.uses_rs1) dec.rs1 = 5'd0;
    if (!dec.uses_rs2) dec.rs2 = 5'd0;
    if (!dec.has_rd)   dec.rd  = 5'd0;
    if (ill) begin
      dec = '0;
      dec.eu = EU_NONE; dec.exc = 1'b1; dec.cause = EXC_ILLEGAL; dec.is_ctrl = 1'b1;
    end
  end

endmodule
