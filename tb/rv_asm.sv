// rv_asm: instruction encoders used by the testbenches to build programs
// (standard RV64 formats, plus the two coprocessor instructions on the
// custom-0 opcode with funct3 000 = iterative and 001 = pipelined).
package rv_asm;

  function automatic logic [31:0] r_t(input int f7, input int rs2, input int rs1, input int f3, input int rd, input int opc);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'(opc)};
  endfunction
  function automatic logic [31:0] i_t(input int imm, input int rs1, input int f3, input int rd, input int opc);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), 7'(opc)};
  endfunction
  function automatic logic [31:0] s_t(input int imm, input int rs2, input int rs1, input int f3, input int opc);
    logic [11:0] i;
    i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'(f3), i[4:0], 7'(opc)};
  endfunction
  function automatic logic [31:0] b_t(input int off, input int rs2, input int rs1, input int f3);
    logic [12:0] i;
    i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), 3'(f3), i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] j_t(input int off, input int rd);
    logic [20:0] i;
    i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction

  function automatic logic [31:0] addi(input int rd, input int rs1, input int imm);  return i_t(imm, rs1, 0, rd, 7'b0010011); endfunction
  function automatic logic [31:0] addiw(input int rd, input int rs1, input int imm); return i_t(imm, rs1, 0, rd, 7'b0011011); endfunction
  function automatic logic [31:0] xori(input int rd, input int rs1, input int imm);  return i_t(imm, rs1, 4, rd, 7'b0010011); endfunction
  function automatic logic [31:0] add(input int rd, input int rs1, input int rs2);   return r_t(0, rs2, rs1, 0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sub(input int rd, input int rs1, input int rs2);   return r_t(32, rs2, rs1, 0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] xor_(input int rd, input int rs1, input int rs2);  return r_t(0, rs2, rs1, 4, rd, 7'b0110011); endfunction
  function automatic logic [31:0] mul(input int rd, input int rs1, input int rs2);   return r_t(1, rs2, rs1, 0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] div(input int rd, input int rs1, input int rs2);   return r_t(1, rs2, rs1, 4, rd, 7'b0110011); endfunction
  function automatic logic [31:0] lui(input int rd, input int imm20);                return {20'(imm20), 5'(rd), 7'b0110111}; endfunction
  function automatic logic [31:0] lw(input int rd, input int rs1, input int imm);    return i_t(imm, rs1, 2, rd, 7'b0000011); endfunction
  function automatic logic [31:0] ld(input int rd, input int rs1, input int imm);    return i_t(imm, rs1, 3, rd, 7'b0000011); endfunction
  function automatic logic [31:0] sw(input int rs2, input int rs1, input int imm);   return s_t(imm, rs2, rs1, 2, 7'b0100011); endfunction
  function automatic logic [31:0] sd(input int rs2, input int rs1, input int imm);   return s_t(imm, rs2, rs1, 3, 7'b0100011); endfunction
  function automatic logic [31:0] beq(input int rs1, input int rs2, input int off);  return b_t(off, rs2, rs1, 0); endfunction
  function automatic logic [31:0] bne(input int rs1, input int rs2, input int off);  return b_t(off, rs2, rs1, 1); endfunction
  function automatic logic [31:0] jal(input int rd, input int off);                  return j_t(off, rd); endfunction
  function automatic logic [31:0] jalr(input int rd, input int rs1, input int imm);  return i_t(imm, rs1, 0, rd, 7'b1100111); endfunction
  function automatic logic [31:0] ret();                                             return jalr(0, 1, 0); endfunction
  function automatic logic [31:0] xdummy_iter(input int rd, input int rs1, input int lat); return i_t(lat, rs1, 0, rd, 7'b0001011); endfunction
  function automatic logic [31:0] xdummy_pipe(input int rd, input int rs1, input int lat); return i_t(lat, rs1, 1, rd, 7'b0001011); endfunction
  function automatic logic [31:0] ecall();                                           return 32'h0000_0073; endfunction
  function automatic logic [31:0] nop();                                             return addi(0, 0, 0); endfunction

endpackage
