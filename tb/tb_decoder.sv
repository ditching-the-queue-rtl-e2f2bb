// tb_decoder: self-checking testbench of the instruction decoder. Encodes
// instructions of every supported group and checks the selected unit,
// operation, registers, immediate and flags; also checks that unsupported
// encodings are reported as illegal instructions.
module tb_decoder;
  import len5_pkg::*;
  import rv_asm::*;
  logic [31:0] instr;
  dec_t dec;
  int checks = 0, failures = 0;

  decoder dut (.instr, .dec);

  task automatic expect_dec(input logic [31:0] i, input eu_e eu, input int op, input int rd,
                            input int rs1, input int rs2, input longint imm, input string name);
    instr = i;
    #1;
    checks++;
    if (dec.eu != eu || dec.op != 4'(op) || dec.rd != 5'(rd) || dec.rs1 != 5'(rs1) ||
        dec.rs2 != 5'(rs2) || dec.imm != 64'(imm) || dec.exc) begin
      failures++;
      $display("FAIL %s: eu=%0d op=%0d rd=%0d rs1=%0d rs2=%0d imm=%0d exc=%0d", name, dec.eu, dec.op,
               dec.rd, dec.rs1, dec.rs2, $signed(dec.imm), dec.exc);
    end
  endtask

  task automatic expect_exc(input logic [31:0] i, input int cause, input string name);
    instr = i;
    #1;
    checks++;
    if (!(dec.exc && dec.cause == 5'(cause) && dec.eu == EU_NONE)) begin
      failures++; $display("FAIL %s: not an exception", name);
    end
  endtask

  initial begin
    expect_dec(addi(5, 6, -7),       EU_ALU, ALU_ADD, 5, 6, 0, -7, "addi");
    expect_dec(addiw(15, 15, -1),    EU_ALU, ALU_ADDW, 15, 15, 0, -1, "addiw");
    expect_dec(add(12, 14, 13),      EU_ALU, ALU_ADD, 12, 14, 13, 0, "add");
    expect_dec(sub(1, 2, 3),         EU_ALU, ALU_SUB, 1, 2, 3, 0, "sub");
    expect_dec(xor_(12, 15, 14),     EU_ALU, ALU_XOR, 12, 15, 14, 0, "xor");
    expect_dec(lui(3, 20'hABCDE),    EU_ALU, ALU_ADD, 3, 0, 0, 64'hFFFF_FFFF_ABCD_E000, "lui");
    expect_dec(mul(4, 5, 6),         EU_MULDIV, MD_MUL, 4, 5, 6, 0, "mul");
    expect_dec(div(4, 5, 6),         EU_MULDIV, MD_DIV, 4, 5, 6, 0, "div");
    expect_dec(bne(15, 0, -16),      EU_BU, BU_BNE, 0, 15, 0, -16, "bnez");
    expect_dec(beq(1, 2, 2048),      EU_BU, BU_BEQ, 0, 1, 2, 2048, "beq");
    expect_dec(jal(1, 1024),         EU_BU, BU_CALL, 1, 0, 0, 1024, "jal ra (call)");
    expect_dec(jal(0, -8),           EU_BU, BU_JAL, 0, 0, 0, -8, "j");
    expect_dec(ret(),                EU_BU, BU_RET, 0, 1, 0, 0, "ret");
    expect_dec(jalr(7, 8, 12),       EU_BU, BU_JALR, 7, 8, 0, 12, "jalr");
    expect_dec(lw(5, 2, 16),         EU_LSU, LSU_LW, 5, 2, 0, 16, "lw");
    expect_dec(ld(5, 2, -8),         EU_LSU, LSU_LD, 5, 2, 0, -8, "ld");
    expect_dec(sw(5, 2, 20),         EU_LSU, LSU_SW, 0, 2, 5, 20, "sw");
    expect_dec(sd(9, 3, -24),        EU_LSU, LSU_SD, 0, 3, 9, -24, "sd");
    expect_dec(xdummy_iter(10, 11, 5), EU_CLC, CLC_ITER, 10, 11, 0, 5, "xdummy.iter");
    expect_dec(xdummy_pipe(10, 10, 20), EU_CLC, CLC_PIPE, 10, 10, 0, 20, "xdummy.pipe");
    checks++;
    if (!(dec.is_ctrl == 0 && dec.has_rd)) begin failures++; $display("FAIL clc flags"); end
    instr = sw(5, 2, 20); #1;
    checks++;
    if (!(dec.is_store && dec.is_ctrl && !dec.has_rd)) begin failures++; $display("FAIL store flags"); end
    expect_exc(ecall(), 11, "ecall");
    expect_exc(32'hFFFF_FFFF, 2, "all ones");
    expect_exc(i_t(0, 1, 5, 1, 7'b0001011), 2, "custom-0 funct3 5");
    expect_exc(32'h0010_0073, 2, "ebreak (unsupported)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
