// tb_issue_stage: self-checking testbench of the issue stage.
// The bench models the register status table, register file and ROB read
// ports with arrays and applies single instructions (assembled with the
// rv_asm encoders). Checks: operands from the register file, from a
// completed ROB entry, or left waiting on the writer's tag; immediate as
// operand b; the target reservation station for ALU, MUL/DIV, branch, CLC
// and load/store instructions; renaming of rd with the allocated tag (none
// for x0); stalls for a full ROB, a full RS and hold; an ECALL allocated
// as completed with its exception and sent to no RS.
module tb_issue_stage;
  import len5_pkg::*;
  import rv_asm::*;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic       hold, iq_valid, iq_ready, iq_pred_taken;
  logic [31:0] iq_instr;
  xlen_t      iq_pc, iq_pred_target;
  logic [4:0] rs_addr [2];
  logic       rs_busy [2];
  rob_idx_t   rs_tag [2];
  logic       rd_issue;
  logic [4:0] rd_addr;
  rob_idx_t   rd_tag;
  xlen_t      rf_data [2];
  rob_idx_t   rob_rd_tag [2];
  logic       rob_rd_done [2];
  xlen_t      rob_rd_value [2];
  logic       rob_alloc_valid, rob_alloc_ready, rob_alloc_has_rd, rob_alloc_is_ctrl;
  logic       rob_alloc_is_store, rob_alloc_done, rob_alloc_exc;
  rob_idx_t   rob_alloc_tag;
  logic [4:0] rob_alloc_rd, rob_alloc_cause;
  logic [4:0] rs_valid, rs_ready;
  rs_data_t   rs_data;
  logic       stall_rob, stall_rs;

  issue_stage dut (.*);

  // environment models
  logic     busy [32];
  rob_idx_t tagof [32];
  xlen_t    rf [32];
  logic     rdone [32];
  xlen_t    rval [32];
  always_comb
    for (int p = 0; p < 2; p++) begin
      rs_busy[p]      = busy[rs_addr[p]];
      rs_tag[p]       = tagof[rs_addr[p]];
      rf_data[p]      = rf[rs_addr[p]];
      rob_rd_done[p]  = rdone[rob_rd_tag[p]];
      rob_rd_value[p] = rval[rob_rd_tag[p]];
    end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic apply(input logic [31:0] instr);
    iq_instr = instr; iq_valid = 1;
    #1;
  endtask

  initial begin
    hold = 0; iq_valid = 0; iq_instr = 0; iq_pc = 64'h400; iq_pred_taken = 0; iq_pred_target = 0;
    rob_alloc_ready = 1; rob_alloc_tag = 5'd12; rs_ready = '1;
    for (int i = 0; i < 32; i++) begin
      busy[i] = 0; tagof[i] = '0; rf[i] = 64'(i * 1000); rdone[i] = 0; rval[i] = 64'(i + 7000);
    end
    rf[0] = 0;
    // both operands from the register file
    apply(add(3, 1, 2));
    check(iq_ready && rob_alloc_valid && rs_valid == 5'b00001, "ADD goes to the ALU RS");
    check(rs_data.a_ready && rs_data.a_val == 1000 && rs_data.b_ready && rs_data.b_val == 2000, "operands from RF");
    check(rs_data.rob_tag == 5'd12 && rd_issue && rd_addr == 3 && rd_tag == 5'd12, "rd renamed with the ROB tag");
    check(rob_alloc_has_rd && rob_alloc_rd == 3 && !rob_alloc_done, "ROB entry for ADD");
    // rs1 busy, writer not done: wait on tag; rs2 busy, writer done: from ROB
    busy[1] = 1; tagof[1] = 5'd4; busy[2] = 1; tagof[2] = 5'd6; rdone[6] = 1;
    apply(sub(5, 1, 2));
    check(!rs_data.a_ready && rs_data.a_tag == 5'd4, "operand a waits on the writer's tag");
    check(rs_data.b_ready && rs_data.b_val == 7006, "operand b read from the completed ROB entry");
    busy[1] = 0; busy[2] = 0;
    // immediate
    apply(addi(6, 1, -5));
    check(rs_data.b_ready && rs_data.b_val == -64'sd5 && rs_data.a_val == 1000, "immediate as operand b");
    // other units
    apply(mul(7, 1, 2));
    check(rs_valid == 5'b00010, "MUL goes to the MUL/DIV RS");
    apply(bne(1, 2, 16));
    check(rs_valid == 5'b00100 && !rd_issue && rob_alloc_is_ctrl, "branch goes to the BU RS, no rd");
    apply(xdummy_pipe(8, 1, 17));
    check(rs_valid == 5'b01000 && rs_data.op == 4'(CLC_PIPE) && rs_data.imm == 17, "xdummy.pipe goes to the CLC RS with its latency");
    apply(sd(2, 1, 8));
    check(rs_valid == 5'b10000 && rob_alloc_is_store && !rd_issue, "store goes to the LSU");
    apply(addi(0, 1, 1));
    check(iq_ready && !rd_issue && !rob_alloc_has_rd, "x0 destination is not renamed");
    // stalls
    rs_ready = 5'b11110;
    apply(add(3, 1, 2));
    check(!iq_ready && !rob_alloc_valid && rs_valid == 0 && stall_rs && !stall_rob, "full RS stalls issue");
    rs_ready = '1; rob_alloc_ready = 0;
    apply(add(3, 1, 2));
    check(!iq_ready && !rob_alloc_valid && stall_rob, "full ROB stalls issue");
    rob_alloc_ready = 1; hold = 1;
    apply(add(3, 1, 2));
    check(!iq_ready && !rob_alloc_valid && !stall_rob && !stall_rs, "hold stops issue");
    hold = 0;
    // ECALL
    apply(ecall());
    check(iq_ready && rob_alloc_valid && rob_alloc_done && rob_alloc_exc && rob_alloc_cause == EXC_ECALL_M && rs_valid == 0,
          "ECALL allocated as completed with its exception");
    iq_valid = 0;
    #1 check(!rob_alloc_valid && rs_valid == 0, "nothing issued without an instruction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
