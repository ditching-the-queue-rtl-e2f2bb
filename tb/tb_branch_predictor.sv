// tb_branch_predictor: self-checking testbench of the gshare + BTB + RAS
// predictor.
// Checks: no prediction for unknown PCs; a conditional branch seen taken is
// predicted taken to its target; after repeated not-taken outcomes it is
// predicted not taken; an unconditional jump is predicted taken; an aliasing
// PC with a different tag misses; a predicted call pushes PC+4 and the
// matching return is predicted to that address; an empty RAS gives no
// return prediction.
module tb_branch_predictor;
  import len5_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  xlen_t   lookup_pc;
  logic    lookup_fire;
  logic    pred_taken;
  xlen_t   pred_target;
  logic    upd_valid;
  bu_res_t upd;

  branch_predictor dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic update(input xlen_t pc, input xlen_t tgt, input bit taken, input bit cond,
                        input bit call, input bit ret);
    upd = '0;
    upd.pc = pc; upd.target = tgt; upd.taken = taken; upd.is_cond = cond;
    upd.is_call = call; upd.is_ret = ret;
    upd_valid = 1;
    @(posedge clk);
    #1 upd_valid = 0;
  endtask

  task automatic look(input xlen_t pc, input bit fire);
    lookup_pc = pc; lookup_fire = fire;
    #1;
  endtask

  initial begin
    lookup_pc = 0; lookup_fire = 0; upd_valid = 0; upd = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    look(64'h40, 0);
    check(!pred_taken, "unknown PC not predicted taken");
    // conditional branch
    update(64'h40, 64'h80, 1, 1, 0, 0);
    look(64'h40, 0);
    check(pred_taken && pred_target == 64'h80, "branch seen taken is predicted taken");
    for (int i = 0; i < 20; i++) update(64'h40, 64'h44, 0, 1, 0, 0);
    look(64'h40, 0);
    check(!pred_taken, "branch trained not taken");
    for (int i = 0; i < 20; i++) update(64'h40, 64'h80, 1, 1, 0, 0);
    look(64'h40, 0);
    check(pred_taken && pred_target == 64'h80, "branch trained taken again");
    // jump and aliasing
    update(64'h100, 64'h200, 1, 0, 0, 0);
    look(64'h100, 0);
    check(pred_taken && pred_target == 64'h200, "jump predicted taken");
    look(64'h100 + 64'd4 * 64, 0);
    check(!pred_taken, "aliasing PC with another tag misses");
    // call / return
    update(64'h300, 64'h400, 1, 0, 1, 0);
    update(64'h480, 64'h304, 1, 0, 0, 1);
    look(64'h480, 0);
    check(!pred_taken, "return with empty RAS not predicted");
    look(64'h300, 1);
    check(pred_taken && pred_target == 64'h400, "call predicted to its target");
    @(posedge clk); #1;
    look(64'h480, 0);
    check(pred_taken && pred_target == 64'h304, $sformatf("return predicted to call PC+4 (%h)", pred_target));
    look(64'h480, 1);
    @(posedge clk); #1;
    look(64'h480, 0);
    check(!pred_taken, "RAS empty again after the return");
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
