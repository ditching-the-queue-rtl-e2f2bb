// tb_reg_status: self-checking testbench of the register status table.
// Checks renaming (the latest writer's tag is returned), that only the
// latest writer is reported "newest" at commit (write-after-write), that
// commit frees the register, that a same-cycle new writer wins over a
// commit, that x0 never becomes busy, and that flush frees everything.
module tb_reg_status;
  import len5_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [4:0] rs_addr[2];
  logic rs_busy[2];
  rob_idx_t rs_tag[2];
  logic issue_valid;
  logic [4:0] issue_rd;
  rob_idx_t issue_tag;
  logic commit_valid[2];
  logic [4:0] commit_rd[2];
  rob_idx_t commit_tag[2];
  logic commit_newest[2];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  reg_status dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic issue(input int rd, input int tag);
    issue_valid = 1; issue_rd = 5'(rd); issue_tag = rob_idx_t'(tag);
    @(posedge clk); #1 issue_valid = 0;
  endtask

  initial begin
    issue_valid = 0; issue_rd = 0; issue_tag = 0;
    commit_valid[0] = 0; commit_valid[1] = 0; commit_rd[0] = 0; commit_rd[1] = 0;
    commit_tag[0] = 0; commit_tag[1] = 0; rs_addr[0] = 0; rs_addr[1] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    issue(5, 3);
    issue(5, 7);      // newer writer of x5
    issue(6, 8);
    issue(0, 9);      // x0: ignored
    rs_addr[0] = 5; rs_addr[1] = 6;
    #1 check(rs_busy[0] && rs_tag[0] == 7, "x5 renamed to latest tag 7");
    check(rs_busy[1] && rs_tag[1] == 8, "x6 renamed to tag 8");
    rs_addr[1] = 0;
    #1 check(!rs_busy[1], "x0 never busy");
    // commit old writer of x5 (tag 3) and writer of x6 in the same cycle
    commit_valid[0] = 1; commit_rd[0] = 5; commit_tag[0] = 3;
    commit_valid[1] = 1; commit_rd[1] = 6; commit_tag[1] = 8;
    #1 check(!commit_newest[0], "older writer of x5 is not newest (WAW)");
    check(commit_newest[1], "latest writer of x6 is newest");
    @(posedge clk); #1;
    commit_valid[0] = 0; commit_valid[1] = 0;
    rs_addr[0] = 5; rs_addr[1] = 6;
    #1 check(rs_busy[0] && rs_tag[0] == 7, "x5 still busy on tag 7");
    check(!rs_busy[1], "x6 freed by commit");
    // commit tag 7 while a new writer of x5 issues: new writer wins
    commit_valid[0] = 1; commit_rd[0] = 5; commit_tag[0] = 7;
    issue_valid = 1; issue_rd = 5; issue_tag = 12;
    #1 check(commit_newest[0], "tag 7 newest at commit");
    @(posedge clk); #1;
    commit_valid[0] = 0; issue_valid = 0;
    #1 check(rs_busy[0] && rs_tag[0] == 12, "same-cycle new writer takes precedence");
    flush = 1;
    @(posedge clk); #1 flush = 0;
    #1 check(!rs_busy[0], "flush frees all registers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
