// tb_rob: self-checking testbench of the ReOrder Buffer.
// Scenario 1: a long-latency instruction at the head and ROB_DEPTH-1 younger
// independent ones: the younger ones commit through the out-of-order slot,
// the buffer fills (alloc_ready low) and, when the head completes, it
// commits and the whole buffer empties in one cycle.
// Scenario 2: an unresolved branch blocks out-of-order commit of younger
// entries; a mispredicted branch at the head raises flush_mispred.
// Scenario 3: an exception reaches the head: exc_valid with cause and PC.
// Scenario 4: write-after-write: a younger writer of the same register
// commits out of order first; the older one then commits without writing
// the register file (commit_write low).
module tb_rob;
  import len5_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic alloc_valid, alloc_ready, alloc_has_rd, alloc_is_ctrl, alloc_is_store, alloc_done, alloc_exc;
  rob_idx_t alloc_tag;
  xlen_t alloc_pc;
  logic [4:0] alloc_rd, alloc_cause;
  rob_idx_t rd_tag[2];
  logic rd_done[2];
  xlen_t rd_value[2];
  logic cdb_valid;
  cdb_t cdb;
  logic commit_valid[2], commit_has_rd[2], commit_is_store[2], commit_write[2];
  rob_idx_t commit_tag[2];
  logic [4:0] commit_rd[2];
  xlen_t commit_value[2];
  logic flush_mispred, exc_valid, empty;
  xlen_t exc_pc;
  logic [4:0] exc_cause;
  rob_idx_t head;

  rob dut (.*);

  int ncommit[2], nwrite[2];
  logic [4:0] fixed_rd = '0;
  always @(posedge clk) if (rst_n) for (int p = 0; p < 2; p++) begin
    if (commit_valid[p]) ncommit[p]++;
    if (commit_write[p]) nwrite[p]++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic alloc(input bit ctrl, input bit done, input bit exc, output rob_idx_t tag);
    alloc_valid = 1; alloc_is_ctrl = ctrl; alloc_done = done; alloc_exc = exc;
    alloc_pc = 64'h1000 + 64'(alloc_tag) * 4; alloc_rd = (fixed_rd != 0) ? fixed_rd : 5'(alloc_tag % 31 + 1); alloc_has_rd = 1;
    tag = alloc_tag;
    @(posedge clk);
    #1 alloc_valid = 0; alloc_done = 0; alloc_exc = 0; alloc_is_ctrl = 0;
  endtask

  task automatic complete(input rob_idx_t tag, input bit mis);
    cdb_valid = 1; cdb = '0; cdb.rob_tag = tag; cdb.result = 64'(tag) + 100; cdb.mispred = mis;
    @(posedge clk);
    #1 cdb_valid = 0;
  endtask

  initial begin
    rob_idx_t t0, t, tb;
    alloc_valid = 0; alloc_has_rd = 0; alloc_is_ctrl = 0; alloc_is_store = 0; alloc_done = 0;
    alloc_exc = 0; alloc_pc = 0; alloc_rd = 0; alloc_cause = 5'd2; cdb_valid = 0; cdb = '0;
    rd_tag[0] = 0; rd_tag[1] = 0;
    ncommit[0] = 0; ncommit[1] = 0; nwrite[0] = 0; nwrite[1] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // ---- scenario 1
    alloc(0, 0, 0, t0);
    for (int i = 1; i < ROB_DEPTH; i++) begin
      alloc(0, 0, 0, t);
      complete(t, 0);
    end
    repeat (2) @(posedge clk);
    #1;
    check(!alloc_ready, "ROB full while the head is waiting");
    check(ncommit[1] == ROB_DEPTH - 1, $sformatf("younger entries committed out of order (%0d)", ncommit[1]));
    check(ncommit[0] == 0, "head not committed yet");
    rd_tag[0] = 5;
    #1 check(rd_done[0] && rd_value[0] == 105, "read port returns a completed result");
    complete(t0, 0);
    @(posedge clk); #1;
    check(ncommit[0] == 1, "head committed in order");
    check(empty && alloc_ready, "buffer empties in one cycle after the head commits");
    // ---- scenario 2
    alloc(1, 0, 0, tb);          // branch, unresolved
    alloc(0, 0, 0, t);
    complete(t, 0);
    repeat (2) @(posedge clk);
    #1 check(ncommit[1] == ROB_DEPTH - 1, "no out-of-order commit past an unresolved branch");
    complete(tb, 1);             // resolves mispredicted
    #1 check(flush_mispred, "mispredicted branch at head flushes");
    @(posedge clk); #1;
    check(empty, "flush empties the buffer");
    // ---- scenario 3
    alloc(0, 0, 0, t);
    alloc(0, 1, 1, tb);          // faulting instruction, done at issue
    complete(t, 0);
    @(posedge clk); #1;
    check(exc_valid && exc_cause == 5'd2 && exc_pc == 64'h1000 + 64'(tb) * 4, "exception reported at head");
    @(posedge clk); #1;
    check(empty, "exception flushes the buffer");
    // ---- scenario 4
    fixed_rd = 5'd7;
    alloc(0, 0, 0, t0);
    alloc(0, 0, 0, t);
    nwrite[0] = 0; nwrite[1] = 0; ncommit[0] = 0; ncommit[1] = 0;
    complete(t, 0);
    @(posedge clk); #1;
    check(ncommit[1] == 1 && nwrite[1] == 1, "younger writer commits out of order and writes");
    complete(t0, 0);
    @(posedge clk); #1;
    check(ncommit[0] == 1 && nwrite[0] == 0, "older writer commits without overwriting");
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
