// tb_lsu: self-checking testbench of the load-store unit.
// The bench plays the issue stage, the ROB (commit of stores, tags in
// program order) and the CDB (the unit's own broadcasts are looped back; the
// bench can also broadcast a result for a pending operand). Memory is a
// 64-bit array with random grant and one-cycle read latency.
// Scenarios: store-to-load forwarding without a memory read; in-order write
// of a committed store; a load waiting for an older store with an unknown
// address; a load that is only partly covered by an older store waits until
// the store has reached memory; a flush drops uncommitted stores but keeps
// committed ones; a misaligned load raises cause 4; LW sign-extends, LWU
// zero-extends.
module tb_lsu;
  import len5_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic       flush = 0;
  rob_idx_t   rob_head = '0;
  logic       issue_valid, issue_ready;
  rs_data_t   issue_data;
  logic       commit_store [2];
  rob_idx_t   commit_tag [2];
  logic       cdb_req_valid, cdb_req_ready;
  cdb_t       cdb_req;
  logic       cdb_valid;
  cdb_t       cdb;
  logic       mem_req, mem_gnt, mem_we, mem_rvalid;
  xlen_t      mem_addr, mem_wdata, mem_rdata;
  logic [7:0] mem_be;
  logic       ev_forward;

  lsu dut (.*);

  // CDB: bench injection has priority over the unit
  logic  tb_cdb_valid = 0;
  cdb_t  tb_cdb = '0;
  assign cdb_valid     = tb_cdb_valid || cdb_req_valid;
  assign cdb           = tb_cdb_valid ? tb_cdb : cdb_req;
  assign cdb_req_ready = !tb_cdb_valid;

  // memory
  xlen_t mem [256];
  logic  gnt_rand;
  int    n_rd, n_wr, n_fwd;
  assign mem_gnt = mem_req && gnt_rand;
  always_ff @(posedge clk) begin
    gnt_rand   <= ($urandom_range(3) != 0);
    mem_rvalid <= rst_n && mem_req && mem_gnt;
    mem_rdata  <= mem[mem_addr[10:3]];
    if (rst_n && mem_req && mem_gnt) begin
      if (mem_we) begin
        n_wr <= n_wr + 1;
        for (int b = 0; b < 8; b++) if (mem_be[b]) mem[mem_addr[10:3]][8*b +: 8] <= mem_wdata[8*b +: 8];
      end else n_rd <= n_rd + 1;
    end
    if (rst_n && ev_forward) n_fwd <= n_fwd + 1;
  end

  // results seen on the CDB, by tag
  logic  got [32];
  xlen_t res [32];
  logic  exc [32];
  logic [4:0] cause [32];
  always_ff @(posedge clk)
    if (rst_n && cdb_valid && !tb_cdb_valid) begin
      got[cdb.rob_tag]   <= 1'b1;
      res[cdb.rob_tag]   <= cdb.result;
      exc[cdb.rob_tag]   <= cdb.exc;
      cause[cdb.rob_tag] <= cdb.cause;
    end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // issue: base ready (or waiting on base_tag), store data ready
  task automatic issue(input lsu_op_e op, input int tag, input bit base_rdy, input int base_tag,
                       input xlen_t base, input int imm, input xlen_t data);
    issue_data = '0;
    issue_data.op      = 4'(op);
    issue_data.rob_tag = rob_idx_t'(tag);
    issue_data.a_ready = base_rdy;
    issue_data.a_tag   = rob_idx_t'(base_tag);
    issue_data.a_val   = base;
    issue_data.b_ready = 1'b1;
    issue_data.b_val   = data;
    issue_data.imm     = xlen_t'(imm);
    issue_valid = 1;
    do @(posedge clk); while (!issue_ready);
    #1 issue_valid = 0;
  endtask

  task automatic commit(input int tag);
    commit_store[0] = 1; commit_tag[0] = rob_idx_t'(tag);
    @(posedge clk);
    #1 commit_store[0] = 0;
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    int rd0, wr0, f0;
    issue_valid = 0; issue_data = '0;
    commit_store[0] = 0; commit_store[1] = 0; commit_tag[0] = '0; commit_tag[1] = '0;
    n_rd = 0; n_wr = 0; n_fwd = 0; gnt_rand = 0;
    for (int i = 0; i < 256; i++) mem[i] = {32'(i), 32'(~i)};
    for (int i = 0; i < 32; i++) begin got[i] = 0; res[i] = 0; exc[i] = 0; cause[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // 1: forwarding
    rd0 = n_rd;
    issue(LSU_SD, 0, 1, 0, 64'h100, 0, 64'hDEAD_BEEF_0123_4567);
    issue(LSU_LD, 1, 1, 0, 64'h0F8, 8, 0);
    wait_cycles(6);
    check(got[0] && !exc[0], "store reports completion");
    check(got[1] && res[1] == 64'hDEAD_BEEF_0123_4567, $sformatf("load forwarded %h", res[1]));
    check(n_rd == rd0 && n_fwd == 1, "forwarded load does not read memory");
    // 2: commit drains the store
    commit(0);
    wait_cycles(8);
    check(mem[32'h100 >> 3] == 64'hDEAD_BEEF_0123_4567, "committed store written to memory");

    // 3: older store with unknown address blocks a load
    issue(LSU_SD, 2, 0, 9, 0, 0, 64'h1111);
    issue(LSU_LD, 3, 1, 0, 64'h200, 0, 0);
    wait_cycles(8);
    check(!got[3], "load waits for an older store address");
    tb_cdb_valid = 1; tb_cdb = '0; tb_cdb.rob_tag = 5'd9; tb_cdb.result = 64'h300;
    @(posedge clk); #1 tb_cdb_valid = 0;
    wait_cycles(8);
    check(got[3] && res[3] == {32'(64), 32'(~64)}, $sformatf("load reads memory after the address is known %h", res[3]));
    commit(2);
    wait_cycles(6);
    check(mem[32'h300 >> 3] == 64'h1111, "second store written");

    // 4: partial cover: a 32-bit store under a 64-bit load
    issue(LSU_SW, 4, 1, 0, 64'h400, 0, 64'hAAAA_BBBB);
    issue(LSU_LD, 5, 1, 0, 64'h400, 0, 0);
    wait_cycles(8);
    check(!got[5], "partly covered load waits");
    commit(4);
    wait_cycles(10);
    check(got[5] && res[5] == {32'(128), 32'hAAAA_BBBB}, $sformatf("load sees merged memory %h", res[5]));

    // 5: flush keeps committed stores, drops the others
    issue(LSU_SD, 6, 1, 0, 64'h500, 0, 64'h66);
    issue(LSU_SD, 7, 1, 0, 64'h508, 0, 64'h77);
    commit(6);
    flush = 1;
    @(posedge clk); #1 flush = 0;
    wait_cycles(10);
    check(mem[32'h500 >> 3] == 64'h66, "committed store survives a flush");
    check(mem[32'h508 >> 3] == {32'(161), 32'(~161)}, "uncommitted store dropped by a flush");

    // 6: misaligned load, LW / LWU extension
    issue(LSU_LD, 8, 1, 0, 64'h104, 0, 0);
    issue(LSU_LW, 9, 1, 0, 64'h104, 0, 0);
    issue(LSU_LWU, 10, 1, 0, 64'h104, 0, 0);
    wait_cycles(10);
    check(got[8] && exc[8] && cause[8] == EXC_LD_MISALIGN, "misaligned load raises cause 4");
    check(got[9] && res[9] == 64'hFFFF_FFFF_DEAD_BEEF, $sformatf("LW sign-extends %h", res[9]));
    check(got[10] && res[10] == 64'h0000_0000_DEAD_BEEF, $sformatf("LWU zero-extends %h", res[10]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
