// tb_reservation_station: self-checking testbench of the generic RS.
// A one-cycle adder stands in for the execution unit and the CDB request is
// granted every cycle (its broadcast is looped back to the snoop port).
// Checks: operands waiting on a tag are captured from the CDB (also in the
// cycle the instruction is written), results carry the right ROB tag and
// value, the RS reports full at DEPTH entries, ready entries are selected in
// rotating order, and in IN_ORDER mode a younger ready entry never overtakes
// an older waiting one.
module tb_reservation_station;
  import len5_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // two instances: round robin and in order, driven identically
  logic     issue_valid;
  rs_data_t issue_data;
  logic     issue_ready[2];
  logic     eu_req_valid[2];
  eu_req_t  eu_req[2];
  logic     eu_rsp_valid[2];
  eu_rsp_t  eu_rsp[2];
  logic     cdb_req_valid[2];
  cdb_t     cdb_req[2];
  logic     ext_cdb_valid;
  cdb_t     ext_cdb;
  logic     cdb_valid[2];
  cdb_t     cdb[2];
  logic     eu_rsp_ready[2];
  logic     flush = 0;
  rob_idx_t rob_head = '0;

  for (genvar g = 0; g < 2; g++) begin : g_rs
    reservation_station #(.DEPTH(4), .IN_ORDER(g == 1)) dut (
      .clk, .rst_n, .flush, .rob_head,
      .issue_valid, .issue_ready(issue_ready[g]), .issue_data,
      .eu_req_valid(eu_req_valid[g]), .eu_req_ready(1'b1), .eu_req(eu_req[g]),
      .eu_rsp_valid(eu_rsp_valid[g]), .eu_rsp_ready(eu_rsp_ready[g]), .eu_rsp(eu_rsp[g]),
      .cdb_req_valid(cdb_req_valid[g]), .cdb_req_ready(!ext_cdb_valid), .cdb_req(cdb_req[g]),
      .cdb_valid(cdb_valid[g]), .cdb(cdb[g]));
    // execution unit model: registered a + b
    always_ff @(posedge clk) begin
      eu_rsp_valid[g]       <= eu_req_valid[g];
      eu_rsp[g].rs_idx      <= eu_req[g].rs_idx;
      eu_rsp[g].result      <= eu_req[g].a + eu_req[g].b;
      eu_rsp[g].exc         <= 1'b0;
      eu_rsp[g].cause       <= '0;
      eu_rsp[g].mispred     <= 1'b0;
    end
    // the testbench may broadcast producer results; otherwise the RS's own
    assign cdb_valid[g] = ext_cdb_valid | cdb_req_valid[g];
    assign cdb[g]       = ext_cdb_valid ? ext_cdb : cdb_req[g];
  end

  // result log per instance
  logic [63:0] got_val[2][32];
  int          got_order[2][$];
  always @(posedge clk) for (int g = 0; g < 2; g++)
    if (rst_n && cdb_req_valid[g] && !ext_cdb_valid) begin
      got_val[g][cdb_req[g].rob_tag] = cdb_req[g].result;
      got_order[g].push_back(int'(cdb_req[g].rob_tag));
    end

  task automatic issue(input int tag, input bit ar, input int at, input longint av,
                       input bit br, input int bt, input longint bv);
    issue_data = '0;
    issue_data.rob_tag = rob_idx_t'(tag);
    issue_data.a_ready = ar; issue_data.a_tag = rob_idx_t'(at); issue_data.a_val = 64'(av);
    issue_data.b_ready = br; issue_data.b_tag = rob_idx_t'(bt); issue_data.b_val = 64'(bv);
    issue_valid = 1;
    @(posedge clk);
    #1 issue_valid = 0;
  endtask

  task automatic bcast(input int tag, input longint val);
    ext_cdb_valid = 1; ext_cdb = '0; ext_cdb.rob_tag = rob_idx_t'(tag); ext_cdb.result = 64'(val);
    @(posedge clk);
    #1 ext_cdb_valid = 0;
  endtask

  initial begin
    issue_valid = 0; issue_data = '0; ext_cdb_valid = 0; ext_cdb = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // instr tag 1 waits on tag 20 (a); instr tag 2 ready; tag 3 waits on 21 (b)
    issue(1, 0, 20, 0, 1, 0, 5);
    issue(2, 1, 0, 10, 1, 0, 7);
    issue(3, 1, 0, 100, 0, 21, 0);
    issue(4, 1, 0, 1, 1, 0, 1);
    #1 check(!issue_ready[0] && !issue_ready[1], "RS full at DEPTH entries");
    repeat (6) @(posedge clk);
    // round-robin RS: 2 and 4 done already; in-order RS: nothing (1 waits)
    check(got_order[0].size() == 2, "ready entries executed while older wait");
    check(got_order[1].size() == 0, "in-order RS holds younger entries");
    #1;
    // broadcast tag 20 together with a new instruction depending on it
    ext_cdb_valid = 1; ext_cdb = '0; ext_cdb.rob_tag = 20; ext_cdb.result = 64'd1000;
    @(posedge clk);
    #1 ext_cdb_valid = 0;
    repeat (6) @(posedge clk);
    check(got_order[1].size() == 2, "in-order RS releases 1 and 2 after tag 20");
    bcast(21, 64'd50);
    // write an instruction in the same cycle its operand is broadcast
    #1;
    issue_data = '0; issue_data.rob_tag = 5; issue_data.a_ready = 0; issue_data.a_tag = 22;
    issue_data.b_ready = 1; issue_data.b_val = 3; issue_valid = 1;
    ext_cdb_valid = 1; ext_cdb = '0; ext_cdb.rob_tag = 22; ext_cdb.result = 64'd40;
    @(posedge clk);
    #1 issue_valid = 0; ext_cdb_valid = 0;
    repeat (8) @(posedge clk);
    for (int g = 0; g < 2; g++) begin
      check(got_order[g].size() == 5, $sformatf("rs%0d: all five results", g));
      check(got_val[g][1] == 1005, "tag 1 = 1000 + 5");
      check(got_val[g][2] == 17,   "tag 2 = 10 + 7");
      check(got_val[g][3] == 150,  "tag 3 = 100 + 50");
      check(got_val[g][4] == 2,    "tag 4 = 1 + 1");
      check(got_val[g][5] == 43,   "tag 5 = 40 + 3 (captured at write)");
    end
    check(got_order[0][0] == 2 && got_order[0][1] == 4, "round-robin order 2 then 4");
    check(got_order[1][0] == 1 && got_order[1][1] == 2 && got_order[1][2] == 3,
          "in-order RS executes in program order");
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
