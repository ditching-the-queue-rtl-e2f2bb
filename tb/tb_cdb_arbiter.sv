// tb_cdb_arbiter: self-checking testbench of the CDB arbiter. With all five
// ports requesting, the branch port must always win; without it the other
// four must be granted in rotating order, exactly one per cycle, and the
// broadcast must carry the granted port's payload.
module tb_cdb_arbiter;
  import len5_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] req_valid, req_ready;
  cdb_t [4:0] req;
  logic cdb_valid;
  cdb_t cdb;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cdb_arbiter #(.N_REQ(5), .BU_PORT(2)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int last, cnt[5];
    req_valid = '0;
    for (int i = 0; i < 5; i++) begin req[i] = '0; req[i].rob_tag = rob_idx_t'(i + 10); req[i].result = 64'(i * 3); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    req_valid = 5'b11111;
    for (int n = 0; n < 10; n++) begin
      #1 check(cdb_valid && req_ready == 5'b00100 && cdb.rob_tag == 12, "branch port wins");
      @(negedge clk);
    end
    req_valid = 5'b11011;
    last = -1;
    for (int i = 0; i < 5; i++) cnt[i] = 0;
    for (int n = 0; n < 40; n++) begin
      int g;
      #1;
      g = -1;
      for (int i = 0; i < 5; i++) if (req_ready[i]) g = i;
      check($onehot(req_ready), "exactly one grant");
      check(g >= 0 && cdb.rob_tag == rob_idx_t'(g + 10) && cdb.result == 64'(g * 3), "payload of granted port");
      if (g >= 0) cnt[g]++;
      if (last >= 0) check(g == ((last == 1) ? 3 : (last == 4 ? 0 : last + 1)), "rotating order");
      last = g;
      @(negedge clk);
    end
    check(cnt[0] == 10 && cnt[1] == 10 && cnt[3] == 10 && cnt[4] == 10, "fair share");
    req_valid = '0;
    #1 check(!cdb_valid && req_ready == '0, "idle bus");
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
