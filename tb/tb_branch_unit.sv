// tb_branch_unit: self-checking testbench of the branch unit. Random
// operands for every branch kind, with random predictions; the taken flag,
// next PC, link value and mispredict flag are compared with a reference
// computed here, one cycle after each request.
module tb_branch_unit;
  import len5_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  logic req_valid, req_ready, rsp_valid, res_valid;
  eu_req_t req;
  eu_rsp_t rsp;
  bu_res_t res;
  int checks = 0, failures = 0, nmis = 0;
  always #5 clk = ~clk;

  branch_unit dut (.clk, .rst_n, .flush, .req_valid, .req_ready, .req,
                   .rsp_valid, .rsp_ready(1'b1), .rsp, .res_valid, .res);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic tk;
    logic [63:0] tgt, nxt, pred;
    req_valid = 0; req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      req = '0;
      req.op  = 4'(n % 11);
      req.a   = (n % 4 == 0) ? 64'(n) : {$urandom, $urandom};
      req.b   = (n % 4 == 0) ? 64'(n) : ((n % 5 == 0) ? req.a : {$urandom, $urandom});
      req.pc  = {32'b0, $urandom} & ~64'd3;
      req.imm = 64'($signed(12'($urandom))) & ~64'd3;
      req.rs_idx = rs_idx_t'(n);
      case (n % 11)
        0: tk = req.a == req.b;
        1: tk = req.a != req.b;
        2: tk = $signed(req.a) < $signed(req.b);
        3: tk = $signed(req.a) >= $signed(req.b);
        4: tk = req.a < req.b;
        5: tk = req.a >= req.b;
        default: tk = 1;
      endcase
      if (n % 11 inside {7, 9, 10}) begin
        req.a = req.a & ~64'd3;
        tgt = (req.a + req.imm) & ~64'd1;
      end else tgt = req.pc + req.imm;
      nxt = tk ? tgt : req.pc + 4;
      req.pred_taken  = $urandom % 2;
      req.pred_target = ($urandom % 2) ? tgt : tgt + 8;
      pred = req.pred_taken ? req.pred_target : req.pc + 4;
      req_valid = 1;
      @(posedge clk); #1;
      req_valid = 0;
      check(rsp_valid && res_valid, "response valid after one cycle");
      check(rsp.result == req.pc + 4, "link value");
      check(res.taken == tk, $sformatf("taken op %0d", n % 11));
      check(res.target == nxt, "next pc");
      check(rsp.mispred == (nxt != pred) && res.mispred == rsp.mispred, "mispredict flag");
      check(res.is_call == (n % 11 inside {8, 9}) && res.is_ret == (n % 11 == 10), "call/ret kind");
      if (rsp.mispred) nmis++;
    end
    check(nmis > 50, "mispredictions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
