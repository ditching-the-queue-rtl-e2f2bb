// tb_fetch_unit: self-checking testbench of the speculative fetch unit.
// The instruction memory returns a word derived from its address, with
// random grants and a random (in-order) response latency, so that requests
// are still outstanding when a redirect arrives. A stand-in predictor says "taken
// to 0x100" for the fetch address 0x20 and "not taken" elsewhere. The
// consumer accepts at random. A reference PC follows the same rules; every
// dequeued instruction must have the expected PC, word and prediction.
// Redirects to random addresses are applied at random times, including
// while requests are outstanding: the next instruction out must come from
// the new address and no stale word may appear.
module tb_fetch_unit;
  import len5_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic        redirect;
  xlen_t       redirect_pc;
  logic        imem_req, imem_gnt, imem_rvalid;
  xlen_t       imem_addr;
  logic [31:0] imem_rdata;
  xlen_t       pred_pc;
  logic        pred_fire, pred_taken;
  xlen_t       pred_target;
  logic        iq_valid, iq_ready, iq_pred_taken;
  logic [31:0] iq_instr;
  xlen_t       iq_pc, iq_pred_target;

  fetch_unit dut (.*);

  function automatic logic [31:0] word_of(xlen_t a);
    return a[31:0] ^ 32'hA500_0003;
  endfunction

  logic gnt_rand, rdy_rand;
  assign imem_gnt    = imem_req && gnt_rand;
  assign pred_taken  = (pred_pc == 64'h20);
  assign pred_target = 64'h100;
  assign iq_ready    = rdy_rand;
  xlen_t pend [$];
  always @(posedge clk) begin
    gnt_rand    <= ($urandom_range(3) != 0);
    rdy_rand    <= ($urandom_range(3) != 0);
    imem_rvalid <= 1'b0;
    if (pend.size() > 0 && $urandom_range(2) == 0) begin
      imem_rvalid <= 1'b1;
      imem_rdata  <= word_of(pend.pop_front());
    end
    if (rst_n && imem_req && imem_gnt) pend.push_back(imem_addr);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reference model and checker
  xlen_t exp_pc;
  int    n_deq, n_redir;
  always @(posedge clk) begin
    if (rst_n) begin
      if (redirect) begin
        exp_pc = redirect_pc;
        n_redir++;
      end else if (iq_valid && iq_ready) begin
        n_deq++;
        checks++;
        if (iq_pc != exp_pc || iq_instr != word_of(exp_pc) ||
            iq_pred_taken != (exp_pc == 64'h20) ||
            (iq_pred_taken && iq_pred_target != 64'h100)) begin
          failures++;
          $display("FAIL: dequeued pc %h instr %h, expected pc %h", iq_pc, iq_instr, exp_pc);
        end
        exp_pc = (exp_pc == 64'h20) ? 64'h100 : exp_pc + 64'd4;
      end
    end
  end

  initial begin
    redirect = 0; redirect_pc = 0; exp_pc = 0; n_deq = 0; n_redir = 0;
    gnt_rand = 0; rdy_rand = 0; imem_rvalid = 0; imem_rdata = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      if ($urandom_range(24) == 0) begin
        redirect = 1;
        redirect_pc = ($urandom_range(3) == 0) ? 64'h0 : xlen_t'($urandom_range(255) * 4);
      end
      @(posedge clk);
      #1 redirect = 0;
    end
    check(n_deq > 300, $sformatf("enough instructions delivered (%0d)", n_deq));
    check(n_redir > 20, "redirects applied");
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
