// tb_muldiv: self-checking testbench of the mul/div unit. Random operands
// (plus division by zero and the signed overflow case) against a reference
// computed here; checks the 2-cycle multiplier latency, one multiply accepted
// per cycle, and that the divider takes one cycle per quotient bit.
module tb_muldiv;
  import len5_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  logic req_valid, req_ready, rsp_valid;
  eu_req_t req;
  eu_rsp_t rsp;
  int checks = 0, failures = 0, cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  muldiv dut (.clk, .rst_n, .flush, .req_valid, .req_ready, .req, .rsp_valid, .rsp_ready(1'b1), .rsp);

  logic [63:0] exp_res[8];
  int          exp_cyc[8];
  int          nresp = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [63:0] ref_md(input int op, input logic [63:0] a, input logic [63:0] b);
    logic signed [127:0] ps;
    logic [127:0] pu;
    case (op)
      0: return a * b;
      1: begin ps = $signed({{64{a[63]}}, a}) * $signed({{64{b[63]}}, b}); return ps[127:64]; end
      2: begin pu = {64'b0, a} * {64'b0, b}; return pu[127:64]; end
      3: begin pu = a * b; return {{32{pu[31]}}, pu[31:0]}; end
      4: return (b == 0) ? '1 : ((a == 64'h8000_0000_0000_0000 && b == '1) ? a : 64'($signed(a) / $signed(b)));
      5: return (b == 0) ? '1 : a / b;
      6: return (b == 0) ? a : ((a == 64'h8000_0000_0000_0000 && b == '1) ? 0 : 64'($signed(a) % $signed(b)));
      7: return (b == 0) ? a : a % b;
      default: return 0;
    endcase
  endfunction

  always @(posedge clk) if (rst_n && rsp_valid) begin
    nresp++;
    check(rsp.result == exp_res[rsp.rs_idx], $sformatf("result idx %0d got %h exp %h",
          rsp.rs_idx, rsp.result, exp_res[rsp.rs_idx]));
    check(cycle == exp_cyc[rsp.rs_idx], $sformatf("latency idx %0d got %0d exp %0d",
          rsp.rs_idx, cycle, exp_cyc[rsp.rs_idx]));
  end

  task automatic send(input int op, input logic [63:0] a, input logic [63:0] b, input int idx, input int lat);
    @(negedge clk);
    req_valid = 1; req = '0; req.op = 4'(op); req.a = a; req.b = b; req.rs_idx = rs_idx_t'(idx);
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    exp_res[idx] = ref_md(op, a, b);
    exp_cyc[idx] = cycle + lat;
    #1 req_valid = 0;
  endtask

  initial begin
    logic [63:0] a, b;
    int sent = 0;
    req_valid = 0; req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // back-to-back multiplies: one per cycle, two-cycle latency
    for (int n = 0; n < 200; n++) begin
      send(n % 4, {$urandom, $urandom}, {$urandom, $urandom}, n % 4, 2);
      sent++;
    end
    repeat (4) @(posedge clk);
    // divisions: 64 iterations + 1 cycle to present the result
    for (int n = 0; n < 40; n++) begin
      a = {$urandom, $urandom};
      b = (n % 3 == 0) ? 64'($urandom % 100) : {$urandom, $urandom} >> ($urandom % 60);
      if (n == 5) b = 0;
      if (n == 6) begin a = 64'h8000_0000_0000_0000; b = '1; end
      send(4 + n % 4, a, b, 4 + n % 4, 65);
      sent++;
      repeat (66) @(posedge clk);
    end
    check(nresp == sent, "every request answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
