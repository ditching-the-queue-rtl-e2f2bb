// tb_alu: self-checking testbench of the ALU. Random operands for every
// operation, compared with a reference computed here; checks the one-cycle
// latency and that the RS index is returned with the result.
module tb_alu;
  import len5_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  logic req_valid, req_ready, rsp_valid;
  eu_req_t req;
  eu_rsp_t rsp;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  alu dut (.clk, .rst_n, .flush, .req_valid, .req_ready, .req, .rsp_valid, .rsp_ready(1'b1), .rsp);

  function automatic logic [63:0] sext32(input logic [31:0] v);
    return {{32{v[31]}}, v};
  endfunction

  function automatic logic [63:0] ref_alu(input int op, input logic [63:0] a, input logic [63:0] b);
    case (op)
      0:  return a + b;
      1:  return a - b;
      2:  return a ^ b;
      3:  return a | b;
      4:  return a & b;
      5:  return a << b[5:0];
      6:  return a >> b[5:0];
      7:  return $signed(a) >>> b[5:0];
      8:  return {63'b0, $signed(a) < $signed(b)};
      9:  return {63'b0, a < b};
      10: return sext32(a[31:0] + b[31:0]);
      11: return sext32(a[31:0] - b[31:0]);
      12: return sext32(a[31:0] << b[4:0]);
      13: return sext32(a[31:0] >> b[4:0]);
      14: return sext32($signed(a[31:0]) >>> b[4:0]);
      default: return 0;
    endcase
  endfunction

  initial begin
    logic [63:0] exp;
    req_valid = 0; req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      req_valid = 1;
      req.op = 4'(n % 15);
      req.a = {$urandom, $urandom};
      req.b = (n % 3 == 0) ? 64'($urandom % 70) : {$urandom, $urandom};
      req.rs_idx = rs_idx_t'(n);
      exp = ref_alu(n % 15, req.a, req.b);
      @(posedge clk);
      #1;
      checks++;
      if (!(rsp_valid && rsp.result == exp && rsp.rs_idx == rs_idx_t'(n))) begin
        failures++;
        $display("FAIL op %0d a=%h b=%h got %h exp %h", n % 15, req.a, req.b, rsp.result, exp);
      end
      req_valid = 0;
    end
    @(posedge clk); #1;
    checks++;
    if (rsp_valid) failures++;
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
