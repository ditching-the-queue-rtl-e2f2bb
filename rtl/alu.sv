// alu: single-cycle integer execution unit (RV64I arithmetic and logic).
//
// Takes one request per cycle from the ALU reservation station and returns
// the result on the next cycle, tagged with the RS index. Operand a is rs1
// (or the PC for AUIPC, or zero for LUI) and operand b is rs2 or the
// immediate; the issue stage has already made those choices. The *W
// operations compute on the low 32 bits and sign-extend the result.
// Always ready; the response is valid for exactly one cycle and the RS always
// accepts it. The operation set and the registered output are this design's
// own choices; the description names the unit only.
module alu
  import len5_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    flush,
  input  logic    req_valid,
  output logic    req_ready,
  input  eu_req_t req,
  output logic    rsp_valid,
  input  logic    rsp_ready,
  output eu_rsp_t rsp
);

  xlen_t       res;
  logic [31:0] res_w;

  always_comb begin
    res   = '0;
    res_w = '0;
    unique case (alu_op_e'(req.op))
      ALU_ADD:  res = req.a + req.b;
      ALU_SUB:  res = req.a - req.b;
      ALU_XOR:  res = req.a ^ req.b;
      ALU_OR:   res = req.a | req.b;
      ALU_AND:  res = req.a & req.b;
      ALU_SLL:  res = req.a << req.b[5:0];
      ALU_SRL:  res = req.a >> req.b[5:0];
      ALU_SRA:  res = xlen_t'($signed(req.a) >>> req.b[5:0]);
      ALU_SLT:  res = xlen_t'($signed(req.a) < $signed(req.b));
      ALU_SLTU: res = xlen_t'(req.a < req.b);
      ALU_ADDW: begin res_w = req.a[31:0] + req.b[31:0]; res = {{32{res_w[31]}}, res_w}; end
      ALU_SUBW: begin res_w = req.a[31:0] - req.b[31:0]; res = {{32{res_w[31]}}, res_w}; end
      ALU_SLLW: begin res_w = req.a[31:0] << req.b[4:0]; res = {{32{res_w[31]}}, res_w}; end
      ALU_SRLW: begin res_w = req.a[31:0] >> req.b[4:0]; res = {{32{res_w[31]}}, res_w}; end
      ALU_SRAW: begin
        res_w = 32'($signed(req.a[31:0]) >>> req.b[4:0]);
        res   = {{32{res_w[31]}}, res_w};
      end
      default:  res = '0;
    endcase
  end

  assign req_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp       <= '0;
    end else begin
      rsp_valid   <= req_valid && !flush;
      rsp.rs_idx  <= req.rs_idx;
      rsp.result  <= res;
      rsp.exc     <= 1'b0;
      rsp.cause   <= '0;
      rsp.mispred <= 1'b0;
    end
  end

  a_rsp_taken: assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> rsp_ready);

endmodule
