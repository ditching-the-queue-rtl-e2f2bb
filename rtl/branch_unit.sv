// branch_unit: resolves conditional branches, JAL and JALR.
//
// For each request it evaluates the condition on rs1/rs2, computes the
// actual next PC (target if taken, PC + 4 otherwise) and compares it with
// the next PC the frontend predicted. The result written back is the link
// address PC + 4 (used by JAL/JALR), with a mispredict flag for the ROB.
// At the same time the resolution (PC, target, taken, kind, mispredict) is
// sent to the frontend so that the predictor is trained and, on a
// misprediction, fetch is redirected at once instead of waiting for commit.
// A taken target that is not 4-byte aligned raises an instruction-address-
// misaligned exception (cause 0).
// Timing: one request per cycle, response and resolution one cycle later.
// Early redirection on resolution and commit-time flush follow the core's
// description; the encodings and the call/return classification (rd or rs1
// equal to x1/x5) are this design's own choices, the latter following the
// usual RISC-V hint convention.
module branch_unit
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
  output eu_rsp_t rsp,
  // resolution to the frontend
  output logic    res_valid,
  output bu_res_t res
);

  logic  taken, is_cond, mispred, is_call, is_ret, is_reg;
  xlen_t target, next_pc, pred_next;

  always_comb begin
    is_cond = 1'b1;
    unique case (bu_op_e'(req.op))
      BU_BEQ:  taken = (req.a == req.b);
      BU_BNE:  taken = (req.a != req.b);
      BU_BLT:  taken = ($signed(req.a) <  $signed(req.b));
      BU_BGE:  taken = ($signed(req.a) >= $signed(req.b));
      BU_BLTU: taken = (req.a <  req.b);
      BU_BGEU: taken = (req.a >= req.b);
      BU_JAL, BU_JALR, BU_CALL, BU_CALLR, BU_RET: begin taken = 1'b1; is_cond = 1'b0; end
      default: taken = 1'b0;
    endcase
    is_call = (bu_op_e'(req.op) inside {BU_CALL, BU_CALLR});
    is_ret  = (bu_op_e'(req.op) == BU_RET);
    is_reg  = (bu_op_e'(req.op) inside {BU_JALR, BU_CALLR, BU_RET});
    if (is_reg) target = (req.a + req.imm) & ~xlen_t'(1);
    else        target = req.pc + req.imm;
    next_pc   = taken ? target : req.pc + xlen_t'(4);
    pred_next = req.pred_taken ? req.pred_target : req.pc + xlen_t'(4);
    mispred   = (next_pc != pred_next);
  end

  assign req_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp       <= '0;
      res_valid <= 1'b0;
      res       <= '0;
    end else begin
      rsp_valid   <= req_valid && !flush;
      res_valid   <= req_valid && !flush;
      rsp.rs_idx  <= req.rs_idx;
      rsp.result  <= req.pc + xlen_t'(4);
      rsp.exc     <= taken && (target[1:0] != 2'b00);
      rsp.cause   <= 5'd0;
      rsp.mispred <= mispred;
      res.pc      <= req.pc;
      res.target  <= next_pc;
      res.taken   <= taken;
      res.is_cond <= is_cond;
      res.is_call <= is_call;
      res.is_ret  <= is_ret;
      res.mispred <= mispred;
    end
  end

  a_rsp_taken: assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> rsp_ready);

endmodule
