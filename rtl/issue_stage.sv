// issue_stage: in-order issue of one instruction per cycle.
//
// Takes the oldest fetched instruction, decodes it and, in the same cycle:
// allocates the ROB entry at the tail (its index becomes the instruction's
// tag), looks up the source registers in the register status table and
// reads the operands - from the register file if no in-flight instruction
// writes the register, from the ROB if the latest writer has completed, or
// else leaves the operand waiting on the writer's tag - and writes the
// instruction into the reservation station of its unit. The destination
// register is then tagged with the new ROB index (renaming). An instruction
// that faults at decode (illegal, ECALL) goes straight to the ROB as
// completed with its exception.
// The stage stalls when the ROB is full, when the target RS is full, or
// while `hold` is high (a mispredicted branch has been resolved and the
// backend is waiting for it to commit and flush). stall_rob / stall_rs say
// why an available instruction did not issue.
// Timing: combinational; everything is written at the clock edge.
// Stalling on a full ROB or RS and forwarding from RF or ROB follow the
// core's description; holding issue between branch resolution and the
// commit-time flush is this design's own choice.
module issue_stage
  import len5_pkg::*;
(
  input  logic       hold,
  // instruction queue
  input  logic       iq_valid,
  output logic       iq_ready,
  input  logic [31:0] iq_instr,
  input  xlen_t      iq_pc,
  input  logic       iq_pred_taken,
  input  xlen_t      iq_pred_target,
  // register status table
  output logic [4:0] rs_addr [2],
  input  logic       rs_busy [2],
  input  rob_idx_t   rs_tag [2],
  output logic       rd_issue,
  output logic [4:0] rd_addr,
  output rob_idx_t   rd_tag,
  // register file
  input  xlen_t      rf_data [2],
  // ROB
  output rob_idx_t   rob_rd_tag [2],
  input  logic       rob_rd_done [2],
  input  xlen_t      rob_rd_value [2],
  output logic       rob_alloc_valid,
  input  logic       rob_alloc_ready,
  input  rob_idx_t   rob_alloc_tag,
  output logic       rob_alloc_has_rd,
  output logic [4:0] rob_alloc_rd,
  output logic       rob_alloc_is_ctrl,
  output logic       rob_alloc_is_store,
  output logic       rob_alloc_done,
  output logic       rob_alloc_exc,
  output logic [4:0] rob_alloc_cause,
  // reservation stations, indexed by eu_e
  output logic [4:0] rs_valid,
  input  logic [4:0] rs_ready,
  output rs_data_t   rs_data,
  // stall reasons
  output logic       stall_rob,
  output logic       stall_rs
);

  dec_t dec;
  logic unit_ready, fire;

  decoder u_dec (.instr(iq_instr), .dec);

  assign rs_addr[0]    = dec.rs1;
  assign rs_addr[1]    = dec.rs2;
  assign rob_rd_tag[0] = rs_tag[0];
  assign rob_rd_tag[1] = rs_tag[1];

  assign unit_ready = (dec.eu == EU_NONE) ? 1'b1 : rs_ready[dec.eu];
  assign fire       = iq_valid && !hold && rob_alloc_ready && unit_ready;
  assign iq_ready   = fire;
  assign stall_rob  = iq_valid && !hold && !rob_alloc_ready;
  assign stall_rs   = iq_valid && !hold && rob_alloc_ready && !unit_ready;

  // ROB allocation
  assign rob_alloc_valid    = fire;
  assign rob_alloc_has_rd   = dec.has_rd && dec.rd != 5'd0;
  assign rob_alloc_rd       = dec.rd;
  assign rob_alloc_is_ctrl  = dec.is_ctrl;
  assign rob_alloc_is_store = dec.is_store;
  assign rob_alloc_done     = (dec.eu == EU_NONE);
  assign rob_alloc_exc      = dec.exc;
  assign rob_alloc_cause    = dec.cause;

  // renaming
  assign rd_issue = fire && dec.has_rd && dec.rd != 5'd0;
  assign rd_addr  = dec.rd;
  assign rd_tag   = rob_alloc_tag;

  // operands
  always_comb begin
    rs_data             = '0;
    rs_data.op          = dec.op;
    rs_data.rob_tag     = rob_alloc_tag;
    rs_data.imm         = dec.imm;
    rs_data.pc          = iq_pc;
    rs_data.pred_taken  = iq_pred_taken;
    rs_data.pred_target = iq_pred_target;
    // operand a
    if (dec.uses_rs1) begin
      if (!rs_busy[0]) begin
        rs_data.a_ready = 1'b1; rs_data.a_val = rf_data[0];
      end else if (rob_rd_done[0]) begin
        rs_data.a_ready = 1'b1; rs_data.a_val = rob_rd_value[0];
      end else begin
        rs_data.a_ready = 1'b0; rs_data.a_tag = rs_tag[0];
      end
    end else begin
      rs_data.a_ready = 1'b1;
      rs_data.a_val   = dec.a_pc ? iq_pc : '0;
    end
    // operand b
    if (dec.uses_rs2) begin
      if (!rs_busy[1]) begin
        rs_data.b_ready = 1'b1; rs_data.b_val = rf_data[1];
      end else if (rob_rd_done[1]) begin
        rs_data.b_ready = 1'b1; rs_data.b_val = rob_rd_value[1];
      end else begin
        rs_data.b_ready = 1'b0; rs_data.b_tag = rs_tag[1];
      end
    end else begin
      rs_data.b_ready = 1'b1;
      rs_data.b_val   = dec.imm;
    end
  end

  always_comb begin
    rs_valid = '0;
    if (fire && dec.eu != EU_NONE) rs_valid[dec.eu] = 1'b1;
  end

endmodule
