// len5_top: out-of-order RV64 core with a Configurable-Latency Coprocessor
// (CLC) attached as one more execution unit.
//
// Frontend: fetch_unit + branch_predictor fetch speculatively into a small
// instruction queue. Backend (Tomasulo with a ReOrder Buffer):
//   issue_stage   decodes, allocates the ROB entry, reads operands from the
//                 register file / ROB, renames rd in reg_status and writes
//                 the instruction into the reservation station of its unit;
//   RSs + units   ALU (8-entry RS), MUL/DIV (4), branch unit (4, in order),
//                 CLC (4), and the load-store unit with its 8-entry load and
//                 16-entry store buffers;
//   cdb_arbiter   one result per cycle on the Common Data Bus, branch first;
//   rob           32 entries, sequential allocation, an in-order and an
//                 out-of-order commit slot; commits write the register file.
// A mispredicted branch redirects fetch as soon as it resolves; issue then
// waits until that branch commits, which flushes the backend. An exception
// at commit flushes everything and restarts fetch at TRAP_ADDR; it is also
// reported on exc_valid/exc_cause/exc_pc. The CLC's iterative / pipelined
// mode and latency come from the xdummy.iter / xdummy.pipe instruction.
// Memory: instruction port (OBI-like, 32-bit words) and data port through a
// 64-to-32-bit bridge (OBI-like, 32-bit). The memories themselves are
// outside. mcycle/minstret count cycles and retired instructions; the ev_*
// outputs pulse on the events that limit or help throughput.
// Structure and sizes follow the core's description; the instruction
// subset, trap handling and memory protocol are this design's own choices.
// Lint notes: reg_status.commit_newest and rob.empty are left unconnected on
// purpose (register-file writes use the ROB's commit_write instead, and the
// core never needs "ROB empty"). The eu_* link arrays keep an unused,
// tied-off LSU slot so they can be indexed by unit number; the LSU has its
// own buffers instead. The note that rst_n is used both synchronously and
// asynchronously comes from the reset term in the reservation stations'
// "disable iff" assertions, not from any circuit.
module len5_top
  import len5_pkg::*;
#(
  parameter xlen_t       BOOT_ADDR       = 64'h0000_0000_0000_0000,
  parameter xlen_t       TRAP_ADDR       = 64'h0000_0000_0000_0100,
  parameter int unsigned ALU_RS          = ALU_RS_DEPTH,
  parameter int unsigned BU_RS           = BU_RS_DEPTH,
  parameter int unsigned MULDIV_RS       = MULDIV_RS_DEPTH,
  parameter int unsigned CLC_RS          = CLC_RS_DEPTH,
  parameter int unsigned LB_ENTRIES      = LB_DEPTH,
  parameter int unsigned SB_ENTRIES      = SB_DEPTH,
  parameter int unsigned CLC_PIPE_STAGES = 32,
  parameter int unsigned CLC_MAX_LATENCY = 4095
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory
  output logic        imem_req,
  input  logic        imem_gnt,
  output xlen_t       imem_addr,
  input  logic        imem_rvalid,
  input  logic [31:0] imem_rdata,
  // data memory (32-bit bus)
  output logic        dmem_req,
  input  logic        dmem_gnt,
  output logic        dmem_we,
  output logic [31:0] dmem_addr,
  output logic [3:0]  dmem_be,
  output logic [31:0] dmem_wdata,
  input  logic        dmem_rvalid,
  input  logic [31:0] dmem_rdata,
  // observation
  input  logic [4:0]  dbg_reg_addr,
  output xlen_t       dbg_reg_data,
  output logic [63:0] mcycle,
  output logic [63:0] minstret,
  output logic        exc_valid,
  output logic [4:0]  exc_cause,
  output xlen_t       exc_pc,
  // events
  output logic        ev_stall_rob_full,
  output logic        ev_stall_rs_full,
  output logic        ev_commit_ooo,
  output logic        ev_mispredict,
  output logic        ev_flush,
  output logic        ev_clc_iter,
  output logic        ev_clc_pipe,
  output logic        ev_cdb_conflict,
  output logic        ev_ld_forward
);

  // ---------------- frontend ----------------
  logic        redirect, mispred_pending_q, backend_flush, flush_mispred;
  xlen_t       redirect_pc, pred_pc, pred_target;
  logic        pred_fire, pred_taken;
  logic        iq_valid, iq_ready, iq_pred_taken;
  logic [31:0] iq_instr;
  xlen_t       iq_pc, iq_pred_target;
  logic        bu_res_valid, bu_res_use;
  bu_res_t     bu_res;

  fetch_unit #(.BOOT_ADDR(BOOT_ADDR)) u_fetch (
    .clk, .rst_n, .redirect, .redirect_pc,
    .imem_req, .imem_gnt, .imem_addr, .imem_rvalid, .imem_rdata,
    .pred_pc, .pred_fire, .pred_taken, .pred_target,
    .iq_valid, .iq_ready, .iq_instr, .iq_pc, .iq_pred_taken, .iq_pred_target);

  branch_predictor u_bpred (
    .clk, .rst_n, .lookup_pc(pred_pc), .lookup_fire(pred_fire),
    .pred_taken, .pred_target, .upd_valid(bu_res_use), .upd(bu_res));

  // only the oldest misprediction redirects; wrong-path resolutions are ignored
  assign bu_res_use = bu_res_valid && !mispred_pending_q && !backend_flush;
  assign redirect    = exc_valid || (bu_res_use && bu_res.mispred);
  assign redirect_pc = exc_valid ? TRAP_ADDR : bu_res.target;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                             mispred_pending_q <= 1'b0;
    else if (backend_flush)                 mispred_pending_q <= 1'b0;
    else if (bu_res_use && bu_res.mispred)  mispred_pending_q <= 1'b1;
  end

  // ---------------- issue ----------------
  logic [4:0] rst_addr [2];
  logic       rst_busy [2];
  rob_idx_t   rst_tag [2];
  logic       rd_issue;
  logic [4:0] rd_addr;
  rob_idx_t   rd_tag;
  xlen_t      rf_rdata [2];
  rob_idx_t   rob_rd_tag [2];
  logic       rob_rd_done [2];
  xlen_t      rob_rd_value [2];
  logic       alloc_valid, alloc_ready, alloc_has_rd, alloc_is_ctrl, alloc_is_store;
  logic       alloc_done, alloc_exc;
  logic [4:0] alloc_rd, alloc_cause;
  rob_idx_t   alloc_tag, rob_head;
  logic [4:0] rs_valid, rs_ready;
  rs_data_t   rs_data;

  issue_stage u_issue (
    .hold(mispred_pending_q || backend_flush),
    .iq_valid, .iq_ready, .iq_instr, .iq_pc, .iq_pred_taken, .iq_pred_target,
    .rs_addr(rst_addr), .rs_busy(rst_busy), .rs_tag(rst_tag),
    .rd_issue, .rd_addr, .rd_tag, .rf_data(rf_rdata),
    .rob_rd_tag, .rob_rd_done, .rob_rd_value,
    .rob_alloc_valid(alloc_valid), .rob_alloc_ready(alloc_ready), .rob_alloc_tag(alloc_tag),
    .rob_alloc_has_rd(alloc_has_rd), .rob_alloc_rd(alloc_rd), .rob_alloc_is_ctrl(alloc_is_ctrl),
    .rob_alloc_is_store(alloc_is_store), .rob_alloc_done(alloc_done), .rob_alloc_exc(alloc_exc),
    .rob_alloc_cause(alloc_cause),
    .rs_valid, .rs_ready, .rs_data,
    .stall_rob(ev_stall_rob_full), .stall_rs(ev_stall_rs_full));

  // ---------------- commit side ----------------
  logic       commit_valid [2], commit_has_rd [2], commit_is_store [2];
  rob_idx_t   commit_tag [2];
  logic [4:0] commit_rd [2];
  xlen_t      commit_value [2];
  logic       rst_commit [2], commit_write [2], lsu_commit_store [2];
  logic       cdb_valid;
  cdb_t       cdb;

  for (genvar p = 0; p < 2; p++) begin : g_commit
    assign rst_commit[p]       = commit_valid[p] && commit_has_rd[p];
    assign lsu_commit_store[p] = commit_valid[p] && commit_is_store[p];
  end

  reg_status u_regstat (
    .clk, .rst_n, .flush(backend_flush),
    .rs_addr(rst_addr), .rs_busy(rst_busy), .rs_tag(rst_tag),
    .issue_valid(rd_issue), .issue_rd(rd_addr), .issue_tag(rd_tag),
    .commit_valid(rst_commit), .commit_rd, .commit_tag, .commit_newest());

  regfile u_rf (
    .clk, .rst_n, .raddr(rst_addr), .rdata(rf_rdata),
    .dbg_addr(dbg_reg_addr), .dbg_data(dbg_reg_data),
    .we(commit_write), .waddr(commit_rd), .wdata(commit_value));

  rob u_rob (
    .clk, .rst_n,
    .alloc_valid, .alloc_ready, .alloc_tag, .alloc_pc(iq_pc), .alloc_has_rd, .alloc_rd,
    .alloc_is_ctrl, .alloc_is_store, .alloc_done, .alloc_exc, .alloc_cause,
    .rd_tag(rob_rd_tag), .rd_done(rob_rd_done), .rd_value(rob_rd_value),
    .cdb_valid, .cdb,
    .commit_valid, .commit_tag, .commit_has_rd, .commit_rd, .commit_value, .commit_is_store, .commit_write,
    .flush_mispred, .exc_valid, .exc_pc, .exc_cause, .head(rob_head), .empty());

  assign backend_flush = flush_mispred || exc_valid;

  // ---------------- reservation stations and units ----------------
  logic    [4:0] eu_req_valid, eu_req_ready, eu_rsp_valid, eu_rsp_ready;
  eu_req_t [4:0] eu_req;
  eu_rsp_t [4:0] eu_rsp;
  logic    [4:0] cdb_req_valid, cdb_req_ready;
  cdb_t    [4:0] cdb_req;

  reservation_station #(.DEPTH(ALU_RS)) u_rs_alu (
    .clk, .rst_n, .flush(backend_flush), .rob_head,
    .issue_valid(rs_valid[EU_ALU]), .issue_ready(rs_ready[EU_ALU]), .issue_data(rs_data),
    .eu_req_valid(eu_req_valid[EU_ALU]), .eu_req_ready(eu_req_ready[EU_ALU]), .eu_req(eu_req[EU_ALU]),
    .eu_rsp_valid(eu_rsp_valid[EU_ALU]), .eu_rsp_ready(eu_rsp_ready[EU_ALU]), .eu_rsp(eu_rsp[EU_ALU]),
    .cdb_req_valid(cdb_req_valid[EU_ALU]), .cdb_req_ready(cdb_req_ready[EU_ALU]), .cdb_req(cdb_req[EU_ALU]),
    .cdb_valid, .cdb);

  alu u_alu (
    .clk, .rst_n, .flush(backend_flush),
    .req_valid(eu_req_valid[EU_ALU]), .req_ready(eu_req_ready[EU_ALU]), .req(eu_req[EU_ALU]),
    .rsp_valid(eu_rsp_valid[EU_ALU]), .rsp_ready(eu_rsp_ready[EU_ALU]), .rsp(eu_rsp[EU_ALU]));

  reservation_station #(.DEPTH(MULDIV_RS)) u_rs_muldiv (
    .clk, .rst_n, .flush(backend_flush), .rob_head,
    .issue_valid(rs_valid[EU_MULDIV]), .issue_ready(rs_ready[EU_MULDIV]), .issue_data(rs_data),
    .eu_req_valid(eu_req_valid[EU_MULDIV]), .eu_req_ready(eu_req_ready[EU_MULDIV]), .eu_req(eu_req[EU_MULDIV]),
    .eu_rsp_valid(eu_rsp_valid[EU_MULDIV]), .eu_rsp_ready(eu_rsp_ready[EU_MULDIV]), .eu_rsp(eu_rsp[EU_MULDIV]),
    .cdb_req_valid(cdb_req_valid[EU_MULDIV]), .cdb_req_ready(cdb_req_ready[EU_MULDIV]), .cdb_req(cdb_req[EU_MULDIV]),
    .cdb_valid, .cdb);

  muldiv u_muldiv (
    .clk, .rst_n, .flush(backend_flush),
    .req_valid(eu_req_valid[EU_MULDIV]), .req_ready(eu_req_ready[EU_MULDIV]), .req(eu_req[EU_MULDIV]),
    .rsp_valid(eu_rsp_valid[EU_MULDIV]), .rsp_ready(eu_rsp_ready[EU_MULDIV]), .rsp(eu_rsp[EU_MULDIV]));

  reservation_station #(.DEPTH(BU_RS), .IN_ORDER(1'b1)) u_rs_bu (
    .clk, .rst_n, .flush(backend_flush), .rob_head,
    .issue_valid(rs_valid[EU_BU]), .issue_ready(rs_ready[EU_BU]), .issue_data(rs_data),
    .eu_req_valid(eu_req_valid[EU_BU]), .eu_req_ready(eu_req_ready[EU_BU]), .eu_req(eu_req[EU_BU]),
    .eu_rsp_valid(eu_rsp_valid[EU_BU]), .eu_rsp_ready(eu_rsp_ready[EU_BU]), .eu_rsp(eu_rsp[EU_BU]),
    .cdb_req_valid(cdb_req_valid[EU_BU]), .cdb_req_ready(cdb_req_ready[EU_BU]), .cdb_req(cdb_req[EU_BU]),
    .cdb_valid, .cdb);

  branch_unit u_bu (
    .clk, .rst_n, .flush(backend_flush),
    .req_valid(eu_req_valid[EU_BU]), .req_ready(eu_req_ready[EU_BU]), .req(eu_req[EU_BU]),
    .rsp_valid(eu_rsp_valid[EU_BU]), .rsp_ready(eu_rsp_ready[EU_BU]), .rsp(eu_rsp[EU_BU]),
    .res_valid(bu_res_valid), .res(bu_res));

  reservation_station #(.DEPTH(CLC_RS)) u_rs_clc (
    .clk, .rst_n, .flush(backend_flush), .rob_head,
    .issue_valid(rs_valid[EU_CLC]), .issue_ready(rs_ready[EU_CLC]), .issue_data(rs_data),
    .eu_req_valid(eu_req_valid[EU_CLC]), .eu_req_ready(eu_req_ready[EU_CLC]), .eu_req(eu_req[EU_CLC]),
    .eu_rsp_valid(eu_rsp_valid[EU_CLC]), .eu_rsp_ready(eu_rsp_ready[EU_CLC]), .eu_rsp(eu_rsp[EU_CLC]),
    .cdb_req_valid(cdb_req_valid[EU_CLC]), .cdb_req_ready(cdb_req_ready[EU_CLC]), .cdb_req(cdb_req[EU_CLC]),
    .cdb_valid, .cdb);

  logic        clc_out_valid;
  xlen_t       clc_out_data;
  rs_idx_t     clc_out_id;

  clc #(.DATA_W(XLEN), .ID_W(RS_IDX_W), .LAT_W(12),
        .PIPE_STAGES(CLC_PIPE_STAGES), .MAX_LATENCY(CLC_MAX_LATENCY)) u_clc (
    .clk, .rst_n, .flush(backend_flush),
    .in_valid(eu_req_valid[EU_CLC]), .in_ready(eu_req_ready[EU_CLC]),
    .in_pipe(clc_op_e'(eu_req[EU_CLC].op) == CLC_PIPE),
    .in_latency(eu_req[EU_CLC].imm[11:0]), .in_data(eu_req[EU_CLC].a), .in_id(eu_req[EU_CLC].rs_idx),
    .out_valid(clc_out_valid), .out_ready(eu_rsp_ready[EU_CLC]),
    .out_data(clc_out_data), .out_id(clc_out_id));

  assign eu_rsp_valid[EU_CLC] = clc_out_valid;
  always_comb begin
    eu_rsp[EU_CLC]        = '0;
    eu_rsp[EU_CLC].rs_idx = clc_out_id;
    eu_rsp[EU_CLC].result = clc_out_data;
  end

  // load-store unit and bus bridge
  logic       lsu_mem_req, lsu_mem_gnt, lsu_mem_we, lsu_mem_rvalid;
  xlen_t      lsu_mem_addr, lsu_mem_wdata, lsu_mem_rdata;
  logic [7:0] lsu_mem_be;

  lsu #(.LB_ENTRIES(LB_ENTRIES), .SB_ENTRIES(SB_ENTRIES)) u_lsu (
    .clk, .rst_n, .flush(backend_flush), .rob_head,
    .issue_valid(rs_valid[EU_LSU]), .issue_ready(rs_ready[EU_LSU]), .issue_data(rs_data),
    .commit_store(lsu_commit_store), .commit_tag,
    .cdb_req_valid(cdb_req_valid[EU_LSU]), .cdb_req_ready(cdb_req_ready[EU_LSU]), .cdb_req(cdb_req[EU_LSU]),
    .cdb_valid, .cdb,
    .mem_req(lsu_mem_req), .mem_gnt(lsu_mem_gnt), .mem_we(lsu_mem_we), .mem_addr(lsu_mem_addr),
    .mem_be(lsu_mem_be), .mem_wdata(lsu_mem_wdata), .mem_rvalid(lsu_mem_rvalid), .mem_rdata(lsu_mem_rdata),
    .ev_forward(ev_ld_forward));

  // the LSU port has no execution-unit interface
  assign eu_req_valid[EU_LSU] = 1'b0;
  assign eu_req[EU_LSU]       = '0;
  assign eu_req_ready[EU_LSU] = 1'b0;
  assign eu_rsp_valid[EU_LSU] = 1'b0;
  assign eu_rsp[EU_LSU]       = '0;
  assign eu_rsp_ready[EU_LSU] = 1'b0;


  mem_bridge u_bridge (
    .clk, .rst_n,
    .c_req(lsu_mem_req), .c_gnt(lsu_mem_gnt), .c_we(lsu_mem_we), .c_addr(lsu_mem_addr),
    .c_be(lsu_mem_be), .c_wdata(lsu_mem_wdata), .c_rvalid(lsu_mem_rvalid), .c_rdata(lsu_mem_rdata),
    .b_req(dmem_req), .b_gnt(dmem_gnt), .b_we(dmem_we), .b_addr(dmem_addr), .b_be(dmem_be),
    .b_wdata(dmem_wdata), .b_rvalid(dmem_rvalid), .b_rdata(dmem_rdata));

  // ---------------- CDB ----------------
  cdb_arbiter #(.N_REQ(5), .BU_PORT(int'(EU_BU))) u_cdb (
    .clk, .rst_n, .req_valid(cdb_req_valid), .req_ready(cdb_req_ready), .req(cdb_req),
    .cdb_valid, .cdb);

  // ---------------- counters and events ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mcycle   <= '0;
      minstret <= '0;
    end else begin
      mcycle   <= mcycle + 64'd1;
      minstret <= minstret + 64'(commit_valid[0]) + 64'(commit_valid[1]);
    end
  end

  assign ev_commit_ooo   = commit_valid[1];
  assign ev_mispredict   = bu_res_use && bu_res.mispred;
  assign ev_flush        = backend_flush;
  assign ev_clc_iter     = eu_req_valid[EU_CLC] && eu_req_ready[EU_CLC] &&
                           clc_op_e'(eu_req[EU_CLC].op) == CLC_ITER;
  assign ev_clc_pipe     = eu_req_valid[EU_CLC] && eu_req_ready[EU_CLC] &&
                           clc_op_e'(eu_req[EU_CLC].op) == CLC_PIPE;
  assign ev_cdb_conflict = (cdb_req_valid & (cdb_req_valid - 5'd1)) != 5'd0;

endmodule
