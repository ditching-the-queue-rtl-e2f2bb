// reservation_station: generic Tomasulo reservation station (RS).
//
// Holds up to DEPTH issued instructions of one class. Each entry goes
// EMPTY -> PENDING (waiting for operands and selection) -> EXEC (sent to the
// execution unit) -> DONE (result held here until the CDB takes it) -> EMPTY.
// While PENDING, an entry snoops the CDB and captures any operand whose tag
// (the producer's ROB index) is broadcast; an instruction written in the same
// cycle as a matching broadcast captures it too.
//
// Selection: with IN_ORDER = 0, ready entries are picked with a rotating
// (round-robin) priority starting after the last one sent, so no ready entry
// starves. With IN_ORDER = 1 (branch unit) only the oldest not-yet-executed
// entry may go, so instructions execute in program order; age is the distance
// of the entry's ROB tag from the ROB head. Among DONE entries the oldest is
// offered to the CDB. The execution unit gets one request per cycle at most
// and returns results tagged with the RS index; results are always accepted.
//
// Timing: an instruction written on edge k with ready operands can be sent on
// the cycle after; its entry is freed on the edge the CDB accepts its result.
// Keeping results in the RS until the CDB accepts them, round-robin selection
// and in-order selection for branches follow the core's description; the
// age-by-ROB-tag rule and the oldest-first CDB request are this design's own.
module reservation_station
  import len5_pkg::*;
#(
  parameter int unsigned DEPTH    = 4,
  parameter bit          IN_ORDER = 1'b0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     flush,
  input  rob_idx_t rob_head,
  // from the issue stage
  input  logic     issue_valid,
  output logic     issue_ready,
  input  rs_data_t issue_data,
  // to / from the execution unit
  output logic     eu_req_valid,
  input  logic     eu_req_ready,
  output eu_req_t  eu_req,
  input  logic     eu_rsp_valid,
  output logic     eu_rsp_ready,
  input  eu_rsp_t  eu_rsp,
  // result request to the CDB
  output logic     cdb_req_valid,
  input  logic     cdb_req_ready,
  output cdb_t     cdb_req,
  // CDB snoop
  input  logic     cdb_valid,
  input  cdb_t     cdb
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef enum logic [1:0] {E_EMPTY, E_PENDING, E_EXEC, E_DONE} estate_e;

  estate_e  [DEPTH-1:0] state_q;
  rs_data_t [DEPTH-1:0] data_q;
  xlen_t    [DEPTH-1:0] res_q;
  logic     [DEPTH-1:0] exc_q, mispred_q;
  logic     [DEPTH-1:0][4:0] cause_q;
  logic     [IDX_W-1:0] rr_q;

  logic [IDX_W-1:0] free_idx, ex_idx, cdb_idx;
  logic             free_found, ex_found, cdb_found;
  logic [DEPTH-1:0] ready_v;

  function automatic rob_idx_t age_of(rob_idx_t tag, rob_idx_t head);
    return tag - head;
  endfunction

  // free slot
  always_comb begin
    free_found = 1'b0;
    free_idx   = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (state_q[i] == E_EMPTY) begin free_found = 1'b1; free_idx = IDX_W'(i); end
  end
  assign issue_ready = free_found;

  // execution selection
  always_comb begin
    for (int i = 0; i < DEPTH; i++)
      ready_v[i] = (state_q[i] == E_PENDING) && data_q[i].a_ready && data_q[i].b_ready;
    ex_found = 1'b0;
    ex_idx   = '0;
    if (IN_ORDER) begin
      // oldest pending entry, only if it is ready
      rob_idx_t best_age;
      logic     have;
      best_age = '1;
      have     = 1'b0;
      for (int i = 0; i < DEPTH; i++)
        if (state_q[i] == E_PENDING &&
            (!have || age_of(data_q[i].rob_tag, rob_head) < best_age)) begin
          have     = 1'b1;
          best_age = age_of(data_q[i].rob_tag, rob_head);
          ex_idx   = IDX_W'(i);
        end
      ex_found = have && ready_v[ex_idx];
    end else begin
      // round robin: first ready entry at or after rr_q
      for (int k = DEPTH - 1; k >= 0; k--) begin
        int unsigned j;
        j = (int'(rr_q) + k) % DEPTH;
        if (ready_v[j]) begin ex_found = 1'b1; ex_idx = IDX_W'(j); end
      end
    end
  end

  assign eu_req_valid       = ex_found;
  assign eu_req.op          = data_q[ex_idx].op;
  assign eu_req.rs_idx      = rs_idx_t'(ex_idx);
  assign eu_req.a           = data_q[ex_idx].a_val;
  assign eu_req.b           = data_q[ex_idx].b_val;
  assign eu_req.imm         = data_q[ex_idx].imm;
  assign eu_req.pc          = data_q[ex_idx].pc;
  assign eu_req.pred_taken  = data_q[ex_idx].pred_taken;
  assign eu_req.pred_target = data_q[ex_idx].pred_target;
  assign eu_rsp_ready       = 1'b1;

  // CDB request: oldest DONE entry
  always_comb begin
    rob_idx_t best_age;
    best_age  = '1;
    cdb_found = 1'b0;
    cdb_idx   = '0;
    for (int i = 0; i < DEPTH; i++)
      if (state_q[i] == E_DONE &&
          (!cdb_found || age_of(data_q[i].rob_tag, rob_head) < best_age)) begin
        cdb_found = 1'b1;
        best_age  = age_of(data_q[i].rob_tag, rob_head);
        cdb_idx   = IDX_W'(i);
      end
  end
  assign cdb_req_valid   = cdb_found;
  assign cdb_req.rob_tag = data_q[cdb_idx].rob_tag;
  assign cdb_req.result  = res_q[cdb_idx];
  assign cdb_req.exc     = exc_q[cdb_idx];
  assign cdb_req.cause   = cause_q[cdb_idx];
  assign cdb_req.mispred = mispred_q[cdb_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= '{default: E_EMPTY};
      data_q    <= '0;
      res_q     <= '0;
      exc_q     <= '0;
      cause_q   <= '0;
      mispred_q <= '0;
      rr_q      <= '0;
    end else if (flush) begin
      state_q <= '{default: E_EMPTY};
    end else begin
      // operand capture from the CDB
      if (cdb_valid) begin
        for (int i = 0; i < DEPTH; i++) begin
          if (state_q[i] == E_PENDING) begin
            if (!data_q[i].a_ready && data_q[i].a_tag == cdb.rob_tag) begin
              data_q[i].a_ready <= 1'b1;
              data_q[i].a_val   <= cdb.result;
            end
            if (!data_q[i].b_ready && data_q[i].b_tag == cdb.rob_tag) begin
              data_q[i].b_ready <= 1'b1;
              data_q[i].b_val   <= cdb.result;
            end
          end
        end
      end
      // new instruction
      if (issue_valid && issue_ready) begin
        state_q[free_idx] <= E_PENDING;
        data_q[free_idx]  <= issue_data;
        if (cdb_valid && !issue_data.a_ready && issue_data.a_tag == cdb.rob_tag) begin
          data_q[free_idx].a_ready <= 1'b1;
          data_q[free_idx].a_val   <= cdb.result;
        end
        if (cdb_valid && !issue_data.b_ready && issue_data.b_tag == cdb.rob_tag) begin
          data_q[free_idx].b_ready <= 1'b1;
          data_q[free_idx].b_val   <= cdb.result;
        end
      end
      // sent to the execution unit
      if (eu_req_valid && eu_req_ready) begin
        state_q[ex_idx] <= E_EXEC;
        rr_q            <= (ex_idx == IDX_W'(DEPTH - 1)) ? '0 : ex_idx + IDX_W'(1);
      end
      // result back
      if (eu_rsp_valid) begin
        state_q[eu_rsp.rs_idx[IDX_W-1:0]]   <= E_DONE;
        res_q[eu_rsp.rs_idx[IDX_W-1:0]]     <= eu_rsp.result;
        exc_q[eu_rsp.rs_idx[IDX_W-1:0]]     <= eu_rsp.exc;
        cause_q[eu_rsp.rs_idx[IDX_W-1:0]]   <= eu_rsp.cause;
        mispred_q[eu_rsp.rs_idx[IDX_W-1:0]] <= eu_rsp.mispred;
      end
      // result taken by the CDB
      if (cdb_req_valid && cdb_req_ready) state_q[cdb_idx] <= E_EMPTY;
    end
  end

  a_depth: assert property (@(posedge clk) DEPTH <= (1 << RS_IDX_W));
  a_rsp_exec: assert property (@(posedge clk) disable iff (!rst_n || flush)
                               eu_rsp_valid |-> state_q[eu_rsp.rs_idx[IDX_W-1:0]] == E_EXEC);

endmodule
