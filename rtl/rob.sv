// rob: ReOrder Buffer with sequential allocation and two commit slots.
//
// Every issued instruction gets the entry at the tail, in program order; the
// entry index is the instruction's tag. Results arrive from the CDB. Two
// instructions may leave per cycle:
//  * the in-order slot commits the head entry once it is complete. If that
//    entry is a mispredicted branch the whole backend is flushed (fetch was
//    already redirected when the branch resolved); if it raised an exception
//    the backend is flushed and the exception is reported (cause and PC).
//  * the out-of-order slot commits the oldest younger entry that is complete,
//    raised no exception, is not a mispredicted branch and is no longer
//    speculative: no older entry is a branch/jump, load/store or faulting
//    instruction that is unresolved, mispredicted or faulting.
// Write-after-write: a committing instruction writes the register file
// (commit_write) unless a younger instruction with the same destination has
// already committed; those younger entries are still in the buffer because
// the head has not passed them. (The register status table separately
// clears its busy bit only for the latest writer.)
// Entries committed out of order stay allocated: the head only moves past
// them, and entries are never reallocated out of order. When the head
// commits, the head pointer jumps over every following entry that has
// already been committed, so an entire run of early-committed instructions
// leaves the buffer in one cycle.
// Timing: allocation, CDB write and commit all take effect at the clock edge;
// an instruction can commit the cycle after its CDB broadcast.
// Sequential allocation, the two slots and the out-of-order conditions follow
// the core's description; treating loads/stores as speculation barriers and
// the single-cycle head jump are this design's reading of it.
module rob
  import len5_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // allocation from the issue stage
  input  logic       alloc_valid,
  output logic       alloc_ready,
  output rob_idx_t   alloc_tag,
  input  xlen_t      alloc_pc,
  input  logic       alloc_has_rd,
  input  logic [4:0] alloc_rd,
  input  logic       alloc_is_ctrl,   // branch/jump/load/store: speculation barrier
  input  logic       alloc_is_store,
  input  logic       alloc_done,      // completes at issue (exception at decode)
  input  logic       alloc_exc,
  input  logic [4:0] alloc_cause,
  // operand read ports for the issue stage
  input  rob_idx_t   rd_tag [2],
  output logic       rd_done [2],
  output xlen_t      rd_value [2],
  // results
  input  logic       cdb_valid,
  input  cdb_t       cdb,
  // commit slots: 0 = in order (head), 1 = out of order
  output logic       commit_valid [2],
  output rob_idx_t   commit_tag [2],
  output logic       commit_has_rd [2],
  output logic [4:0] commit_rd [2],
  output xlen_t      commit_value [2],
  output logic       commit_is_store [2],
  output logic       commit_write [2],    // write the register file
  // flush requests (from the in-order slot)
  output logic       flush_mispred,
  output logic       exc_valid,
  output xlen_t      exc_pc,
  output logic [4:0] exc_cause,
  output rob_idx_t   head,
  output logic       empty
);

  typedef struct packed {
    logic       valid;
    logic       done;
    logic       committed;
    logic       exc;
    logic [4:0] cause;
    logic       mispred;
    logic       is_ctrl;
    logic       is_store;
    logic       has_rd;
    logic [4:0] rd;
    xlen_t      value;
    xlen_t      pc;
  } rob_entry_t;

  rob_entry_t [ROB_DEPTH-1:0] rob_q;
  rob_idx_t                   head_q, tail_q;
  logic [ROB_IDX_W:0]         count_q;

  logic     c0, c1, do_flush;
  rob_idx_t c1_tag;
  logic [ROB_IDX_W:0] n_pop;

  assign head        = head_q;
  assign empty       = (count_q == '0);
  assign alloc_ready = (count_q != (ROB_IDX_W+1)'(ROB_DEPTH));
  assign alloc_tag   = tail_q;

  for (genvar p = 0; p < 2; p++) begin : g_rd
    assign rd_done[p]  = rob_q[rd_tag[p]].valid && rob_q[rd_tag[p]].done;
    assign rd_value[p] = rob_q[rd_tag[p]].value;
  end

  // in-order slot
  rob_entry_t h;
  assign h  = rob_q[head_q];
  assign c0 = h.valid && h.done && !h.committed;
  assign do_flush = c0 && (h.exc || h.mispred);

  // per-entry flags, rotated so that bit a describes the entry a places
  // after the head (keeps the scans below free of wide indexed muxes)
  typedef logic [ROB_DEPTH-1:0]      vec_t;
  typedef logic [ROB_DEPTH-1:0][4:0] rdvec_t;
  vec_t   elig_v, barrier_v, comm_v, hasrd_v;
  vec_t   elig_r, barrier_r, comm_r, hasrd_r, live_r;
  rdvec_t rd_v, rd_r;
  rob_idx_t c1_off;

  always_comb begin
    for (int i = 0; i < ROB_DEPTH; i++) begin
      elig_v[i]    = rob_q[i].valid && rob_q[i].done && !rob_q[i].committed &&
                     !rob_q[i].exc && !rob_q[i].mispred;
      barrier_v[i] = rob_q[i].valid && rob_q[i].is_ctrl &&
                     (!rob_q[i].done || rob_q[i].exc || rob_q[i].mispred);
      comm_v[i]    = rob_q[i].valid && rob_q[i].committed;
      hasrd_v[i]   = rob_q[i].has_rd;
      rd_v[i]      = rob_q[i].rd;
    end
    elig_r    = vec_t'({elig_v, elig_v} >> head_q);
    barrier_r = vec_t'({barrier_v, barrier_v} >> head_q);
    comm_r    = vec_t'({comm_v, comm_v} >> head_q);
    hasrd_r   = vec_t'({hasrd_v, hasrd_v} >> head_q);
    rd_r      = rdvec_t'({rd_v, rd_v} >> (5 * int'(head_q)));
    for (int a = 0; a < ROB_DEPTH; a++) live_r[a] = (a < int'(count_q));
  end

  // out-of-order slot: oldest eligible entry younger than the head
  always_comb begin
    logic blocked;
    c1      = 1'b0;
    c1_off  = '0;
    blocked = 1'b0;
    for (int a = 0; a < ROB_DEPTH; a++) begin
      if (a != 0 && !blocked && !c1 && live_r[a] && elig_r[a]) begin
        c1     = 1'b1;
        c1_off = rob_idx_t'(a);
      end
      if (!live_r[a] || barrier_r[a]) blocked = 1'b1;
    end
    if (do_flush) c1 = 1'b0;
  end
  assign c1_tag = head_q + c1_off;

  // how many entries leave from the head this cycle
  always_comb begin
    logic stop;
    n_pop = '0;
    stop  = 1'b0;
    if (h.valid && (h.committed || c0)) begin
      n_pop = 1;
      for (int a = 1; a < ROB_DEPTH; a++) begin
        if (!stop && live_r[a] && (comm_r[a] || (c1 && c1_off == rob_idx_t'(a))))
          n_pop = n_pop + 1'b1;
        else
          stop = 1'b1;
      end
    end
  end

  // register-file write enables: suppressed when a younger writer of the
  // same register has already committed
  always_comb begin
    commit_write[0] = c0 && !h.exc && h.has_rd &&
                      !(c1 && hasrd_r[c1_off] && rd_r[c1_off] == h.rd);
    commit_write[1] = c1 && hasrd_r[c1_off];
    for (int a = 1; a < ROB_DEPTH; a++) begin
      if (live_r[a] && comm_r[a] && hasrd_r[a]) begin
        if (rd_r[a] == h.rd) commit_write[0] = 1'b0;
        if (rob_idx_t'(a) > c1_off && rd_r[a] == rd_r[c1_off]) commit_write[1] = 1'b0;
      end
    end
  end

  // commit outputs
  assign commit_valid[0]    = c0 && !h.exc;
  assign commit_tag[0]      = head_q;
  assign commit_has_rd[0]   = h.has_rd;
  assign commit_rd[0]       = h.rd;
  assign commit_value[0]    = h.value;
  assign commit_is_store[0] = h.is_store;
  assign commit_valid[1]    = c1;
  assign commit_tag[1]      = c1_tag;
  assign commit_has_rd[1]   = rob_q[c1_tag].has_rd;
  assign commit_rd[1]       = rob_q[c1_tag].rd;
  assign commit_value[1]    = rob_q[c1_tag].value;
  assign commit_is_store[1] = rob_q[c1_tag].is_store;

  assign flush_mispred = c0 && h.mispred && !h.exc;
  assign exc_valid     = c0 && h.exc;
  assign exc_pc        = h.pc;
  assign exc_cause     = h.cause;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rob_q   <= '0;
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else if (do_flush) begin
      for (int i = 0; i < ROB_DEPTH; i++) rob_q[i].valid <= 1'b0;
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      for (int i = 0; i < ROB_DEPTH; i++) begin
        if (cdb_valid && cdb.rob_tag == rob_idx_t'(i) && rob_q[i].valid) begin
          rob_q[i].done    <= 1'b1;
          rob_q[i].value   <= cdb.result;
          rob_q[i].exc     <= cdb.exc;
          rob_q[i].cause   <= cdb.cause;
          rob_q[i].mispred <= cdb.mispred;
        end
        if (c1 && c1_tag == rob_idx_t'(i)) rob_q[i].committed <= 1'b1;
        if ((ROB_IDX_W+1)'(rob_idx_t'(rob_idx_t'(i) - head_q)) < n_pop) rob_q[i].valid <= 1'b0;
        if (alloc_valid && alloc_ready && tail_q == rob_idx_t'(i)) begin
          rob_q[i].valid     <= 1'b1;
          rob_q[i].done      <= alloc_done;
          rob_q[i].committed <= 1'b0;
          rob_q[i].exc       <= alloc_exc;
          rob_q[i].cause     <= alloc_cause;
          rob_q[i].mispred   <= 1'b0;
          rob_q[i].is_ctrl   <= alloc_is_ctrl;
          rob_q[i].is_store  <= alloc_is_store;
          rob_q[i].has_rd    <= alloc_has_rd;
          rob_q[i].rd        <= alloc_rd;
          rob_q[i].value     <= '0;
          rob_q[i].pc        <= alloc_pc;
        end
      end
      if (alloc_valid && alloc_ready) tail_q <= tail_q + rob_idx_t'(1);
      head_q  <= head_q + rob_idx_t'(n_pop);
      count_q <= count_q - n_pop + (ROB_IDX_W+1)'(alloc_valid && alloc_ready);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  count_q <= (ROB_IDX_W+1)'(ROB_DEPTH));
  a_cdb_to_live: assert property (@(posedge clk) disable iff (!rst_n)
                                  cdb_valid |-> rob_q[cdb.rob_tag].valid);

endmodule
