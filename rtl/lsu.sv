// lsu: load-store unit with a load buffer (LB) and a store buffer (SB).
//
// Loads and stores are issued into their own buffer, which plays the role of
// the unit's reservation station: entries snoop the CDB for the base address
// (and, for stores, the data) operand. Address = base + immediate.
//
// Stores stay in the SB in program order. As soon as address and data are
// known the store reports completion on the CDB, so the ROB can commit it;
// commit marks it, and committed stores are written to memory from the SB
// head, one at a time, in order. A flush drops the uncommitted stores only.
// Loads: once its address is known, a load checks every older store still
// in the SB (older = committed, or earlier in ROB order). If an older store
// has an unknown address, or the youngest older store touching the same
// bytes does not cover all of them, the load waits. If that youngest store
// covers the load, its data are forwarded and the load completes without a
// memory access (store-to-load forwarding). Otherwise the load reads memory.
// Misaligned accesses raise the load/store-misaligned exception and never
// reach memory. One memory request is outstanding at a time; committed
// stores have priority over loads.
// Memory port: 64-bit, OBI-like: req/addr/we/be/wdata held until gnt; one
// rvalid (with rdata for loads) per granted request, in order.
// Supported accesses: LW, LWU, LD, SW, SD.
// The two buffers, store-to-load forwarding and the memory-hazard checks
// follow the core's description; the check rules, the single outstanding
// request, the draining of committed stores as soon as possible (rather
// than keeping them as a small cache until space is needed) and the
// priorities are this design's own choices.
module lsu
  import len5_pkg::*;
#(
  parameter int unsigned LB_ENTRIES = LB_DEPTH,
  parameter int unsigned SB_ENTRIES = SB_DEPTH
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  input  rob_idx_t   rob_head,
  // issue
  input  logic       issue_valid,
  output logic       issue_ready,
  input  rs_data_t   issue_data,
  // commit (both ROB slots)
  input  logic       commit_store [2],
  input  rob_idx_t   commit_tag [2],
  // CDB
  output logic       cdb_req_valid,
  input  logic       cdb_req_ready,
  output cdb_t       cdb_req,
  input  logic       cdb_valid,
  input  cdb_t       cdb,
  // memory
  output logic       mem_req,
  input  logic       mem_gnt,
  output logic       mem_we,
  output xlen_t      mem_addr,
  output logic [7:0] mem_be,
  output xlen_t      mem_wdata,
  input  logic       mem_rvalid,
  input  xlen_t      mem_rdata,
  // events
  output logic       ev_forward
);

  localparam int unsigned LB_W = $clog2(LB_ENTRIES);
  localparam int unsigned SB_W = $clog2(SB_ENTRIES);

  typedef enum logic [1:0] {L_WAIT, L_READY, L_MEM, L_DONE} lstate_e;

  typedef struct packed {
    logic       valid;
    lstate_e    state;
    lsu_op_e    op;
    rob_idx_t   tag;
    logic       b_ready;     // base
    rob_idx_t   b_tag;
    xlen_t      b_val;
    xlen_t      imm;
    xlen_t      result;
    logic       exc;
  } lb_entry_t;

  typedef struct packed {
    logic       valid;
    lsu_op_e    op;
    rob_idx_t   tag;
    logic       b_ready;     // base
    rob_idx_t   b_tag;
    xlen_t      b_val;
    logic       d_ready;     // data
    rob_idx_t   d_tag;
    xlen_t      d_val;
    xlen_t      imm;
    logic       reported;
    logic       committed;
  } sb_entry_t;

  lb_entry_t [LB_ENTRIES-1:0] lb_q;
  sb_entry_t [SB_ENTRIES-1:0] sb_q;
  logic [SB_W-1:0] sb_head_q, sb_tail_q;
  logic [SB_W:0]   sb_cnt_q;

  logic            busy_q, busy_load_q, drop_q;
  logic [LB_W-1:0] busy_idx_q;

  // ---------------- helpers ----------------
  function automatic logic [7:0] be_of(lsu_op_e op, xlen_t addr);
    if (op inside {LSU_LD, LSU_SD}) return 8'hFF;
    return addr[2] ? 8'hF0 : 8'h0F;
  endfunction

  function automatic logic misaligned(lsu_op_e op, xlen_t addr);
    if (op inside {LSU_LD, LSU_SD}) return addr[2:0] != 3'b000;
    return addr[1:0] != 2'b00;
  endfunction

  function automatic xlen_t load_result(lsu_op_e op, xlen_t addr, xlen_t dword);
    logic [31:0] w;
    w = addr[2] ? dword[63:32] : dword[31:0];
    case (op)
      LSU_LW:  return {{32{w[31]}}, w};
      LSU_LWU: return {32'b0, w};
      default: return dword;
    endcase
  endfunction

  function automatic rob_idx_t age(rob_idx_t t);
    return t - rob_head;
  endfunction

  // ---------------- addresses ----------------
  xlen_t [LB_ENTRIES-1:0] lb_addr;
  xlen_t [SB_ENTRIES-1:0] sb_addr;
  xlen_t [SB_ENTRIES-1:0] sb_wdata;
  logic  [SB_ENTRIES-1:0][7:0] sb_be;
  always_comb begin
    for (int i = 0; i < LB_ENTRIES; i++) lb_addr[i] = lb_q[i].b_val + lb_q[i].imm;
    for (int i = 0; i < SB_ENTRIES; i++) begin
      sb_addr[i]  = sb_q[i].b_val + sb_q[i].imm;
      sb_be[i]    = be_of(sb_q[i].op, sb_addr[i]);
      sb_wdata[i] = (sb_q[i].op == LSU_SD) ? sb_q[i].d_val : {2{sb_q[i].d_val[31:0]}};
    end
  end

  // ---------------- issue ----------------
  logic            is_store_in, lb_free_found;
  logic [LB_W-1:0] lb_free;
  assign is_store_in = (lsu_op_e'(issue_data.op) inside {LSU_SW, LSU_SD});
  always_comb begin
    lb_free_found = 1'b0;
    lb_free       = '0;
    for (int i = LB_ENTRIES - 1; i >= 0; i--)
      if (!lb_q[i].valid) begin lb_free_found = 1'b1; lb_free = LB_W'(i); end
  end
  assign issue_ready = is_store_in ? (sb_cnt_q != (SB_W+1)'(SB_ENTRIES)) : lb_free_found;

  // position of each SB entry counted from the head (0 = oldest)
  logic [SB_ENTRIES-1:0][SB_W-1:0] sb_pos;
  always_comb
    for (int k = 0; k < SB_ENTRIES; k++) sb_pos[k] = SB_W'(k) - sb_head_q;

  // ---------------- load hazard check and selection ----------------
  logic [LB_ENTRIES-1:0] ld_block, ld_fwd;
  xlen_t [LB_ENTRIES-1:0] ld_fwd_data;
  always_comb begin
    for (int l = 0; l < LB_ENTRIES; l++) begin
      logic [7:0] lbe;
      logic       hit, covers;
      logic [SB_W-1:0] best_pos;
      lbe = be_of(lb_q[l].op, lb_addr[l]);
      ld_block[l]    = 1'b0;
      hit            = 1'b0;
      covers          = 1'b0;
      ld_fwd_data[l] = '0;
      // among the older stores overlapping the load, the youngest wins
      best_pos = '0;
      for (int k = 0; k < SB_ENTRIES; k++) begin
        if (sb_q[k].valid &&
            (sb_q[k].committed || age(sb_q[k].tag) < age(lb_q[l].tag))) begin
          if (!sb_q[k].b_ready) ld_block[l] = 1'b1;
          else if (sb_addr[k][XLEN-1:3] == lb_addr[l][XLEN-1:3] && (sb_be[k] & lbe) != 8'h00 &&
                   (!hit || sb_pos[k] > best_pos)) begin
            hit            = 1'b1;
            best_pos       = sb_pos[k];
            covers         = ((sb_be[k] & lbe) == lbe) && sb_q[k].d_ready;
            ld_fwd_data[l] = sb_wdata[k];
          end
        end
      end
      if (hit && !covers) ld_block[l] = 1'b1;
      ld_fwd[l] = hit && covers;
    end
  end

  // oldest load that is ready and not blocked
  logic            ld_sel_found;
  logic [LB_W-1:0] ld_sel;
  always_comb begin
    rob_idx_t best;
    best = '1;
    ld_sel_found = 1'b0;
    ld_sel = '0;
    for (int l = 0; l < LB_ENTRIES; l++)
      if (lb_q[l].valid && lb_q[l].state == L_READY && !ld_block[l] &&
          (!ld_sel_found || age(lb_q[l].tag) < best)) begin
        ld_sel_found = 1'b1;
        best = age(lb_q[l].tag);
        ld_sel = LB_W'(l);
      end
  end

  // ---------------- memory port ----------------
  logic st_go, ld_go, ld_fwd_go;
  sb_entry_t sbh;
  assign sbh      = sb_q[sb_head_q];
  assign st_go    = !busy_q && sb_cnt_q != '0 && sbh.valid && sbh.committed;
  assign ld_fwd_go = ld_sel_found && ld_fwd[ld_sel];
  assign ld_go    = !busy_q && !st_go && ld_sel_found && !ld_fwd[ld_sel];

  assign mem_req   = st_go || ld_go;
  assign mem_we    = st_go;
  assign mem_addr  = st_go ? {sb_addr[sb_head_q][XLEN-1:3], 3'b000} : {lb_addr[ld_sel][XLEN-1:3], 3'b000};
  assign mem_be    = st_go ? sb_be[sb_head_q] : be_of(lb_q[ld_sel].op, lb_addr[ld_sel]);
  assign mem_wdata = sb_wdata[sb_head_q];
  assign ev_forward = ld_fwd_go;

  // ---------------- CDB request ----------------
  logic            cdb_ld_found, cdb_st_found;
  logic [LB_W-1:0] cdb_ld;
  logic [SB_W-1:0] cdb_st;
  always_comb begin
    rob_idx_t best;
    best = '1;
    cdb_ld_found = 1'b0;
    cdb_ld = '0;
    for (int l = 0; l < LB_ENTRIES; l++)
      if (lb_q[l].valid && lb_q[l].state == L_DONE && (!cdb_ld_found || age(lb_q[l].tag) < best)) begin
        cdb_ld_found = 1'b1;
        best = age(lb_q[l].tag);
        cdb_ld = LB_W'(l);
      end
    cdb_st_found = 1'b0;
    cdb_st = '0;
    for (int k = 0; k < SB_ENTRIES; k++)
      if (sb_q[k].valid && !sb_q[k].reported && sb_q[k].b_ready && sb_q[k].d_ready &&
          (!cdb_st_found || sb_pos[k] < sb_pos[cdb_st])) begin
        cdb_st_found = 1'b1;
        cdb_st = SB_W'(k);
      end
  end

  always_comb begin
    cdb_req = '0;
    cdb_req_valid = cdb_ld_found || cdb_st_found;
    if (cdb_ld_found) begin
      cdb_req.rob_tag = lb_q[cdb_ld].tag;
      cdb_req.result  = lb_q[cdb_ld].result;
      cdb_req.exc     = lb_q[cdb_ld].exc;
      cdb_req.cause   = EXC_LD_MISALIGN;
    end else begin
      cdb_req.rob_tag = sb_q[cdb_st].tag;
      cdb_req.exc     = misaligned(sb_q[cdb_st].op, sb_addr[cdb_st]);
      cdb_req.cause   = EXC_ST_MISALIGN;
    end
  end

  // ---------------- state update ----------------
  logic [SB_W:0] n_committed;
  always_comb begin
    n_committed = '0;
    for (int k = 0; k < SB_ENTRIES; k++)
      if (sb_q[k].valid && sb_q[k].committed) n_committed = n_committed + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    logic sb_pop, sb_push;
    sb_pop  = 1'b0;
    sb_push = 1'b0;
    if (!rst_n) begin
      lb_q        <= '0;
      sb_q        <= '0;
      sb_head_q   <= '0;
      sb_tail_q   <= '0;
      sb_cnt_q    <= '0;
      busy_q      <= 1'b0;
      busy_load_q <= 1'b0;
      busy_idx_q  <= '0;
      drop_q      <= 1'b0;
    end else begin
      // memory response
      if (mem_rvalid) begin
        busy_q <= 1'b0;
        if (busy_load_q) begin
          if (!drop_q && !flush)
            for (int l = 0; l < LB_ENTRIES; l++)
              if (busy_idx_q == LB_W'(l)) begin
                lb_q[l].state  <= L_DONE;
                lb_q[l].result <= load_result(lb_q[l].op, lb_addr[l], mem_rdata);
              end
          drop_q <= 1'b0;
        end else begin
          sb_pop = 1'b1;
        end
      end
      if (mem_req && mem_gnt) begin
        busy_q      <= 1'b1;
        busy_load_q <= ld_go;
        busy_idx_q  <= ld_sel;
        if (ld_go && !flush)
          for (int l = 0; l < LB_ENTRIES; l++)
            if (ld_sel == LB_W'(l)) lb_q[l].state <= L_MEM;
        if (ld_go && flush)  drop_q <= 1'b1;
      end
      if (flush) begin
        for (int l = 0; l < LB_ENTRIES; l++) lb_q[l].valid <= 1'b0;
        if (busy_q && busy_load_q && !mem_rvalid) drop_q <= 1'b1;
        // keep only the committed stores (a prefix of the SB)
        for (int k = 0; k < SB_ENTRIES; k++)
          if (!sb_q[k].committed || (sb_pop && sb_head_q == SB_W'(k))) sb_q[k].valid <= 1'b0;
        sb_tail_q <= sb_head_q + SB_W'(n_committed);
        if (sb_pop) begin
          sb_head_q <= sb_head_q + SB_W'(1);
          sb_cnt_q  <= n_committed - 1'b1;
        end else begin
          sb_cnt_q  <= n_committed;
        end
      end else begin
        // CDB snoop
        if (cdb_valid) begin
          for (int l = 0; l < LB_ENTRIES; l++)
            if (lb_q[l].valid && !lb_q[l].b_ready && lb_q[l].b_tag == cdb.rob_tag) begin
              lb_q[l].b_ready <= 1'b1;
              lb_q[l].b_val   <= cdb.result;
            end
          for (int k = 0; k < SB_ENTRIES; k++) begin
            if (sb_q[k].valid && !sb_q[k].b_ready && sb_q[k].b_tag == cdb.rob_tag) begin
              sb_q[k].b_ready <= 1'b1;
              sb_q[k].b_val   <= cdb.result;
            end
            if (sb_q[k].valid && !sb_q[k].d_ready && sb_q[k].d_tag == cdb.rob_tag) begin
              sb_q[k].d_ready <= 1'b1;
              sb_q[k].d_val   <= cdb.result;
            end
          end
        end
        // address known: check alignment
        for (int l = 0; l < LB_ENTRIES; l++)
          if (lb_q[l].valid && lb_q[l].state == L_WAIT && lb_q[l].b_ready) begin
            if (misaligned(lb_q[l].op, lb_addr[l])) begin
              lb_q[l].state <= L_DONE;
              lb_q[l].exc   <= 1'b1;
            end else begin
              lb_q[l].state <= L_READY;
            end
          end
        // forwarding
        for (int l = 0; l < LB_ENTRIES; l++) begin
          if (ld_fwd_go && ld_sel == LB_W'(l)) begin
            lb_q[l].state  <= L_DONE;
            lb_q[l].result <= load_result(lb_q[l].op, lb_addr[l], ld_fwd_data[l]);
          end
          // CDB grant
          if (cdb_req_valid && cdb_req_ready && cdb_ld_found && cdb_ld == LB_W'(l))
            lb_q[l].valid <= 1'b0;
        end
        for (int k = 0; k < SB_ENTRIES; k++)
          if (cdb_req_valid && cdb_req_ready && !cdb_ld_found && cdb_st == SB_W'(k))
            sb_q[k].reported <= 1'b1;
        // commit marks
        for (int p = 0; p < 2; p++)
          if (commit_store[p])
            for (int k = 0; k < SB_ENTRIES; k++)
              if (sb_q[k].valid && !sb_q[k].committed && sb_q[k].tag == commit_tag[p])
                sb_q[k].committed <= 1'b1;
        // new instruction
        sb_push = issue_valid && issue_ready && is_store_in;
        for (int k = 0; k < SB_ENTRIES; k++)
          if (sb_push && sb_tail_q == SB_W'(k)) begin
            sb_q[k].valid     <= 1'b1;
            sb_q[k].op        <= lsu_op_e'(issue_data.op);
            sb_q[k].tag       <= issue_data.rob_tag;
            sb_q[k].b_ready   <= issue_data.a_ready || (cdb_valid && issue_data.a_tag == cdb.rob_tag);
            sb_q[k].b_tag     <= issue_data.a_tag;
            sb_q[k].b_val     <= issue_data.a_ready ? issue_data.a_val : cdb.result;
            sb_q[k].d_ready   <= issue_data.b_ready || (cdb_valid && issue_data.b_tag == cdb.rob_tag);
            sb_q[k].d_tag     <= issue_data.b_tag;
            sb_q[k].d_val     <= issue_data.b_ready ? issue_data.b_val : cdb.result;
            sb_q[k].imm       <= issue_data.imm;
            sb_q[k].reported  <= 1'b0;
            sb_q[k].committed <= 1'b0;
          end else if (sb_pop && sb_head_q == SB_W'(k)) begin
            sb_q[k].valid <= 1'b0;
          end
        if (sb_push) sb_tail_q <= sb_tail_q + SB_W'(1);
        for (int l = 0; l < LB_ENTRIES; l++)
          if (issue_valid && issue_ready && !is_store_in && lb_free == LB_W'(l)) begin
            lb_q[l].valid   <= 1'b1;
            lb_q[l].state   <= L_WAIT;
            lb_q[l].op      <= lsu_op_e'(issue_data.op);
            lb_q[l].tag     <= issue_data.rob_tag;
            lb_q[l].b_ready <= issue_data.a_ready || (cdb_valid && issue_data.a_tag == cdb.rob_tag);
            lb_q[l].b_tag   <= issue_data.a_tag;
            lb_q[l].b_val   <= issue_data.a_ready ? issue_data.a_val : cdb.result;
            lb_q[l].imm     <= issue_data.imm;
            lb_q[l].exc     <= 1'b0;
          end
        if (sb_pop) sb_head_q <= sb_head_q + SB_W'(1);
        sb_cnt_q <= sb_cnt_q + (SB_W+1)'(sb_push) - (SB_W+1)'(sb_pop);
      end
    end
  end

  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n) busy_q |-> !mem_req);
  a_store_committed: assert property (@(posedge clk) disable iff (!rst_n) mem_req && mem_we |-> sbh.committed);

endmodule
