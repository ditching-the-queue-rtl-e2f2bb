// branch_predictor: gshare direction predictor, branch target buffer (BTB)
// and return address stack (RAS) of the speculative frontend.
//
// Lookup (combinational, every fetch address): the BTB is direct-mapped on
// the PC and remembers, for control transfers seen taken before, their
// target and kind (conditional, jump, call, return). On a hit
//   - a return is predicted taken to the address on top of the RAS,
//   - a conditional branch is predicted with the 2-bit counter selected by
//     PC xor global history (gshare),
//   - any other jump is predicted taken to the BTB target.
// When the fetch request is actually sent (lookup_fire), a predicted call
// pushes PC + 4 on the RAS and a predicted return pops it.
// Update (from the branch unit, one cycle after resolution): taken
// transfers are written into the BTB, the counter of a conditional branch
// moves towards the outcome, and the outcome is shifted into the global
// history. History and counters are updated at resolution, not
// speculatively; the RAS is not repaired after a misprediction. Counters
// start at weakly-taken: a branch only reaches them after the BTB has seen
// it taken once, so a loop branch is predicted taken from its second pass
// on, whatever the history bits are at that moment.
// upd.mispred is not used: training depends only on the actual outcome.
// The three structures are named by the core's description; their sizes,
// indexing and update policy are this design's own choices.
module branch_predictor
  import len5_pkg::*;
#(
  parameter int unsigned HIST_BITS   = 8,   // gshare history = log2(counters)
  parameter int unsigned BTB_ENTRIES = 64,
  parameter int unsigned RAS_DEPTH   = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  xlen_t   lookup_pc,
  input  logic    lookup_fire,
  output logic    pred_taken,
  output xlen_t   pred_target,
  input  logic    upd_valid,
  input  bu_res_t upd
);

  localparam int unsigned BTB_IDX_W = $clog2(BTB_ENTRIES);
  localparam int unsigned TAG_W     = XLEN - 2 - BTB_IDX_W;
  localparam int unsigned RAS_PTR_W = (RAS_DEPTH > 1) ? $clog2(RAS_DEPTH) : 1;

  typedef enum logic [1:0] {K_COND, K_JUMP, K_CALL, K_RET} kind_e;

  typedef struct packed {
    logic             valid;
    logic [TAG_W-1:0] tag;
    xlen_t            target;
    kind_e            kind;
  } btb_entry_t;

  btb_entry_t [BTB_ENTRIES-1:0]     btb_q;
  logic [(1<<HIST_BITS)-1:0][1:0]   pht_q;
  logic [HIST_BITS-1:0]             ghr_q;
  xlen_t [RAS_DEPTH-1:0]            ras_q;
  logic [RAS_PTR_W-1:0]             ras_top_q;   // index of the top entry
  logic [RAS_PTR_W:0]               ras_cnt_q;

  logic [BTB_IDX_W-1:0] l_idx, u_idx;
  logic [HIST_BITS-1:0] l_pht, u_pht;
  btb_entry_t           l_e;
  logic                 hit, do_push, do_pop;

  assign l_idx = lookup_pc[2 +: BTB_IDX_W];
  assign l_pht = lookup_pc[2 +: HIST_BITS] ^ ghr_q;
  assign l_e   = btb_q[l_idx];
  assign hit   = l_e.valid && (l_e.tag == lookup_pc[XLEN-1 -: TAG_W]);

  always_comb begin
    pred_taken  = 1'b0;
    pred_target = l_e.target;
    if (hit) begin
      unique case (l_e.kind)
        K_RET:  begin pred_taken = (ras_cnt_q != '0); pred_target = ras_q[ras_top_q]; end
        K_COND: pred_taken = pht_q[l_pht][1];
        default: pred_taken = 1'b1;
      endcase
    end
  end

  assign do_push = lookup_fire && hit && l_e.kind == K_CALL;
  assign do_pop  = lookup_fire && hit && l_e.kind == K_RET && ras_cnt_q != '0;

  assign u_idx = upd.pc[2 +: BTB_IDX_W];
  assign u_pht = upd.pc[2 +: HIST_BITS] ^ ghr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      btb_q     <= '0;
      pht_q     <= '{default: 2'b10};
      ghr_q     <= '0;
      ras_q     <= '0;
      ras_top_q <= '0;
      ras_cnt_q <= '0;
    end else begin
      // RAS (circular; overflow overwrites the oldest entry)
      if (do_push) begin
        ras_q[ras_top_q + RAS_PTR_W'(1)] <= lookup_pc + xlen_t'(4);
        ras_top_q <= ras_top_q + RAS_PTR_W'(1);
        if (ras_cnt_q != (RAS_PTR_W+1)'(RAS_DEPTH)) ras_cnt_q <= ras_cnt_q + 1'b1;
      end else if (do_pop) begin
        ras_top_q <= ras_top_q - RAS_PTR_W'(1);
        ras_cnt_q <= ras_cnt_q - 1'b1;
      end
      // training
      if (upd_valid) begin
        if (upd.taken) begin
          btb_q[u_idx].valid  <= 1'b1;
          btb_q[u_idx].tag    <= upd.pc[XLEN-1 -: TAG_W];
          btb_q[u_idx].target <= upd.target;
          btb_q[u_idx].kind   <= upd.is_ret  ? K_RET  :
                                 upd.is_call ? K_CALL :
                                 upd.is_cond ? K_COND : K_JUMP;
        end
        if (upd.is_cond) begin
          if (upd.taken && pht_q[u_pht] != 2'b11)  pht_q[u_pht] <= pht_q[u_pht] + 2'b01;
          if (!upd.taken && pht_q[u_pht] != 2'b00) pht_q[u_pht] <= pht_q[u_pht] - 2'b01;
          ghr_q <= {ghr_q[HIST_BITS-2:0], upd.taken};
        end
      end
    end
  end

endmodule
