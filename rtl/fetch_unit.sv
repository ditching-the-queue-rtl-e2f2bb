// fetch_unit: speculative frontend - program counter, instruction memory
// requests and the instruction queue feeding the issue stage.
//
// Every cycle in which the queue has a free slot, the unit requests the word
// at the current PC and reserves the slot for it together with the
// prediction made for that PC; the PC then moves to the predicted next
// address (branch_predictor). Instruction words return in request order and
// fill the reserved slots; the issue stage takes filled slots in order.
// A redirect (branch unit misprediction, or exception) empties the queue,
// loads the new PC and discards the words of requests still outstanding.
// Memory interface (OBI-like): req/addr are held until gnt; each granted
// request returns exactly one rvalid/rdata, in order, at any later cycle.
// The speculative frontend with branch prediction is named by the core's
// description; the reserved-slot queue, its depth and the bus protocol are
// this design's own choices.
module fetch_unit
  import len5_pkg::*;
#(
  parameter int unsigned IQ_DEPTH  = 4,
  parameter xlen_t       BOOT_ADDR = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  // redirect
  input  logic        redirect,
  input  xlen_t       redirect_pc,
  // instruction memory
  output logic        imem_req,
  input  logic        imem_gnt,
  output xlen_t       imem_addr,
  input  logic        imem_rvalid,
  input  logic [31:0] imem_rdata,
  // predictor
  output xlen_t       pred_pc,
  output logic        pred_fire,
  input  logic        pred_taken,
  input  xlen_t       pred_target,
  // to the issue stage
  output logic        iq_valid,
  input  logic        iq_ready,
  output logic [31:0] iq_instr,
  output xlen_t       iq_pc,
  output logic        iq_pred_taken,
  output xlen_t       iq_pred_target
);

  localparam int unsigned PTR_W = (IQ_DEPTH > 1) ? $clog2(IQ_DEPTH) : 1;

  typedef struct packed {
    logic        filled;
    logic [31:0] instr;
    xlen_t       pc;
    logic        pred_taken;
    xlen_t       pred_target;
  } iq_entry_t;

  iq_entry_t [IQ_DEPTH-1:0] iq_q;
  logic [PTR_W-1:0] head_q, tail_q, fill_q;
  logic [PTR_W:0]   count_q;
  xlen_t            pc_q;
  logic [PTR_W:0]   outst_q, drop_q;

  logic req_fire, deq, rsp_keep;

  // a new request needs a free queue slot, and at most IQ_DEPTH requests
  // (including ones left over from before a redirect) may be outstanding
  assign imem_req  = !redirect && (count_q != (PTR_W+1)'(IQ_DEPTH)) &&
                     (outst_q != (PTR_W+1)'(IQ_DEPTH));
  assign imem_addr = pc_q;
  assign req_fire  = imem_req && imem_gnt;
  assign pred_pc   = pc_q;
  assign pred_fire = req_fire;
  assign rsp_keep  = imem_rvalid && (drop_q == '0);

  assign iq_valid       = (count_q != '0) && iq_q[head_q].filled;
  assign iq_instr       = iq_q[head_q].instr;
  assign iq_pc          = iq_q[head_q].pc;
  assign iq_pred_taken  = iq_q[head_q].pred_taken;
  assign iq_pred_target = iq_q[head_q].pred_target;
  assign deq            = iq_valid && iq_ready;

  function automatic logic [PTR_W-1:0] inc(logic [PTR_W-1:0] p);
    return (p == PTR_W'(IQ_DEPTH - 1)) ? '0 : p + PTR_W'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iq_q    <= '0;
      head_q  <= '0;
      tail_q  <= '0;
      fill_q  <= '0;
      count_q <= '0;
      pc_q    <= BOOT_ADDR;
      outst_q <= '0;
      drop_q  <= '0;
    end else begin
      outst_q <= outst_q + (PTR_W+1)'(req_fire) - (PTR_W+1)'(imem_rvalid);
      if (redirect) begin
        pc_q    <= redirect_pc;
        head_q  <= '0;
        tail_q  <= '0;
        fill_q  <= '0;
        count_q <= '0;
        for (int i = 0; i < IQ_DEPTH; i++) iq_q[i].filled <= 1'b0;
        drop_q  <= outst_q - (PTR_W+1)'(imem_rvalid);
      end else begin
        if (imem_rvalid && drop_q != '0) drop_q <= drop_q - 1'b1;
        if (req_fire) begin
          iq_q[tail_q].filled      <= 1'b0;
          iq_q[tail_q].pc          <= pc_q;
          iq_q[tail_q].pred_taken  <= pred_taken;
          iq_q[tail_q].pred_target <= pred_target;
          tail_q <= inc(tail_q);
          pc_q   <= pred_taken ? pred_target : pc_q + xlen_t'(4);
        end
        if (rsp_keep) begin
          iq_q[fill_q].filled <= 1'b1;
          iq_q[fill_q].instr  <= imem_rdata;
          fill_q <= inc(fill_q);
        end
        if (deq) head_q <= inc(head_q);
        count_q <= count_q + (PTR_W+1)'(req_fire) - (PTR_W+1)'(deq);
      end
    end
  end

  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 imem_req && !imem_gnt && !redirect |=> imem_req || redirect);

endmodule
