// cdb_arbiter: Common Data Bus arbitration and broadcast.
//
// N_REQ reservation stations request the bus; one result per cycle is
// granted and broadcast to the ROB and to every RS (a 1-to-N bus rather than
// a crossbar). Requester BU_PORT (the branch unit) always wins, because a
// resolved branch can unblock commit and free resources soonest; the others
// share the bus with a rotating priority that starts after the last port
// granted. Combinational: grant and broadcast in the cycle of the request.
// Branch priority and round-robin for the rest follow the core's
// description; the rotating-pointer implementation is this design's own.
module cdb_arbiter
  import len5_pkg::*;
#(
  parameter int unsigned N_REQ   = 5,
  parameter int unsigned BU_PORT = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_REQ-1:0] req_valid,
  output logic [N_REQ-1:0] req_ready,
  input  cdb_t [N_REQ-1:0] req,
  output logic             cdb_valid,
  output cdb_t             cdb
);

  localparam int unsigned IDX_W = (N_REQ > 1) ? $clog2(N_REQ) : 1;

  logic [IDX_W-1:0] rr_q, sel;
  logic             found;

  always_comb begin
    found = 1'b0;
    sel   = '0;
    if (req_valid[BU_PORT]) begin
      found = 1'b1;
      sel   = IDX_W'(BU_PORT);
    end else begin
      for (int k = N_REQ - 1; k >= 0; k--) begin
        if (req_valid[(int'(rr_q) + k) % N_REQ]) begin
          found = 1'b1;
          sel   = IDX_W'((int'(rr_q) + k) % N_REQ);
        end
      end
    end
    req_ready = '0;
    if (found) req_ready[sel] = 1'b1;
  end

  assign cdb_valid = found;
  assign cdb       = req[sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr_q <= '0;
    else if (found && sel != IDX_W'(BU_PORT))
      rr_q <= (sel == IDX_W'(N_REQ - 1)) ? '0 : sel + IDX_W'(1);
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(req_ready));

endmodule
