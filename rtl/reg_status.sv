// reg_status: register status table (renaming by ROB tag).
//
// For every architectural integer register it records whether an in-flight
// instruction will write it and, if so, the ROB tag of the latest such
// instruction. The issue stage looks up the two source registers: a busy
// register means the operand comes from the ROB (if the producer has
// completed) or will come from the CDB with that tag; a free register means
// the register file holds the value. Issuing an instruction that writes rd
// makes it the latest writer. When an instruction commits it reports whether
// it is still the latest writer of its destination ("newest"): only then may
// it write the register file, and the entry is freed. An older writer that
// commits after a newer one has been issued thus retires without touching
// the register file, which resolves write-after-write conflicts for both
// commit slots. A flush frees every register. x0 is never busy.
// Timing: lookups are combinational; updates take effect at the clock edge,
// and a new writer issued in the same cycle takes precedence over a commit.
// Tagging the destination with the ROB index (no separate rename registers)
// follows the core's description; the "newest writer" rule is this design's
// way to realise its write-after-write condition.
module reg_status
  import len5_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  // lookups
  input  logic [4:0] rs_addr [2],
  output logic       rs_busy [2],
  output rob_idx_t   rs_tag [2],
  // new writer
  input  logic       issue_valid,
  input  logic [4:0] issue_rd,
  input  rob_idx_t   issue_tag,
  // commits
  input  logic       commit_valid [2],
  input  logic [4:0] commit_rd [2],
  input  rob_idx_t   commit_tag [2],
  output logic       commit_newest [2]
);

  logic     [31:0] busy_q;
  rob_idx_t [31:0] tag_q;

  for (genvar p = 0; p < 2; p++) begin : g_port
    assign rs_busy[p]       = busy_q[rs_addr[p]];
    assign rs_tag[p]        = tag_q[rs_addr[p]];
    assign commit_newest[p] = commit_valid[p] && commit_rd[p] != 5'd0 &&
                              busy_q[commit_rd[p]] && tag_q[commit_rd[p]] == commit_tag[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= '0;
      tag_q  <= '0;
    end else if (flush) begin
      busy_q <= '0;
    end else begin
      for (int p = 0; p < 2; p++)
        if (commit_newest[p]) busy_q[commit_rd[p]] <= 1'b0;
      if (issue_valid && issue_rd != 5'd0) begin
        busy_q[issue_rd] <= 1'b1;
        tag_q[issue_rd]  <= issue_tag;
      end
    end
  end

  a_x0_free: assert property (@(posedge clk) disable iff (!rst_n) !busy_q[0]);

endmodule
