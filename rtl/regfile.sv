// regfile: integer register file, 32 x XLEN bits, x0 hard-wired to zero.
//
// Two combinational read ports for the issue stage, a third for debug /
// observation, and two write ports, one per ROB commit slot. The two commit
// slots never write the same register in one cycle (only the latest writer
// of a register may write it); should they, port 1 (the younger
// instruction) wins. Writes take effect at the clock edge.
// The unit is only named by the core's description; the port count follows
// from its two commit slots.
module regfile
  import len5_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] raddr [2],
  output xlen_t      rdata [2],
  input  logic [4:0] dbg_addr,
  output xlen_t      dbg_data,
  input  logic       we [2],
  input  logic [4:0] waddr [2],
  input  xlen_t      wdata [2]
);

  xlen_t regs_q [32];

  assign rdata[0] = (raddr[0] == 5'd0) ? '0 : regs_q[raddr[0]];
  assign rdata[1] = (raddr[1] == 5'd0) ? '0 : regs_q[raddr[1]];
  assign dbg_data = (dbg_addr == 5'd0) ? '0 : regs_q[dbg_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs_q[i] <= '0;
    end else begin
      for (int p = 0; p < 2; p++)
        if (we[p] && waddr[p] != 5'd0) regs_q[waddr[p]] <= wdata[p];
    end
  end

endmodule
