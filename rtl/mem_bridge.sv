// mem_bridge: adapts the core's 64-bit data-memory requests to a 32-bit
// OBI-style system bus.
//
// A 64-bit request (doubleword-aligned address plus byte enables) becomes
// one 32-bit bus transaction per half-word-of-64 whose byte enables are not
// all zero: the low word at addr, the high word at addr + 4. A 32-bit access
// therefore costs a single bus transaction; a 64-bit one costs two, issued
// one after the other. The first bus request is presented in the same cycle
// as the core's request, so a 32-bit access sees exactly the bus latency.
// The core-side response (rvalid and the assembled 64-bit rdata) is given in
// the cycle the last bus response arrives.
// Both sides: req/addr/we/be/wdata held until gnt, one rvalid per granted
// request, in order. The core side may have one request outstanding.
// Splitting 64-bit requests into two 32-bit ones follows the system
// description; the sequencing and the pass-through of the first request are
// this design's own choices.
module mem_bridge
  import len5_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // core side (64 bit)
  input  logic        c_req,
  output logic        c_gnt,
  input  logic        c_we,
  input  xlen_t       c_addr,
  input  logic [7:0]  c_be,
  input  xlen_t       c_wdata,
  output logic        c_rvalid,
  output xlen_t       c_rdata,
  // bus side (32 bit)
  output logic        b_req,
  input  logic        b_gnt,
  output logic        b_we,
  output logic [31:0] b_addr,
  output logic [3:0]  b_be,
  output logic [31:0] b_wdata,
  input  logic        b_rvalid,
  input  logic [31:0] b_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT1, S_REQ2, S_WAIT2} state_e;
  state_e state_q;

  logic        we_q, two_q, first_hi_q;
  logic [31:0] addr_q;
  logic [7:0]  be_q;
  xlen_t       wdata_q;
  logic [31:0] lo_q;

  logic first_hi;
  assign first_hi = (c_be[3:0] == 4'b0);

  always_comb begin
    b_req   = 1'b0;
    b_we    = we_q;
    b_addr  = {addr_q[31:3], 3'b100};
    b_be    = be_q[7:4];
    b_wdata = wdata_q[63:32];
    c_gnt   = 1'b0;
    case (state_q)
      S_IDLE: begin
        b_req   = c_req;
        b_we    = c_we;
        b_addr  = {c_addr[31:3], first_hi, 2'b00};
        b_be    = first_hi ? c_be[7:4] : c_be[3:0];
        b_wdata = first_hi ? c_wdata[63:32] : c_wdata[31:0];
        c_gnt   = b_gnt;
      end
      S_REQ2:  b_req = 1'b1;
      default: b_req = 1'b0;
    endcase
  end

  // response
  always_comb begin
    c_rvalid = 1'b0;
    c_rdata  = '0;
    if (state_q == S_WAIT1 && !two_q && b_rvalid) begin
      c_rvalid = 1'b1;
      c_rdata  = first_hi_q ? {b_rdata, 32'b0} : {32'b0, b_rdata};
    end else if (state_q == S_WAIT2 && b_rvalid) begin
      c_rvalid = 1'b1;
      c_rdata  = {b_rdata, lo_q};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      we_q       <= 1'b0;
      two_q      <= 1'b0;
      first_hi_q <= 1'b0;
      addr_q     <= '0;
      be_q       <= '0;
      wdata_q    <= '0;
      lo_q       <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (c_req && b_gnt) begin
          state_q    <= S_WAIT1;
          we_q       <= c_we;
          two_q      <= (c_be[3:0] != 4'b0) && (c_be[7:4] != 4'b0);
          first_hi_q <= first_hi;
          addr_q     <= c_addr[31:0];
          be_q       <= c_be;
          wdata_q    <= c_wdata;
        end
        S_WAIT1: if (b_rvalid) begin
          lo_q    <= b_rdata;
          state_q <= two_q ? S_REQ2 : S_IDLE;
        end
        S_REQ2:  if (b_gnt) state_q <= S_WAIT2;
        S_WAIT2: if (b_rvalid) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_no_empty: assert property (@(posedge clk) disable iff (!rst_n) c_req |-> c_be != 8'h00);

endmodule
