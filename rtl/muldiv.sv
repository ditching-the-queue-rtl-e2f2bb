// muldiv: multiplication/division execution unit.
//
// Multiplier: two pipeline stages. Stage 1 registers the full 128-bit product
// of the (sign-adjusted) operands, stage 2 selects the requested half (or the
// sign-extended low word for MULW) and presents the result. A multiply is
// accepted every cycle and returns two cycles after it was accepted.
// Divider: serial, one quotient bit per cycle (restoring division on the
// magnitudes, 64 iterations), then the signs are fixed. Only one division is
// in flight; a new one is accepted once the previous result was returned.
// Division by zero returns all ones (remainder: the dividend), as RISC-V
// requires. When both halves finish in the same cycle the multiplier wins and
// the divider holds its result a cycle longer.
// The 2-stage pipelined multiplier and the serial divider follow the core's
// configuration; the radix, the operation subset and the output priority are
// this design's own choices.
module muldiv
  import len5_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    flush,
  input  logic    req_valid,
  output logic    req_ready,
  input  eu_req_t req,
  output logic    rsp_valid,
  input  logic    rsp_ready,
  output eu_rsp_t rsp
);

  logic is_div_op;
  assign is_div_op = (muldiv_op_e'(req.op) inside {MD_DIV, MD_DIVU, MD_REM, MD_REMU});

  // ---------------- multiplier ----------------
  logic             m1_valid_q, m2_valid_q;
  muldiv_op_e       m1_op_q;
  rs_idx_t          m1_idx_q, m2_idx_q;
  logic [127:0]     m1_prod_q;
  xlen_t            m2_res_q;
  logic             mul_fire;
  logic signed [64:0] ma, mb;

  assign mul_fire = req_valid && req_ready && !is_div_op;

  always_comb begin
    // MULH: signed x signed; MULHU: unsigned x unsigned; MUL/MULW: low bits
    if (muldiv_op_e'(req.op) == MD_MULH) begin
      ma = {req.a[63], req.a};
      mb = {req.b[63], req.b};
    end else begin
      ma = {1'b0, req.a};
      mb = {1'b0, req.b};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1_valid_q <= 1'b0;
      m2_valid_q <= 1'b0;
      m1_op_q    <= MD_MUL;
      m1_idx_q   <= '0;
      m2_idx_q   <= '0;
      m1_prod_q  <= '0;
      m2_res_q   <= '0;
    end else if (flush) begin
      m1_valid_q <= 1'b0;
      m2_valid_q <= 1'b0;
    end else begin
      m1_valid_q <= mul_fire;
      m1_op_q    <= muldiv_op_e'(req.op);
      m1_idx_q   <= req.rs_idx;
      m1_prod_q  <= 128'(ma * mb);
      m2_valid_q <= m1_valid_q;
      m2_idx_q   <= m1_idx_q;
      case (m1_op_q)
        MD_MULH, MD_MULHU: m2_res_q <= m1_prod_q[127:64];
        MD_MULW:           m2_res_q <= {{32{m1_prod_q[31]}}, m1_prod_q[31:0]};
        default:           m2_res_q <= m1_prod_q[63:0];
      endcase
    end
  end

  // ---------------- serial divider ----------------
  typedef enum logic [1:0] {D_IDLE, D_RUN, D_DONE} dstate_e;
  dstate_e     d_state_q;
  logic [6:0]  d_cnt_q;
  logic [64:0] d_rem_q;
  xlen_t       d_quo_q, d_div_q, d_dividend_q;
  logic        d_neg_q_q, d_neg_r_q, d_want_rem_q, d_by_zero_q;
  rs_idx_t     d_idx_q;
  xlen_t       d_res;
  logic        div_fire, d_signed;
  logic [64:0] d_trial;

  assign div_fire = req_valid && req_ready && is_div_op;
  assign d_signed = (muldiv_op_e'(req.op) inside {MD_DIV, MD_REM});
  assign d_trial  = {d_rem_q[63:0], d_quo_q[63]} - {1'b0, d_div_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_state_q    <= D_IDLE;
      d_cnt_q      <= '0;
      d_rem_q      <= '0;
      d_quo_q      <= '0;
      d_div_q      <= '0;
      d_dividend_q <= '0;
      d_neg_q_q    <= 1'b0;
      d_neg_r_q    <= 1'b0;
      d_want_rem_q <= 1'b0;
      d_by_zero_q  <= 1'b0;
      d_idx_q      <= '0;
    end else if (flush) begin
      d_state_q <= D_IDLE;
    end else begin
      case (d_state_q)
        D_IDLE: if (div_fire) begin
          d_state_q    <= D_RUN;
          d_cnt_q      <= 7'd64;
          d_rem_q      <= '0;
          d_quo_q      <= (d_signed && req.a[63]) ? -req.a : req.a;
          d_div_q      <= (d_signed && req.b[63]) ? -req.b : req.b;
          d_dividend_q <= req.a;
          d_neg_q_q    <= d_signed && (req.a[63] ^ req.b[63]);
          d_neg_r_q    <= d_signed && req.a[63];
          d_want_rem_q <= (muldiv_op_e'(req.op) inside {MD_REM, MD_REMU});
          d_by_zero_q  <= (req.b == '0);
          d_idx_q      <= req.rs_idx;
        end
        D_RUN: begin
          // shift in the next dividend bit, subtract if it fits
          if (!d_trial[64]) begin
            d_rem_q <= d_trial;
            d_quo_q <= {d_quo_q[62:0], 1'b1};
          end else begin
            d_rem_q <= {d_rem_q[63:0], d_quo_q[63]};
            d_quo_q <= {d_quo_q[62:0], 1'b0};
          end
          d_cnt_q <= d_cnt_q - 7'd1;
          if (d_cnt_q == 7'd1) d_state_q <= D_DONE;
        end
        D_DONE: if (!m2_valid_q) d_state_q <= D_IDLE;
        default: d_state_q <= D_IDLE;
      endcase
    end
  end

  always_comb begin
    if (d_by_zero_q)       d_res = d_want_rem_q ? d_dividend_q : '1;
    else if (d_want_rem_q) d_res = d_neg_r_q ? -d_rem_q[63:0] : d_rem_q[63:0];
    else                   d_res = d_neg_q_q ? -d_quo_q : d_quo_q;
  end

  // ---------------- request / response ----------------
  assign req_ready = is_div_op ? (d_state_q == D_IDLE) : 1'b1;

  always_comb begin
    rsp         = '0;
    rsp_valid   = 1'b0;
    if (m2_valid_q) begin
      rsp_valid  = 1'b1;
      rsp.rs_idx = m2_idx_q;
      rsp.result = m2_res_q;
    end else if (d_state_q == D_DONE) begin
      rsp_valid  = 1'b1;
      rsp.rs_idx = d_idx_q;
      rsp.result = d_res;
    end
  end

  a_rsp_taken: assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> rsp_ready);

endmodule
