// clc: Configurable-Latency Coprocessor.
//
// A stand-in for a tightly coupled accelerator whose latency is chosen per
// instruction. Each transaction carries a mode (iterative or pipelined), a
// latency operand and a data operand; after the selected number of cycles the
// data operand is returned unchanged, together with the transaction id.
//
// Pipelined mode: the request enters a chain of PIPE_STAGES registers and
// leaves from register (latency-1), so the latency operand picks which
// pipeline register serves as the output. A new pipelined request can be
// accepted every cycle. If the result at the output register is not taken
// (out_ready low), or two results reach their output register in the same
// cycle (mixed latencies), the whole chain holds and the deepest result is
// returned first.
// Iterative mode: a down-counter models a multi-cycle unit; no new request is
// accepted until the CPU has taken the previous result. An iterative request
// is only accepted when the pipeline is empty.
//
// Timing: a request accepted on clock edge k with latency L (1..) presents
// out_valid from the cycle after edge k+L-1, i.e. L cycles later. L = 0 is
// treated as 1; pipelined latencies above PIPE_STAGES are clamped to
// PIPE_STAGES, iterative ones above MAX_LATENCY to MAX_LATENCY.
// Both ports use valid-ready handshakes (transfer when valid && ready).
//
// The two modes, the latency operand selecting the output register, the
// data operand being forwarded and the iterative "wait for acknowledge" rule
// follow the coprocessor description; the hold-on-stall policy, the clamping
// and the default sizes are this design's own choices.
module clc #(
  parameter int unsigned DATA_W      = 64,
  parameter int unsigned ID_W        = 3,
  parameter int unsigned LAT_W       = 12,
  parameter int unsigned PIPE_STAGES = 32,
  parameter int unsigned MAX_LATENCY = 4095
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,       // drop everything in flight
  // request
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              in_pipe,     // 1: pipelined mode, 0: iterative
  input  logic [LAT_W-1:0]  in_latency,
  input  logic [DATA_W-1:0] in_data,
  input  logic [ID_W-1:0]   in_id,
  // result
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic [ID_W-1:0]   out_id
);

  localparam int unsigned SEL_W = (PIPE_STAGES > 1) ? $clog2(PIPE_STAGES) : 1;

  typedef enum logic [1:0] {S_IDLE, S_PIPE, S_ITER_BUSY, S_ITER_DONE} state_e;
  state_e state_q, state_d;

  // pipeline registers
  logic [PIPE_STAGES-1:0]             stg_valid_q;
  logic [PIPE_STAGES-1:0][DATA_W-1:0] stg_data_q;
  logic [PIPE_STAGES-1:0][ID_W-1:0]   stg_id_q;
  logic [PIPE_STAGES-1:0][SEL_W-1:0]  stg_sel_q;

  // iterative unit
  logic [LAT_W-1:0]  cnt_q;
  logic [DATA_W-1:0] it_data_q;
  logic [ID_W-1:0]   it_id_q;

  logic [PIPE_STAGES-1:0] arrived;
  logic                   any_arrived, multi_arrived, pipe_empty;
  int unsigned            out_stage;
  logic                   pipe_out_valid, stall, pipe_fire;
  logic                   acc_pipe, acc_iter;
  logic [LAT_W-1:0]       lat_eff;

  always_comb begin
    any_arrived   = 1'b0;
    multi_arrived = 1'b0;
    out_stage     = 0;
    for (int i = 0; i < PIPE_STAGES; i++) begin
      arrived[i] = stg_valid_q[i] && (int'(stg_sel_q[i]) == i);
      if (arrived[i]) begin
        if (any_arrived) multi_arrived = 1'b1;
        any_arrived = 1'b1;
        out_stage   = i;          // last hit = deepest stage
      end
    end
    pipe_empty = (stg_valid_q == '0);
  end

  assign pipe_out_valid = any_arrived;
  assign pipe_fire      = pipe_out_valid && out_ready;
  assign stall          = multi_arrived || (any_arrived && !out_ready);

  // outputs
  always_comb begin
    if (state_q == S_ITER_DONE) begin
      out_valid = 1'b1;
      out_data  = it_data_q;
      out_id    = it_id_q;
    end else begin
      out_valid = pipe_out_valid;
      out_data  = stg_data_q[out_stage];
      out_id    = stg_id_q[out_stage];
    end
  end

  always_comb begin
    case (state_q)
      S_IDLE:  in_ready = in_pipe ? !stall : pipe_empty;
      S_PIPE:  in_ready = in_pipe ? !stall : pipe_empty;
      default: in_ready = 1'b0;
    endcase
  end

  assign acc_pipe = in_valid && in_ready && in_pipe;
  assign acc_iter = in_valid && in_ready && !in_pipe;

  // effective latency (>= 1, clamped to the mode's maximum)
  always_comb begin
    lat_eff = (in_latency == '0) ? LAT_W'(1) : in_latency;
    if (in_pipe) begin
      if (32'(lat_eff) > PIPE_STAGES) lat_eff = LAT_W'(PIPE_STAGES);
    end else begin
      if (32'(lat_eff) > MAX_LATENCY) lat_eff = LAT_W'(MAX_LATENCY);
    end
  end

  // FSM
  always_comb begin
    state_d = state_q;
    case (state_q)
      S_IDLE, S_PIPE: begin
        if (acc_iter)      state_d = (lat_eff == LAT_W'(1)) ? S_ITER_DONE : S_ITER_BUSY;
        else if (acc_pipe) state_d = S_PIPE;
        else if (pipe_empty) state_d = S_IDLE;
      end
      S_ITER_BUSY: if (cnt_q == LAT_W'(1)) state_d = S_ITER_DONE;
      S_ITER_DONE: if (out_ready)          state_d = S_IDLE;
      default:     state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      cnt_q     <= '0;
      it_data_q <= '0;
      it_id_q   <= '0;
    end else if (flush) begin
      state_q   <= S_IDLE;
      cnt_q     <= '0;
    end else begin
      state_q <= state_d;
      if (acc_iter) begin
        cnt_q     <= lat_eff - LAT_W'(1);
        it_data_q <= in_data;
        it_id_q   <= in_id;
      end else if (state_q == S_ITER_BUSY) begin
        cnt_q <= cnt_q - LAT_W'(1);
      end
    end
  end

  // pipeline chain
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stg_valid_q <= '0;
      stg_data_q  <= '0;
      stg_id_q    <= '0;
      stg_sel_q   <= '0;
    end else if (flush) begin
      stg_valid_q <= '0;
    end else if (stall) begin
      if (pipe_fire) stg_valid_q[out_stage] <= 1'b0;
    end else begin
      for (int i = PIPE_STAGES - 1; i > 0; i--) begin
        stg_valid_q[i] <= stg_valid_q[i-1] && !arrived[i-1];
        stg_data_q[i]  <= stg_data_q[i-1];
        stg_id_q[i]    <= stg_id_q[i-1];
        stg_sel_q[i]   <= stg_sel_q[i-1];
      end
      stg_valid_q[0] <= acc_pipe;
      stg_data_q[0]  <= in_data;
      stg_id_q[0]    <= in_id;
      stg_sel_q[0]   <= SEL_W'(lat_eff - LAT_W'(1));
    end
  end

  // handshake rules
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n || flush)
                                 out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
