// tb_clc: self-checking testbench of the Configurable-Latency Coprocessor.
// Checks that every result returns its data operand exactly L cycles after
// the request was accepted, that pipelined mode accepts one request per cycle,
// that iterative mode refuses a new request until the previous result is
// taken, and that back-pressure on the output holds the result stable.
module tb_clc;
  localparam int unsigned STAGES = 8;
  logic clk = 0, rst_n = 0, flush = 0;
  logic in_valid, in_ready, in_pipe, out_valid, out_ready;
  logic [11:0] in_latency;
  logic [63:0] in_data, out_data;
  logic [2:0]  in_id, out_id;
  int checks = 0, failures = 0, cycle = 0;

  clc #(.PIPE_STAGES(STAGES), .MAX_LATENCY(300)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results: accept cycle + latency, indexed by id
  int exp_cycle[8];
  logic [63:0] exp_data[8];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", msg, cycle); end
  endtask

  // scoreboard on the output
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    check(out_data == exp_data[out_id], $sformatf("data id %0d", out_id));
    check(cycle == exp_cycle[out_id], $sformatf("latency id %0d got %0d exp %0d",
          out_id, cycle, exp_cycle[out_id]));
  end

  task automatic send(input bit pipe, input int lat, input int id, input logic [63:0] d);
    in_valid <= 1; in_pipe <= pipe; in_latency <= 12'(lat); in_id <= 3'(id); in_data <= d;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    // accepted on this edge (cycle value before update)
    exp_cycle[id] = cycle + ((lat == 0) ? 1 : lat);
    exp_data[id]  = d;
    in_valid <= 0;
  endtask

  int acc_cycles[4];
  initial begin
    in_valid = 0; in_pipe = 0; in_latency = 0; in_data = 0; in_id = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // 1) pipelined, same latency, back to back: one accepted per cycle
    for (int i = 0; i < 4; i++) begin
      send(1, 5, i, 64'hA000 + i);
      acc_cycles[i] = cycle;
    end
    check(acc_cycles[3] - acc_cycles[0] == 3, "pipelined throughput of one per cycle");
    repeat (10) @(posedge clk);
    // 2) iterative latency 7: a second request must wait for the first result
    send(0, 7, 0, 64'hBEEF);
    acc_cycles[0] = cycle;
    send(0, 3, 1, 64'hCAFE);
    check(cycle - acc_cycles[0] >= 7, "iterative mode blocks a new request");
    repeat (10) @(posedge clk);
    // 3) iterative with long latency beyond the pipeline depth
    send(0, 40, 2, 64'h1234_5678);
    repeat (45) @(posedge clk);
    // 4) output back-pressure: hold out_ready low, result must stay
    out_ready <= 0;
    send(1, 2, 3, 64'h77);
    exp_cycle[3] = exp_cycle[3] + 3;
    repeat (3) @(posedge clk);
    check(out_valid && out_data == 64'h77, "result held under back-pressure");
    repeat (1) @(posedge clk);
    out_ready <= 1;
    repeat (5) @(posedge clk);
    // 5) mixed latencies colliding at the output: both delivered
    out_ready <= 1;
    send(1, 4, 4, 64'h44);       // leaves at stage 3
    send(1, 3, 5, 64'h55);       // also reaches its output the same cycle
    exp_cycle[5] = exp_cycle[5] + 1;  // deeper one goes first, this one a cycle later
    repeat (10) @(posedge clk);
    check(!out_valid, "pipeline drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
