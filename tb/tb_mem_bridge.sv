// tb_mem_bridge: self-checking testbench of the 64-to-32-bit bus bridge.
// A 32-bit memory with random grant delays sits on the bus side; the bench
// drives random 64-bit, 32-bit (low or high half) and byte-masked reads and
// writes from the core side, one at a time, and keeps a 64-bit reference
// copy of the memory. Checks: read data of every enabled half equals the
// reference, the number of bus transactions per access (2 for a full 64-bit
// access, 1 for a single half), and the bus byte enables/addresses.
module tb_mem_bridge;
  import len5_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic        c_req, c_gnt, c_we, c_rvalid;
  xlen_t       c_addr, c_wdata, c_rdata;
  logic [7:0]  c_be;
  logic        b_req, b_gnt, b_we, b_rvalid;
  logic [31:0] b_addr, b_wdata, b_rdata;
  logic [3:0]  b_be;

  mem_bridge dut (.*);

  logic [31:0] mem [64];
  logic [63:0] ref_mem [32];
  int          n_bus;
  logic        gnt_rand;

  assign b_gnt = b_req && gnt_rand;
  always_ff @(posedge clk) begin
    gnt_rand <= ($urandom_range(2) != 0);
    b_rvalid <= rst_n && b_req && b_gnt;
    b_rdata  <= mem[b_addr[7:2]];
    if (rst_n && b_req && b_gnt) begin
      n_bus <= n_bus + 1;
      if (b_we)
        for (int b = 0; b < 4; b++) if (b_be[b]) mem[b_addr[7:2]][8*b +: 8] <= b_wdata[8*b +: 8];
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic access(input bit we, input int idx, input logic [7:0] be, input xlen_t wd);
    int    n0, exp_n;
    xlen_t rd;
    n0 = n_bus;
    c_req = 1; c_we = we; c_addr = xlen_t'(idx * 8); c_be = be; c_wdata = wd;
    do @(posedge clk); while (!c_gnt);
    #1 c_req = 0;
    while (!c_rvalid) begin @(posedge clk); #1; end
    rd = c_rdata;
    @(posedge clk); #1;
    exp_n = int'(be[3:0] != 0) + int'(be[7:4] != 0);
    check(n_bus - n0 == exp_n, $sformatf("bus transactions %0d expected %0d (be %b)", n_bus - n0, exp_n, be));
    if (we) begin
      for (int b = 0; b < 8; b++) if (be[b]) ref_mem[idx][8*b +: 8] = wd[8*b +: 8];
    end else begin
      if (be[3:0] != 0) check(rd[31:0] == ref_mem[idx][31:0], $sformatf("read low word %h vs %h", rd[31:0], ref_mem[idx][31:0]));
      if (be[7:4] != 0) check(rd[63:32] == ref_mem[idx][63:32], $sformatf("read high word %h vs %h", rd[63:32], ref_mem[idx][63:32]));
    end
  endtask

  // bus-side protocol: request held stable until granted
  logic        p_req, p_gnt;
  logic [31:0] p_addr;
  always @(posedge clk) begin
    if (rst_n && p_req && !p_gnt) check(b_req && b_addr == p_addr, "bus request held until grant");
    p_req <= b_req; p_gnt <= b_gnt; p_addr <= b_addr;
  end

  initial begin
    logic [7:0] be;
    int sel;
    c_req = 0; c_we = 0; c_addr = 0; c_be = 0; c_wdata = 0; n_bus = 0; gnt_rand = 0;
    p_req = 0; p_gnt = 0; p_addr = 0;
    for (int i = 0; i < 64; i++) mem[i] = 32'(i * 32'h01010101);
    for (int i = 0; i < 32; i++) ref_mem[i] = {mem[2*i+1], mem[2*i]};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      sel = $urandom_range(3);
      case (sel)
        0: be = 8'hFF;
        1: be = 8'h0F;
        2: be = 8'hF0;
        default: begin be = 8'($urandom); if (be == 0) be = 8'h01; end
      endcase
      access($urandom_range(1) == 1, $urandom_range(31), be, {$urandom, $urandom});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
