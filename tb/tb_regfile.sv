// tb_regfile: self-checking testbench of the register file. Random writes
// on both ports against a reference array; reads on all three ports; x0
// stays zero.
module tb_regfile;
  import len5_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] raddr[2], dbg_addr, waddr[2];
  xlen_t rdata[2], dbg_data, wdata[2];
  logic we[2];
  xlen_t model[32];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  regfile dut (.*);

  initial begin
    we[0] = 0; we[1] = 0; waddr[0] = 0; waddr[1] = 0; wdata[0] = 0; wdata[1] = 0;
    raddr[0] = 0; raddr[1] = 0; dbg_addr = 0;
    for (int i = 0; i < 32; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      we[0] = $urandom % 2; we[1] = $urandom % 2;
      waddr[0] = 5'($urandom); waddr[1] = 5'($urandom);
      if (waddr[1] == waddr[0]) waddr[1] = waddr[1] + 1;
      wdata[0] = {$urandom, $urandom}; wdata[1] = {$urandom, $urandom};
      @(posedge clk); #1;
      for (int p = 0; p < 2; p++) if (we[p] && waddr[p] != 0) model[waddr[p]] = wdata[p];
      we[0] = 0; we[1] = 0;
      raddr[0] = 5'($urandom); raddr[1] = 5'($urandom); dbg_addr = 5'($urandom);
      #1;
      checks += 3;
      if (rdata[0] != model[raddr[0]]) begin failures++; $display("FAIL port 0 x%0d", raddr[0]); end
      if (rdata[1] != model[raddr[1]]) begin failures++; $display("FAIL port 1 x%0d", raddr[1]); end
      if (dbg_data != model[dbg_addr]) begin failures++; $display("FAIL dbg x%0d", dbg_addr); end
    end
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
