// tb_len5_top: end-to-end test of the core with the default configuration.
// A behavioural memory (64 KiB, shared by the instruction and data ports,
// one-cycle read latency, optional random grant stalls) holds programs that
// the bench assembles itself. Address 0 jumps to the program at 0x200; the
// trap address 0x100 holds a self-loop. A program ends with ECALL, whose
// exception at commit stops the run; the bench then reads registers through
// the debug port and compares them with the expected values, and compares
// minstret with the exact number of retired instructions (the jump at
// address 0 included, the final ECALL excluded).
// Programs:
//   functional  ALU ops, MUL, DIV, 64-bit and 32-bit stores and loads with
//               forwarding, both CLC modes, a taken branch with a
//               wrong-path store, a counted loop and a call/return;
//   illegal     an illegal instruction must trap with cause 2;
//   loops       the coprocessor loops of the evaluation: independent (1a),
//               dependent (1b) and with a housekeeping call (1c), in
//               iterative and pipelined mode, over a small latency x NIB grid;
//   ROB limit   latency = NIB, compared with IPC = (1+N)/(L+N-R+1).
// IPC limits checked: near 1 for enough independent work, pipelined better
// than iterative for few instructions, the ROB-limit formula within 0.06.
// Every mechanism (ROB-full and RS-full stall, out-of-order commit,
// misprediction, flush, both CLC modes, CDB conflict, store forwarding,
// 64-bit access split on the 32-bit bus, exception) must occur at least once.
module tb_len5_top;
  import len5_pkg::*;
  import rv_asm::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        imem_req, imem_gnt, imem_rvalid;
  xlen_t       imem_addr;
  logic [31:0] imem_rdata;
  logic        dmem_req, dmem_gnt, dmem_we, dmem_rvalid;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;
  logic [3:0]  dmem_be;
  logic [4:0]  dbg_reg_addr = '0;
  xlen_t       dbg_reg_data;
  logic [63:0] mcycle, minstret;
  logic        exc_valid;
  logic [4:0]  exc_cause;
  xlen_t       exc_pc;
  logic        ev_stall_rob_full, ev_stall_rs_full, ev_commit_ooo, ev_mispredict, ev_flush;
  logic        ev_clc_iter, ev_clc_pipe, ev_cdb_conflict, ev_ld_forward;

  len5_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- memory ----------------
  localparam int MEM_WORDS = 16384;
  logic [31:0] mem [MEM_WORDS];
  logic        rand_stall = 1'b0;

  assign imem_gnt = imem_req && (!rand_stall || ($urandom_range(3) != 0));
  assign dmem_gnt = dmem_req && (!rand_stall || ($urandom_range(2) != 0));

  always_ff @(posedge clk) begin
    imem_rvalid <= rst_n && imem_req && imem_gnt;
    imem_rdata  <= mem[imem_addr[15:2]];
    dmem_rvalid <= rst_n && dmem_req && dmem_gnt;
    dmem_rdata  <= mem[dmem_addr[15:2]];
    if (rst_n && dmem_req && dmem_gnt && dmem_we)
      for (int b = 0; b < 4; b++)
        if (dmem_be[b]) mem[dmem_addr[15:2]][8*b +: 8] <= dmem_wdata[8*b +: 8];
  end

  // ---------------- event counters ----------------
  int n_rob_full, n_rs_full, n_ooo, n_mispred, n_flush, n_iter, n_pipe, n_conflict;
  int n_fwd, n_split, n_exc;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      n_rob_full <= n_rob_full + int'(ev_stall_rob_full);
      n_rs_full  <= n_rs_full  + int'(ev_stall_rs_full);
      n_ooo      <= n_ooo      + int'(ev_commit_ooo);
      n_mispred  <= n_mispred  + int'(ev_mispredict);
      n_flush    <= n_flush    + int'(ev_flush);
      n_iter     <= n_iter     + int'(ev_clc_iter);
      n_pipe     <= n_pipe     + int'(ev_clc_pipe);
      n_conflict <= n_conflict + int'(ev_cdb_conflict);
      n_fwd      <= n_fwd      + int'(ev_ld_forward);
      n_split    <= n_split    + int'(dmem_req && dmem_gnt && dmem_addr[2]);
      n_exc      <= n_exc      + int'(exc_valid);
    end
  end
  initial begin
    n_rob_full = 0; n_rs_full = 0; n_ooo = 0; n_mispred = 0; n_flush = 0; n_iter = 0;
    n_pipe = 0; n_conflict = 0; n_fwd = 0; n_split = 0; n_exc = 0;
  end

  // ---------------- program building ----------------
  int pc_w;  // next word index
  task automatic clear_mem();
    for (int i = 0; i < MEM_WORDS; i++) mem[i] = 32'h0000_0013;
    mem[0]          = jal(0, 32'h200);   // 0x000: jump to program
    mem[32'h100/4]  = jal(0, 0);         // 0x100: trap self-loop
    for (int i = 32'h1000/4; i < MEM_WORDS; i++) mem[i] = '0;  // data area
    pc_w = 32'h200 / 4;
  endtask
  task automatic emit(input logic [31:0] w);
    mem[pc_w] = w;
    pc_w++;
  endtask

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask
  task automatic check_reg(input string what, input int r, input logic [63:0] exp);
    dbg_reg_addr = 5'(r);
    #1;
    check($sformatf("%s x%0d", what, r), dbg_reg_data, exp);
  endtask

  // run until the exception; returns cycles and retired instructions
  logic [63:0] end_cycles, end_instret;
  logic [4:0]  end_cause;
  logic [63:0] end_pc;
  task automatic run(input string name, input int max_cycles);
    int n;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    n = 0;
    while (!exc_valid && n < max_cycles) begin
      @(posedge clk);
      #1;
      n++;
    end
    checks++;
    if (!exc_valid) begin
      failures++;
      $display("FAIL %s: no end after %0d cycles", name, max_cycles);
    end
    end_cycles  = mcycle;
    end_instret = minstret;
    end_cause   = exc_cause;
    end_pc      = exc_pc;
    @(posedge clk);
    #1;
  endtask

  // ---------------- CLC loops ----------------
  // kind 0: independent (1a), 1: dependent (1b), 2: housekeeping call (1c)
  // nib counts the single-cycle instructions in the loop, including the
  // counter decrement and the branch (nib >= 2)
  localparam int HK_INSTR = 3;
  real ipc;
  task automatic clc_loop(input int kind, input bit pipe, input int lat, input int nib,
                          input int iters, output real ipc_o);
    int loop_w, hk_call_w, expected;
    string nm;
    nm = $sformatf("loop kind=%0d %s L=%0d NIB=%0d", kind, pipe ? "pipe" : "iter", lat, nib);
    clear_mem();
    emit(addi(10, 0, iters));
    emit(addi(11, 0, 7));
    emit(addi(13, 0, 9));
    loop_w = pc_w;
    if (pipe) emit(xdummy_pipe(13, (kind == 1) ? 13 : 11, lat));
    else      emit(xdummy_iter(13, (kind == 1) ? 13 : 11, lat));
    hk_call_w = pc_w;
    if (kind == 2) emit(nop());                    // patched to the call below
    for (int k = 0; k < nib - 2; k++) emit(addi(14 + (k % 10), 0, k + 1));
    emit(addi(10, 10, -1));
    emit(bne(10, 0, (loop_w - pc_w) * 4));
    emit(ecall());
    if (kind == 2) begin
      mem[hk_call_w] = jal(1, (pc_w - hk_call_w) * 4);
      for (int k = 0; k < HK_INSTR; k++) emit(addi(25 + k, 25 + k, 1));
      emit(ret());
    end
    run(nm, 200 + iters * (lat + nib + 20) * 2);
    expected = 4 + iters * (1 + nib + ((kind == 2) ? HK_INSTR + 2 : 0));
    check({nm, " cause"}, 64'(end_cause), 64'(EXC_ECALL_M));
    check({nm, " minstret"}, end_instret, 64'(expected));
    check_reg(nm, 10, 0);
    check_reg(nm, 13, (kind == 1) ? 64'd9 : 64'd7);
    if (nib > 2) check_reg(nm, 14, 64'(((nib - 3) / 10) * 10 + 1));
    if (kind == 2) check_reg(nm, 25, 64'(iters));
    ipc_o = real'(end_instret) / real'(end_cycles);
    $display("IPC %-40s = %0.3f  (%0d instr / %0d cycles)", nm, ipc_o, end_instret, end_cycles);
  endtask

  // ---------------- main ----------------
  int w_beq;
  real ipc_tab [2][4][4];
  int  lats [4] = '{1, 5, 10, 20};
  int  nibs [4] = '{2, 5, 10, 20};
  real ipc_a, ipc_b, ipc_c, ipc_d, pred;

  initial begin
    // ---- functional program, with random bus stalls ----
    rand_stall = 1'b1;
    clear_mem();
    emit(addi(1, 0, 100));
    emit(addi(2, 0, -7));
    emit(add(3, 1, 2));              // 93
    emit(sub(4, 1, 2));              // 107
    emit(mul(5, 1, 2));              // -700
    emit(div(6, 1, 2));              // -14
    emit(lui(7, 1));                 // 0x1000
    emit(sd(5, 7, 0));
    emit(ld(8, 7, 0));               // -700, forwarded
    emit(lui(9, 32'h12345));
    emit(addi(9, 9, 32'h678));
    emit(sw(9, 7, 8));
    emit(lw(10, 7, 8));              // 0x12345678
    emit(xdummy_iter(11, 1, 3));     // 100
    emit(xdummy_pipe(12, 3, 7));     // 93
    emit(add(13, 11, 12));           // 193
    w_beq = pc_w;
    emit(beq(0, 0, 8));              // taken: skips the store
    emit(sd(2, 7, 16));              // wrong path only
    emit(addi(14, 0, 5));
    emit(addi(15, 0, 0));
    emit(add(15, 15, 14));           // loop: 5+4+3+2+1
    emit(addi(14, 14, -1));
    emit(bne(14, 0, -8));
    emit(jal(1, 16));                // call func
    emit(addi(17, 16, 1));           // 43
    emit(ld(18, 7, 0));              // -700
    emit(ecall());
    emit(addi(16, 0, 42));           // func
    emit(ret());
    run("functional", 3000);
    check("functional cause", 64'(end_cause), 64'(EXC_ECALL_M));
    check("functional exc_pc", end_pc, 64'((pc_w - 3) * 4));
    check("functional minstret", end_instret, 64'(40));
    check_reg("functional", 1, 64'((w_beq + 8) * 4));
    check_reg("functional", 3, 93);
    check_reg("functional", 4, 107);
    check_reg("functional", 5, -64'sd700);
    check_reg("functional", 6, -64'sd14);
    check_reg("functional", 8, -64'sd700);
    check_reg("functional", 10, 64'h1234_5678);
    check_reg("functional", 11, 100);
    check_reg("functional", 12, 93);
    check_reg("functional", 13, 193);
    check_reg("functional", 15, 15);
    check_reg("functional", 16, 42);
    check_reg("functional", 17, 43);
    check_reg("functional", 18, -64'sd700);
    check("memory 64-bit low", 64'(mem[32'h1000/4]), 64'(32'hFFFF_FD44));
    check("memory 64-bit high", 64'(mem[32'h1004/4]), 64'(32'hFFFF_FFFF));
    check("memory 32-bit", 64'(mem[32'h1008/4]), 64'(32'h1234_5678));
    check("wrong-path store dropped", 64'(mem[32'h1010/4]), 64'd0);

    // ---- illegal instruction ----
    clear_mem();
    emit(addi(5, 0, 1));
    emit(32'h0000_0000);
    emit(addi(5, 0, 2));
    run("illegal", 500);
    check("illegal cause", 64'(end_cause), 64'(EXC_ILLEGAL));
    check("illegal exc_pc", end_pc, 64'h204);
    check_reg("illegal", 5, 1);
    rand_stall = 1'b0;

    // ---- loop sweep (Listing 1a) ----
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          clc_loop(0, m == 1, lats[i], nibs[j], 30, ipc_tab[m][i][j]);
    // enough independent work hides the latency
    checks++;
    if (ipc_tab[0][3][3] < 0.8) begin failures++; $display("FAIL iter L=20 NIB=20 IPC %0.3f < 0.8", ipc_tab[0][3][3]); end
    checks++;
    if (ipc_tab[1][3][3] < 0.8) begin failures++; $display("FAIL pipe L=20 NIB=20 IPC %0.3f < 0.8", ipc_tab[1][3][3]); end
    // pipelined beats iterative when little other work is available
    checks++;
    if (ipc_tab[1][3][1] < ipc_tab[0][3][1] + 0.1) begin
      failures++; $display("FAIL pipe %0.3f not above iter %0.3f (L=20 NIB=5)", ipc_tab[1][3][1], ipc_tab[0][3][1]);
    end
    // pipelined: few instructions per coprocessor op are enough
    checks++;
    if (ipc_tab[1][3][1] < 0.7) begin failures++; $display("FAIL pipe L=20 NIB=5 IPC %0.3f < 0.7", ipc_tab[1][3][1]); end
    // short latency and enough instructions: near 1 in both modes
    checks++;
    if (ipc_tab[0][0][2] < 0.8) begin failures++; $display("FAIL iter L=1 NIB=10 IPC %0.3f", ipc_tab[0][0][2]); end

    // ---- dependent loop (Listing 1b) and housekeeping (Listing 1c) ----
    clc_loop(1, 1'b1, 20, 5, 20, ipc_a);
    clc_loop(0, 1'b1, 20, 5, 20, ipc_b);
    checks++;
    if (ipc_a > ipc_b - 0.1) begin failures++; $display("FAIL dependent pipe %0.3f not below independent %0.3f", ipc_a, ipc_b); end
    clc_loop(1, 1'b0, 10, 10, 20, ipc_c);
    clc_loop(2, 1'b0, 10, 5, 20, ipc_c);
    clc_loop(2, 1'b1, 10, 5, 20, ipc_d);
    checks++;
    if (ipc_d < 0.6) begin failures++; $display("FAIL housekeeping pipe IPC %0.3f", ipc_d); end

    // ---- ROB limit: latency = NIB ----
    begin
      int lv [3] = '{64, 120, 200};
      for (int i = 0; i < 3; i++) begin
        clc_loop(0, 1'b0, lv[i], lv[i], 12, ipc_a);
        pred = real'(1 + lv[i]) / real'(lv[i] + lv[i] - ROB_DEPTH + 1);
        $display("ROB limit L=N=%0d: IPC %0.3f, formula %0.3f", lv[i], ipc_a, pred);
        checks++;
        if (ipc_a < pred - 0.06 || ipc_a > pred + 0.06) begin
          failures++; $display("FAIL ROB-limit IPC %0.3f vs formula %0.3f", ipc_a, pred);
        end
      end
    end

    // ---- every mechanism must have happened ----
    $display("events: rob_full=%0d rs_full=%0d ooo_commit=%0d mispredict=%0d flush=%0d clc_iter=%0d clc_pipe=%0d cdb_conflict=%0d forward=%0d split=%0d exc=%0d",
             n_rob_full, n_rs_full, n_ooo, n_mispred, n_flush, n_iter, n_pipe, n_conflict, n_fwd, n_split, n_exc);
    checks++; if (n_rob_full == 0) begin failures++; $display("FAIL no ROB-full stall"); end
    checks++; if (n_rs_full  == 0) begin failures++; $display("FAIL no RS-full stall"); end
    checks++; if (n_ooo      == 0) begin failures++; $display("FAIL no out-of-order commit"); end
    checks++; if (n_mispred  == 0) begin failures++; $display("FAIL no misprediction"); end
    checks++; if (n_flush    == 0) begin failures++; $display("FAIL no flush"); end
    checks++; if (n_iter     == 0) begin failures++; $display("FAIL no iterative CLC op"); end
    checks++; if (n_pipe     == 0) begin failures++; $display("FAIL no pipelined CLC op"); end
    checks++; if (n_conflict == 0) begin failures++; $display("FAIL no CDB conflict"); end
    checks++; if (n_fwd      == 0) begin failures++; $display("FAIL no store forwarding"); end
    checks++; if (n_split    == 0) begin failures++; $display("FAIL no split 64-bit access"); end
    checks++; if (n_exc      == 0) begin failures++; $display("FAIL no exception"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
