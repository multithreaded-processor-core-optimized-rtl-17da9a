// tb_par_core: end-to-end test of the PAR core at its default configuration
// (4 lanes x 4 threads, no parameter overrides).
//
// The test plays the master core: it loads a thread program into the instruction
// cache, writes an input array A into the data memory through the host port, starts
// a PAR packet of NTHR threads and, after done, reads the output array B back and
// compares every element with a model computed here in plain SystemVerilog.
//
// Thread program (thread index i = i0, a = A[i], c = A[7]):
//   r1 = A[i]; r2 = A[7] (same address in every thread: replicated load)
//   r3 = r1 + r2; r4 = 3*r3; p1,p2 = (r1 < 50); (p1) r4 += 1000
//   r5 = 0; r6 = 3; loop r6 -> { r5 += r1 }          (counted loop, 3 iterations)
//   (p2) xp LX                                       (threads with a >= 50 only)
//   B[i] = r4 (store, end of block)
//   LX: r4 += r5; r7 = 0; r8 = a & 3; loop (p0) -> { r7 += 1; p4,p3 = (r8 < r7);
//       (p4) brk; r4 += 2 }                          (threads leave after r8 passes)
// so B[i] = 3(a+c) + (a<50 ? 1000 : 3a + 2(a&3)).
// NTHR = 40 needs three thread groups, the last one partial.
//
// Mechanism counters (each must be non-zero): dispatch stalls, waits of control
// decisions, taken xp, loop iterations and exits, a full brk, returns, group restarts,
// operand forwarding, replicated loads, bank waits, predicate waits, bank conflicts.
module tb_par_core;
  import par_pkg::*;

  localparam int NTHR  = 40;
  localparam int BBASE = 1024;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                   start = 1'b0;
  logic [9:0]             start_addr = '0;
  logic [31:0]            nthreads = '0;
  logic [XLEN-1:0]        i0_init = '0;
  logic [15:0][XLEN-1:0]  inh_data = '0;
  logic                   busy, done;
  logic                   ic_we = 1'b0;
  logic [9:0]             ic_waddr = '0;
  logic [31:0]            ic_wdata = '0;
  logic                   h_req = 1'b0, h_we = 1'b0;
  logic [13:0]            h_addr = '0;
  logic [XLEN-1:0]        h_wdata = '0;
  logic                   h_gnt;
  logic [XLEN-1:0]        h_rdata;
  logic                   stk_overflow, stk_underflow;
  fetch_ev_t              fetch_ev;
  lane_ev_t [3:0]         lane_ev;
  logic                   bank_conflict;

  par_core dut (.*);

  int checks = 0, failures = 0;

  // ---------------- small assembler ----------------
  function automatic logic [31:0] i_ri(logic [5:0] op, logic [1:0] f, logic [4:0] rd,
                                       logic [4:0] ra, logic [8:0] imm, logic [2:0] qp = 0,
                                       logic stop = 0);
    return {qp, 1'b0, op, rd, ra, f, imm, stop};
  endfunction
  function automatic logic [31:0] i_rr(logic [5:0] op, logic [1:0] f, logic [3:0] x,
                                       logic [4:0] rd, logic [4:0] ra, logic [4:0] rb,
                                       logic [2:0] qp = 0, logic stop = 0);
    return {qp, 1'b0, op, rd, ra, f, x, rb, stop};
  endfunction
  function automatic logic [31:0] i_set(logic [4:0] rd, logic [15:0] imm, logic stop = 0);
    return {3'd0, 1'b0, OP_SET, rd, imm, stop};
  endfunction
  function automatic logic [31:0] i_cmpi(logic [1:0] f, logic [2:0] pt, logic [2:0] pf,
                                         logic [4:0] ra, logic [8:0] imm, logic stop = 0);
    return {3'd0, 1'b0, OP5_CMPI, pt, pf, ra, f, imm, stop};
  endfunction
  function automatic logic [31:0] i_cmpr(logic [1:0] f, logic [2:0] pt, logic [2:0] pf,
                                         logic [4:0] ra, logic [4:0] rb, logic stop = 0);
    return {3'd0, 1'b0, OP5_CMPR, pt, pf, ra, f, 4'd0, rb, stop};
  endfunction
  function automatic logic [31:0] i_xp(logic [2:0] qp, logic [9:0] tgt, logic stop = 0);
    return {qp, 1'b1, 1'b0, 16'd0, tgt, stop};
  endfunction
  function automatic logic [31:0] i_loopc(logic [4:0] rc, logic [9:0] tgt, logic stop = 0);
    return {3'd0, 1'b0, OP_LOOPC, rc, 5'd0, 1'b0, tgt, stop};
  endfunction
  function automatic logic [31:0] i_loopp(logic [2:0] qp, logic [9:0] tgt, logic stop = 0);
    return {qp, 1'b0, OP_LOOPP, 5'd0, 5'd0, 1'b0, tgt, stop};
  endfunction
  function automatic logic [31:0] i_brk(logic [2:0] qp, logic stop = 0);
    return {qp, 1'b0, OP_BRK, 21'd0, stop};
  endfunction

  logic [31:0] prog [32];
  logic [XLEN-1:0] a_mem [NTHR];

  initial begin
    // main block
    prog[0]  = i_rr(OP_LD, 0, 0, 5'd1, 5'd17, 5'd16);        // r1 = A[i]
    prog[1]  = i_rr(OP_LD, 0, 0, 5'd2, 5'd17, 5'd21);        // r2 = A[7]
    prog[2]  = i_rr(OP_ALUR, 0, 0, 5'd3, 5'd1, 5'd2);        // r3 = r1 + r2
    prog[3]  = i_ri(OP_MULI, 0, 5'd4, 5'd3, 9'd3);           // r4 = r3 * 3
    prog[4]  = i_cmpi(2'd1, 3'd1, 3'd2, 5'd1, 9'd50);        // p1,p2 = r1 < 50
    prog[5]  = i_rr(OP_ALUR, 0, 0, 5'd4, 5'd4, 5'd22, 3'd1); // (p1) r4 += r22 (=1000)
    prog[6]  = i_set(5'd5, 16'd0);                           // r5 = 0
    prog[7]  = i_set(5'd6, 16'd3);                           // r6 = 3
    prog[8]  = i_loopc(5'd6, 10'd11);                        // loop r6, L1
    prog[9]  = i_xp(3'd2, 10'd12);                           // (p2) xp LX
    prog[10] = i_rr(OP_ST, 0, 0, 5'd4, 5'd18, 5'd16, 3'd0, 1'b1); // B[i] = r4 ;;
    // L1
    prog[11] = i_rr(OP_ALUR, 0, 0, 5'd5, 5'd5, 5'd1, 3'd0, 1'b1); // r5 += r1 ;;
    // LX
    prog[12] = i_rr(OP_ALUR, 0, 0, 5'd4, 5'd4, 5'd5);        // r4 += r5
    prog[13] = i_set(5'd7, 16'd0);                           // r7 = 0
    prog[14] = i_ri(OP_LOGI, 0, 5'd8, 5'd1, 9'd3);           // r8 = r1 & 3
    prog[15] = i_loopp(3'd0, 10'd16, 1'b1);                  // loop L2 ;;
    // L2
    prog[16] = i_ri(OP_ADDI, 0, 5'd7, 5'd7, 9'd1);           // r7 += 1
    prog[17] = i_cmpr(2'd1, 3'd4, 3'd3, 5'd8, 5'd7);         // p4,p3 = r8 < r7
    prog[18] = i_brk(3'd4);                                  // (p4) brk
    prog[19] = i_ri(OP_ADDI, 0, 5'd4, 5'd4, 9'd2, 3'd0, 1'b1); // r4 += 2 ;;
    for (int k = 20; k < 32; k++) prog[k] = '0;
  end

  function automatic logic [XLEN-1:0] model(int i);
    logic [XLEN-1:0] a, c, r;
    a = a_mem[i];
    c = a_mem[7];
    r = 3 * (a + c);
    if (a < 50) r = r + 1000;
    else r = r + 3 * a + 2 * (a & 3);
    return r;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_stall, n_ctl, n_xp, n_iter, n_exit, n_brk, n_ret, n_group;
  int n_fwd, n_repl, n_bwait, n_qpw, n_conf, n_disp, n_commit;
  int cycles = 0;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (rst_n) begin
      n_stall <= n_stall + int'(fetch_ev.stall);
      n_ctl   <= n_ctl + int'(fetch_ev.ctl_wait);
      n_xp    <= n_xp + int'(fetch_ev.xp);
      n_iter  <= n_iter + int'(fetch_ev.loop_iter);
      n_exit  <= n_exit + int'(fetch_ev.loop_exit);
      n_brk   <= n_brk + int'(fetch_ev.brk);
      n_ret   <= n_ret + int'(fetch_ev.ret);
      n_group <= n_group + int'(fetch_ev.group);
      n_conf  <= n_conf + int'(bank_conflict);
      for (int l = 0; l < 4; l++) begin
        n_fwd    = n_fwd + int'(lane_ev[l].fwd_capture);
        n_repl   = n_repl + int'(lane_ev[l].load_repl);
        n_bwait  = n_bwait + int'(lane_ev[l].bank_wait);
        n_qpw    = n_qpw + int'(lane_ev[l].qp_wait);
        n_disp   = n_disp + int'(lane_ev[l].dispatch);
        n_commit = n_commit + int'(lane_ev[l].commit);
      end
    end
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic host_write(input int addr, input logic [XLEN-1:0] data);
    h_req   <= 1'b1;
    h_we    <= 1'b1;
    h_addr  <= 14'(addr);
    h_wdata <= data;
    @(posedge clk);
    while (!h_gnt) @(posedge clk);
  endtask

  task automatic host_read(input int addr, output logic [XLEN-1:0] data);
    h_req  <= 1'b1;
    h_we   <= 1'b0;
    h_addr <= 14'(addr);
    @(posedge clk);
    while (!h_gnt) @(posedge clk);
    @(negedge clk);
    data = h_rdata;
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int start_cycle, end_cycle;
  logic [XLEN-1:0] got;

  initial begin
    {n_stall, n_ctl, n_xp, n_iter, n_exit, n_brk, n_ret, n_group} = '0;
    {n_fwd, n_repl, n_bwait, n_qpw, n_conf, n_disp, n_commit} = '0;
    for (int i = 0; i < NTHR; i++) a_mem[i] = 64'($urandom_range(0, 99));
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // load the program
    for (int k = 0; k < 32; k++) begin
      ic_we    <= 1'b1;
      ic_waddr <= 10'(k);
      ic_wdata <= prog[k];
      @(posedge clk);
    end
    ic_we <= 1'b0;
    // input array and a guard pattern in the output array
    for (int i = 0; i < NTHR; i++) host_write(i, a_mem[i]);
    for (int i = 0; i < NTHR + 4; i++) host_write(BBASE + i, 64'hdead);
    h_req <= 1'b0;
    h_we  <= 1'b0;
    // inherited registers: r17 = &A, r18 = &B, r21 = 7, r22 = 1000
    inh_data[1] = 64'd0;
    inh_data[2] = 64'(BBASE);
    inh_data[5] = 64'd7;
    inh_data[6] = 64'd1000;
    start_addr  <= 10'd0;
    nthreads    <= 32'(NTHR);
    i0_init     <= '0;
    start       <= 1'b1;
    @(posedge clk);
    start       <= 1'b0;
    start_cycle = cycles;
    @(posedge clk);
    check("busy after start", busy);
    while (!done) @(posedge clk);
    end_cycle = cycles;
    @(posedge clk);
    check("idle after done", !busy);
    check("no control stack overflow", !stk_overflow);
    check("no control stack underflow", !stk_underflow);
    for (int i = 0; i < NTHR; i++) begin
      host_read(BBASE + i, got);
      if (got !== model(i)) $display("thread %0d: a=%0d got %0d expected %0d", i, a_mem[i], got, model(i));
      check($sformatf("B[%0d]", i), got === model(i));
    end
    for (int i = NTHR; i < NTHR + 4; i++) begin
      host_read(BBASE + i, got);
      check($sformatf("B[%0d] untouched", i), got === 64'hdead);
    end
    h_req <= 1'b0;
    $display("packet of %0d threads took %0d cycles", NTHR, end_cycle - start_cycle);
    $display("events: stall=%0d ctl_wait=%0d xp=%0d loop_iter=%0d loop_exit=%0d brk=%0d ret=%0d group=%0d",
             n_stall, n_ctl, n_xp, n_iter, n_exit, n_brk, n_ret, n_group);
    $display("events: fwd=%0d repl=%0d bank_wait=%0d qp_wait=%0d conflict=%0d dispatch=%0d commit=%0d",
             n_fwd, n_repl, n_bwait, n_qpw, n_conf, n_disp, n_commit);
    check("dispatch stall happened", n_stall > 0);
    check("control wait happened", n_ctl > 0);
    check("xp taken", n_xp > 0);
    check("loop iterated", n_iter > 0);
    check("loop exited", n_exit > 0);
    check("brk of all threads", n_brk > 0);
    check("return after jump", n_ret > 0);
    check("group restart", n_group == (NTHR + 15) / 16 - 1);
    check("forwarding used", n_fwd > 0);
    check("replicated load", n_repl > 0);
    check("bank wait", n_bwait > 0);
    check("predicate wait", n_qpw > 0);
    check("bank conflict", n_conf > 0);
    check("every dispatch committed", n_disp == n_commit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
