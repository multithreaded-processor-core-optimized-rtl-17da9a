// tb_par_fetch: self-checking test of the fetch unit and thread-group control
// (par_fetch) with 4 lanes of 4 threads.
//
// The testbench models the instruction cache (synchronous read) and the lanes: it
// drops lanes_ready and lanes_empty at random and delays the predicate valid bits,
// so that broadcasts stall and control decisions wait. The thread program uses every
// control mechanism: a taken xp with return, a counted loop whose body contains a
// partial brk, the loop end, a full brk (all active threads) in the second thread
// group, and the PAR restart with a partial last group. The sequence of broadcast
// instructions and their thread masks is compared with a hand-derived trace, as are
// the group base index, done, the event pulses and the stack error flags.
module tb_par_fetch;
  import par_pkg::*;

  localparam int L = 4, T = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                            start = 1'b0;
  logic [9:0]                      start_addr = '0;
  logic [31:0]                     nthreads = '0;
  logic [XLEN-1:0]                 i0_init = '0;
  logic                            busy, done;
  logic [9:0]                      ic_addr;
  logic [31:0]                     ic_data;
  logic                            disp_valid;
  logic [31:0]                     disp_instr;
  logic [L-1:0][T-1:0]             mask;
  logic [XLEN-1:0]                 i0_base;
  logic                            lanes_ready = 1'b1, lanes_empty = 1'b1;
  logic [L-1:0][NUM_PRED-1:0][T-1:0] pred_value;
  logic [L-1:0][NUM_PRED-1:0]        pred_valid;
  logic [4:0]                      lc_idx;
  logic [XLEN-1:0]                 lc_data;
  logic                            lc_valid = 1'b0;
  logic                            stk_overflow, stk_underflow;
  logic ev_stall, ev_ctl_wait, ev_xp, ev_loop_iter, ev_loop_exit, ev_brk, ev_return, ev_group;

  par_fetch #(.LANES(L), .T(T)) dut (.*);

  int checks = 0, failures = 0;

  // instruction memory with a synchronous read
  logic [31:0] imem [1024];
  always_ff @(posedge clk) ic_data <= imem[ic_addr];

  // p1 = threads 4..7, p2 = threads 0..3 and 8..11 (bit l*T + t)
  localparam logic [15:0] P1 = 16'h00f0, P2 = 16'h0f0f;
  logic pv_ok = 1'b0;
  always_comb begin
    pred_value = '0;
    pred_valid = '0;
    for (int l = 0; l < L; l++) begin
      pred_value[l][1] = P1[l*T +: T];
      pred_value[l][2] = P2[l*T +: T];
      pred_valid[l] = pv_ok ? '1 : 8'b1111_1001;
    end
    lc_data = (lc_idx == 5'd5) ? 64'd3 : 64'd0;
  end

  always @(posedge clk) begin
    lanes_ready <= ($urandom_range(0, 3) != 0);
    lanes_empty <= ($urandom_range(0, 2) == 0);
    pv_ok       <= ($urandom_range(0, 2) != 0);
    lc_valid    <= ($urandom_range(0, 2) != 0);
  end

  function automatic logic [31:0] a_id(int id, logic stop);
    return {3'd0, 1'b0, OP_ADDI, 5'd1, 5'd1, 2'd0, 9'(id), stop};
  endfunction

  // expected broadcast trace: id and mask
  int          e_id   [14] = '{0, 10, 2, 20, 22, 20, 22, 20, 22, 4, 0, 2, 20, 4};
  logic [15:0] e_mask [14] = '{16'hffff, 16'h00f0, 16'hffff, 16'hffff, 16'hf0f0, 16'hf0f0,
                               16'hf0f0, 16'hf0f0, 16'hf0f0, 16'hffff, 16'h000f, 16'h000f,
                               16'h000f, 16'h000f};
  logic [63:0] e_base [14] = '{100, 100, 100, 100, 100, 100, 100, 100, 100, 100, 116, 116, 116, 116};
  int n = 0;
  int n_stall = 0, n_ctl = 0, n_xp = 0, n_iter = 0, n_exit = 0, n_brk = 0, n_ret = 0, n_group = 0;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (disp_valid) begin
      check("broadcast only when lanes are ready", lanes_ready);
      if (n < 14) begin
        check($sformatf("broadcast %0d id (got %0d)", n, disp_instr[9:1]), int'(disp_instr[9:1]) == e_id[n]);
        check($sformatf("broadcast %0d mask (got %h)", n, mask), mask == e_mask[n]);
        check($sformatf("broadcast %0d base", n), i0_base == e_base[n]);
      end else check("no extra broadcast", 1'b0);
      n++;
    end
    n_stall <= n_stall + int'(ev_stall);
    n_ctl   <= n_ctl + int'(ev_ctl_wait);
    n_xp    <= n_xp + int'(ev_xp);
    n_iter  <= n_iter + int'(ev_loop_iter);
    n_exit  <= n_exit + int'(ev_loop_exit);
    n_brk   <= n_brk + int'(ev_brk);
    n_ret   <= n_ret + int'(ev_return);
    n_group <= n_group + int'(ev_group);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) imem[i] = '0;
    imem[0]  = a_id(0, 0);
    imem[1]  = {3'd1, 1'b1, 1'b0, 16'd0, 10'd10, 1'b0};          // (p1) xp 10
    imem[2]  = a_id(2, 0);
    imem[3]  = {3'd0, 1'b0, OP_LOOPC, 5'd5, 5'd0, 1'b0, 10'd20, 1'b0}; // loop r5, 20
    imem[4]  = a_id(4, 1);
    imem[10] = a_id(10, 1);
    imem[20] = a_id(20, 0);
    imem[21] = {3'd2, 1'b0, OP_BRK, 21'd0, 1'b0};               // (p2) brk
    imem[22] = a_id(22, 1);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    check("idle after reset", !busy);
    start_addr <= 10'd0;
    nthreads   <= 32'd20;
    i0_init    <= 64'd100;
    start      <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (!done) @(posedge clk);
    @(posedge clk);
    #1;
    check("all broadcasts seen", n == 14);
    check("idle after done", !busy);
    check("no stack error", !stk_overflow && !stk_underflow);
    $display("events: stall=%0d ctl=%0d xp=%0d iter=%0d exit=%0d brk=%0d ret=%0d group=%0d",
             n_stall, n_ctl, n_xp, n_iter, n_exit, n_brk, n_ret, n_group);
    check("xp count", n_xp == 1);
    check("loop iterations", n_iter == 2);
    check("loop exits", n_exit == 1);
    check("full brk", n_brk == 1);
    check("returns", n_ret == 3);
    check("group restarts", n_group == 1);
    check("stalls seen", n_stall > 0);
    check("control waits seen", n_ctl > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
