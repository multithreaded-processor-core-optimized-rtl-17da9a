// tb_par_fu: self-checking test of the functional-unit shell (par_fu): waiting
// queue, issue, input buffers with forwarding capture, output buffers.
//
// The testbench provides everything around one unit: a one-cycle adder as the
// datapath (result a + b, or the old d when the thread's write enable is off) with a
// random ready, a register file whose value of register r for thread t is a fixed
// function, a fake producer unit whose output buffers fill thread by thread at random
// and later commit, and the commit broadcasts for pending qualifying predicates.
// Instructions with random operand sources (immediate, register, waiting on the
// producer), random masks and pending predicates are dispatched whenever a slot is
// free and retired in order once slot_done is high. Checked: every thread's result in
// the output buffer, dispatch only into free slots, in-order issue, and that both
// forwarding paths (capture before commit, register read after) were used.
module tb_par_fu;
  import par_pkg::*;

  localparam int T = 4, Q = 2, NINS = 600;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                                   disp_valid = 1'b0;
  fu_entry_t                              disp_entry = '0;
  logic [T-1:0]                           disp_mask = '0;
  logic                                   slot_free;
  logic [SLOT_W-1:0]                      alloc_slot;
  logic                                   free_valid = 1'b0;
  logic [SLOT_W-1:0]                      free_slot = '0;
  logic                                   cm_valid = 1'b0, cm_gpr = 1'b0, cm_pred = 1'b0;
  tag_t                                   cm_tag = '0;
  logic [NUM_FU-1:0][Q-1:0][T-1:0]        fwd_valid;
  logic [NUM_FU-1:0][Q-1:0][T-1:0][XLEN-1:0] fwd_data;
  logic [Q-1:0][T-1:0]                    obuf_valid;
  logic [Q-1:0][T-1:0][XLEN-1:0]          obuf_data;
  logic [Q-1:0]                           slot_done;
  logic [2:0][4:0]                        rf_idx;
  logic [2:0][T-1:0][XLEN-1:0]            rf_data;
  logic [NUM_PRED-1:0][T-1:0]             pr_value;
  logic                                   dp_valid, dp_ready;
  uop_e                                   dp_uop;
  logic [1:0]                             dp_size, dp_sla_n;
  logic [XLEN-1:0]                        dp_a, dp_b, dp_d;
  logic                                   dp_we;
  logic [SLOT_W-1:0]                      dp_slot;
  logic [1:0]                             dp_thr;
  logic                                   res_valid;
  logic [SLOT_W-1:0]                      res_slot;
  logic [1:0]                             res_thr;
  logic [XLEN-1:0]                        res_data;
  logic                                   busy, ev_fwd, ev_qp_wait;

  par_fu #(.T(T), .QSIZE(Q)) dut (.*);

  int checks = 0, failures = 0;

  function automatic logic [63:0] regval(logic [4:0] r, int t);
    return 64'h1000 * r + 64'(t) + 64'h5000_0000;
  endfunction

  // register file and predicates
  always_comb begin
    for (int k = 0; k < 3; k++)
      for (int t = 0; t < T; t++) rf_data[k][t] = regval(rf_idx[k], t);
    pr_value = '0;
    pr_value[0] = '1;
    pr_value[1] = 4'b1010;
    pr_value[2] = 4'b0111;
  end

  // datapath: one-cycle adder with random ready
  logic rdy_r = 1'b0;
  assign dp_ready = rdy_r;
  always_ff @(posedge clk) begin
    rdy_r     <= ($urandom_range(0, 3) != 0);
    res_valid <= dp_valid && dp_ready;
    res_slot  <= dp_slot;
    res_thr   <= dp_thr;
    res_data  <= dp_we ? dp_a + dp_b : dp_d;
  end

  // fake producer unit (FU_LSU) and the unit's own output buffers
  logic [Q-1:0][T-1:0] pv;
  logic [Q-1:0][T-1:0][63:0] pd;
  always_comb begin
    fwd_valid = '0;
    fwd_data  = '0;
    fwd_valid[FU_LSU] = pv;
    fwd_data[FU_LSU]  = pd;
    fwd_valid[FU_ALU] = obuf_valid;
    fwd_data[FU_ALU]  = obuf_data;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-slot bookkeeping
  logic [Q-1:0]             s_busy, s_prod, s_prod_done, s_qp_pend;
  logic [Q-1:0][T-1:0][63:0] s_exp;
  int n_fwd_issue = 0, n_reg_issue = 0, n_qpw = 0;
  int issued_order [$];
  int disp_n = 0, ret_n = 0, ret_slot = 0;
  fu_entry_t e;
  logic [T-1:0] m, we;
  logic [4:0] ra, rb, rdd;
  logic [63:0] va, vb;
  int sa, sb, s;

  always @(posedge clk) if (rst_n) n_qpw <= n_qpw + int'(ev_qp_wait);

  initial begin
    pv = '0;
    pd = '0;
    s_busy = '0; s_prod = '0; s_prod_done = '0; s_qp_pend = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (ret_n < NINS) begin
      @(negedge clk);
      disp_valid = 1'b0;
      free_valid = 1'b0;
      cm_valid = 1'b0; cm_gpr = 1'b0; cm_pred = 1'b0;
      // retire the oldest slot when done and its producer has committed
      if (s_busy[ret_slot] && slot_done[ret_slot] && (!s_prod[ret_slot] || s_prod_done[ret_slot]) &&
          !s_qp_pend[ret_slot] && $urandom_range(0, 1) == 0) begin
        for (int t = 0; t < T; t++)
          check($sformatf("result ins %0d thread %0d", ret_n, t),
                obuf_data[ret_slot][t] === s_exp[ret_slot][t]);
        free_valid = 1'b1;
        free_slot = SLOT_W'(ret_slot);
      end
      // producer threads appear at random
      for (int q = 0; q < Q; q++)
        if (s_prod[q] && !s_prod_done[q])
          for (int t = 0; t < T; t++) if ($urandom_range(0, 2) == 0) pv[q][t] = 1'b1;
      // commit broadcasts: producer results or a pending predicate
      s = $urandom_range(0, Q - 1);
      if (s_prod[s] && !s_prod_done[s] && &pv[s] && $urandom_range(0, 2) == 0) begin
        cm_valid = 1'b1; cm_gpr = 1'b1;
        cm_tag = '{fu: FU_LSU, slot: SLOT_W'(s)};
      end else if (s_qp_pend[s] && $urandom_range(0, 2) == 0) begin
        cm_valid = 1'b1; cm_pred = 1'b1;
        cm_tag = '{fu: FU_CMP, slot: SLOT_W'(s)};
      end
      // dispatch a new instruction
      if (slot_free && disp_n < NINS && $urandom_range(0, 1) == 0) begin
        s = int'(alloc_slot);
        check("dispatch slot is free in the model", !s_busy[s]);
        e = '0;
        e.uop = U_ADD;
        ra = 5'($urandom_range(0, 15));
        rb = 5'($urandom_range(0, 15));
        rdd = 5'($urandom_range(0, 15));
        e.imm = {$urandom, $urandom};
        sa = $urandom_range(0, 2);
        sb = $urandom_range(0, 2);
        if (sa == 2 && sb == 2) rb = ra;   // one producer writes one register
        e.src[0] = (sa == 0) ? SRC_IMM : (sa == 1) ? SRC_REG : SRC_WAIT;
        e.src[1] = (sb == 0) ? SRC_IMM : (sb == 1) ? SRC_REG : SRC_WAIT;
        e.src[2] = SRC_REG;
        e.rnum[0] = ra; e.rnum[1] = rb; e.rnum[2] = rdd;
        e.tag[0] = '{fu: FU_LSU, slot: SLOT_W'(s)};
        e.tag[1] = '{fu: FU_LSU, slot: SLOT_W'(s)};
        e.qp = 3'($urandom_range(0, 2));
        e.qp_ready = (e.qp == 0) || ($urandom_range(0, 1) == 0);
        e.qp_tag = '{fu: FU_CMP, slot: SLOT_W'(s)};
        m = ($urandom_range(0, 2) == 0) ? 4'($urandom) : 4'hf;
        we = m & pr_value[e.qp];
        for (int t = 0; t < T; t++) begin
          va = (sa == 0) ? e.imm : regval(ra, t);
          vb = (sb == 0) ? e.imm : regval(rb, t);
          s_exp[s][t] = we[t] ? va + vb : regval(rdd, t);
          pd[s][t] = regval(ra, t);
          if (sa != 2 && sb == 2) pd[s][t] = regval(rb, t);
        end
        s_prod[s] = (sa == 2 || sb == 2);
        s_prod_done[s] = 1'b0;
        s_qp_pend[s] = !e.qp_ready;
        pv[s] = '0;
        s_busy[s] = 1'b1;
        disp_valid = 1'b1;
        disp_entry = e;
        disp_mask = m;
        disp_n++;
      end
      // issue decided for the coming edge (registered state only)
      #1;
      if (dut.can_issue) begin
        issued_order.push_back(int'(dut.iptr_q));
        if (dut.ie.src[0] == SRC_WAIT || dut.ie.src[1] == SRC_WAIT) n_fwd_issue++;
        else if (s_prod[dut.iptr_q]) n_reg_issue++;
      end
      @(posedge clk);
      #1;
      // model effects of this edge
      if (cm_valid && cm_gpr) begin
        s_prod_done[cm_tag.slot[0]] = 1'b1;
        pv[cm_tag.slot[0]] = '0;
      end
      if (cm_valid && cm_pred) s_qp_pend[cm_tag.slot[0]] = 1'b0;
      if (free_valid) begin
        s_busy[ret_slot] = 1'b0;
        ret_slot = (ret_slot + 1) % Q;
        ret_n++;
      end
    end
    for (int k = 0; k < issued_order.size(); k++) check("in-order issue", issued_order[k] == k % Q);
    $display("issue with forwarding %0d, after producer commit %0d, qp wait cycles %0d",
             n_fwd_issue, n_reg_issue, n_qpw);
    check("issued while waiting on a producer", n_fwd_issue > 20);
    check("issued after the producer committed", n_reg_issue > 20);
    check("waited for a predicate", n_qpw > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
