// par_fetch: fetch unit and thread-group control of the PAR core.
//
// One fetch unit drives all lanes. It reads one instruction per cycle from the
// instruction cache and either broadcasts it to every lane (dispatch) or, for the
// control instructions (xp, loop, brk) and at the end of each instruction block,
// executes it itself. Control decisions are made for the whole thread group using
// the predicate registers of all lanes and a mask with one bit per hardware thread:
// a thread whose mask bit is clear executes nothing.
//
// Control stack: a command stack (PAR, LOOPC, LOOPP, RETURN and JOIN entries with an
// address, a qualifying predicate and the mask to restore) and a counter stack (remaining threads of
// the PAR packet, loop counters), both par_ctrl_stack instances.
//
//  * start: pushes PAR(start_addr) and the remaining thread count, loads the first
//    group of min(nthreads, LANES*T) threads (low mask bits) and starts at start_addr.
//  * Block end (stop bit): the top command decides. RETURN pops and continues at its
//    address with its saved mask. LOOPC/LOOPP re-run the loop body for the threads
//    whose loop predicate is still true (LOOPC also while its counter is non-zero,
//    decrementing it), otherwise they are popped, the mask from before the loop is
//    restored and the next command decides. JOIN only restores its mask and pops. PAR
//    waits until every lane is empty, then starts the next group at the packet start
//    with the base thread index advanced by LANES*T, or pops and finishes.
//  * xp L (predicated): if the predicate holds in any active thread, the mask is
//    narrowed to those threads and execution jumps to L; if the xp is not the last
//    instruction of its block a RETURN to the next instruction is pushed first,
//    otherwise a JOIN, so the enclosing command sees the mask from before the jump.
//  * loop r, L / loop L: same as xp, but a LOOPC/LOOPP command with the loop address
//    and predicate (and the counter r-1 for LOOPC, read from lane 0, thread 0) is
//    pushed. The loop body is the block at L; its end re-evaluates the loop.
//  * brk (predicated): threads with the predicate true leave the innermost loop;
//    when that is every active thread, the stack is popped through the innermost
//    loop command and its block end is taken. Threads removed by a partial brk stay
//    inactive until the loop ends, except that returning from an xp taken inside the
//    loop body restores the mask saved by that xp (a limitation of this design).
//
// The instruction cache read is synchronous: this unit presents the next PC (ic_addr)
// and sees the instruction at the current PC (ic_data) one cycle later, so straight
// code and taken jumps both run at one instruction per cycle. A broadcast waits while
// any lane cannot accept (lanes_ready low); a control decision waits until its
// predicate (and loop count) has been produced in every lane.
//
// This design's own choices: absolute jump and loop targets, stack depth 16, the
// encoding of the control instructions (see par_pkg), the counter taken from lane 0
// thread 0, and a full drain of the lanes between thread groups.
module par_fetch
  import par_pkg::*;
#(
  parameter int unsigned LANES  = 4,
  parameter int unsigned T      = 4,
  parameter int unsigned IAW    = 10,
  parameter int unsigned CNT_W  = 32,
  parameter int unsigned SDEPTH = 16
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // packet start (master core side)
  input  logic                                start,
  input  logic [IAW-1:0]                      start_addr,
  input  logic [CNT_W-1:0]                    nthreads,
  input  logic [XLEN-1:0]                     i0_init,
  output logic                                busy,
  output logic                                done,
  // instruction cache
  output logic [IAW-1:0]                      ic_addr,
  input  logic [31:0]                         ic_data,
  // broadcast to the lanes
  output logic                                disp_valid,
  output logic [31:0]                         disp_instr,
  output logic [LANES-1:0][T-1:0]             mask,
  output logic [XLEN-1:0]                     i0_base,
  input  logic                                lanes_ready,
  input  logic                                lanes_empty,
  // predicate and loop-count feedback
  input  logic [LANES-1:0][NUM_PRED-1:0][T-1:0] pred_value,
  input  logic [LANES-1:0][NUM_PRED-1:0]        pred_valid,
  output logic [4:0]                          lc_idx,
  input  logic [XLEN-1:0]                     lc_data,
  input  logic                                lc_valid,
  // status and events
  output logic                                stk_overflow,
  output logic                                stk_underflow,
  output logic                                ev_stall,
  output logic                                ev_ctl_wait,
  output logic                                ev_xp,
  output logic                                ev_loop_iter,
  output logic                                ev_loop_exit,
  output logic                                ev_brk,
  output logic                                ev_return,
  output logic                                ev_group
);

  localparam int unsigned NT = LANES * T;

  typedef enum logic [2:0] {C_PAR, C_LOOPC, C_LOOPP, C_RET, C_JOIN} cmd_e;

  typedef struct packed {
    cmd_e           kind;
    logic [IAW-1:0] addr;
    logic [2:0]     qp;
    logic [NT-1:0]  mask;
  } cmd_t;

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_END, S_LOOP2, S_BRK, S_DRAIN, S_FIN} state_e;

  state_e          state_q, state_d;
  logic [IAW-1:0]  pc_q, pc_d;
  logic [NT-1:0]   mask_q, mask_d;
  logic [XLEN-1:0] base_q, base_d;
  cmd_t            l2_cmd_q, l2_cmd_d;
  logic [CNT_W-1:0] l2_cnt_q, l2_cnt_d;

  // stacks
  logic       c_push, c_pop, c_clear;
  cmd_t       c_push_data, c_top;
  logic       c_empty, c_full, c_ovf, c_unf;
  logic       n_push, n_pop, n_wr;
  logic [CNT_W-1:0] n_push_data, n_wr_data, n_top;
  logic       n_empty, n_full, n_ovf, n_unf;

  par_ctrl_stack #(.W($bits(cmd_t)), .DEPTH(SDEPTH)) u_cmd (
    .clk, .rst_n, .clear(c_clear),
    .push(c_push), .push_data(c_push_data), .pop(c_pop),
    .wr_top(1'b0), .top_data('0),
    .top(c_top), .empty(c_empty), .full(c_full), .overflow(c_ovf), .underflow(c_unf)
  );

  par_ctrl_stack #(.W(CNT_W), .DEPTH(SDEPTH)) u_cnt (
    .clk, .rst_n, .clear(c_clear),
    .push(n_push), .push_data(n_push_data), .pop(n_pop),
    .wr_top(n_wr), .top_data(n_wr_data),
    .top(n_top), .empty(n_empty), .full(n_full), .overflow(n_ovf), .underflow(n_unf)
  );

  assign stk_overflow  = c_ovf | n_ovf;
  assign stk_underflow = c_unf | n_unf;

  // predicate of all threads, flattened in mask order (bit l*T+t)
  function automatic logic [NT-1:0] pred_bits(input logic [2:0] p,
                                              input logic [LANES-1:0][NUM_PRED-1:0][T-1:0] v);
    logic [NT-1:0] r;
    for (int l = 0; l < LANES; l++)
      for (int t = 0; t < T; t++)
        r[l*T + t] = (p == 3'd0) ? 1'b1 : v[l][p][t];
    return r;
  endfunction

  function automatic logic pred_ready(input logic [2:0] p,
                                      input logic [LANES-1:0][NUM_PRED-1:0] vv);
    logic r;
    r = 1'b1;
    for (int l = 0; l < LANES; l++) r = r & vv[l][p];
    return r;
  endfunction

  function automatic logic [NT-1:0] low_mask(input logic [CNT_W-1:0] k);
    logic [NT-1:0] r;
    for (int i = 0; i < NT; i++) r[i] = (CNT_W'(i) < k);
    return r;
  endfunction

  // current instruction fields
  logic [2:0]     i_qp;
  logic           i_stop, i_xp, i_loopc, i_loopp, i_brk, i_ctl;
  logic [IAW-1:0] i_xp_tgt, i_lp_tgt, pc_inc;
  logic [NT-1:0]  qbits, tbits;
  logic           qrdy, trdy;
  logic [CNT_W-1:0] grp_k, lc_n;

  assign i_qp     = ic_data[31:29];
  assign i_stop   = ic_data[0];
  assign i_xp     = ic_data[28];
  assign i_loopc  = !ic_data[28] && ic_data[27:22] == OP_LOOPC;
  assign i_loopp  = !ic_data[28] && ic_data[27:22] == OP_LOOPP;
  assign i_brk    = !ic_data[28] && ic_data[27:22] == OP_BRK;
  assign i_ctl    = i_xp || i_loopc || i_loopp || i_brk;
  assign i_xp_tgt = ic_data[IAW:1];
  assign i_lp_tgt = ic_data[IAW:1];
  assign pc_inc   = pc_q + 1'b1;
  assign lc_idx   = ic_data[21:17];
  assign lc_n     = lc_data[CNT_W-1:0];

  assign qbits = pred_bits(i_qp, pred_value);
  assign qrdy  = pred_ready(i_qp, pred_valid);
  assign tbits = pred_bits(c_top.qp, pred_value);
  assign trdy  = pred_ready(c_top.qp, pred_valid);
  assign grp_k = (n_top > CNT_W'(NT)) ? CNT_W'(NT) : n_top;

  always_comb begin
    state_d     = state_q;
    pc_d        = pc_q;
    mask_d      = mask_q;
    base_d      = base_q;
    l2_cmd_d    = l2_cmd_q;
    l2_cnt_d    = l2_cnt_q;
    c_push      = 1'b0;
    c_pop       = 1'b0;
    c_clear     = 1'b0;
    c_push_data = '0;
    n_push      = 1'b0;
    n_pop       = 1'b0;
    n_wr        = 1'b0;
    n_push_data = '0;
    n_wr_data   = '0;
    disp_valid  = 1'b0;
    done        = 1'b0;
    ev_stall    = 1'b0;
    ev_ctl_wait = 1'b0;
    ev_xp       = 1'b0;
    ev_loop_iter = 1'b0;
    ev_loop_exit = 1'b0;
    ev_brk      = 1'b0;
    ev_return   = 1'b0;
    ev_group    = 1'b0;

    unique case (state_q)
      S_IDLE: begin
        if (start) begin
          c_clear = 1'b1;
          state_d = S_LOOP2;
          pc_d    = start_addr;
          base_d  = i0_init;
          mask_d  = low_mask(nthreads);
          // the stacks are cleared this cycle; PAR is pushed from S_LOOP2
          l2_cmd_d = '{kind: C_PAR, addr: start_addr, qp: 3'd0, mask: '0};
          l2_cnt_d = (nthreads > CNT_W'(NT)) ? nthreads - CNT_W'(NT) : '0;
        end
      end

      S_RUN: begin
        if (!i_ctl) begin
          if (!lanes_ready) ev_stall = 1'b1;
          else begin
            disp_valid = 1'b1;
            if (i_stop) state_d = S_END;
            else pc_d = pc_inc;
          end
        end else if (!qrdy || (i_loopc && !lc_valid)) begin
          ev_ctl_wait = 1'b1;
        end else if (i_brk) begin
          if ((mask_q & qbits) != '0 && (mask_q & ~qbits) == '0) begin
            state_d = S_BRK;
            ev_brk  = 1'b1;
          end else begin
            mask_d = mask_q & ~qbits;
            if (i_stop) state_d = S_END;
            else pc_d = pc_inc;
          end
        end else if ((mask_q & qbits) != '0 && !(i_loopc && lc_n == '0)) begin
          mask_d = mask_q & qbits;
          if (!i_stop) begin
            c_push      = 1'b1;
            c_push_data = '{kind: C_RET, addr: pc_inc, qp: 3'd0, mask: mask_q};
          end else if (i_xp) begin
            c_push      = 1'b1;
            c_push_data = '{kind: C_JOIN, addr: pc_q, qp: 3'd0, mask: mask_q};
          end
          if (i_xp) begin
            ev_xp = 1'b1;
            pc_d  = i_xp_tgt;
          end else begin
            l2_cmd_d = '{kind: i_loopc ? C_LOOPC : C_LOOPP, addr: i_lp_tgt, qp: i_qp, mask: mask_q};
            l2_cnt_d = lc_n - 1'b1;
            pc_d     = i_lp_tgt;
            state_d  = S_LOOP2;
          end
        end else begin
          // not taken by any active thread
          if (i_stop) state_d = S_END;
          else pc_d = pc_inc;
        end
      end

      S_LOOP2: begin
        // second push of a loop entry (or of the packet start)
        c_push      = 1'b1;
        c_push_data = l2_cmd_q;
        if (l2_cmd_q.kind != C_LOOPP) begin
          n_push      = 1'b1;
          n_push_data = l2_cnt_q;
        end
        state_d = S_RUN;
      end

      S_END: begin
        if (c_empty) state_d = S_FIN;
        else begin
          unique case (c_top.kind)
            C_RET: begin
              c_pop     = 1'b1;
              mask_d    = c_top.mask;
              pc_d      = c_top.addr;
              state_d   = S_RUN;
              ev_return = 1'b1;
            end
            C_JOIN: begin
              c_pop  = 1'b1;
              mask_d = c_top.mask;
            end
            C_LOOPC, C_LOOPP: begin
              if (!trdy) ev_ctl_wait = 1'b1;
              else if ((mask_q & tbits) != '0 && (c_top.kind == C_LOOPP || n_top != '0)) begin
                mask_d       = mask_q & tbits;
                pc_d         = c_top.addr;
                state_d      = S_RUN;
                ev_loop_iter = 1'b1;
                if (c_top.kind == C_LOOPC) begin
                  n_wr      = 1'b1;
                  n_wr_data = n_top - 1'b1;
                end
              end else begin
                c_pop        = 1'b1;
                n_pop        = (c_top.kind == C_LOOPC);
                mask_d       = c_top.mask;
                ev_loop_exit = 1'b1;
              end
            end
            default: state_d = S_DRAIN;  // C_PAR
          endcase
        end
      end

      S_BRK: begin
        if (c_empty) state_d = S_FIN;
        else begin
          unique case (c_top.kind)
            C_RET, C_JOIN: c_pop = 1'b1;
            C_LOOPC, C_LOOPP: begin
              c_pop   = 1'b1;
              n_pop   = (c_top.kind == C_LOOPC);
              mask_d  = c_top.mask;
              state_d = S_END;
            end
            default: state_d = S_END;  // brk outside any loop ends the thread program
          endcase
        end
      end

      S_DRAIN: begin
        if (lanes_empty) begin
          if (n_top != '0) begin
            n_wr      = 1'b1;
            n_wr_data = n_top - grp_k;
            mask_d    = low_mask(grp_k);
            base_d    = base_q + XLEN'(NT);
            pc_d      = c_top.addr;
            state_d   = S_RUN;
            ev_group  = 1'b1;
          end else begin
            c_pop   = 1'b1;
            n_pop   = 1'b1;
            state_d = S_FIN;
          end
        end
      end

      default: begin  // S_FIN
        if (lanes_empty) begin
          done    = 1'b1;
          mask_d  = '0;
          state_d = S_IDLE;
        end
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      pc_q     <= '0;
      mask_q   <= '0;
      base_q   <= '0;
      l2_cmd_q <= '0;
      l2_cnt_q <= '0;
    end else begin
      state_q  <= state_d;
      pc_q     <= pc_d;
      mask_q   <= mask_d;
      base_q   <= base_d;
      l2_cmd_q <= l2_cmd_d;
      l2_cnt_q <= l2_cnt_d;
    end
  end

  assign ic_addr    = pc_d;
  assign disp_instr = ic_data;
  assign mask       = mask_q;
  assign i0_base    = base_q;
  assign busy       = (state_q != S_IDLE);

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !stk_overflow);

endmodule
