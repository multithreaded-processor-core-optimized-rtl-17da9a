// par_fu: the part common to every functional unit of a lane: instruction waiting
// queue, issue logic, input buffers with forwarding capture, and output buffers.
//
// Queue: QSIZE slots used in circular order. A slot is taken at dispatch and held
// until the ROB retires its instruction, so the slot number is the "instruction ID
// within the functional unit" of the design's tag, and slot k's output buffer holds
// that instruction's results for all T threads until write back. Dispatch, issue and
// release all follow slot order, so the unit works strictly in order.
//
// Issue: the oldest waiting slot issues when no instruction is active and its
// qualifying predicate (and, for predicate logic, its source predicates) have been
// written back; the write enable of every thread (qp AND mask) is then known. Issue
// loads the three input buffers (a, b, old d), one entry per thread with a valid
// bit: immediates and register-file values are valid at once, operands still being
// produced are taken from the forwarding network, thread by thread, as the producer's
// output buffer fills. Waiting for the predicate before issue, and forwarding by
// output-buffer slot, are this design's choices.
//
// Execute: the active instruction sends thread 0, 1, ..., T-1 to the datapath, one
// per cycle, each as soon as its three operands are valid (a value arriving on the
// forwarding network this cycle can be used at once). Results come back tagged with
// slot and thread and fill the slot's output buffer; slot_done rises when all T
// threads are there.
//
// Commit broadcast (cm_*): turns operands waiting on the retiring tag into register
// file reads, and marks predicates as written.
module par_fu
  import par_pkg::*;
#(
  parameter int unsigned T      = 4,
  parameter int unsigned QSIZE  = 2,
  parameter int unsigned THR_W  = (T > 1) ? $clog2(T) : 1,
  parameter int unsigned QW     = (QSIZE > 1) ? $clog2(QSIZE) : 1
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // dispatch
  input  logic                                   disp_valid,
  input  fu_entry_t                              disp_entry,
  input  logic [T-1:0]                           disp_mask,
  output logic                                   slot_free,
  output logic [SLOT_W-1:0]                      alloc_slot,
  // retire: the ROB frees a slot of this unit
  input  logic                                   free_valid,
  input  logic [SLOT_W-1:0]                      free_slot,
  // commit broadcast from the ROB
  input  logic                                   cm_valid,
  input  tag_t                                   cm_tag,
  input  logic                                   cm_gpr,
  input  logic                                   cm_pred,
  // forwarding network: every unit's output buffers
  input  logic [NUM_FU-1:0][QSIZE-1:0][T-1:0]            fwd_valid,
  input  logic [NUM_FU-1:0][QSIZE-1:0][T-1:0][XLEN-1:0]  fwd_data,
  output logic [QSIZE-1:0][T-1:0]                obuf_valid,
  output logic [QSIZE-1:0][T-1:0][XLEN-1:0]      obuf_data,
  output logic [QSIZE-1:0]                       slot_done,
  // register file and predicate file reads at issue
  output logic [2:0][4:0]                        rf_idx,
  input  logic [2:0][T-1:0][XLEN-1:0]            rf_data,
  input  logic [NUM_PRED-1:0][T-1:0]             pr_value,
  // datapath
  output logic                                   dp_valid,
  input  logic                                   dp_ready,
  output uop_e                                   dp_uop,
  output logic [1:0]                             dp_size,
  output logic [1:0]                             dp_sla_n,
  output logic [XLEN-1:0]                        dp_a,
  output logic [XLEN-1:0]                        dp_b,
  output logic [XLEN-1:0]                        dp_d,
  output logic                                   dp_we,
  output logic [SLOT_W-1:0]                      dp_slot,
  output logic [THR_W-1:0]                       dp_thr,
  input  logic                                   res_valid,
  input  logic [SLOT_W-1:0]                      res_slot,
  input  logic [THR_W-1:0]                       res_thr,
  input  logic [XLEN-1:0]                        res_data,
  // status and events
  output logic                                   busy,
  output logic                                   ev_fwd,
  output logic                                   ev_qp_wait
);

  typedef enum logic [1:0] {S_FREE, S_WAIT, S_EXEC} sstate_e;

  sstate_e   [QSIZE-1:0]         st_q;
  fu_entry_t [QSIZE-1:0]         ent_q;
  logic      [QSIZE-1:0][T-1:0]  mask_q;
  logic      [QW-1:0]            aptr_q, iptr_q;

  // active instruction
  logic                          act_q;
  logic [QW-1:0]                 act_slot_q;
  logic [THR_W-1:0]              act_thr_q;
  logic [T-1:0]                  act_we_q;
  logic [2:0][T-1:0]             ib_valid_q;
  logic [2:0][T-1:0][XLEN-1:0]   ib_data_q;
  logic [2:0]                    ib_wait_q;
  tag_t [2:0]                    ib_tag_q;

  fu_entry_t                     ie;       // entry at the issue pointer
  logic                          can_issue;
  logic [T-1:0]                  qp_val;
  logic [2:0]                    op_ok;
  logic [2:0][XLEN-1:0]          op_val;
  logic                          send;
  logic                          cap_any;

  function automatic logic [T-1:0] pred_bits(input logic [2:0] idx,
                                              input logic [NUM_PRED-1:0][T-1:0] pv);
    return (idx == 3'd0) ? '1 : pv[idx];
  endfunction

  assign alloc_slot = SLOT_W'(aptr_q);
  assign slot_free  = (st_q[aptr_q] == S_FREE);
  assign busy       = act_q;

  always_comb begin
    for (int s = 0; s < QSIZE; s++) slot_done[s] = (st_q[s] == S_EXEC) && (&obuf_valid[s]);
  end

  // ---------------- issue ----------------
  assign ie = ent_q[iptr_q];
  always_comb begin
    can_issue = (st_q[iptr_q] == S_WAIT) && !act_q && ie.qp_ready;
    for (int k = 0; k < 3; k++) if (ie.src[k] == SRC_PWAIT) can_issue = 1'b0;
    ev_qp_wait = (st_q[iptr_q] == S_WAIT) && !can_issue && !act_q;
    qp_val = pred_bits(ie.qp, pr_value);
    for (int k = 0; k < 3; k++) rf_idx[k] = ie.rnum[k];
  end

  // ---------------- send one thread to the datapath ----------------
  always_comb begin
    for (int k = 0; k < 3; k++) begin
      op_ok[k]  = ib_valid_q[k][act_thr_q];
      op_val[k] = ib_data_q[k][act_thr_q];
      if (!op_ok[k] && ib_wait_q[k] &&
          fwd_valid[ib_tag_q[k].fu][ib_tag_q[k].slot[QW-1:0]][act_thr_q]) begin
        op_ok[k]  = 1'b1;
        op_val[k] = fwd_data[ib_tag_q[k].fu][ib_tag_q[k].slot[QW-1:0]][act_thr_q];
      end
    end
    dp_valid = act_q && (&op_ok);
    send     = dp_valid && dp_ready;
    dp_uop   = ent_q[act_slot_q].uop;
    dp_size  = ent_q[act_slot_q].size;
    dp_sla_n = ent_q[act_slot_q].sla_n;
    dp_a     = op_val[0];
    dp_b     = op_val[1];
    dp_d     = op_val[2];
    dp_we    = act_we_q[act_thr_q];
    dp_slot  = SLOT_W'(act_slot_q);
    dp_thr   = act_thr_q;
  end

  // forwarding capture events
  always_comb begin
    cap_any = 1'b0;
    for (int k = 0; k < 3; k++)
      if (act_q && ib_wait_q[k] &&
          |(~ib_valid_q[k] & fwd_valid[ib_tag_q[k].fu][ib_tag_q[k].slot[QW-1:0]]))
        cap_any = 1'b1;
  end
  assign ev_fwd = cap_any;

  // ---------------- state ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q       <= '{default: S_FREE};
      ent_q      <= '0;
      mask_q     <= '0;
      aptr_q     <= '0;
      iptr_q     <= '0;
      act_q      <= 1'b0;
      act_slot_q <= '0;
      act_thr_q  <= '0;
      act_we_q   <= '0;
      ib_valid_q <= '0;
      ib_data_q  <= '0;
      ib_wait_q  <= '0;
      ib_tag_q   <= '0;
      obuf_valid <= '0;
      obuf_data  <= '0;
    end else begin
      // commit broadcast: operands and predicates become available
      if (cm_valid) begin
        for (int s = 0; s < QSIZE; s++) begin
          for (int k = 0; k < 3; k++) begin
            if (cm_gpr && ent_q[s].src[k] == SRC_WAIT && ent_q[s].tag[k] == cm_tag)
              ent_q[s].src[k] <= SRC_REG;
            if (cm_pred && ent_q[s].src[k] == SRC_PWAIT && ent_q[s].tag[k] == cm_tag)
              ent_q[s].src[k] <= SRC_PRED;
          end
          if (cm_pred && !ent_q[s].qp_ready && ent_q[s].qp_tag == cm_tag)
            ent_q[s].qp_ready <= 1'b1;
        end
      end

      // forwarding capture into the active input buffers
      if (act_q) begin
        for (int k = 0; k < 3; k++) begin
          if (ib_wait_q[k]) begin
            for (int t = 0; t < T; t++) begin
              if (!ib_valid_q[k][t] && fwd_valid[ib_tag_q[k].fu][ib_tag_q[k].slot[QW-1:0]][t]) begin
                ib_valid_q[k][t] <= 1'b1;
                ib_data_q[k][t]  <= fwd_data[ib_tag_q[k].fu][ib_tag_q[k].slot[QW-1:0]][t];
              end
            end
          end
        end
      end

      // thread sequencing
      if (send) begin
        if (act_thr_q == THR_W'(T - 1)) begin
          act_q     <= 1'b0;
          act_thr_q <= '0;
        end else begin
          act_thr_q <= act_thr_q + 1'b1;
        end
      end

      // issue
      if (can_issue) begin
        act_q      <= 1'b1;
        act_slot_q <= iptr_q;
        act_thr_q  <= '0;
        act_we_q   <= qp_val & mask_q[iptr_q];
        st_q[iptr_q] <= S_EXEC;
        iptr_q     <= (iptr_q == QW'(QSIZE - 1)) ? '0 : iptr_q + 1'b1;
        for (int k = 0; k < 3; k++) begin
          ib_wait_q[k] <= 1'b0;
          ib_tag_q[k]  <= ie.tag[k];
          for (int t = 0; t < T; t++) begin
            ib_valid_q[k][t] <= 1'b1;
            unique case (ie.src[k])
              SRC_IMM:  ib_data_q[k][t] <= ie.imm;
              SRC_REG:  ib_data_q[k][t] <= rf_data[k][t];
              SRC_PRED: ib_data_q[k][t] <= XLEN'(pred_bits(ie.rnum[k][2:0], pr_value) >> t) & XLEN'(1);
              SRC_WAIT: begin
                ib_valid_q[k][t] <= fwd_valid[ie.tag[k].fu][ie.tag[k].slot[QW-1:0]][t];
                ib_data_q[k][t]  <= fwd_data[ie.tag[k].fu][ie.tag[k].slot[QW-1:0]][t];
              end
              default:  ib_data_q[k][t] <= '0;
            endcase
          end
          if (ie.src[k] == SRC_WAIT) ib_wait_q[k] <= 1'b1;
        end
      end

      // results into the output buffers
      if (res_valid) begin
        obuf_valid[res_slot[QW-1:0]][res_thr] <= 1'b1;
        obuf_data[res_slot[QW-1:0]][res_thr]  <= res_data;
      end

      // retire frees the slot and its output buffer
      if (free_valid) begin
        st_q[free_slot[QW-1:0]]       <= S_FREE;
        obuf_valid[free_slot[QW-1:0]] <= '0;
      end

      // dispatch
      if (disp_valid) begin
        st_q[aptr_q]   <= S_WAIT;
        ent_q[aptr_q]  <= disp_entry;
        mask_q[aptr_q] <= disp_mask;
        aptr_q         <= (aptr_q == QW'(QSIZE - 1)) ? '0 : aptr_q + 1'b1;
      end
    end
  end

  // A new instruction is only dispatched into a free slot.
  a_disp_free: assert property (@(posedge clk) disable iff (!rst_n)
    disp_valid |-> slot_free)
    else $error("par_fu: dispatch into an occupied slot");

endmodule
