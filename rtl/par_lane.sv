// par_lane: one backend lane of the PAR core.
//
// A lane runs every broadcast instruction for its T threads. Its pipeline, as in
// the design, is decode, dispatch, issue, execute and write back around four
// functional units (ALU, FPU, load/store, compare) that work in parallel, each with
// an instruction waiting queue, input buffers and output buffers (par_fu), a wide
// register file with inherited registers, a predicate file and a reorder buffer.
//
// Dispatch: the instruction is decoded; it needs a free slot in its unit's queue
// and a free ROB entry, otherwise ready is low and the fetch unit stalls. At
// dispatch each register operand that is still being produced is renamed to its
// producer's tag (unit, slot), the destination is marked invalid with the new tag,
// and a ROB entry is written with the thread mask in force. Operands that become
// final in the same cycle through write back are taken as final.
//
// Forwarding: every output buffer of every unit is visible to every unit's input
// buffers (fwd_* bus), thread by thread, as soon as each thread's result exists.
//
// Write back: the ROB head retires when its unit holds results for all threads and
// its qualifying predicate is valid: the register (or predicate pair) is written for
// threads whose qp AND mask bit is set, the slot is freed, and the tag is broadcast
// so waiting operands and predicates are released. One instruction retires per cycle.
//
// Interface: in_valid is the dispatch strobe from the fetch unit (it already
// includes every lane being ready). pred_* expose the predicate file to the fetch
// unit for control instructions; lc_* read a loop counter register (thread 0).
// Memory: one request/grant port of the L/S unit.
module par_lane
  import par_pkg::*;
#(
  parameter int unsigned T      = 4,
  parameter int unsigned QSIZE  = 2,
  parameter int unsigned NROB   = 8,
  parameter int unsigned NGPR   = 16,
  parameter int unsigned NINH   = 16,
  parameter int unsigned FP_LAT = 4,
  parameter int unsigned AW     = 14,
  parameter int unsigned THR_W  = (T > 1) ? $clog2(T) : 1,
  parameter int unsigned QW     = (QSIZE > 1) ? $clog2(QSIZE) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // instruction from the fetch unit
  input  logic                        in_valid,
  input  logic [31:0]                 in_instr,
  input  logic [T-1:0]                in_mask,
  output logic                        ready,
  output logic                        empty,
  // PAR packet registers
  input  logic                        inh_load,
  input  logic [NINH-1:0][XLEN-1:0]   inh_data,
  input  logic [XLEN-1:0]             i0_base,
  // feedback to the fetch unit
  output logic [NUM_PRED-1:0][T-1:0]  pred_value,
  output logic [NUM_PRED-1:0]         pred_valid,
  input  logic [4:0]                  lc_idx,
  output logic [XLEN-1:0]             lc_data,
  output logic                        lc_valid,
  // data memory port
  output logic                        mem_req,
  output logic                        mem_we,
  output logic [AW-1:0]               mem_addr,
  output logic [XLEN-1:0]             mem_wdata,
  output logic [7:0]                  mem_be,
  input  logic                        mem_gnt,
  input  logic [XLEN-1:0]             mem_rdata,
  // events
  output lane_ev_t                    ev
);

  dec_t dec;
  par_decode u_dec (.instr(in_instr), .dec(dec));

  // ---------------- shared state ----------------
  logic [NUM_FU-1:0][QSIZE-1:0][T-1:0]            fwd_valid;
  logic [NUM_FU-1:0][QSIZE-1:0][T-1:0][XLEN-1:0]  fwd_data;
  logic [NUM_FU-1:0][QSIZE-1:0]                   slot_done;
  logic [NUM_FU-1:0]                              slot_free;
  logic [NUM_FU-1:0][SLOT_W-1:0]                  alloc_slot;
  logic [NUM_FU-1:0]                              fu_disp;
  logic [NUM_FU-1:0]                              fu_free;
  logic [NUM_FU-1:0]                              fu_busy, fu_evfwd, fu_evqp;
  logic [NUM_FU*3-1:0][4:0]                       rf_idx;
  logic [NUM_FU*3-1:0][T-1:0][XLEN-1:0]           rf_data;

  // datapath handshakes
  logic [NUM_FU-1:0]                dp_valid, dp_ready, dp_we;
  uop_e [NUM_FU-1:0]                dp_uop;
  logic [NUM_FU-1:0][1:0]           dp_size, dp_sla_n;
  logic [NUM_FU-1:0][XLEN-1:0]      dp_a, dp_b, dp_d;
  logic [NUM_FU-1:0][SLOT_W-1:0]    dp_slot;
  logic [NUM_FU-1:0][THR_W-1:0]     dp_thr;
  logic [NUM_FU-1:0]                res_valid;
  logic [NUM_FU-1:0][SLOT_W-1:0]    res_slot;
  logic [NUM_FU-1:0][THR_W-1:0]     res_thr;
  logic [NUM_FU-1:0][XLEN-1:0]      res_data;

  // register file status
  logic [2:0][4:0]  st_idx;
  logic [2:0]       st_valid;
  tag_t [2:0]       st_tag;
  tag_t [NUM_PRED-1:0] pr_tag;

  // ROB head / commit
  logic          rob_full, rob_empty, commit;
  tag_t          h_tag;
  logic          h_gpr, h_pred, h_qp_ok;
  logic [4:0]    h_rd;
  logic [2:0]    h_pt, h_pf, h_qp;
  logic [T-1:0]  h_mask, h_we, h_vt, h_vf;
  logic [T-1:0][XLEN-1:0] h_data;

  // ---------------- dispatch ----------------
  tag_t       new_tag;
  fu_entry_t  entry;
  logic       disp;
  logic       qp_ok;
  tag_t       qp_tag;

  assign new_tag = '{fu: dec.fu, slot: alloc_slot[dec.fu]};
  assign ready   = !dec.valid || (slot_free[dec.fu] && !rob_full);
  assign disp    = in_valid && dec.valid;

  // status of a GPR/inherited operand, with same-cycle write-back bypass
  function automatic logic reg_final(input logic v, input tag_t tg, input logic cm,
                                     input logic cm_gpr, input tag_t cm_tag);
    return v || (cm && cm_gpr && tg == cm_tag);
  endfunction

  always_comb begin
    st_idx[0] = dec.ra;
    st_idx[1] = dec.rb;
    st_idx[2] = dec.rd;

    entry       = '0;
    entry.uop   = dec.uop;
    entry.size  = dec.size;
    entry.sla_n = dec.sla_n;
    entry.imm   = dec.imm;
    entry.qp    = dec.qp;
    entry.rnum[0] = dec.ra;
    entry.rnum[1] = dec.rb;
    entry.rnum[2] = dec.rd;

    // operand a, b: registers or predicates
    for (int k = 0; k < 2; k++) begin
      logic use_k;
      logic [4:0] r;
      use_k = (k == 0) ? dec.use_ra : (dec.use_rb && !dec.use_imm);
      r     = (k == 0) ? dec.ra : dec.rb;
      entry.src[k] = SRC_NONE;
      if (dec.pred_src && use_k) begin
        if (r[2:0] == 3'd0 || pred_valid[r[2:0]] ||
            (commit && h_pred && pr_tag[r[2:0]] == h_tag))
          entry.src[k] = SRC_PRED;
        else begin
          entry.src[k] = SRC_PWAIT;
          entry.tag[k] = pr_tag[r[2:0]];
        end
      end else if (use_k) begin
        if (reg_final(st_valid[k], st_tag[k], commit, h_gpr, h_tag)) entry.src[k] = SRC_REG;
        else begin
          entry.src[k] = SRC_WAIT;
          entry.tag[k] = st_tag[k];
        end
      end
    end
    if (dec.use_imm) entry.src[1] = SRC_IMM;
    // operand d: old destination
    entry.src[2] = SRC_NONE;
    if (dec.use_rd) begin
      if (reg_final(st_valid[2], st_tag[2], commit, h_gpr, h_tag)) entry.src[2] = SRC_REG;
      else begin
        entry.src[2] = SRC_WAIT;
        entry.tag[2] = st_tag[2];
      end
    end
    // qualifying predicate
    qp_ok  = (dec.qp == 3'd0) || pred_valid[dec.qp] ||
             (commit && h_pred && pr_tag[dec.qp] == h_tag);
    qp_tag = pr_tag[dec.qp];
    entry.qp_ready = qp_ok;
    entry.qp_tag   = qp_tag;

    for (int f = 0; f < NUM_FU; f++) fu_disp[f] = disp && (dec.fu == fu_e'(f));
  end

  // ---------------- register files and ROB ----------------
  par_regfile #(.T(T), .NGPR(NGPR), .NINH(NINH), .NRD(NUM_FU*3)) u_rf (
    .clk, .rst_n,
    .rd_idx  (rf_idx),
    .rd_data (rf_data),
    .st_idx  (st_idx),
    .st_valid(st_valid),
    .st_tag  (st_tag),
    .mk_valid(disp && dec.wr_gpr),
    .mk_idx  (dec.rd),
    .mk_tag  (new_tag),
    .wb_valid(commit && h_gpr),
    .wb_idx  (h_rd),
    .wb_tag  (h_tag),
    .wb_we   (h_we),
    .wb_data (h_data),
    .inh_load(inh_load),
    .inh_data(inh_data),
    .i0_base (i0_base),
    .lc_idx  (lc_idx),
    .lc_data (lc_data),
    .lc_valid(lc_valid)
  );

  par_predfile #(.T(T)) u_pf (
    .clk, .rst_n,
    .value   (pred_value),
    .valid   (pred_valid),
    .tag     (pr_tag),
    .mk_valid(disp && dec.wr_pred),
    .mk_pt   (dec.pt),
    .mk_pf   (dec.pf),
    .mk_tag  (new_tag),
    .wb_valid(commit && h_pred),
    .wb_pt   (h_pt),
    .wb_pf   (h_pf),
    .wb_tag  (h_tag),
    .wb_we   (h_we),
    .wb_vt   (h_vt),
    .wb_vf   (h_vf)
  );

  par_rob #(.T(T), .NROB(NROB)) u_rob (
    .clk, .rst_n,
    .push       (disp),
    .push_tag   (new_tag),
    .push_gpr   (dec.wr_gpr && !dec.rd[4]),
    .push_rd    (dec.rd),
    .push_pred  (dec.wr_pred),
    .push_pt    (dec.pt),
    .push_pf    (dec.pf),
    .push_qp    (dec.qp),
    .push_qp_ok (qp_ok),
    .push_qp_tag(qp_tag),
    .push_mask  (in_mask),
    .full       (rob_full),
    .empty      (rob_empty),
    .h_tag      (h_tag),
    .h_gpr      (h_gpr),
    .h_rd       (h_rd),
    .h_pred     (h_pred),
    .h_pt       (h_pt),
    .h_pf       (h_pf),
    .h_qp       (h_qp),
    .h_qp_ok    (h_qp_ok),
    .h_mask     (h_mask),
    .pop        (commit),
    .cm_pred    (commit && h_pred),
    .cm_tag     (h_tag)
  );

  // ---------------- write back ----------------
  always_comb begin
    commit = !rob_empty && h_qp_ok && slot_done[h_tag.fu][h_tag.slot[QW-1:0]];
    h_data = fwd_data[h_tag.fu][h_tag.slot[QW-1:0]];
    h_we   = ((h_qp == 3'd0) ? {T{1'b1}} : pred_value[h_qp]) & h_mask;
    for (int t = 0; t < T; t++) begin
      h_vt[t] = h_data[t][0];
      h_vf[t] = h_data[t][1];
    end
    for (int f = 0; f < NUM_FU; f++) fu_free[f] = commit && (h_tag.fu == fu_e'(f));
  end

  assign empty = rob_empty;

  // ---------------- functional units ----------------
  for (genvar f = 0; f < NUM_FU; f++) begin : g_fu
    logic [2:0][4:0]               idx_f;
    logic [2:0][T-1:0][XLEN-1:0]   data_f;
    assign rf_idx[3*f+0] = idx_f[0];
    assign rf_idx[3*f+1] = idx_f[1];
    assign rf_idx[3*f+2] = idx_f[2];
    assign data_f[0] = rf_data[3*f+0];
    assign data_f[1] = rf_data[3*f+1];
    assign data_f[2] = rf_data[3*f+2];

    par_fu #(.T(T), .QSIZE(QSIZE)) u_fu (
      .clk, .rst_n,
      .disp_valid (fu_disp[f]),
      .disp_entry (entry),
      .disp_mask  (in_mask),
      .slot_free  (slot_free[f]),
      .alloc_slot (alloc_slot[f]),
      .free_valid (fu_free[f]),
      .free_slot  (h_tag.slot),
      .cm_valid   (commit),
      .cm_tag     (h_tag),
      .cm_gpr     (h_gpr),
      .cm_pred    (h_pred),
      .fwd_valid  (fwd_valid),
      .fwd_data   (fwd_data),
      .obuf_valid (fwd_valid[f]),
      .obuf_data  (fwd_data[f]),
      .slot_done  (slot_done[f]),
      .rf_idx     (idx_f),
      .rf_data    (data_f),
      .pr_value   (pred_value),
      .dp_valid   (dp_valid[f]),
      .dp_ready   (dp_ready[f]),
      .dp_uop     (dp_uop[f]),
      .dp_size    (dp_size[f]),
      .dp_sla_n   (dp_sla_n[f]),
      .dp_a       (dp_a[f]),
      .dp_b       (dp_b[f]),
      .dp_d       (dp_d[f]),
      .dp_we      (dp_we[f]),
      .dp_slot    (dp_slot[f]),
      .dp_thr     (dp_thr[f]),
      .res_valid  (res_valid[f]),
      .res_slot   (res_slot[f]),
      .res_thr    (res_thr[f]),
      .res_data   (res_data[f]),
      .busy       (fu_busy[f]),
      .ev_fwd     (fu_evfwd[f]),
      .ev_qp_wait (fu_evqp[f])
    );
  end

  assign dp_ready[FU_ALU] = 1'b1;
  assign dp_ready[FU_FPU] = 1'b1;
  assign dp_ready[FU_CMP] = 1'b1;

  par_alu #(.THR_W(THR_W)) u_alu (
    .clk, .rst_n,
    .in_valid(dp_valid[FU_ALU]), .in_uop(dp_uop[FU_ALU]), .in_sla_n(dp_sla_n[FU_ALU]),
    .in_a(dp_a[FU_ALU]), .in_b(dp_b[FU_ALU]), .in_d(dp_d[FU_ALU]), .in_we(dp_we[FU_ALU]),
    .in_slot(dp_slot[FU_ALU]), .in_thr(dp_thr[FU_ALU]),
    .out_valid(res_valid[FU_ALU]), .out_slot(res_slot[FU_ALU]),
    .out_thr(res_thr[FU_ALU]), .out_data(res_data[FU_ALU])
  );

  par_fpu #(.THR_W(THR_W), .LAT(FP_LAT)) u_fpu (
    .clk, .rst_n,
    .in_valid(dp_valid[FU_FPU]), .in_uop(dp_uop[FU_FPU]),
    .in_a(dp_a[FU_FPU]), .in_b(dp_b[FU_FPU]), .in_d(dp_d[FU_FPU]), .in_we(dp_we[FU_FPU]),
    .in_slot(dp_slot[FU_FPU]), .in_thr(dp_thr[FU_FPU]),
    .out_valid(res_valid[FU_FPU]), .out_slot(res_slot[FU_FPU]),
    .out_thr(res_thr[FU_FPU]), .out_data(res_data[FU_FPU])
  );

  par_cmp #(.THR_W(THR_W)) u_cmp (
    .clk, .rst_n,
    .in_valid(dp_valid[FU_CMP]), .in_uop(dp_uop[FU_CMP]),
    .in_a(dp_a[FU_CMP]), .in_b(dp_b[FU_CMP]),
    .in_slot(dp_slot[FU_CMP]), .in_thr(dp_thr[FU_CMP]),
    .out_valid(res_valid[FU_CMP]), .out_slot(res_slot[FU_CMP]),
    .out_thr(res_thr[FU_CMP]), .out_data(res_data[FU_CMP])
  );

  logic lsu_repl, lsu_wait;
  par_lsu #(.THR_W(THR_W), .AW(AW)) u_lsu (
    .clk, .rst_n,
    .in_valid(dp_valid[FU_LSU]), .in_ready(dp_ready[FU_LSU]), .in_uop(dp_uop[FU_LSU]),
    .in_size(dp_size[FU_LSU]),
    .in_a(dp_a[FU_LSU]), .in_b(dp_b[FU_LSU]), .in_d(dp_d[FU_LSU]), .in_we(dp_we[FU_LSU]),
    .in_slot(dp_slot[FU_LSU]), .in_thr(dp_thr[FU_LSU]),
    .out_valid(res_valid[FU_LSU]), .out_slot(res_slot[FU_LSU]),
    .out_thr(res_thr[FU_LSU]), .out_data(res_data[FU_LSU]),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_be, .mem_gnt, .mem_rdata,
    .ev_repl(lsu_repl), .ev_wait(lsu_wait)
  );

  always_comb begin
    ev             = '0;
    ev.dispatch    = disp;
    ev.commit      = commit;
    ev.fwd_capture = |fu_evfwd;
    ev.load_repl   = lsu_repl;
    ev.bank_wait   = lsu_wait;
    ev.qp_wait     = |fu_evqp;
  end

endmodule
