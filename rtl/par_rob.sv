// par_rob: reorder buffer of one lane.
//
// A circular FIFO of NROB entries, filled at dispatch in program order and emptied
// from the head at write back, so results reach the register files in order even
// though the four functional units finish out of order. As in the design, an entry
// holds the instruction's tag (unit and slot), its destination (a GPR, or the
// predicate pair pt/pf of a compare), the qualifying predicate number with a valid
// bit and the tag of the compare producing it; this design also keeps the thread
// mask in force at dispatch, since mask AND qp are the per-thread write enables.
// The valid bit of a pending qualifying predicate is set by the commit broadcast of
// the compare that writes it.
//
// The head is retired by the lane (pop) when its unit has the results for all
// threads and its predicate is valid.
module par_rob
  import par_pkg::*;
#(
  parameter int unsigned T    = 4,
  parameter int unsigned NROB = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  tag_t          push_tag,
  input  logic          push_gpr,
  input  logic [4:0]    push_rd,
  input  logic          push_pred,
  input  logic [2:0]    push_pt,
  input  logic [2:0]    push_pf,
  input  logic [2:0]    push_qp,
  input  logic          push_qp_ok,
  input  tag_t          push_qp_tag,
  input  logic [T-1:0]  push_mask,
  output logic          full,
  output logic          empty,
  // head
  output tag_t          h_tag,
  output logic          h_gpr,
  output logic [4:0]    h_rd,
  output logic          h_pred,
  output logic [2:0]    h_pt,
  output logic [2:0]    h_pf,
  output logic [2:0]    h_qp,
  output logic          h_qp_ok,
  output logic [T-1:0]  h_mask,
  input  logic          pop,
  // predicate commit broadcast
  input  logic          cm_pred,
  input  tag_t          cm_tag
);

  localparam int unsigned PW = (NROB > 1) ? $clog2(NROB) : 1;

  typedef struct packed {
    tag_t         tag;
    logic         gpr;
    logic [4:0]   rd;
    logic         pred;
    logic [2:0]   pt;
    logic [2:0]   pf;
    logic [2:0]   qp;
    logic         qp_ok;
    tag_t         qp_tag;
    logic [T-1:0] mask;
  } rob_t;

  rob_t [NROB-1:0]   e_q;
  logic [PW-1:0]     hd_q, tl_q;
  logic [PW:0]       cnt_q;

  assign full    = (cnt_q == (PW+1)'(NROB));
  assign empty   = (cnt_q == '0);
  assign h_tag   = e_q[hd_q].tag;
  assign h_gpr   = e_q[hd_q].gpr;
  assign h_rd    = e_q[hd_q].rd;
  assign h_pred  = e_q[hd_q].pred;
  assign h_pt    = e_q[hd_q].pt;
  assign h_pf    = e_q[hd_q].pf;
  assign h_qp    = e_q[hd_q].qp;
  assign h_qp_ok = e_q[hd_q].qp_ok;
  assign h_mask  = e_q[hd_q].mask;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_q   <= '0;
      hd_q  <= '0;
      tl_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (cm_pred)
        for (int i = 0; i < NROB; i++)
          if (!e_q[i].qp_ok && e_q[i].qp_tag == cm_tag) e_q[i].qp_ok <= 1'b1;
      if (push) begin
        e_q[tl_q] <= '{tag: push_tag, gpr: push_gpr, rd: push_rd, pred: push_pred,
                       pt: push_pt, pf: push_pf, qp: push_qp, qp_ok: push_qp_ok,
                       qp_tag: push_qp_tag, mask: push_mask};
        tl_q <= (tl_q == PW'(NROB - 1)) ? '0 : tl_q + 1'b1;
      end
      if (pop) hd_q <= (hd_q == PW'(NROB - 1)) ? '0 : hd_q + 1'b1;
      cnt_q <= cnt_q + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop))
    else $error("par_rob: push into a full ROB");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("par_rob: pop from an empty ROB");

endmodule
