// par_predfile: predicate register file of one lane.
//
// Eight predicate registers p0..p7, each with one bit per thread of the lane and a
// valid bit that is cleared while a compare instruction that writes it is in
// flight (the tag names that compare), as in the design. p0 always reads as true
// for every thread and ignores writes (this design's choice, consistent with the
// ISA's "null" pseudo-instruction that writes p0). A compare writes two predicates
// (pt and pf) at write back, each thread only where its write enable is set; the
// valid bit is set only if the register's tag still names that compare.
// If pt and pf name the same register, the pt value is written (this design's
// choice). Reset clears p1..p7 to false and marks them valid.
module par_predfile
  import par_pkg::*;
#(
  parameter int unsigned T = 4
) (
  input  logic                            clk,
  input  logic                            rst_n,
  output logic [NUM_PRED-1:0][T-1:0]      value,
  output logic [NUM_PRED-1:0]             valid,
  output tag_t [NUM_PRED-1:0]             tag,
  // dispatch mark of a compare's two destinations
  input  logic                            mk_valid,
  input  logic [2:0]                      mk_pt,
  input  logic [2:0]                      mk_pf,
  input  tag_t                            mk_tag,
  // write back
  input  logic                            wb_valid,
  input  logic [2:0]                      wb_pt,
  input  logic [2:0]                      wb_pf,
  input  tag_t                            wb_tag,
  input  logic [T-1:0]                    wb_we,
  input  logic [T-1:0]                    wb_vt,
  input  logic [T-1:0]                    wb_vf
);

  logic [NUM_PRED-1:0][T-1:0] val_q;
  logic [NUM_PRED-1:0]        ok_q;
  tag_t [NUM_PRED-1:0]        tag_q;

  always_comb begin
    value    = val_q;
    valid    = ok_q;
    tag      = tag_q;
    value[0] = '1;
    valid[0] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      val_q <= '0;
      ok_q  <= '1;
      tag_q <= '0;
    end else begin
      if (wb_valid) begin
        for (int t = 0; t < T; t++) begin
          if (wb_we[t]) begin
            if (wb_pt != 3'd0) val_q[wb_pt][t] <= wb_vt[t];
            if (wb_pf != 3'd0 && wb_pf != wb_pt) val_q[wb_pf][t] <= wb_vf[t];
          end
        end
        if (wb_pt != 3'd0 && tag_q[wb_pt] == wb_tag) ok_q[wb_pt] <= 1'b1;
        if (wb_pf != 3'd0 && tag_q[wb_pf] == wb_tag) ok_q[wb_pf] <= 1'b1;
      end
      if (mk_valid) begin
        if (mk_pt != 3'd0) begin ok_q[mk_pt] <= 1'b0; tag_q[mk_pt] <= mk_tag; end
        if (mk_pf != 3'd0) begin ok_q[mk_pf] <= 1'b0; tag_q[mk_pf] <= mk_tag; end
      end
    end
  end

endmodule
