// par_regfile: register file of one lane (general purpose plus inherited registers).
//
// Each general purpose register is as wide as the lane: one 64-bit word per thread,
// plus a valid bit and the tag of the in-flight instruction that will write it, as
// in the design. A 5-bit register number with bit 4 = 0 names GPR r0..r15, with
// bit 4 = 1 inherited register i0..i15 (the most significant bit selects the file,
// as described). Inherited registers are read-only copies of the master thread's
// values, loaded from the PAR packet; i0 is the thread index and reads as
// i0_base + t for thread t of this lane (the fetch unit advances i0_base for each
// new group of threads). Inherited registers are always valid.
//
// Ports: NRD combinational read ports (all threads at once), three status reads
// (valid, tag) for dispatch, a mark port that invalidates and tags the destination
// of a dispatched instruction, one write-back port with a per-thread write enable,
// and a thread-0 read port used by the fetch unit for loop counters. A write-back
// sets the valid bit only when its tag is still the register's tag; a mark in the
// same cycle wins. Reset clears the GPRs and makes them valid.
module par_regfile
  import par_pkg::*;
#(
  parameter int unsigned T    = 4,
  parameter int unsigned NGPR = 16,
  parameter int unsigned NINH = 16,
  parameter int unsigned NRD  = 12
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // operand reads
  input  logic [NRD-1:0][4:0]             rd_idx,
  output logic [NRD-1:0][T-1:0][XLEN-1:0] rd_data,
  // dispatch status reads
  input  logic [2:0][4:0]                 st_idx,
  output logic [2:0]                      st_valid,
  output tag_t [2:0]                      st_tag,
  // dispatch mark
  input  logic                            mk_valid,
  input  logic [4:0]                      mk_idx,
  input  tag_t                            mk_tag,
  // write back
  input  logic                            wb_valid,
  input  logic [4:0]                      wb_idx,
  input  tag_t                            wb_tag,
  input  logic [T-1:0]                    wb_we,
  input  logic [T-1:0][XLEN-1:0]          wb_data,
  // inherited registers
  input  logic                            inh_load,
  input  logic [NINH-1:0][XLEN-1:0]       inh_data,
  input  logic [XLEN-1:0]                 i0_base,
  // loop counter read (thread 0)
  input  logic [4:0]                      lc_idx,
  output logic [XLEN-1:0]                 lc_data,
  output logic                            lc_valid
);

  localparam int unsigned GW = $clog2(NGPR);
  localparam int unsigned IW = $clog2(NINH);

  logic [NGPR-1:0][T-1:0][XLEN-1:0] gpr_q;
  logic [NGPR-1:0]                  val_q;
  tag_t [NGPR-1:0]                  tag_q;
  logic [NINH-1:0][XLEN-1:0]        inh_q;

  function automatic logic [XLEN-1:0] rd_one(input logic [4:0] idx, input int unsigned t,
      input logic [NGPR-1:0][T-1:0][XLEN-1:0] g, input logic [NINH-1:0][XLEN-1:0] ih,
      input logic [XLEN-1:0] base);
    logic [XLEN-1:0] v;
    if (!idx[4]) v = g[idx[GW-1:0]][t];
    else if (idx[IW-1:0] == '0) v = base + XLEN'(t);
    else v = ih[idx[IW-1:0]];
    return v;
  endfunction

  always_comb begin
    for (int p = 0; p < NRD; p++)
      for (int t = 0; t < T; t++)
        rd_data[p][t] = rd_one(rd_idx[p], t, gpr_q, inh_q, i0_base);
    for (int k = 0; k < 3; k++) begin
      st_valid[k] = st_idx[k][4] ? 1'b1 : val_q[st_idx[k][GW-1:0]];
      st_tag[k]   = tag_q[st_idx[k][GW-1:0]];
    end
    lc_data  = rd_one(lc_idx, 0, gpr_q, inh_q, i0_base);
    lc_valid = lc_idx[4] ? 1'b1 : val_q[lc_idx[GW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gpr_q <= '0;
      val_q <= '1;
      tag_q <= '0;
      inh_q <= '0;
    end else begin
      if (inh_load) inh_q <= inh_data;
      if (wb_valid && !wb_idx[4]) begin
        for (int t = 0; t < T; t++)
          if (wb_we[t]) gpr_q[wb_idx[GW-1:0]][t] <= wb_data[t];
        if (tag_q[wb_idx[GW-1:0]] == wb_tag) val_q[wb_idx[GW-1:0]] <= 1'b1;
      end
      if (mk_valid && !mk_idx[4]) begin
        val_q[mk_idx[GW-1:0]] <= 1'b0;
        tag_q[mk_idx[GW-1:0]] <= mk_tag;
      end
    end
  end

endmodule
