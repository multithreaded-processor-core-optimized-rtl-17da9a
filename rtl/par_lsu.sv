// par_lsu: load/store unit datapath of a lane.
//
// Executes one thread of a load (ldN rd = ra[rb]) or store (stN ra[rb] = rd) per
// cycle against the local data memory through a request/grant port. The address is
// ra + rb, counted in 64-bit words as the benchmark programs of the design count
// it (consecutive elements differ by 1). ld8/st8 move a whole word; ld4/ld2/ld1 read
// the low 4/2/1 bytes of the word zero-extended and st4/st2/st1 write them (this
// design's reading of the sub-word sizes, which the document does not detail).
//
// Replicated load: when a thread of a load uses the same address as the previous
// thread of the same instruction, the unit reuses that data instead of accessing
// memory again, so a load all threads make to one address reaches memory once and
// its result is replicated, as the design describes. Reuse is limited to threads
// 1..T-1 of one instruction, so data never outlives the instruction that loaded it.
//
// Threads whose write enable (qualifying predicate AND mask) is false make no
// access: a store is suppressed and a load returns the old destination value d.
//
// Timing: a request is accepted in the cycle mem_gnt is high (or at once when no
// access is needed); its result appears one cycle later (the one-cycle hit latency
// of the local memory). in_ready is low while a needed grant is missing.
module par_lsu
  import par_pkg::*;
#(
  parameter int unsigned THR_W = 2,
  parameter int unsigned AW    = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  uop_e              in_uop,
  input  logic [1:0]        in_size,
  input  logic [XLEN-1:0]   in_a,
  input  logic [XLEN-1:0]   in_b,
  input  logic [XLEN-1:0]   in_d,
  input  logic              in_we,
  input  logic [SLOT_W-1:0] in_slot,
  input  logic [THR_W-1:0]  in_thr,
  output logic              out_valid,
  output logic [SLOT_W-1:0] out_slot,
  output logic [THR_W-1:0]  out_thr,
  output logic [XLEN-1:0]   out_data,
  // memory port
  output logic              mem_req,
  output logic              mem_we,
  output logic [AW-1:0]     mem_addr,
  output logic [XLEN-1:0]   mem_wdata,
  output logic [7:0]        mem_be,
  input  logic              mem_gnt,
  input  logic [XLEN-1:0]   mem_rdata,
  // events
  output logic              ev_repl,
  output logic              ev_wait
);

  typedef enum logic [1:0] {R_MEM, R_REPL, R_OLD} rsrc_e;

  logic [XLEN-1:0]   addr_full;
  logic              is_ld, repl_hit, need_mem, accept;
  logic              last_valid;
  logic [SLOT_W-1:0] last_slot;
  logic [AW-1:0]     last_addr;
  logic [XLEN-1:0]   last_data;
  logic              p_valid;
  rsrc_e             p_src;
  logic [1:0]        p_size;
  logic [SLOT_W-1:0] p_slot;
  logic [THR_W-1:0]  p_thr;
  logic [XLEN-1:0]   p_old;
  logic [XLEN-1:0]   rd_word;

  assign addr_full = in_a + in_b;
  assign is_ld     = (in_uop == U_LD);
  assign repl_hit  = is_ld && last_valid && (in_thr != '0) && (last_slot == in_slot) &&
                     (last_addr == addr_full[AW-1:0]);
  assign need_mem  = in_valid && in_we && !repl_hit;
  assign in_ready  = !need_mem || mem_gnt;
  assign accept    = in_valid && in_ready;

  assign mem_req   = need_mem;
  assign mem_we    = !is_ld;
  assign mem_addr  = addr_full[AW-1:0];
  assign mem_wdata = in_d;
  always_comb begin
    unique case (in_size)
      2'd0:    mem_be = 8'hff;
      2'd1:    mem_be = 8'h0f;
      2'd2:    mem_be = 8'h03;
      default: mem_be = 8'h01;
    endcase
  end

  assign ev_repl = accept && in_we && repl_hit;
  assign ev_wait = need_mem && !mem_gnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_valid    <= 1'b0;
      p_src      <= R_OLD;
      p_size     <= '0;
      p_slot     <= '0;
      p_thr      <= '0;
      p_old      <= '0;
      last_valid <= 1'b0;
      last_slot  <= '0;
      last_addr  <= '0;
      last_data  <= '0;
    end else begin
      p_valid <= accept;
      if (accept) begin
        p_slot <= in_slot;
        p_thr  <= in_thr;
        p_old  <= in_d;
        p_size <= in_size;
        if (!in_we || !is_ld) p_src <= R_OLD;
        else if (repl_hit)    p_src <= R_REPL;
        else                  p_src <= R_MEM;
        if (need_mem) begin
          last_valid <= is_ld;
          last_slot  <= in_slot;
          last_addr  <= addr_full[AW-1:0];
        end else if (in_thr == '0) begin
          last_valid <= 1'b0;  // a new instruction never reuses older data
        end
      end
      if (p_valid && p_src == R_MEM) last_data <= mem_rdata;
    end
  end

  always_comb begin
    rd_word = (p_src == R_REPL) ? last_data : mem_rdata;
    unique case (p_size)
      2'd0:    rd_word = rd_word;
      2'd1:    rd_word = {32'd0, rd_word[31:0]};
      2'd2:    rd_word = {48'd0, rd_word[15:0]};
      default: rd_word = {56'd0, rd_word[7:0]};
    endcase
  end

  assign out_valid = p_valid;
  assign out_slot  = p_slot;
  assign out_thr   = p_thr;
  assign out_data  = (p_src == R_OLD) ? p_old : rd_word;

endmodule
