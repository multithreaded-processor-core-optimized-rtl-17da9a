// par_core: top level of the PAR core (fetch unit, instruction cache, lanes, data
// memory and interconnect).
//
// The PAR core executes one PAR packet at a time: a thread program (a sequence of
// instruction blocks in the instruction cache) to be run by nthreads threads that
// differ only in their thread index i0. The fetch unit (par_fetch) runs the threads
// in groups of LANES*T: every lane holds T threads and executes each broadcast
// instruction once per thread, one thread per cycle, so LANES*T threads advance
// together through the same instruction stream. Thread t of lane l in a group reads
// i0 = group base + l*T + t. Between groups the core waits until every lane is empty.
//
// The master core that builds PAR packets and runs the sequential code is not part
// of this design; its side appears as ports instead:
//   * packet start: start (one-cycle pulse while busy is low), start_addr (first
//     instruction), nthreads, i0_init (i0 of the first thread) and inh_data (the
//     inherited registers loaded into every thread at start; they are read-only to the
//     thread program). done pulses when the last group has finished.
//   * instruction cache load: ic_we / ic_waddr / ic_wdata.
//   * host data port into the shared local data memory (h_*), used to place inputs
//     and read results; it has priority over the lanes in the interconnect.
// Status and statistics: stk_overflow / stk_underflow (sticky control-stack errors),
// fetch_ev (fetch unit event pulses), lane_ev (per-lane event pulses) and
// bank_conflict (some lane request lost arbitration this cycle).
//
// Defaults follow the evaluated configuration: 4 lanes of 4 threads, queue size 2
// per unit, ROB of 8, 4-stage FPU, 1024-instruction cache. The data memory of 4
// banks of 4096 words is this design's choice.
module par_core
  import par_pkg::*;
#(
  parameter int unsigned LANES      = 4,
  parameter int unsigned T          = 4,
  parameter int unsigned QSIZE      = 2,
  parameter int unsigned NROB       = 8,
  parameter int unsigned NGPR       = 16,
  parameter int unsigned NINH       = 16,
  parameter int unsigned FP_LAT     = 4,
  parameter int unsigned IC_DEPTH   = 1024,
  parameter int unsigned NBANK      = 4,
  parameter int unsigned BANK_WORDS = 4096,
  parameter int unsigned SDEPTH     = 16,
  parameter int unsigned IAW        = $clog2(IC_DEPTH),
  parameter int unsigned AW         = $clog2(NBANK * BANK_WORDS)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // PAR packet from the master core
  input  logic                        start,
  input  logic [IAW-1:0]              start_addr,
  input  logic [31:0]                 nthreads,
  input  logic [XLEN-1:0]             i0_init,
  input  logic [NINH-1:0][XLEN-1:0]   inh_data,
  output logic                        busy,
  output logic                        done,
  // instruction cache load
  input  logic                        ic_we,
  input  logic [IAW-1:0]              ic_waddr,
  input  logic [31:0]                 ic_wdata,
  // host data port
  input  logic                        h_req,
  input  logic                        h_we,
  input  logic [AW-1:0]               h_addr,
  input  logic [XLEN-1:0]             h_wdata,
  output logic                        h_gnt,
  output logic [XLEN-1:0]             h_rdata,
  // status and events
  output logic                        stk_overflow,
  output logic                        stk_underflow,
  output fetch_ev_t                   fetch_ev,
  output lane_ev_t [LANES-1:0]        lane_ev,
  output logic                        bank_conflict
);

  logic [IAW-1:0]                         ic_addr;
  logic [31:0]                            ic_data;
  logic                                   disp_valid;
  logic [31:0]                            disp_instr;
  logic [LANES-1:0][T-1:0]                mask;
  logic [XLEN-1:0]                        i0_base;
  logic [LANES-1:0]                       l_ready, l_empty;
  logic [LANES-1:0][NUM_PRED-1:0][T-1:0]  pred_value;
  logic [LANES-1:0][NUM_PRED-1:0]         pred_valid;
  logic [4:0]                             lc_idx;
  logic [LANES-1:0][XLEN-1:0]             lc_data;
  logic [LANES-1:0]                       lc_valid;
  logic [LANES-1:0]                       m_req, m_we, m_gnt;
  logic [LANES-1:0][AW-1:0]               m_addr;
  logic [LANES-1:0][XLEN-1:0]             m_wdata, m_rdata;
  logic [LANES-1:0][7:0]                  m_be;
  logic                                   inh_load;

  assign inh_load = start && !busy;

  par_icache #(.DEPTH(IC_DEPTH), .AW(IAW)) u_icache (
    .clk, .raddr(ic_addr), .rdata(ic_data),
    .we(ic_we), .waddr(ic_waddr), .wdata(ic_wdata)
  );

  par_fetch #(.LANES(LANES), .T(T), .IAW(IAW), .CNT_W(32), .SDEPTH(SDEPTH)) u_fetch (
    .clk, .rst_n,
    .start(inh_load), .start_addr, .nthreads, .i0_init, .busy, .done,
    .ic_addr, .ic_data,
    .disp_valid, .disp_instr, .mask, .i0_base,
    .lanes_ready(&l_ready), .lanes_empty(&l_empty),
    .pred_value, .pred_valid,
    .lc_idx, .lc_data(lc_data[0]), .lc_valid(lc_valid[0]),
    .stk_overflow, .stk_underflow,
    .ev_stall(fetch_ev.stall), .ev_ctl_wait(fetch_ev.ctl_wait), .ev_xp(fetch_ev.xp),
    .ev_loop_iter(fetch_ev.loop_iter), .ev_loop_exit(fetch_ev.loop_exit),
    .ev_brk(fetch_ev.brk), .ev_return(fetch_ev.ret), .ev_group(fetch_ev.group)
  );

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    par_lane #(
      .T(T), .QSIZE(QSIZE), .NROB(NROB), .NGPR(NGPR), .NINH(NINH),
      .FP_LAT(FP_LAT), .AW(AW)
    ) u_lane (
      .clk, .rst_n,
      .in_valid(disp_valid), .in_instr(disp_instr), .in_mask(mask[l]),
      .ready(l_ready[l]), .empty(l_empty[l]),
      .inh_load, .inh_data, .i0_base(i0_base + XLEN'(l * T)),
      .pred_value(pred_value[l]), .pred_valid(pred_valid[l]),
      .lc_idx, .lc_data(lc_data[l]), .lc_valid(lc_valid[l]),
      .mem_req(m_req[l]), .mem_we(m_we[l]), .mem_addr(m_addr[l]), .mem_wdata(m_wdata[l]),
      .mem_be(m_be[l]), .mem_gnt(m_gnt[l]), .mem_rdata(m_rdata[l]),
      .ev(lane_ev[l])
    );
  end

  par_dmem_xbar #(.NPORT(LANES), .NBANK(NBANK), .BANK_WORDS(BANK_WORDS), .AW(AW)) u_xbar (
    .clk, .rst_n,
    .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata), .be(m_be),
    .gnt(m_gnt), .rdata(m_rdata),
    .h_req, .h_we, .h_addr, .h_wdata, .h_gnt, .h_rdata,
    .conflict(bank_conflict)
  );

endmodule
