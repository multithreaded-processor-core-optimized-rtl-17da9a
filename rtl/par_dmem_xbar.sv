// par_dmem_xbar: interconnect between the lanes and the data memory banks.
//
// The design draws an interconnect bus between the lanes and the D-cache banks but
// does not describe it; this is the simplest crossbar that does the job. Words are
// interleaved over NBANK banks by the low address bits (bank = addr % NBANK). Each
// cycle every bank grants one requester: the host port first (used to load and read
// data while the core is idle), then the lanes in round-robin order starting after
// the lane granted last. A lane that is not granted keeps its request up (its L/S
// unit waits). Read data come back one cycle after the grant, on the port that was
// granted.
//
// Ports are flattened arrays, index = lane. AW is the full word address width.
module par_dmem_xbar #(
  parameter int unsigned NPORT = 4,
  parameter int unsigned NBANK = 4,
  parameter int unsigned BANK_WORDS = 4096,
  parameter int unsigned AW    = $clog2(NBANK * BANK_WORDS)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // lane ports
  input  logic [NPORT-1:0]            req,
  input  logic [NPORT-1:0]            we,
  input  logic [NPORT-1:0][AW-1:0]    addr,
  input  logic [NPORT-1:0][63:0]      wdata,
  input  logic [NPORT-1:0][7:0]       be,
  output logic [NPORT-1:0]            gnt,
  output logic [NPORT-1:0][63:0]      rdata,
  // host port (highest priority)
  input  logic                        h_req,
  input  logic                        h_we,
  input  logic [AW-1:0]               h_addr,
  input  logic [63:0]                 h_wdata,
  output logic                        h_gnt,
  output logic [63:0]                 h_rdata,
  // a lane request lost arbitration this cycle
  output logic                        conflict
);

  localparam int unsigned BB  = (NBANK > 1) ? $clog2(NBANK) : 1;
  localparam int unsigned BAW = $clog2(BANK_WORDS);
  localparam int unsigned PW  = (NPORT > 1) ? $clog2(NPORT) : 1;

  logic [NBANK-1:0]              b_req, b_we, b_host;
  logic [NBANK-1:0][BAW-1:0]     b_addr;
  logic [NBANK-1:0][63:0]        b_wdata, b_rdata;
  logic [NBANK-1:0][7:0]         b_be;
  logic [NBANK-1:0][PW-1:0]      b_sel, rr_q;
  logic [NPORT-1:0][BB-1:0]      p_bank;
  logic [BB-1:0]                 h_bank;
  int unsigned                   pp;
  logic [NPORT-1:0][BB-1:0]      rd_bank_q;
  logic [BB-1:0]                 h_bank_q;

  always_comb begin
    for (int p = 0; p < NPORT; p++) p_bank[p] = BB'(addr[p] % NBANK);
    h_bank = BB'(h_addr % NBANK);
    gnt    = '0;
    h_gnt  = 1'b0;
    pp     = 0;
    b_req  = '0;
    b_we   = '0;
    b_host = '0;
    b_addr = '0;
    b_wdata = '0;
    b_be   = '0;
    b_sel  = '0;
    for (int b = 0; b < NBANK; b++) begin
      if (h_req && h_bank == BB'(b)) begin
        b_req[b]   = 1'b1;
        b_host[b]  = 1'b1;
        b_we[b]    = h_we;
        b_addr[b]  = BAW'(h_addr / NBANK);
        b_wdata[b] = h_wdata;
        b_be[b]    = 8'hff;
        h_gnt      = 1'b1;
      end else begin
        for (int k = 1; k <= NPORT; k++) begin
          pp = (32'(rr_q[b]) + 32'(k)) % NPORT;
          if (!b_req[b] && req[pp] && p_bank[pp] == BB'(b)) begin
            b_req[b]   = 1'b1;
            b_sel[b]   = PW'(pp);
            b_we[b]    = we[pp];
            b_addr[b]  = BAW'(addr[pp] / NBANK);
            b_wdata[b] = wdata[pp];
            b_be[b]    = be[pp];
            gnt[pp]    = 1'b1;
          end
        end
      end
    end
    conflict = |(req & ~gnt);
  end

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    par_dmem_bank #(.WORDS(BANK_WORDS)) u_bank (
      .clk  (clk),
      .req  (b_req[b]),
      .we   (b_we[b]),
      .addr (b_addr[b]),
      .wdata(b_wdata[b]),
      .be   (b_be[b]),
      .rdata(b_rdata[b])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr_q      <= '0;
      rd_bank_q <= '0;
      h_bank_q  <= '0;
    end else begin
      for (int b = 0; b < NBANK; b++)
        if (b_req[b] && !b_host[b]) rr_q[b] <= b_sel[b];
      for (int p = 0; p < NPORT; p++) rd_bank_q[p] <= p_bank[p];
      h_bank_q  <= h_bank;
    end
  end

  always_comb begin
    for (int p = 0; p < NPORT; p++) rdata[p] = b_rdata[rd_bank_q[p]];
    h_rdata = b_rdata[h_bank_q];
  end

  // Every bank serves at most one requester per cycle.
  a_one_grant_per_bank: assert property (@(posedge clk) disable iff (!rst_n)
    ($countones(gnt) + 32'(h_gnt)) <= NBANK)
    else $error("par_dmem_xbar: more grants than banks");

endmodule
