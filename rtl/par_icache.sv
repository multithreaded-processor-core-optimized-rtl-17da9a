// par_icache: level-one instruction cache of the PAR core.
//
// The design assumes this cache is large enough to hold the whole thread program,
// so after the cold start it never misses; it is therefore modelled as an
// instruction memory of DEPTH 32-bit words (1024 by default, the size in the
// evaluated configuration) that the host fills through the write port before a PAR
// packet is started. Refill from a lower memory level is not part of this design.
//
// Timing: synchronous read. The word at raddr appears on rdata after the clock
// edge; the fetch unit presents the next PC so that rdata is the instruction at the
// current PC (the design's instruction register).
module par_icache #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
