// par_dmem_bank: one bank of the lanes' local data memory ("D-cache bank").
//
// The design treats the local memory as a memory that never misses and answers a
// hit in one cycle; this bank is that memory: a single-port synchronous RAM of
// WORDS 64-bit words with byte enables. A write (req && we) stores the enabled
// bytes; a read (req && !we) returns the word on rdata in the next cycle. The
// number of words per bank is this design's choice (the document gives none).
module par_dmem_bank #(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [63:0]   wdata,
  input  logic [7:0]    be,
  output logic [63:0]   rdata
);

  logic [63:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (req) begin
      if (we) begin
        for (int i = 0; i < 8; i++)
          if (be[i]) mem[addr][8*i +: 8] <= wdata[8*i +: 8];
      end else begin
        rdata <= mem[addr];
      end
    end
  end

endmodule
