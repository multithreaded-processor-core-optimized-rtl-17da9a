// par_alu: integer ALU datapath of a lane.
//
// Executes one thread of one instruction per cycle: add/sub (subf computes b - a),
// the eight bitwise logic operations, shifts and rotate by b[5:0], shift-left-and-add,
// signed/unsigned min and max, abs, population count, count leading zeros, and the
// constant-formation instructions set (b holds the sign-extended imm16) and sli
// ((rd << 16) | imm16). The operation list follows the ISA appendix of the design.
//
// Result merge (this design's choice): when the thread's write enable (qualifying
// predicate AND mask) is false, the old destination value d is returned instead, so
// what is forwarded equals what the register will hold after write back.
// The side effect on p7 (overflow/carry/compare flag) that the ISA lists for add and
// min/max is not produced.
//
// Timing: one register stage, latency 1 cycle (the ALU latency of the evaluated
// configuration), fully pipelined. The slot and thread numbers travel with the data.
module par_alu
  import par_pkg::*;
#(
  parameter int unsigned THR_W = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  uop_e              in_uop,
  input  logic [1:0]        in_sla_n,
  input  logic [XLEN-1:0]   in_a,
  input  logic [XLEN-1:0]   in_b,
  input  logic [XLEN-1:0]   in_d,
  input  logic              in_we,
  input  logic [SLOT_W-1:0] in_slot,
  input  logic [THR_W-1:0]  in_thr,
  output logic              out_valid,
  output logic [SLOT_W-1:0] out_slot,
  output logic [THR_W-1:0]  out_thr,
  output logic [XLEN-1:0]   out_data
);

  logic [XLEN-1:0] r;
  logic [6:0]      cnt;

  always_comb begin
    r   = '0;
    cnt = '0;
    unique case (in_uop)
      U_ADD, U_ADDU:   r = in_a + in_b;
      U_SUBF, U_SUBFU: r = in_b - in_a;
      U_AND:   r = in_a & in_b;
      U_OR:    r = in_a | in_b;
      U_XOR:   r = in_a ^ in_b;
      U_NOR:   r = ~(in_a | in_b);
      U_ANDC:  r = in_a & ~in_b;
      U_ORC:   r = in_a | ~in_b;
      U_XNOR:  r = ~(in_a ^ in_b);
      U_NAND:  r = ~(in_a & in_b);
      U_SLL:   r = in_a << in_b[5:0];
      U_SRL:   r = in_a >> in_b[5:0];
      U_SRA:   r = $unsigned($signed(in_a) >>> in_b[5:0]);
      U_ROR:   r = (in_a >> in_b[5:0]) | (in_a << (7'd64 - {1'b0, in_b[5:0]}));
      U_SLA:   r = in_a + (in_b << in_sla_n);
      U_MIN:   r = ($signed(in_a) < $signed(in_b)) ? in_a : in_b;
      U_MAX:   r = ($signed(in_a) > $signed(in_b)) ? in_a : in_b;
      U_MINU:  r = (in_a < in_b) ? in_a : in_b;
      U_MAXU:  r = (in_a > in_b) ? in_a : in_b;
      U_ABS:   r = in_a[XLEN-1] ? (~in_a + 1'b1) : in_a;
      U_POPC: begin
        for (int i = 0; i < XLEN; i++) cnt = cnt + 7'(in_a[i]);
        r = XLEN'(cnt);
      end
      U_CLZ: begin
        cnt = 7'd64;
        for (int i = 0; i < XLEN; i++) if (in_a[i]) cnt = 7'(XLEN - 1 - i);
        r = XLEN'(cnt);
      end
      U_SET:   r = in_b;
      U_SLI:   r = (in_d << 16) | in_b;
      default: r = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_slot  <= '0;
      out_thr   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      out_slot  <= in_slot;
      out_thr   <= in_thr;
      out_data  <= in_we ? r : in_d;
    end
  end

endmodule
