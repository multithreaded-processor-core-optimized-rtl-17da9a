// par_cmp: compare unit datapath of a lane.
//
// Evaluates one thread per cycle and produces the predicate pair of a compare:
// out_data[0] is the value for pt (the condition), out_data[1] the value for pf
// (its complement). Integer eq / lt (signed) / ltu (unsigned), double-precision
// eq.d / lt.d on IEEE-754 bit patterns (NaN compares false for both, +0 == -0), and
// the predicate logic and / or / xor / andc on bit 0 of its operands, whose pf is the
// complement (nand, nor, xnor, orc), all as listed in the ISA appendix.
//
// No merge is done here: predicate write enables are applied at write back.
// Timing: one register stage, latency 1 cycle (the evaluated compare latency).
module par_cmp
  import par_pkg::*;
#(
  parameter int unsigned THR_W = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  uop_e              in_uop,
  input  logic [XLEN-1:0]   in_a,
  input  logic [XLEN-1:0]   in_b,
  input  logic [SLOT_W-1:0] in_slot,
  input  logic [THR_W-1:0]  in_thr,
  output logic              out_valid,
  output logic [SLOT_W-1:0] out_slot,
  output logic [THR_W-1:0]  out_thr,
  output logic [XLEN-1:0]   out_data
);

  function automatic logic is_nan(input logic [63:0] v);
    return (v[62:52] == 11'h7ff) && (v[51:0] != '0);
  endfunction

  function automatic logic is_zero(input logic [63:0] v);
    return v[62:0] == '0;
  endfunction

  // a < b for doubles, NaN gives false.
  function automatic logic fp_lt(input logic [63:0] a, input logic [63:0] b);
    logic r;
    if (is_nan(a) || is_nan(b) || (is_zero(a) && is_zero(b))) r = 1'b0;
    else if (a[63] != b[63]) r = a[63];
    else if (!a[63]) r = a[62:0] < b[62:0];
    else r = a[62:0] > b[62:0];
    return r;
  endfunction

  logic c;
  logic cf;   // pf value

  always_comb begin
    c = 1'b0;
    unique case (in_uop)
      U_CEQ:   c = (in_a == in_b);
      U_CLT:   c = ($signed(in_a) < $signed(in_b));
      U_CLTU:  c = (in_a < in_b);
      U_FEQ:   c = !is_nan(in_a) && !is_nan(in_b) &&
                   ((in_a == in_b) || (is_zero(in_a) && is_zero(in_b)));
      U_FLT:   c = fp_lt(in_a, in_b);
      U_PAND:  c = in_a[0] & in_b[0];
      U_POR:   c = in_a[0] | in_b[0];
      U_PXOR:  c = in_a[0] ^ in_b[0];
      U_PANDC: c = in_a[0] & ~in_b[0];
      default: c = 1'b0;
    endcase
    // An unordered FP compare is false for both predicates.
    if ((in_uop == U_FEQ || in_uop == U_FLT) && (is_nan(in_a) || is_nan(in_b))) cf = 1'b0;
    else cf = !c;
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
      out_data  <= {{(XLEN-2){1'b0}}, cf, c};
    end
  end

endmodule
