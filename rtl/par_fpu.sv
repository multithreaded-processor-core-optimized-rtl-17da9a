// par_fpu: pipelined multiply / multiply-accumulate / divide unit of a lane ("FPU").
//
// As in the design, this unit executes integer and floating-point multiplication,
// division and multiply-accumulate, so it has three operand inputs (a, b and the old
// destination d). One thread enters per cycle and its result leaves LAT cycles later,
// so an instruction run for T threads keeps the pipeline full.
//
// Integer: mul (low 64 bits), mulh / mulhu (high 64 bits, signed / unsigned),
// mac / macu (d + low32(a) * low32(b), signed / unsigned), div / divu / rem / remu.
// Division by zero returns all ones (div) or the dividend (rem); the most negative
// number divided by -1 returns itself with remainder 0 (this design's choice, the
// document does not say).
// Double precision: add.d, sub.d, mul.d, mac.d (d + a*b, rounded after the product
// and after the sum), abs.d. This design's arithmetic truncates (rounds toward
// zero), flushes subnormal inputs and results to zero, returns a quiet NaN for
// invalid operations and infinity on overflow. FP divide (div.d) is not provided.
//
// Results of threads whose write enable is false are the old d (see par_alu).
// Timing: the operation is computed before the first register and carried through
// LAT register stages; LAT defaults to the evaluated 4-stage FPU.
module par_fpu
  import par_pkg::*;
#(
  parameter int unsigned THR_W = 2,
  parameter int unsigned LAT   = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  uop_e              in_uop,
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

  localparam logic [63:0] QNAN = 64'h7ff8_0000_0000_0000;

  function automatic logic [63:0] fp_mul(input logic [63:0] a, input logic [63:0] b);
    logic        s;
    logic [10:0] ea, eb;
    logic [105:0] p;
    logic signed [13:0] e;
    logic [51:0] m;
    logic [63:0] r;
    s  = a[63] ^ b[63];
    ea = a[62:52];
    eb = b[62:52];
    if ((ea == 11'h7ff && a[51:0] != 0) || (eb == 11'h7ff && b[51:0] != 0)) r = QNAN;
    else if (ea == 11'h7ff || eb == 11'h7ff) r = (ea == 0 || eb == 0) ? QNAN : {s, 11'h7ff, 52'd0};
    else if (ea == 0 || eb == 0) r = {s, 63'd0};
    else begin
      p = {1'b1, a[51:0]} * {1'b1, b[51:0]};
      e = $signed({3'b0, ea}) + $signed({3'b0, eb}) - 14'sd1023;
      if (p[105]) begin
        m = p[104:53];
        e = e + 14'sd1;
      end else m = p[103:52];
      if (e >= 14'sd2047) r = {s, 11'h7ff, 52'd0};
      else if (e <= 14'sd0) r = {s, 63'd0};
      else r = {s, e[10:0], m};
    end
    return r;
  endfunction

  function automatic logic [63:0] fp_add(input logic [63:0] a, input logic [63:0] b);
    logic [63:0] x, y, r;
    logic [11:0] d;
    logic [56:0] mx, my, sum;
    logic signed [13:0] e;
    int unsigned lz;
    logic az, bz;
    az = (a[62:52] == 0);
    bz = (b[62:52] == 0);
    if ((a[62:52] == 11'h7ff && a[51:0] != 0) || (b[62:52] == 11'h7ff && b[51:0] != 0)) r = QNAN;
    else if (a[62:52] == 11'h7ff && b[62:52] == 11'h7ff) r = (a[63] == b[63]) ? a : QNAN;
    else if (a[62:52] == 11'h7ff) r = a;
    else if (b[62:52] == 11'h7ff) r = b;
    else if (az && bz) r = {a[63] & b[63], 63'd0};
    else if (az) r = b;
    else if (bz) r = a;
    else begin
      // x has the larger magnitude
      if (a[62:0] >= b[62:0]) begin x = a; y = b; end
      else begin x = b; y = a; end
      d  = {1'b0, x[62:52]} - {1'b0, y[62:52]};
      mx = {1'b0, 1'b1, x[51:0], 3'b000};
      my = {1'b0, 1'b1, y[51:0], 3'b000};
      my = (d > 12'd56) ? '0 : (my >> d);
      e  = $signed({3'b0, x[62:52]});
      if (x[63] == y[63]) begin
        sum = mx + my;
        if (sum[56]) begin
          sum = sum >> 1;
          e   = e + 14'sd1;
        end
      end else begin
        sum = mx - my;
      end
      if (sum == '0) r = 64'd0;
      else begin
        lz = 0;
        for (int i = 0; i <= 55; i++) if (sum[i]) lz = 55 - i;
        sum = sum << lz;
        e   = e - 14'(lz);
        if (e >= 14'sd2047) r = {x[63], 11'h7ff, 52'd0};
        else if (e <= 14'sd0) r = {x[63], 63'd0};
        else r = {x[63], e[10:0], sum[54:3]};
      end
    end
    return r;
  endfunction

  logic [XLEN-1:0]        r;
  logic signed [127:0]    ps;
  logic [127:0]           pu;
  logic signed [63:0]     mac_s;
  logic [63:0]            mac_u;

  always_comb begin
    ps    = $signed({{64{in_a[63]}}, in_a}) * $signed({{64{in_b[63]}}, in_b});
    pu    = {64'd0, in_a} * {64'd0, in_b};
    mac_s = $signed({{32{in_a[31]}}, in_a[31:0]}) * $signed({{32{in_b[31]}}, in_b[31:0]});
    mac_u = {32'd0, in_a[31:0]} * {32'd0, in_b[31:0]};
    r     = '0;
    unique case (in_uop)
      U_MUL:   r = pu[63:0];
      U_MULH:  r = ps[127:64];
      U_MULHU: r = pu[127:64];
      U_MAC:   r = in_d + mac_s;
      U_MACU:  r = in_d + mac_u;
      U_DIV:
        if (in_b == '0) r = '1;
        else if (in_a == {1'b1, 63'd0} && in_b == '1) r = in_a;
        else r = $unsigned($signed(in_a) / $signed(in_b));
      U_DIVU:  r = (in_b == '0) ? '1 : in_a / in_b;
      U_REM:
        if (in_b == '0) r = in_a;
        else if (in_a == {1'b1, 63'd0} && in_b == '1) r = '0;
        else r = $unsigned($signed(in_a) % $signed(in_b));
      U_REMU:  r = (in_b == '0) ? in_a : in_a % in_b;
      U_FADD:  r = fp_add(in_a, in_b);
      U_FSUB:  r = fp_add(in_a, {~in_b[63], in_b[62:0]});
      U_FMUL:  r = fp_mul(in_a, in_b);
      U_FMAC:  r = fp_add(in_d, fp_mul(in_a, in_b));
      U_FABS:  r = {1'b0, in_a[62:0]};
      default: r = '0;
    endcase
  end

  logic [LAT-1:0]                   v_q;
  logic [LAT-1:0][SLOT_W-1:0]       s_q;
  logic [LAT-1:0][THR_W-1:0]        t_q;
  logic [LAT-1:0][XLEN-1:0]         d_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q <= '0;
      s_q <= '0;
      t_q <= '0;
      d_q <= '0;
    end else begin
      v_q[0] <= in_valid;
      s_q[0] <= in_slot;
      t_q[0] <= in_thr;
      d_q[0] <= in_we ? r : in_d;
      for (int i = 1; i < LAT; i++) begin
        v_q[i] <= v_q[i-1];
        s_q[i] <= s_q[i-1];
        t_q[i] <= t_q[i-1];
        d_q[i] <= d_q[i-1];
      end
    end
  end

  assign out_valid = v_q[LAT-1];
  assign out_slot  = s_q[LAT-1];
  assign out_thr   = t_q[LAT-1];
  assign out_data  = d_q[LAT-1];

endmodule
