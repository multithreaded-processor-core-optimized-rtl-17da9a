// tb_par_fpu: self-checking test of the multiply/divide/FP unit (par_fpu).
//
// Random operations, one per cycle: integer mul/mulh/mulhu/mac/macu/div/divu/rem/
// remu (including division by zero) and double add/sub/mul/mac/abs on operands whose
// exact results are representable (small integers and quarters), so the reference is
// plain real arithmetic. Each result must appear exactly LAT = 4 cycles after its
// input, with its slot and thread tags; write enable low returns the old d.
module tb_par_fpu;
  import par_pkg::*;

  localparam int LAT = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid = 1'b0, in_we = 1'b0;
  uop_e              in_uop = U_NOP;
  logic [XLEN-1:0]   in_a = '0, in_b = '0, in_d = '0;
  logic [SLOT_W-1:0] in_slot = '0;
  logic [1:0]        in_thr = '0;
  logic              out_valid;
  logic [SLOT_W-1:0] out_slot;
  logic [1:0]        out_thr;
  logic [XLEN-1:0]   out_data;

  par_fpu #(.THR_W(2)) dut (.*);

  int checks = 0, failures = 0;

  function automatic logic [63:0] rd_(int lo, int hi);
    int n;
    real r;
    n = int'($urandom_range(0, hi - lo)) + lo;
    r = n;
    r = r / 4.0;
    return $realtobits(r);
  endfunction

  function automatic logic [63:0] ref_op(uop_e u, logic [63:0] a, logic [63:0] b, logic [63:0] d);
    logic [127:0] pu;
    logic signed [127:0] ps;
    real ra, rb, rd;
    ra = $bitstoreal(a);
    rb = $bitstoreal(b);
    rd = $bitstoreal(d);
    pu = {64'd0, a} * {64'd0, b};
    ps = $signed({{64{a[63]}}, a}) * $signed({{64{b[63]}}, b});
    case (u)
      U_MUL:   return pu[63:0];
      U_MULH:  return ps[127:64];
      U_MULHU: return pu[127:64];
      U_MAC:   return d + 64'($signed(a[31:0]) * $signed(b[31:0]));
      U_MACU:  return d + {32'd0, a[31:0]} * {32'd0, b[31:0]};
      U_DIV:   return (b == 0) ? '1 : 64'($signed(a) / $signed(b));
      U_DIVU:  return (b == 0) ? '1 : a / b;
      U_REM:   return (b == 0) ? a : 64'($signed(a) % $signed(b));
      U_REMU:  return (b == 0) ? a : a % b;
      U_FADD:  return $realtobits(ra + rb);
      U_FSUB:  return $realtobits(ra - rb);
      U_FMUL:  return $realtobits(ra * rb);
      U_FMAC:  return $realtobits(rd + ra * rb);
      U_FABS:  return {1'b0, a[62:0]};
      default: return '0;
    endcase
  endfunction

  uop_e ops [14] = '{U_MUL, U_MULH, U_MULHU, U_MAC, U_MACU, U_DIV, U_DIVU, U_REM, U_REMU,
                     U_FADD, U_FSUB, U_FMUL, U_FMAC, U_FABS};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, indexed by the cycle the input was presented
  logic [XLEN-1:0]   e_data [4000];
  logic [SLOT_W-1:0] e_slot [4000];
  logic [1:0]        e_thr  [4000];
  int cyc = 0;
  uop_e u;
  logic [63:0] a, b, d;
  logic we;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 3000 + LAT; i++) begin
      if (i < 3000) begin
        u = ops[$urandom_range(0, 13)];
        if (u inside {U_FADD, U_FSUB, U_FMUL, U_FMAC, U_FABS}) begin
          a = rd_(-4000, 4000);
          b = rd_(-4000, 4000);
          d = rd_(-4000, 4000);
        end else begin
          a = (i % 3 == 0) ? 64'(-$urandom_range(0, 1000)) : {$urandom, $urandom};
          b = (i % 11 == 0) ? 64'd0 : (i % 3 == 1) ? 64'($urandom_range(1, 100)) : {$urandom, $urandom};
          d = {$urandom, $urandom};
        end
        we = ($urandom_range(0, 4) != 0);
        in_valid <= 1'b1;
        in_uop <= u;
        in_a <= a;
        in_b <= b;
        in_d <= d;
        in_we <= we;
        in_slot <= SLOT_W'(i);
        in_thr <= 2'(i >> 3);
        e_data[i] = we ? ref_op(u, a, b, d) : d;
        e_slot[i] = SLOT_W'(i);
        e_thr[i]  = 2'(i >> 3);
      end else begin
        in_valid <= 1'b0;
      end
      @(posedge clk);
      #1;
      // the input presented before edge k leaves after edge k + LAT - 1
      if (i >= LAT - 1) begin
        checks++;
        if (!(out_valid === (i - (LAT - 1) < 3000) &&
              (i - (LAT - 1) >= 3000 || (out_data === e_data[i - (LAT - 1)] &&
               out_slot === e_slot[i - (LAT - 1)] && out_thr === e_thr[i - (LAT - 1)])))) begin
          failures++;
          if (failures < 10)
            $display("FAIL: input %0d got %h exp %h", i - (LAT - 1), out_data, e_data[i - (LAT - 1)]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
