// tb_par_cmp: self-checking test of the compare unit (par_cmp).
//
// One random compare per cycle: integer eq/lt/ltu on random and equal operands,
// double eq/lt on real numbers (including +0/-0 and NaN) and the predicate logic
// operations on bit 0. The (pt, pf) pair is checked one cycle later against a
// reference built with real arithmetic; NaN must give false for both.
module tb_par_cmp;
  import par_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid = 1'b0;
  uop_e              in_uop = U_NOP;
  logic [XLEN-1:0]   in_a = '0, in_b = '0;
  logic [SLOT_W-1:0] in_slot = '0;
  logic [1:0]        in_thr = '0;
  logic              out_valid;
  logic [SLOT_W-1:0] out_slot;
  logic [1:0]        out_thr;
  logic [XLEN-1:0]   out_data;

  par_cmp #(.THR_W(2)) dut (.*);

  int checks = 0, failures = 0;
  localparam logic [63:0] NAN = 64'h7ff8_0000_0000_0001;

  function automatic logic [63:0] rnd_double();
    int k, n;
    real r;
    k = $urandom_range(0, 9);
    n = $urandom_range(0, 40);
    r = n;
    r = (r - 20.0) / 4.0;
    if (k == 0) return NAN;
    if (k == 1) return 64'h8000_0000_0000_0000;  // -0
    if (k == 2) return 64'd0;
    return $realtobits(r);
  endfunction

  function automatic logic [1:0] ref_cmp(uop_e u, logic [63:0] a, logic [63:0] b);
    logic c, nan;
    real ra, rb;
    nan = (a[62:52] == 11'h7ff && a[51:0] != 0) || (b[62:52] == 11'h7ff && b[51:0] != 0);
    ra = $bitstoreal(a);
    rb = $bitstoreal(b);
    case (u)
      U_CEQ:   c = (a == b);
      U_CLT:   c = ($signed(a) < $signed(b));
      U_CLTU:  c = (a < b);
      U_FEQ:   c = !nan && (ra == rb);
      U_FLT:   c = !nan && (ra < rb);
      U_PAND:  c = a[0] & b[0];
      U_POR:   c = a[0] | b[0];
      U_PXOR:  c = a[0] ^ b[0];
      default: c = a[0] & ~b[0];
    endcase
    if ((u == U_FEQ || u == U_FLT) && nan) return 2'b00;
    return {!c, c};
  endfunction

  uop_e ops [9] = '{U_CEQ, U_CLT, U_CLTU, U_FEQ, U_FLT, U_PAND, U_POR, U_PXOR, U_PANDC};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] exp_p;
  uop_e u;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      u = ops[$urandom_range(0, 8)];
      in_valid <= 1'b1;
      in_uop   <= u;
      if (u == U_FEQ || u == U_FLT) begin
        in_a <= rnd_double();
        in_b <= rnd_double();
      end else if (i % 4 == 0) begin
        in_a <= 64'($urandom_range(0, 3));
        in_b <= 64'($urandom_range(0, 3));
      end else begin
        in_a <= {$urandom, $urandom};
        in_b <= {$urandom, $urandom};
      end
      in_slot <= SLOT_W'($urandom);
      in_thr  <= 2'($urandom);
      @(posedge clk);
      exp_p = ref_cmp(in_uop, in_a, in_b);
      #1;
      checks++;
      if (!(out_valid && out_data[1:0] === exp_p && out_slot === in_slot && out_thr === in_thr)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: uop=%s a=%h b=%h got %b exp %b", in_uop.name(), in_a, in_b,
                   out_data[1:0], exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
