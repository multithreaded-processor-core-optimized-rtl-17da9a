// tb_par_alu: self-checking test of the lane ALU (par_alu).
//
// Drives one random operation per cycle (every ALU micro-operation, random operands,
// random write enable) and compares the output one cycle later with a reference
// computed here, checking the one-cycle latency and the slot/thread tags. Threads
// with the write enable low must return the old destination value.
module tb_par_alu;
  import par_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid = 1'b0, in_we = 1'b0;
  uop_e              in_uop = U_NOP;
  logic [1:0]        in_sla_n = '0;
  logic [XLEN-1:0]   in_a = '0, in_b = '0, in_d = '0;
  logic [SLOT_W-1:0] in_slot = '0;
  logic [1:0]        in_thr = '0;
  logic              out_valid;
  logic [SLOT_W-1:0] out_slot;
  logic [1:0]        out_thr;
  logic [XLEN-1:0]   out_data;

  par_alu #(.THR_W(2)) dut (.*);

  int checks = 0, failures = 0;

  function automatic logic [XLEN-1:0] ref_op(uop_e u, logic [1:0] n, logic [63:0] a,
                                             logic [63:0] b, logic [63:0] d);
    logic [63:0] r;
    int c;
    case (u)
      U_ADD, U_ADDU:   r = a + b;
      U_SUBF, U_SUBFU: r = b - a;
      U_AND:  r = a & b;
      U_OR:   r = a | b;
      U_XOR:  r = a ^ b;
      U_NOR:  r = ~(a | b);
      U_ANDC: r = a & ~b;
      U_ORC:  r = a | ~b;
      U_XNOR: r = ~(a ^ b);
      U_NAND: r = ~(a & b);
      U_SLL:  r = a << b[5:0];
      U_SRL:  r = a >> b[5:0];
      U_SRA:  r = 64'($signed(a) >>> b[5:0]);
      U_ROR:  r = (b[5:0] == 0) ? a : ((a >> b[5:0]) | (a << (64 - b[5:0])));
      U_SLA:  r = a + b * (64'd1 << n);
      U_MIN:  r = ($signed(a) < $signed(b)) ? a : b;
      U_MAX:  r = ($signed(a) > $signed(b)) ? a : b;
      U_MINU: r = (a < b) ? a : b;
      U_MAXU: r = (a > b) ? a : b;
      U_ABS:  r = ($signed(a) < 0) ? 64'(-$signed(a)) : a;
      U_POPC: r = 64'($countones(a));
      U_CLZ: begin
        c = 0;
        while (c < 64 && !a[63 - c]) c++;
        r = 64'(c);
      end
      U_SET:  r = b;
      U_SLI:  r = {d[47:0], 16'd0} | b;
      default: r = '0;
    endcase
    return r;
  endfunction

  uop_e ops [25] = '{U_ADD, U_ADDU, U_SUBF, U_SUBFU, U_AND, U_OR, U_XOR, U_NOR, U_ANDC,
                     U_ORC, U_XNOR, U_NAND, U_SLL, U_SRL, U_SRA, U_ROR, U_SLA, U_MIN,
                     U_MINU, U_MAX, U_MAXU, U_ABS, U_POPC, U_CLZ, U_SLI};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [XLEN-1:0] exp_data;
  logic [SLOT_W-1:0] exp_slot;
  logic [1:0] exp_thr;
  logic exp_valid = 1'b0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      in_valid <= 1'b1;
      in_uop   <= ops[$urandom_range(0, 24)];
      in_sla_n <= 2'($urandom);
      in_a     <= (i % 7 == 0) ? 64'd0 : {$urandom, $urandom} >> $urandom_range(0, 63);
      in_b     <= (i % 5 == 0) ? 64'(-$urandom_range(0, 9)) : {$urandom, $urandom};
      in_d     <= {$urandom, $urandom};
      in_we    <= ($urandom_range(0, 3) != 0);
      in_slot  <= SLOT_W'($urandom);
      in_thr   <= 2'($urandom);
      @(posedge clk);
      // inputs of this edge are visible now; the result appears after the next edge
      exp_data  = in_we ? ref_op(in_uop, in_sla_n, in_a, in_b, in_d) : in_d;
      exp_slot  = in_slot;
      exp_thr   = in_thr;
      #1;
      checks++;
      if (!(out_valid && out_data === exp_data && out_slot === exp_slot && out_thr === exp_thr)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: uop=%s a=%h b=%h d=%h we=%b got %h exp %h", in_uop.name(), in_a, in_b,
                   in_d, in_we, out_data, exp_data);
      end
    end
    in_valid <= 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
