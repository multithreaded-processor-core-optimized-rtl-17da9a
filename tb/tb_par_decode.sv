// tb_par_decode: self-checking test of the instruction decoder (par_decode).
//
// A directed table: each entry is an instruction assembled from its fields and the
// decoded unit, micro-operation, operands, immediate and write flags expected for
// it, covering every format (I-type, R-type groups, set/sli, multiply/divide/FP,
// load/store, integer/FP compares, predicate logic) and the control instructions,
// which must decode as not executable by the lane. Randomised registers, predicate
// numbers and immediates make each entry a family of checks.
module tb_par_decode;
  import par_pkg::*;

  logic [31:0] instr = '0;
  dec_t        dec;

  par_decode dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (instr %h)", what, instr);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] qp;
  logic [4:0] rd, ra, rb;
  logic [8:0] i9;
  logic [15:0] i16;
  logic st;

  // one R-type ALU / MDR case
  task automatic t_rr(logic [5:0] op, logic [1:0] f, logic [3:0] x, fu_e fu, uop_e u,
                      logic rbused, logic wr);
    instr = {qp, 1'b0, op, rd, ra, f, x, rb, st};
    #1;
    check($sformatf("rr %0d/%0d/%0d valid", op, x, f), dec.valid);
    check("rr fu", dec.fu == fu);
    check($sformatf("rr uop %s", u.name()), dec.uop == u);
    check("rr regs", dec.ra == ra && dec.rd == rd && (!rbused || dec.rb == rb));
    check("rr operand use", dec.use_ra && dec.use_rb == rbused && !dec.use_imm);
    check("rr writes", dec.wr_gpr == wr && !dec.wr_pred && dec.qp == qp);
    check("rr reads old rd", dec.use_rd);
  endtask

  task automatic t_ri(logic [5:0] op, logic [1:0] f, fu_e fu, uop_e u);
    instr = {qp, 1'b0, op, rd, ra, f, i9, st};
    #1;
    check($sformatf("ri %0d/%0d", op, f), dec.valid && dec.fu == fu && dec.uop == u);
    check("ri fields", dec.ra == ra && dec.rd == rd && dec.use_imm && dec.wr_gpr && dec.qp == qp);
    if (op != OP_SHI) check("ri imm9 sign-extended", dec.imm == 64'($signed(i9)));
    else check("ri shift amount", dec.imm == 64'(i9[5:0]));
  endtask

  initial begin
    for (int n = 0; n < 40; n++) begin
      qp = 3'($urandom); rd = 5'($urandom); ra = 5'($urandom); rb = 5'($urandom);
      i9 = 9'($urandom); i16 = 16'($urandom); st = 1'($urandom);
      // ALU R-type
      t_rr(OP_ALUR, 0, 0, FU_ALU, U_ADD, 1, 1);
      t_rr(OP_ALUR, 2, 0, FU_ALU, U_SUBF, 1, 1);
      t_rr(OP_ALUR, 3, 1, FU_ALU, U_NOR, 1, 1);
      t_rr(OP_ALUR, 2, 2, FU_ALU, U_SRA, 1, 1);
      t_rr(OP_ALUR, 1, 3, FU_ALU, U_MINU, 1, 1);
      t_rr(OP_ALUR, 1, 5, FU_ALU, U_ORC, 1, 1);
      t_rr(OP_ALUR, 1, 6, FU_ALU, U_POPC, 0, 1);
      t_rr(OP_ALUR, 2, 4, FU_ALU, U_SLA, 1, 1);
      check("sla shift", dec.sla_n == 2'd2);
      // multiply / divide / FP
      t_rr(OP_MDR, 3, 0, FU_FPU, U_MULHU, 1, 1);
      t_rr(OP_MDR, 0, 1, FU_FPU, U_MAC, 1, 1);
      t_rr(OP_MDR, 2, 2, FU_FPU, U_REM, 1, 1);
      t_rr(OP_MDR, 3, 8, FU_FPU, U_FMAC, 1, 1);
      // loads and stores
      t_rr(OP_LD, 0, 4'd2, FU_LSU, U_LD, 1, 1);
      check("load size", dec.size == 2'd2);
      t_rr(OP_ST, 0, 4'd1, FU_LSU, U_ST, 1, 0);
      check("store size", dec.size == 2'd1);
      // I-type
      t_ri(OP_ADDI, 1, FU_ALU, U_ADDU);
      t_ri(OP_LOGI, 2, FU_ALU, U_XOR);
      t_ri(OP_MINI, 2, FU_ALU, U_MAX);
      t_ri(OP_MULI, 0, FU_FPU, U_MUL);
      t_ri(OP_DIVI, 1, FU_FPU, U_DIVU);
      i9[8] = 1'b0;
      t_ri(OP_SHI, 3, FU_ALU, U_ROR);
      // set / sli
      instr = {qp, 1'b0, OP_SET, rd, i16, st};
      #1;
      check("set", dec.valid && dec.uop == U_SET && dec.imm == 64'($signed(i16)) && dec.rd == rd && dec.wr_gpr);
      instr = {qp, 1'b0, OP_SLI, rd, i16, st};
      #1;
      check("sli", dec.valid && dec.uop == U_SLI && dec.imm == 64'(i16) && dec.use_rd);
      // compares
      instr = {qp, 1'b0, OP5_CMPI, 3'd5, 3'd6, ra, 2'd1, i9, st};
      #1;
      check("cmp.lt imm", dec.valid && dec.fu == FU_CMP && dec.uop == U_CLT && dec.wr_pred &&
            dec.pt == 3'd5 && dec.pf == 3'd6 && dec.ra == ra && dec.use_imm && !dec.wr_gpr && !dec.use_rd);
      instr = {qp, 1'b0, OP5_CMPR, 3'd2, 3'd3, ra, 2'd2, 4'd0, rb, st};
      #1;
      check("cmp.ltu reg", dec.valid && dec.uop == U_CLTU && dec.use_rb && dec.rb == rb);
      instr = {qp, 1'b0, OP5_CMPR, 3'd2, 3'd3, ra, 2'd1, 4'd6, rb, st};
      #1;
      check("cmp.lt.d", dec.valid && dec.uop == U_FLT);
      instr = {qp, 1'b0, OP5_CMPR, 3'd4, 3'd1, 2'b00, 3'd3, 2'd3, 4'd15, 2'b00, 3'd6, st};
      #1;
      check("pred andc", dec.valid && dec.uop == U_PANDC && dec.pred_src && dec.ra == 5'd3 && dec.rb == 5'd6);
      // control instructions are not for the lane
      instr = {qp, 1'b1, 27'($urandom), st};
      #1;
      check("xp not dispatched", !dec.valid);
      instr = {qp, 1'b0, OP_LOOPC, rd, i16, st};
      #1;
      check("loop not dispatched", !dec.valid);
      instr = {qp, 1'b0, OP_BRK, 21'd0, st};
      #1;
      check("brk not dispatched", !dec.valid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
