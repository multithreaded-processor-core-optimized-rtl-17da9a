// par_decode: instruction decoder of a lane (decode half of "decode and dispatch").
//
// Purely combinational. Takes one 32-bit PAR instruction and returns a dec_t that
// names the functional unit, the micro-operation, the register and predicate
// operands, the sign-extended immediate and what the instruction writes.
// Control instructions (xp, loop, brk) are executed by the fetch unit and come out
// with valid = 0, as do encodings this design does not implement; the lane drops
// those without using any resource.
//
// Field positions and the numbered opcodes/function codes follow the ISA appendix
// of the design. Where the appendix prints only part of a table (the f codes beyond
// the first two of a group, loads, stores, FP arithmetic, abs/popc/clz), the codes
// used here are this design's own and are listed in par_pkg and in the README.
// Every destination-writing instruction also reads its old rd: the functional unit
// returns that old value for threads whose predicate or mask bit is false, so a
// forwarded result is always the value the register will hold.
module par_decode
  import par_pkg::*;
(
  input  logic [31:0] instr,
  output dec_t        dec
);

  logic [5:0] op6;
  logic [4:0] op5;
  logic [1:0] f;
  logic [3:0] x;
  logic [XLEN-1:0] imm9, imm16s, imm16u;

  assign op6    = instr[27:22];
  assign op5    = instr[27:23];
  assign f      = instr[11:10];
  assign x      = instr[9:6];
  assign imm9   = {{(XLEN-9){instr[9]}}, instr[9:1]};
  assign imm16s = {{(XLEN-16){instr[16]}}, instr[16:1]};
  assign imm16u = {{(XLEN-16){1'b0}}, instr[16:1]};

  always_comb begin
    dec          = '0;
    dec.qp       = instr[31:29];
    dec.rd       = instr[21:17];
    dec.ra       = instr[16:12];
    dec.rb       = instr[5:1];
    dec.pt       = instr[22:20];
    dec.pf       = instr[19:17];
    dec.imm      = imm9;
    dec.fu       = FU_ALU;
    dec.uop      = U_NOP;

    if (!instr[28]) begin
      if (op6 <= 6'd7) begin
        // ---------------- compare unit ----------------
        dec.fu      = FU_CMP;
        dec.wr_pred = 1'b1;
        dec.use_ra  = 1'b1;
        if (op5 == OP5_CMPI) begin
          dec.use_imm = 1'b1;
          dec.valid   = (f != 2'd3);
          unique case (f)
            2'd0: dec.uop = U_CEQ;
            2'd1: dec.uop = U_CLT;
            default: dec.uop = U_CLTU;
          endcase
        end else if (op5 == OP5_CMPR) begin
          dec.use_rb = 1'b1;
          unique case (x)
            4'd0: begin
              dec.valid = (f != 2'd3);
              dec.uop   = (f == 2'd0) ? U_CEQ : (f == 2'd1) ? U_CLT : U_CLTU;
            end
            4'd6: begin
              dec.valid = (f <= 2'd1);
              dec.uop   = (f == 2'd0) ? U_FEQ : U_FLT;
            end
            4'd15: begin
              dec.valid    = 1'b1;
              dec.pred_src = 1'b1;
              dec.ra       = {2'b00, instr[14:12]};
              dec.rb       = {2'b00, instr[3:1]};
              unique case (f)
                2'd0: dec.uop = U_PAND;
                2'd1: dec.uop = U_POR;
                2'd2: dec.uop = U_PXOR;
                default: dec.uop = U_PANDC;
              endcase
            end
            default: dec.valid = 1'b0;
          endcase
        end
      end else begin
        unique case (op6)
          // ---------------- ALU ----------------
          OP_ADDI, OP_LOGI, OP_MINI: begin
            dec.valid = 1'b1; dec.fu = FU_ALU; dec.use_ra = 1'b1; dec.use_imm = 1'b1;
            dec.wr_gpr = 1'b1;
            case (op6)
              OP_ADDI: dec.uop = (f == 2'd0) ? U_ADD : (f == 2'd1) ? U_ADDU :
                                 (f == 2'd2) ? U_SUBF : U_SUBFU;
              OP_LOGI: dec.uop = (f == 2'd0) ? U_AND : (f == 2'd1) ? U_OR :
                                 (f == 2'd2) ? U_XOR : U_NOR;
              default: dec.uop = (f == 2'd0) ? U_MIN : (f == 2'd1) ? U_MINU :
                                 (f == 2'd2) ? U_MAX : U_MAXU;
            endcase
          end
          OP_SHI: begin
            // imm9[8] = 0: shift/rotate by imm6; imm9[8] = 1: ext (not implemented)
            dec.valid = !instr[9]; dec.fu = FU_ALU; dec.use_ra = 1'b1;
            dec.use_imm = 1'b1; dec.wr_gpr = 1'b1;
            dec.imm = {{(XLEN-6){1'b0}}, instr[6:1]};
            dec.uop = (f == 2'd0) ? U_SLL : (f == 2'd1) ? U_SRL :
                      (f == 2'd2) ? U_SRA : U_ROR;
          end
          OP_ALUR: begin
            dec.valid = 1'b1; dec.fu = FU_ALU; dec.use_ra = 1'b1; dec.use_rb = 1'b1;
            dec.wr_gpr = 1'b1;
            unique case (x)
              4'd0: dec.uop = (f == 2'd0) ? U_ADD : (f == 2'd1) ? U_ADDU :
                              (f == 2'd2) ? U_SUBF : U_SUBFU;
              4'd1: dec.uop = (f == 2'd0) ? U_AND : (f == 2'd1) ? U_OR :
                              (f == 2'd2) ? U_XOR : U_NOR;
              4'd2: dec.uop = (f == 2'd0) ? U_SLL : (f == 2'd1) ? U_SRL :
                              (f == 2'd2) ? U_SRA : U_ROR;
              4'd3: dec.uop = (f == 2'd0) ? U_MIN : (f == 2'd1) ? U_MINU :
                              (f == 2'd2) ? U_MAX : U_MAXU;
              4'd4: begin dec.uop = U_SLA; dec.sla_n = f; end
              4'd5: dec.uop = (f == 2'd0) ? U_ANDC : (f == 2'd1) ? U_ORC :
                              (f == 2'd2) ? U_XNOR : U_NAND;
              4'd6: begin
                dec.use_rb = 1'b0;
                dec.valid  = (f != 2'd3);
                dec.uop    = (f == 2'd0) ? U_ABS : (f == 2'd1) ? U_POPC : U_CLZ;
              end
              default: dec.valid = 1'b0;
            endcase
          end
          OP_SET: begin
            dec.valid = 1'b1; dec.fu = FU_ALU; dec.use_imm = 1'b1; dec.wr_gpr = 1'b1;
            dec.imm = imm16s; dec.uop = U_SET;
          end
          OP_SLI: begin
            dec.valid = 1'b1; dec.fu = FU_ALU; dec.use_imm = 1'b1; dec.wr_gpr = 1'b1;
            dec.imm = imm16u; dec.uop = U_SLI;
          end
          // ---------------- FPU (multiply, MAC, divide, FP) ----------------
          OP_MULI, OP_MACI, OP_DIVI: begin
            dec.valid = 1'b1; dec.fu = FU_FPU; dec.use_ra = 1'b1; dec.use_imm = 1'b1;
            dec.wr_gpr = 1'b1;
            case (op6)
              OP_MULI: dec.uop = (f == 2'd2) ? U_MULH : (f == 2'd3) ? U_MULHU : U_MUL;
              OP_MACI: begin
                dec.valid = (f <= 2'd1);
                dec.uop   = (f == 2'd0) ? U_MAC : U_MACU;
              end
              default: dec.uop = (f == 2'd0) ? U_DIV : (f == 2'd1) ? U_DIVU :
                                 (f == 2'd2) ? U_REM : U_REMU;
            endcase
          end
          OP_MDR: begin
            dec.valid = 1'b1; dec.fu = FU_FPU; dec.use_ra = 1'b1; dec.use_rb = 1'b1;
            dec.wr_gpr = 1'b1;
            unique case (x)
              4'd0: dec.uop = (f == 2'd2) ? U_MULH : (f == 2'd3) ? U_MULHU : U_MUL;
              4'd1: begin
                dec.valid = (f <= 2'd1);
                dec.uop   = (f == 2'd0) ? U_MAC : U_MACU;
              end
              4'd2: dec.uop = (f == 2'd0) ? U_DIV : (f == 2'd1) ? U_DIVU :
                              (f == 2'd2) ? U_REM : U_REMU;
              4'd8: dec.uop = (f == 2'd0) ? U_FADD : (f == 2'd1) ? U_FSUB :
                              (f == 2'd2) ? U_FMUL : U_FMAC;
              4'd9: begin
                dec.valid = (f == 2'd0); dec.use_rb = 1'b0; dec.uop = U_FABS;
              end
              default: dec.valid = 1'b0;
            endcase
          end
          // ---------------- load / store ----------------
          OP_LD: begin
            dec.valid = 1'b1; dec.fu = FU_LSU; dec.use_ra = 1'b1; dec.use_rb = 1'b1;
            dec.wr_gpr = 1'b1; dec.uop = U_LD; dec.size = x[1:0];
          end
          OP_ST: begin
            dec.valid = 1'b1; dec.fu = FU_LSU; dec.use_ra = 1'b1; dec.use_rb = 1'b1;
            dec.uop = U_ST; dec.size = x[1:0];
          end
          default: dec.valid = 1'b0;  // control instructions and unused opcodes
        endcase
      end
    end
    // The old destination value is needed by every GPR writer and by stores.
    dec.use_rd = dec.valid && (dec.wr_gpr || dec.uop == U_ST);
  end

endmodule
