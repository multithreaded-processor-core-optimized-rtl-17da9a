// par_pkg: types and constants shared by the PAR core.
//
// The PAR core is a SIMT processor: one fetch unit broadcasts each instruction to
// several lanes and every lane executes it once per hardware thread, one thread per
// cycle. This package holds the instruction field layout, the micro-operation list
// the decoder produces, the functional-unit numbering and the result tag that names
// an in-flight instruction by (functional unit, queue slot).
//
// The 32-bit formats (qp[31:29], format bit 28, op[27:22], rd[21:17], ra[16:12],
// f[11:10], x[9:6], rb[5:1], stop bit[0]) follow the ISA appendix of the design.
// Opcodes the ISA leaves unnumbered (loads, stores, loops, break, floating point,
// abs/popc/clz, the second logic group) are this design's own choice and are
// marked below.
package par_pkg;

  localparam int unsigned XLEN     = 64;  // register width per thread
  localparam int unsigned NUM_FU   = 4;   // ALU, FPU, L/S, compare
  localparam int unsigned SLOT_W   = 3;   // up to 8 queue slots per unit
  localparam int unsigned NUM_PRED = 8;   // p0..p7, p0 reads as all-true

  typedef enum logic [1:0] {
    FU_ALU = 2'd0,
    FU_FPU = 2'd1,
    FU_LSU = 2'd2,
    FU_CMP = 2'd3
  } fu_e;

  // Tag of an in-flight instruction: the unit executing it and its slot in that
  // unit's instruction waiting queue (the slot also names its output buffer).
  typedef struct packed {
    fu_e               fu;
    logic [SLOT_W-1:0] slot;
  } tag_t;

  // Major opcodes.
  localparam logic [5:0] OP_ADDI   = 6'd16;  // add family, I-type
  localparam logic [5:0] OP_LOGI   = 6'd17;  // logic, I-type
  localparam logic [5:0] OP_SHI    = 6'd18;  // shift/rotate, I-type
  localparam logic [5:0] OP_MINI   = 6'd19;  // min/max, I-type
  localparam logic [5:0] OP_ALUR   = 6'd31;  // ALU R-type, group in x
  localparam logic [5:0] OP_MULI   = 6'd32;
  localparam logic [5:0] OP_MACI   = 6'd33;
  localparam logic [5:0] OP_DIVI   = 6'd34;
  localparam logic [5:0] OP_MDR    = 6'd35;  // multiply/divide R-type, group in x
  localparam logic [5:0] OP_LD     = 6'd36;  // own choice: ld8/4/2/1 rd = ra[rb], size in x
  localparam logic [5:0] OP_ST     = 6'd37;  // own choice: st8/4/2/1 ra[rb] = rd
  localparam logic [5:0] OP_SET    = 6'd48;
  localparam logic [5:0] OP_SLI    = 6'd49;
  localparam logic [5:0] OP_LOOPC  = 6'd50;  // own choice: loop r, L
  localparam logic [5:0] OP_LOOPP  = 6'd51;  // own choice: loop L
  localparam logic [5:0] OP_BRK    = 6'd52;  // own choice: brk
  // Compare formats use a 5-bit opcode in [27:23]: 0 = I-type, 3 = R-type.
  localparam logic [4:0] OP5_CMPI  = 5'd0;
  localparam logic [4:0] OP5_CMPR  = 5'd3;

  // Micro-operations.
  typedef enum logic [5:0] {
    U_NOP, U_ADD, U_ADDU, U_SUBF, U_SUBFU,
    U_AND, U_OR, U_XOR, U_NOR, U_ANDC, U_ORC, U_XNOR, U_NAND,
    U_SLL, U_SRL, U_SRA, U_ROR, U_SLA,
    U_MIN, U_MINU, U_MAX, U_MAXU, U_ABS, U_POPC, U_CLZ,
    U_SET, U_SLI,
    U_MUL, U_MULH, U_MULHU, U_MAC, U_MACU,
    U_DIV, U_DIVU, U_REM, U_REMU,
    U_FADD, U_FSUB, U_FMUL, U_FMAC, U_FABS,
    U_CEQ, U_CLT, U_CLTU, U_FEQ, U_FLT,
    U_PAND, U_POR, U_PXOR, U_PANDC,
    U_LD, U_ST
  } uop_e;

  // Where an operand of a queued instruction comes from.
  typedef enum logic [2:0] {
    SRC_NONE,  // unused, reads as zero
    SRC_IMM,   // immediate from the instruction
    SRC_REG,   // register file (value is final)
    SRC_WAIT,  // forwarded from the tagged producer
    SRC_PRED,  // predicate register, bit per thread (value is final)
    SRC_PWAIT  // predicate register still being produced by the tagged compare
  } src_e;

  // One entry of a functional unit's instruction waiting queue. Operand index
  // 0 = a (ra), 1 = b (rb or immediate), 2 = d (old rd).
  typedef struct packed {
    uop_e                  uop;
    logic [1:0]            size;
    logic [1:0]            sla_n;
    logic [XLEN-1:0]       imm;
    src_e [2:0]            src;
    logic [2:0][4:0]       rnum;
    tag_t [2:0]            tag;
    logic [2:0]            qp;
    logic                  qp_ready;
    tag_t                  qp_tag;
  } fu_entry_t;

  // Decoded instruction, as produced by par_decode.
  typedef struct packed {
    logic               valid;    // executes in the backend
    fu_e                fu;
    uop_e               uop;
    logic [1:0]         size;     // load/store: 0=8,1=4,2=2,3=1 bytes
    logic [1:0]         sla_n;    // shift amount of sla
    logic [XLEN-1:0]    imm;
    logic               use_imm;  // operand B is the immediate
    logic [4:0]         ra;
    logic [4:0]         rb;
    logic [4:0]         rd;
    logic               use_ra;
    logic               use_rb;
    logic               use_rd;   // old rd is read (merge, mac, store data, sli)
    logic               wr_gpr;   // writes rd
    logic               wr_pred;  // writes pt and pf
    logic [2:0]         pt;
    logic [2:0]         pf;
    logic               pred_src; // ra/rb name predicate registers (pa, pb)
    logic [2:0]         qp;
  } dec_t;

  // Event pulses of one lane, summed by the core for statistics.
  typedef struct packed {
    logic dispatch;     // an instruction entered the lane
    logic commit;       // the ROB retired an instruction
    logic fwd_capture;  // an input buffer took an operand from the forwarding network
    logic load_repl;    // a load reused the previous thread's data (same address)
    logic bank_wait;    // the L/S unit waited for a memory bank
    logic qp_wait;      // a queued instruction waited for its predicate
  } lane_ev_t;

  // Event pulses of the fetch unit.
  typedef struct packed {
    logic stall;      // a broadcast waited for a lane
    logic ctl_wait;   // a control decision waited for a predicate or loop count
    logic xp;         // a taken xp jump
    logic loop_iter;  // a loop body restarted
    logic loop_exit;  // a loop ended
    logic brk;        // every active thread left a loop
    logic ret;        // a RETURN command resumed after a jump or loop
    logic group;      // a new thread group of the PAR packet started
  } fetch_ev_t;

endpackage
