// tb_par_lane: self-checking test of one backend lane (par_lane) with 4 threads.
//
// The testbench plays the fetch unit and the data memory. It sends random programs
// (ALU, multiply, multiply-accumulate, compares writing predicates, predicated
// instructions, loads including same-address loads, stores) with random thread masks,
// dispatching each instruction in a cycle where ready is high, and grants memory
// requests at random. A reference model executes the same program thread by thread in
// program order. After the lane drains, every GPR r1..r8 of every thread, the
// predicates p1..p3 and the memory are compared with the model. Dependent
// instructions back to back make the lane forward, stall and wait for predicates;
// these events are counted and must occur.
module tb_par_lane;
  import par_pkg::*;

  localparam int T = 4, AW = 6, NINS = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                        in_valid = 1'b0;
  logic [31:0]                 in_instr = '0;
  logic [T-1:0]                in_mask = '0;
  logic                        ready, empty;
  logic                        inh_load = 1'b0;
  logic [15:0][XLEN-1:0]       inh_data = '0;
  logic [XLEN-1:0]             i0_base = '0;
  logic [NUM_PRED-1:0][T-1:0]  pred_value;
  logic [NUM_PRED-1:0]         pred_valid;
  logic [4:0]                  lc_idx = 5'd1;
  logic [XLEN-1:0]             lc_data;
  logic                        lc_valid;
  logic                        mem_req, mem_we, mem_gnt;
  logic [AW-1:0]               mem_addr;
  logic [XLEN-1:0]             mem_wdata, mem_rdata;
  logic [7:0]                  mem_be;
  lane_ev_t                    ev;

  par_lane #(.T(T), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;

  // ---------------- memory model ----------------
  logic [63:0] mem [64];
  logic gnt_en = 1'b0;
  assign mem_gnt = mem_req && gnt_en;
  always @(posedge clk) begin
    gnt_en <= ($urandom_range(0, 3) != 0);
    if (mem_req && mem_gnt) begin
      if (mem_we) begin
        for (int k = 0; k < 8; k++) if (mem_be[k]) mem[mem_addr][8*k +: 8] <= mem_wdata[8*k +: 8];
      end else mem_rdata <= mem[mem_addr];
    end
  end

  // ---------------- reference model ----------------
  logic [31:0][T-1:0][63:0] rr;   // r0..r15 and the inherited view
  logic [7:0][T-1:0] pp;
  logic [63:0] rmem [64];

  function automatic logic [63:0] rv(logic [4:0] r, int t);
    if (!r[4]) return rr[r][t];
    if (r[3:0] == 0) return i0_base + 64'(t);
    return inh_data[r[3:0]];
  endfunction

  int n_fwd = 0, n_qpw = 0, n_repl = 0, n_stall = 0;
  always @(posedge clk) if (rst_n) begin
    n_fwd  <= n_fwd + int'(ev.fwd_capture);
    n_qpw  <= n_qpw + int'(ev.qp_wait);
    n_repl <= n_repl + int'(ev.load_repl);
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input logic [31:0] ins, input logic [T-1:0] m);
    in_instr = ins;
    in_mask  = m;
    @(negedge clk);
    while (!ready) begin
      n_stall++;
      @(negedge clk);
    end
    in_valid = 1'b1;
    @(posedge clk);
    #1;
    in_valid = 1'b0;
  endtask

  function automatic logic [4:0] src();
    int k;
    k = $urandom_range(0, 9);
    if (k == 8) return 5'd16;   // i0
    if (k == 9) return 5'd17;   // inherited value
    return 5'($urandom_range(1, 8));
  endfunction

  logic [31:0] ins;
  logic [T-1:0] m;
  logic [2:0] qp, pt, pf;
  logic [4:0] rd, ra, rb;
  logic [8:0] i9;
  logic [63:0] a, b, d, res;
  int kind;
  logic en;

  initial begin
    for (int i = 0; i < 64; i++) begin
      mem[i] = {$urandom, $urandom};
      rmem[i] = mem[i];
    end
    rr = '0;
    pp = '0;
    pp[0] = '1;
    mem_rdata = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    i0_base = 64'd8;
    inh_data[1] = 64'd100;   // r17
    inh_data[2] = 64'd20;    // r18: store base
    inh_data[3] = 64'd3;     // r19: load base
    inh_load = 1'b1;
    @(posedge clk);
    #1;
    inh_load = 1'b0;
    for (int n = 0; n < NINS; n++) begin
      kind = $urandom_range(0, 11);
      qp = ($urandom_range(0, 2) == 0) ? 3'($urandom_range(1, 3)) : 3'd0;
      m  = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'hf;
      rd = 5'($urandom_range(1, 8));
      ra = src();
      rb = src();
      i9 = 9'($urandom);
      pt = 3'($urandom_range(1, 3));
      pf = (pt == 3) ? 3'd1 : pt + 3'd1;
      case (kind)
        0, 1: ins = {qp, 1'b0, OP_ALUR, rd, ra, 2'd0, 4'd0, rb, 1'b0};      // add
        2:    ins = {qp, 1'b0, OP_ALUR, rd, ra, 2'd2, 4'd0, rb, 1'b0};      // subf
        3:    ins = {qp, 1'b0, OP_ALUR, rd, ra, 2'd2, 4'd1, rb, 1'b0};      // xor
        4:    ins = {qp, 1'b0, OP_ADDI, rd, ra, 2'd0, i9, 1'b0};            // addi
        5:    ins = {qp, 1'b0, OP_MULI, rd, ra, 2'd0, i9, 1'b0};            // muli
        6:    ins = {qp, 1'b0, OP_MDR, rd, ra, 2'd0, 4'd1, rb, 1'b0};       // mac
        7, 8: ins = {qp, 1'b0, OP5_CMPR, pt, pf, ra, 2'd1, 4'd0, rb, 1'b0}; // cmp.lt
        9:    ins = {qp, 1'b0, OP_LD, rd, 5'd19, 2'd0, 4'd0, 5'($urandom_range(0, 1)) == 0 ? 5'd16 : 5'd19, 1'b0};
        10:   ins = {qp, 1'b0, OP_ST, rd, 5'd18, 2'd0, 4'd0, 5'd16, 1'b0};  // st8 r18[i0] = rd
        default: ins = {qp, 1'b0, OP_MINI, rd, ra, 2'd1, i9, 1'b0};         // minu imm
      endcase
      // reference, thread by thread
      for (int t = 0; t < T; t++) begin
        en = m[t] && pp[qp][t];
        a = rv(ins[16:12], t);
        b = rv(ins[5:1], t);
        d = rr[rd][t];
        case (kind)
          0, 1: res = a + b;
          2: res = b - a;
          3: res = a ^ b;
          4: res = a + 64'($signed(i9));
          5: res = a * 64'($signed(i9));
          6: res = d + 64'($signed(a[31:0]) * $signed(b[31:0]));
          9: res = rmem[6'(a + b)];
          11: res = (a < 64'($signed(i9))) ? a : 64'($signed(i9));
          default: res = d;
        endcase
        if (en) begin
          if (kind == 7 || kind == 8) begin
            pp[pt][t] = ($signed(a) < $signed(b));
            pp[pf][t] = !($signed(a) < $signed(b));
          end else if (kind == 10) rmem[6'(rv(5'd18, t) + rv(5'd16, t))] = d;
          else rr[rd][t] = res;
        end
      end
      issue(ins, m);
    end
    // drain
    while (!empty) @(posedge clk);
    repeat (2) @(posedge clk);
    for (int r = 1; r <= 8; r++)
      for (int t = 0; t < T; t++)
        check($sformatf("r%0d thread %0d", r, t), dut.u_rf.gpr_q[r][t] === rr[r][t]);
    for (int p = 1; p <= 3; p++) check($sformatf("p%0d", p), pred_value[p] === pp[p]);
    for (int i = 0; i < 64; i++) check($sformatf("mem %0d", i), mem[i] === rmem[i]);
    check("all predicates valid", &pred_valid);
    $display("events: fwd=%0d qp_wait=%0d repl=%0d stall_cycles=%0d", n_fwd, n_qpw, n_repl, n_stall);
    check("forwarding happened", n_fwd > 0);
    check("predicate wait happened", n_qpw > 0);
    check("replicated load happened", n_repl > 0);
    check("dispatch stall happened", n_stall > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
