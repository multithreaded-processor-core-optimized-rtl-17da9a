// tb_par_sva: scaled vector addition, V3[i] = a*V1[i] + b*V2[i], run as one PAR
// packet of 1280 threads on the PAR core at its default configuration (4 lanes x 4
// threads, no parameter overrides).
//
// This is the one evaluated workload whose data fit the default local memory: the
// packet size (1280 threads) and the array placement (V1, V2, V3 at words 0, 1280,
// 2560) are those of the evaluated benchmark, 3 x 1280 = 3840 of 16384 words. The
// thread program is this testbench's own:
//   r1 = V1[i]; r2 = V2[i]; r3 = a * r1 (mul.d); r3 = r3 + r2 * b (mac.d); V3[i] = r3
// with r17/r18/r19 = &V1/&V2/&V3, r21 = a, r22 = b in inherited registers.
// a = 0.5 and b = 0.75 and the inputs are small integers, so every product and sum is
// exact in double precision and the expected values, computed here with real
// arithmetic, do not depend on the rounding mode.
//
// 1280 threads run as 80 groups of 16; the test checks every output word, that the
// words after V3 are untouched, that the fetch unit started 79 further groups, and
// reports the cycle count and the FPU instructions per cycle of the whole packet.
module tb_par_sva;
  import par_pkg::*;

  localparam int NTHR  = 1280;
  localparam int V1    = 0;
  localparam int V2    = 1280;
  localparam int V3    = 2560;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                   start = 1'b0;
  logic [9:0]             start_addr = '0;
  logic [31:0]            nthreads = '0;
  logic [XLEN-1:0]        i0_init = '0;
  logic [15:0][XLEN-1:0]  inh_data = '0;
  logic                   busy, done;
  logic                   ic_we = 1'b0;
  logic [9:0]             ic_waddr = '0;
  logic [31:0]            ic_wdata = '0;
  logic                   h_req = 1'b0, h_we = 1'b0;
  logic [13:0]            h_addr = '0;
  logic [XLEN-1:0]        h_wdata = '0;
  logic                   h_gnt;
  logic [XLEN-1:0]        h_rdata;
  logic                   stk_overflow, stk_underflow;
  fetch_ev_t              fetch_ev;
  lane_ev_t [3:0]         lane_ev;
  logic                   bank_conflict;

  par_core dut (.*);

  int checks = 0, failures = 0;

  // ---------------- small assembler ----------------
  function automatic logic [31:0] i_rr(logic [5:0] op, logic [1:0] f, logic [3:0] x,
                                       logic [4:0] rd, logic [4:0] ra, logic [4:0] rb,
                                       logic [2:0] qp = 0, logic stop = 0);
    return {qp, 1'b0, op, rd, ra, f, x, rb, stop};
  endfunction

  logic [31:0] prog [8];
  logic [XLEN-1:0] v1_mem [NTHR];
  logic [XLEN-1:0] v2_mem [NTHR];

  initial begin
    prog[0] = i_rr(OP_LD, 0, 0, 5'd1, 5'd17, 5'd16);               // r1 = V1[i]
    prog[1] = i_rr(OP_LD, 0, 0, 5'd2, 5'd18, 5'd16);               // r2 = V2[i]
    prog[2] = i_rr(OP_MDR, 2'd2, 4'd8, 5'd3, 5'd21, 5'd1);         // r3 = a * r1
    prog[3] = i_rr(OP_MDR, 2'd3, 4'd8, 5'd3, 5'd2, 5'd22);         // r3 += r2 * b
    prog[4] = i_rr(OP_ST, 0, 0, 5'd3, 5'd19, 5'd16, 3'd0, 1'b1);  // V3[i] = r3 ;;
    for (int k = 5; k < 8; k++) prog[k] = '0;
  end

  function automatic logic [XLEN-1:0] model(int i);
    real x, y, r;
    x = $bitstoreal(v1_mem[i]);
    y = $bitstoreal(v2_mem[i]);
    r = 0.5 * x + 0.75 * y;
    return $realtobits(r);
  endfunction

  int n_group, n_fpu;
  int cycles = 0;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (rst_n) n_group <= n_group + int'(fetch_ev.group);
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic host_write(input int addr, input logic [XLEN-1:0] data);
    h_req   <= 1'b1;
    h_we    <= 1'b1;
    h_addr  <= 14'(addr);
    h_wdata <= data;
    @(posedge clk);
    while (!h_gnt) @(posedge clk);
  endtask

  task automatic host_read(input int addr, output logic [XLEN-1:0] data);
    h_req  <= 1'b1;
    h_we   <= 1'b0;
    h_addr <= 14'(addr);
    @(posedge clk);
    while (!h_gnt) @(posedge clk);
    @(negedge clk);
    data = h_rdata;
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int start_cycle, end_cycle;
  logic [XLEN-1:0] got;
  int bad;
  real rv;
  int iv;

  initial begin
    n_group = 0;
    for (int i = 0; i < NTHR; i++) begin
      iv = int'($urandom_range(0, 2000)) - 1000;
      rv = iv;
      v1_mem[i] = $realtobits(rv);
      iv = int'($urandom_range(0, 2000)) - 1000;
      rv = iv;
      v2_mem[i] = $realtobits(rv);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 8; k++) begin
      ic_we    <= 1'b1;
      ic_waddr <= 10'(k);
      ic_wdata <= prog[k];
      @(posedge clk);
    end
    ic_we <= 1'b0;
    for (int i = 0; i < NTHR; i++) host_write(V1 + i, v1_mem[i]);
    for (int i = 0; i < NTHR; i++) host_write(V2 + i, v2_mem[i]);
    for (int i = 0; i < NTHR + 4; i++) host_write(V3 + i, 64'hdead);
    h_req <= 1'b0;
    h_we  <= 1'b0;
    inh_data[1] = 64'(V1);
    inh_data[2] = 64'(V2);
    inh_data[3] = 64'(V3);
    rv = 0.5;
    inh_data[5] = $realtobits(rv);
    rv = 0.75;
    inh_data[6] = $realtobits(rv);
    start_addr  <= 10'd0;
    nthreads    <= 32'(NTHR);
    i0_init     <= '0;
    start       <= 1'b1;
    @(posedge clk);
    start       <= 1'b0;
    start_cycle = cycles;
    while (!done) @(posedge clk);
    end_cycle = cycles;
    @(posedge clk);
    check("no control stack overflow", !stk_overflow);
    check("no control stack underflow", !stk_underflow);
    check("79 group restarts", n_group == NTHR / 16 - 1);
    bad = 0;
    for (int i = 0; i < NTHR; i++) begin
      host_read(V3 + i, got);
      if (got !== model(i) && bad < 5) begin
        bad++;
        $display("V3[%0d]: got %h expected %h", i, got, model(i));
      end
      check($sformatf("V3[%0d]", i), got === model(i));
    end
    for (int i = NTHR; i < NTHR + 4; i++) begin
      host_read(V3 + i, got);
      check($sformatf("V3[%0d] untouched", i), got === 64'hdead);
    end
    h_req <= 1'b0;
    n_fpu = 2 * NTHR / 4;  // two FP instructions per thread, one per lane per 4 threads
    $display("SVA: %0d threads in %0d cycles, %0d lane FP instructions (%0d per 100 cycles)",
             NTHR, end_cycle - start_cycle, n_fpu, 100 * n_fpu / (end_cycle - start_cycle));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
