// tb_par_lsu: self-checking test of the load/store unit datapath (par_lsu).
//
// Feeds loads and stores, one thread per cycle in groups of four threads (one
// instruction), with a memory model that grants at random. Checked: load data
// (size-masked), store effects and byte enables, old d for disabled threads, the
// one-cycle result latency after acceptance, that a thread reading the same address
// as the previous thread of its instruction makes no memory request and still gets
// the data (replicated load), and that in_ready follows the grant.
module tb_par_lsu;
  import par_pkg::*;

  localparam int AW = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid = 1'b0, in_we = 1'b0;
  logic              in_ready;
  uop_e              in_uop = U_LD;
  logic [1:0]        in_size = '0;
  logic [XLEN-1:0]   in_a = '0, in_b = '0, in_d = '0;
  logic [SLOT_W-1:0] in_slot = '0;
  logic [1:0]        in_thr = '0;
  logic              out_valid;
  logic [SLOT_W-1:0] out_slot;
  logic [1:0]        out_thr;
  logic [XLEN-1:0]   out_data;
  logic              mem_req, mem_we, mem_gnt;
  logic [AW-1:0]     mem_addr;
  logic [XLEN-1:0]   mem_wdata, mem_rdata;
  logic [7:0]        mem_be;
  logic              ev_repl, ev_wait;

  par_lsu #(.THR_W(2), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] mem [64];
  logic gnt_en = 1'b0;
  assign mem_gnt = mem_req && gnt_en;

  always @(posedge clk) begin
    gnt_en <= ($urandom_range(0, 2) != 0);
    if (mem_req && mem_gnt) begin
      if (mem_we) begin
        for (int k = 0; k < 8; k++) if (mem_be[k]) mem[mem_addr][8*k +: 8] <= mem_wdata[8*k +: 8];
      end else mem_rdata <= mem[mem_addr];
    end
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] ref_mem [64];
  logic [63:0] exp_q [$];
  int n_repl = 0, n_req_repl = 0;
  logic expect_out = 1'b0;
  logic [63:0] exp_now;
  logic [5:0] ad;
  logic [63:0] w, mask;
  bit is_ld, same;
  int prev_ad;

  initial begin
    mem_rdata = '0;
    for (int i = 0; i < 64; i++) begin
      mem[i] = {$urandom, $urandom};
      ref_mem[i] = mem[i];
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int ins = 0; ins < 600; ins++) begin
      is_ld = ($urandom_range(0, 2) != 0);
      same = ($urandom_range(0, 1) == 0);
      in_uop  <= is_ld ? U_LD : U_ST;
      in_size <= 2'($urandom);
      in_slot <= SLOT_W'(ins);
      prev_ad = -1;
      for (int t = 0; t < 4; t++) begin
        ad = same ? 6'(ins * 7) : 6'($urandom);
        in_valid <= 1'b1;
        in_thr <= 2'(t);
        in_a <= 64'(ad) - 64'd5;
        in_b <= 64'd5;
        in_d <= {$urandom, $urandom};
        in_we <= ($urandom_range(0, 5) != 0);
        #1;
        // hold the thread until it is accepted
        while (!in_ready) begin
          check("request while waiting", mem_req);
          @(posedge clk);
          #1;
          if (expect_out) begin
            check("no output while stalled", !out_valid);
            expect_out = 1'b0;
          end
        end
        // accepted at the next edge
        unique case (in_size)
          2'd0: mask = '1;
          2'd1: mask = 64'h0000_0000_ffff_ffff;
          2'd2: mask = 64'h0000_0000_0000_ffff;
          default: mask = 64'h0000_0000_0000_00ff;
        endcase
        if (!in_we) exp_now = in_d;
        else if (is_ld) exp_now = ref_mem[ad] & mask;
        else begin
          exp_now = in_d;
          ref_mem[ad] = (ref_mem[ad] & ~mask) | (in_d & mask);
        end
        if (is_ld && in_we && t > 0 && prev_ad == int'(ad)) begin
          n_repl++;
          check("replicated load makes no request", !mem_req);
          check("replicated load event", ev_repl);
        end
        if (in_we && is_ld) prev_ad = int'(ad);
        else if (!in_we && t == 0) prev_ad = -1;
        @(posedge clk);
        #1;
        if (expect_out) check("previous output", 1'b1);
        check($sformatf("result ins %0d thr %0d", ins, t),
              out_valid && out_data === exp_now && out_thr === 2'(t) && out_slot === SLOT_W'(ins));
        if (ins % 50 == 0 && t == 3) begin
          in_valid <= 1'b0;
          @(posedge clk);
          #1;
          check("idle output", !out_valid);
        end
      end
    end
    in_valid <= 1'b0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 64; i++) check($sformatf("memory word %0d", i), mem[i] === ref_mem[i]);
    check("replicated loads exercised", n_repl > 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
