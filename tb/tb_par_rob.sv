// tb_par_rob: self-checking test of the reorder buffer (par_rob).
//
// Random pushes and pops (never past full or empty) and predicate commit broadcasts,
// against a queue model. Checked every cycle: full/empty, every head field, and that
// a broadcast sets the qualifying-predicate valid bit of exactly the entries waiting
// for that tag.
module tb_par_rob;
  import par_pkg::*;

  localparam int T = 4, N = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         push = 1'b0, pop = 1'b0, cm_pred = 1'b0;
  tag_t         push_tag = '0, push_qp_tag = '0, cm_tag = '0;
  logic         push_gpr = 1'b0, push_pred = 1'b0, push_qp_ok = 1'b0;
  logic [4:0]   push_rd = '0;
  logic [2:0]   push_pt = '0, push_pf = '0, push_qp = '0;
  logic [T-1:0] push_mask = '0;
  logic         full, empty;
  tag_t         h_tag;
  logic         h_gpr, h_pred, h_qp_ok;
  logic [4:0]   h_rd;
  logic [2:0]   h_pt, h_pf, h_qp;
  logic [T-1:0] h_mask;

  par_rob #(.T(T), .NROB(N)) dut (.*);

  typedef struct packed {
    tag_t tag; logic gpr; logic [4:0] rd; logic pred; logic [2:0] pt, pf, qp;
    logic ok; tag_t qtag; logic [T-1:0] mask;
  } e_t;

  int checks = 0, failures = 0;
  e_t q [$];
  e_t e;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 5000; i++) begin
      e = e_t'({$urandom, $urandom});
      push <= (q.size() < N) && ($urandom_range(0, 2) != 0);
      pop  <= (q.size() > 0) && ($urandom_range(0, 2) == 0);
      {push_tag, push_gpr, push_rd, push_pred, push_pt, push_pf, push_qp, push_qp_ok,
       push_qp_tag, push_mask} <= e;
      cm_pred <= ($urandom_range(0, 1) == 0);
      cm_tag  <= (q.size() > 0 && $urandom_range(0, 1) == 0) ? q[$urandom_range(0, q.size() - 1)].qtag
                                                             : tag_t'($urandom);
      @(posedge clk);
      if (cm_pred)
        foreach (q[k]) if (!q[k].ok && q[k].qtag == cm_tag) q[k].ok = 1'b1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(e);
      #1;
      check("empty", empty == (q.size() == 0));
      check("full", full == (q.size() == N));
      if (q.size() > 0)
        check("head entry", {h_tag, h_gpr, h_rd, h_pred, h_pt, h_pf, h_qp, h_qp_ok, h_mask} ===
              {q[0].tag, q[0].gpr, q[0].rd, q[0].pred, q[0].pt, q[0].pf, q[0].qp, q[0].ok, q[0].mask});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
