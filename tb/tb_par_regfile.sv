// tb_par_regfile: self-checking test of the lane register file (par_regfile).
//
// Random marks (dispatch), tagged write-backs with per-thread enables and inherited
// register loads, against a reference model kept here. Checked every cycle: read
// data of all ports and threads (GPRs, inherited registers, i0 = base + thread),
// valid bits and tags of the status ports, the loop-counter port, and the rule that
// a write-back validates a register only while its tag is current (a mark in the
// same cycle wins).
module tb_par_regfile;
  import par_pkg::*;

  localparam int T = 4, NRD = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NRD-1:0][4:0]             rd_idx = '0;
  logic [NRD-1:0][T-1:0][XLEN-1:0] rd_data;
  logic [2:0][4:0]                 st_idx = '0;
  logic [2:0]                      st_valid;
  tag_t [2:0]                      st_tag;
  logic                            mk_valid = 1'b0;
  logic [4:0]                      mk_idx = '0;
  tag_t                            mk_tag = '0;
  logic                            wb_valid = 1'b0;
  logic [4:0]                      wb_idx = '0;
  tag_t                            wb_tag = '0;
  logic [T-1:0]                    wb_we = '0;
  logic [T-1:0][XLEN-1:0]          wb_data = '0;
  logic                            inh_load = 1'b0;
  logic [15:0][XLEN-1:0]           inh_data = '0;
  logic [XLEN-1:0]                 i0_base = '0;
  logic [4:0]                      lc_idx = '0;
  logic [XLEN-1:0]                 lc_data;
  logic                            lc_valid;

  par_regfile #(.T(T), .NRD(NRD)) dut (.*);

  int checks = 0, failures = 0;
  logic [15:0][T-1:0][XLEN-1:0] g;
  logic [15:0] v;
  tag_t [15:0] tg;
  logic [15:0][XLEN-1:0] ih;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [XLEN-1:0] ref_rd(logic [4:0] i, int t);
    if (!i[4]) return g[i[3:0]][t];
    if (i[3:0] == 0) return i0_base + XLEN'(t);
    return ih[i[3:0]];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    g = '0;
    v = '1;
    tg = '0;
    ih = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 4000; i++) begin
      mk_valid <= ($urandom_range(0, 2) == 0);
      mk_idx   <= 5'($urandom);
      mk_tag   <= tag_t'($urandom);
      wb_valid <= ($urandom_range(0, 1) == 0);
      // write back mostly with the current tag of the register
      wb_idx   <= 5'($urandom_range(0, 15));
      wb_we    <= 4'($urandom);
      wb_data  <= {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      inh_load <= ($urandom_range(0, 30) == 0);
      for (int k = 0; k < 16; k++) inh_data[k] <= {$urandom, $urandom};
      i0_base  <= 64'($urandom);
      #1;
      wb_tag <= ($urandom_range(0, 3) != 0) ? tg[wb_idx[3:0]] : tag_t'($urandom);
      @(posedge clk);
      if (inh_load) ih = inh_data;
      if (wb_valid && !wb_idx[4]) begin
        for (int t = 0; t < T; t++) if (wb_we[t]) g[wb_idx[3:0]][t] = wb_data[t];
        if (tg[wb_idx[3:0]] == wb_tag) v[wb_idx[3:0]] = 1'b1;
      end
      if (mk_valid && !mk_idx[4]) begin
        v[mk_idx[3:0]] = 1'b0;
        tg[mk_idx[3:0]] = mk_tag;
      end
      for (int p = 0; p < NRD; p++) rd_idx[p] <= 5'($urandom);
      for (int k = 0; k < 3; k++) st_idx[k] <= 5'($urandom);
      lc_idx <= 5'($urandom);
      #1;
      for (int p = 0; p < NRD; p++)
        for (int t = 0; t < T; t++)
          check($sformatf("read port %0d r%0d thread %0d", p, rd_idx[p], t),
                rd_data[p][t] === ref_rd(rd_idx[p], t));
      for (int k = 0; k < 3; k++) begin
        check("status valid", st_valid[k] === (st_idx[k][4] ? 1'b1 : v[st_idx[k][3:0]]));
        if (!st_idx[k][4]) check("status tag", st_tag[k] === tg[st_idx[k][3:0]]);
      end
      check("loop counter data", lc_data === ref_rd(lc_idx, 0));
      check("loop counter valid", lc_valid === (lc_idx[4] ? 1'b1 : v[lc_idx[3:0]]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
