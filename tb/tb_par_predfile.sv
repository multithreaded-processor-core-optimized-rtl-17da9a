// tb_par_predfile: self-checking test of the lane predicate file (par_predfile).
//
// Random compare dispatches (mark pt/pf with a tag) and write-backs (tagged, with
// per-thread enables and pt/pf values) against a reference model. Checked every
// cycle: values, valid bits and tags of p0..p7; p0 stays true and valid.
module tb_par_predfile;
  import par_pkg::*;

  localparam int T = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NUM_PRED-1:0][T-1:0] value;
  logic [NUM_PRED-1:0]        valid;
  tag_t [NUM_PRED-1:0]        tag;
  logic                       mk_valid = 1'b0, wb_valid = 1'b0;
  logic [2:0]                 mk_pt = '0, mk_pf = '0, wb_pt = '0, wb_pf = '0;
  tag_t                       mk_tag = '0, wb_tag = '0;
  logic [T-1:0]               wb_we = '0, wb_vt = '0, wb_vf = '0;

  par_predfile #(.T(T)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0][T-1:0] pv;
  logic [7:0] vv;
  tag_t [7:0] tt;

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
    pv = '0;
    pv[0] = '1;
    vv = '1;
    tt = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 4000; i++) begin
      mk_valid <= ($urandom_range(0, 2) == 0);
      mk_pt <= 3'($urandom);
      mk_pf <= 3'($urandom);
      mk_tag <= tag_t'($urandom);
      wb_valid <= ($urandom_range(0, 1) == 0);
      wb_pt <= 3'($urandom);
      wb_pf <= 3'($urandom);
      wb_we <= 4'($urandom);
      wb_vt <= 4'($urandom);
      wb_vf <= 4'($urandom);
      #1;
      wb_tag <= ($urandom_range(0, 3) != 0) ? tt[wb_pt] : tag_t'($urandom);
      @(posedge clk);
      if (wb_valid) begin
        if (wb_pt != 0) begin
          for (int t = 0; t < T; t++) if (wb_we[t]) pv[wb_pt][t] = wb_vt[t];
          if (tt[wb_pt] == wb_tag) vv[wb_pt] = 1'b1;
        end
        if (wb_pf != 0 && wb_pf != wb_pt) begin
          for (int t = 0; t < T; t++) if (wb_we[t]) pv[wb_pf][t] = wb_vf[t];
          if (tt[wb_pf] == wb_tag) vv[wb_pf] = 1'b1;
        end
      end
      if (mk_valid) begin
        if (mk_pt != 0) begin vv[mk_pt] = 1'b0; tt[mk_pt] = mk_tag; end
        if (mk_pf != 0) begin vv[mk_pf] = 1'b0; tt[mk_pf] = mk_tag; end
      end
      #1;
      for (int p = 0; p < 8; p++) begin
        check($sformatf("p%0d value", p), value[p] === pv[p]);
        check($sformatf("p%0d valid", p), valid[p] === vv[p]);
        if (p != 0) check($sformatf("p%0d tag", p), tag[p] === tt[p]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
