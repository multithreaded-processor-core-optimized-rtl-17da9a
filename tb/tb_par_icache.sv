// tb_par_icache: self-checking test of the instruction cache (par_icache).
//
// Fills the cache through its write port, then reads random addresses every cycle
// and checks that each word appears one clock edge after its address, and that a
// rewrite of a word is seen by later reads.
module tb_par_icache;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [9:0]  raddr = '0, waddr = '0;
  logic [31:0] rdata, wdata = '0;
  logic        we = 1'b0;

  par_icache dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [1024];
  logic [31:0] exp_w;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      model[i] = $urandom;
      we <= 1'b1; waddr <= 10'(i); wdata <= model[i];
      @(posedge clk);
    end
    we <= 1'b0;
    for (int i = 0; i < 3000; i++) begin
      raddr <= 10'($urandom);
      if (i % 10 == 0) begin
        we <= 1'b1;
        waddr <= 10'($urandom);
        wdata <= $urandom;
      end else we <= 1'b0;
      @(posedge clk);
      exp_w = model[raddr];
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== exp_w) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %0d got %h exp %h", raddr, rdata, exp_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
