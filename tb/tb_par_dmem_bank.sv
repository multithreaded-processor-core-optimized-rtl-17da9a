// tb_par_dmem_bank: self-checking test of one data-memory bank (par_dmem_bank).
//
// Random reads and byte-masked writes against a reference array kept here. A read
// returns the word on the clock edge after its request (one-cycle hit latency).
module tb_par_dmem_bank;

  localparam int WORDS = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        req = 1'b0, we = 1'b0;
  logic [5:0]  addr = '0;
  logic [63:0] wdata = '0;
  logic [7:0]  be = '0;
  logic [63:0] rdata;

  par_dmem_bank #(.WORDS(WORDS)) dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] model [WORDS];
  logic [63:0] exp_r;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first so that all later reads are defined
    for (int i = 0; i < WORDS; i++) begin
      model[i] = {$urandom, $urandom};
      req <= 1'b1; we <= 1'b1; addr <= 6'(i); wdata <= model[i]; be <= 8'hff;
      @(posedge clk);
    end
    for (int i = 0; i < 4000; i++) begin
      req   <= ($urandom_range(0, 5) != 0);
      we    <= $urandom_range(0, 1);
      addr  <= 6'($urandom);
      wdata <= {$urandom, $urandom};
      be    <= 8'($urandom);
      @(posedge clk);
      exp_r = model[addr];
      if (req && we)
        for (int k = 0; k < 8; k++) if (be[k]) model[addr][8*k +: 8] = wdata[8*k +: 8];
      #1;
      if (req && !we) begin
        checks++;
        if (rdata !== exp_r) begin
          failures++;
          if (failures < 10) $display("FAIL: read %0d got %h exp %h", addr, rdata, exp_r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
