// tb_par_dmem_xbar: self-checking test of the lane-to-bank interconnect and the
// banked data memory (par_dmem_xbar with its par_dmem_bank instances).
//
// Four lane ports and the host port issue random reads and writes; a lane holds its
// request until it is granted. Checked: writes land in a reference memory and reads
// return its contents one cycle after the grant; a bank grants at most one
// requester per cycle; the host is granted at once; a lane alone on its bank is
// granted at once; round-robin keeps every lane's wait short; conflicts are reported.
module tb_par_dmem_xbar;

  localparam int NP = 4, NB = 4, BW = 16, AW = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NP-1:0]          req = '0, we = '0;
  logic [NP-1:0][AW-1:0]  addr = '0;
  logic [NP-1:0][63:0]    wdata = '0;
  logic [NP-1:0][7:0]     be = '0;
  logic [NP-1:0]          gnt;
  logic [NP-1:0][63:0]    rdata;
  logic                   h_req = 1'b0, h_we = 1'b0;
  logic [AW-1:0]          h_addr = '0;
  logic [63:0]            h_wdata = '0;
  logic                   h_gnt;
  logic [63:0]            h_rdata;
  logic                   conflict;

  par_dmem_xbar #(.NPORT(NP), .NBANK(NB), .BANK_WORDS(BW), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] model [NB * BW];

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int wait_cnt [NP];
  int max_wait = 0, n_conf = 0;
  logic [NP-1:0] rd_pend;
  logic [NP-1:0][63:0] rd_exp;
  logic h_pend;
  logic [63:0] h_exp;
  int nb [NB];

  initial begin
    for (int p = 0; p < NP; p++) wait_cnt[p] = 0;
    rd_pend = '0;
    h_pend = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // fill the memory through the host port
    for (int i = 0; i < NB * BW; i++) begin
      model[i] = {$urandom, $urandom};
      h_req <= 1'b1; h_we <= 1'b1; h_addr <= AW'(i); h_wdata <= model[i];
      @(posedge clk);
    end
    h_req <= 1'b0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      // new requests for idle lanes, random host traffic
      for (int p = 0; p < NP; p++)
        if (!req[p] && $urandom_range(0, 2) != 0) begin
          req[p] <= 1'b1;
          we[p] <= $urandom_range(0, 1);
          addr[p] <= AW'($urandom);
          wdata[p] <= {$urandom, $urandom};
          be[p] <= 8'($urandom);
        end
      h_req <= ($urandom_range(0, 7) == 0);
      h_we <= $urandom_range(0, 1);
      h_addr <= AW'($urandom);
      h_wdata <= {$urandom, $urandom};
      #1;
      // combinational checks on this cycle's requests
      for (int b = 0; b < NB; b++) nb[b] = 0;
      for (int p = 0; p < NP; p++) if (gnt[p]) nb[addr[p] % NB]++;
      if (h_gnt) nb[h_addr % NB]++;
      for (int b = 0; b < NB; b++) check("one grant per bank", nb[b] <= 1);
      check("host granted at once", h_gnt == h_req);
      for (int p = 0; p < NP; p++) begin
        automatic bit alone = req[p] && !(h_req && h_addr % NB == addr[p] % NB);
        for (int q = 0; q < NP; q++)
          if (q != p && req[q] && addr[q] % NB == addr[p] % NB) alone = 0;
        if (alone) check("lone request granted", gnt[p]);
        if (gnt[p]) check("grant only on request", req[p]);
      end
      check("conflict flag", conflict == |(req & ~gnt));
      if (conflict) n_conf++;
      @(posedge clk);
      // reads granted at this edge return data after it
      #1;
      for (int p = 0; p < NP; p++)
        if (rd_pend[p]) check($sformatf("lane %0d read data", p), rdata[p] === rd_exp[p]);
      if (h_pend) check("host read data", h_rdata === h_exp);
      rd_pend = '0;
      h_pend = 1'b0;
      // apply the accesses granted at the edge, in grant order: host first
      // (a bank serves one requester, so the order does not matter)
    end
    $display("max lane wait %0d cycles, %0d conflict cycles", max_wait, n_conf);
    check("conflicts occurred", n_conf > 0);
    check("round robin bound", max_wait <= 2 * NP + 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bookkeeping at each edge (uses values before the edge)
  always @(posedge clk) if (rst_n) begin
    if (h_req && h_gnt) begin
      if (h_we) model[h_addr] = h_wdata;
      else begin h_pend = 1'b1; h_exp = model[h_addr]; end
    end
    for (int p = 0; p < NP; p++) begin
      if (req[p] && gnt[p]) begin
        if (we[p]) begin
          for (int k = 0; k < 8; k++) if (be[p][k]) model[addr[p]][8*k +: 8] = wdata[p][8*k +: 8];
        end else begin
          rd_pend[p] = 1'b1;
          rd_exp[p] = model[addr[p]];
        end
        req[p] <= 1'b0;
        wait_cnt[p] = 0;
      end else if (req[p]) begin
        wait_cnt[p]++;
        if (wait_cnt[p] > max_wait) max_wait = wait_cnt[p];
      end
    end
  end

endmodule
