// tb_par_ctrl_stack: self-checking test of the control-stack LIFO (par_ctrl_stack).
//
// Random push, pop, push+pop (replace) and write-top operations against a queue used
// as the reference stack; checks top, empty and full every cycle, that overflow and
// underflow are raised (and sticky) exactly when a full stack is pushed or an empty
// one popped, and that clear empties the stack and the flags.
module tb_par_ctrl_stack;

  localparam int W = 16, D = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         clear = 1'b0, push = 1'b0, pop = 1'b0, wr_top = 1'b0;
  logic [W-1:0] push_data = '0, top_data = '0, top;
  logic         empty, full, overflow, underflow;

  par_ctrl_stack #(.W(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] st [$];
  logic e_ovf = 1'b0, e_unf = 1'b0;

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

  int op;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 5000; i++) begin
      op = $urandom_range(0, 19);
      push      <= (op < 7) || (op == 12);
      pop       <= (op >= 7 && op < 12) || (op == 12);
      wr_top    <= (op == 13);
      clear     <= (op == 19 && i % 7 == 0);
      push_data <= W'($urandom);
      top_data  <= W'($urandom);
      @(posedge clk);
      // reference update for the operation applied at this edge
      if (clear) begin
        st.delete();
        e_ovf = 0;
        e_unf = 0;
      end else if (push && pop) begin
        if (st.size() == 0) e_unf = 1;
        else st[st.size() - 1] = push_data;
      end else if (push) begin
        if (st.size() == D) e_ovf = 1;
        else st.push_back(push_data);
      end else if (pop) begin
        if (st.size() == 0) e_unf = 1;
        else void'(st.pop_back());
      end else if (wr_top) begin
        if (st.size() == 0) e_unf = 1;
        else st[st.size() - 1] = top_data;
      end
      #1;
      check("empty", empty == (st.size() == 0));
      check("full", full == (st.size() == D));
      if (st.size() > 0) check("top", top === st[st.size() - 1]);
      check("overflow flag", overflow == e_ovf);
      check("underflow flag", underflow == e_unf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
