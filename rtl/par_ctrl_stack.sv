// par_ctrl_stack: one LIFO of the fetch unit's control stack.
//
// The design splits its control stack into a command control stack (PAR, loop and
// return commands) and a counter control stack (remaining threads and loop
// counters); both are instances of this module with different widths. The design
// gives the function but not the depth, which is a parameter here.
//
// Operations in one cycle: push (new top), pop (remove top), wr_top (replace the
// top entry, used to decrement a counter in place). push together with pop
// replaces the top. clear empties the stack. overflow (push on a full stack) and
// underflow (pop or wr_top on an empty one) are sticky flags, cleared by clear or
// reset; the offending operation is ignored. top is valid when empty is low.
module par_ctrl_stack #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         push,
  input  logic [W-1:0] push_data,
  input  logic         pop,
  input  logic         wr_top,
  input  logic [W-1:0] top_data,
  output logic [W-1:0] top,
  output logic         empty,
  output logic         full,
  output logic         overflow,
  output logic         underflow
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [DEPTH-1:0][W-1:0] st_q;
  logic [CW-1:0]           cnt_q;

  assign empty = (cnt_q == '0);
  assign full  = (cnt_q == CW'(DEPTH));
  assign top   = empty ? '0 : st_q[cnt_q - 1'b1];

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      st_q      <= '0;
      cnt_q     <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      if (push && pop) begin
        if (empty) underflow <= 1'b1;
        else st_q[cnt_q - 1'b1] <= push_data;
      end else if (push) begin
        if (full) overflow <= 1'b1;
        else begin
          st_q[cnt_q] <= push_data;
          cnt_q       <= cnt_q + 1'b1;
        end
      end else if (pop) begin
        if (empty) underflow <= 1'b1;
        else cnt_q <= cnt_q - 1'b1;
      end else if (wr_top) begin
        if (empty) underflow <= 1'b1;
        else st_q[cnt_q - 1'b1] <= top_data;
      end
    end
  end

endmodule
