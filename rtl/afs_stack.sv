// afs_stack: last-in first-out stack used for the decoder's stacks (the Graph
// Generator's runtime stack of newly fused edges, the DFS Engine's runtime
// stack and its two edge stacks).
//
// The top entry is read asynchronously.  push and pop take effect at the clock
// edge; both in one cycle replace the top entry.  A push into a full stack is
// dropped and sets the sticky `overflow` flag, which `clear` (or reset)
// removes together with the contents.  Depth and entry type are parameters.
module afs_stack #(
  parameter type         T     = logic [15:0],
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       push,
  input  T                           din,
  input  logic                       pop,
  output T                           top,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow
);
  T mem [DEPTH];

  assign empty = (count == '0);
  assign full  = (int'(count) == DEPTH);
  assign top   = empty ? T'('0) : mem[int'(count) - 1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (push && pop && !empty) begin
      count <= count;
    end else if (push) begin
      if (full) overflow <= 1'b1;
      else      count    <= count + 1'b1;
    end else if (pop && !empty) begin
      count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!clear) begin
      if (push && pop && !empty) mem[int'(count) - 1] <= din;
      else if (push && !full)    mem[int'(count)] <= din;
    end
  end

  // A pop of an empty stack means the controlling FSM lost track of it.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && !push && empty));

endmodule
