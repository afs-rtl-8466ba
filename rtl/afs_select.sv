// afs_select: Select logic of a conjoined decoder block.
//
// Several producers (Spanning Tree Memories filled by Graph Generators) share
// one consumer (a DFS Engine).  The select logic serves the first-ready
// producer first: requests join a queue in the order in which they are raised.
// Requests that are raised in the same cycle join one per cycle in round-robin
// order, starting after the producer that joined last, so no producer can be
// starved.  The head of the queue drives the multiplexer select (`gnt_idx`,
// valid with `gnt_valid`); `take` removes it when the consumer accepts it.
//
// A request must stay high until granted and drop in the cycle after `take`.
// Latency: a request raised into an empty queue is granted two cycles later.
// The first-ready priority with round-robin fairness follows the decoder
// block's description; the queue realisation is this design's choice.
module afs_select #(
  parameter int unsigned N = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N-1:0]                 req,
  input  logic                         take,
  output logic                         gnt_valid,
  output logic [$clog2(N)-1:0]         gnt_idx
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0]       q [N];
  logic [IW:0]         qcount;
  logic [N-1:0]        queued;
  logic [IW-1:0]       rr_ptr;

  logic [N-1:0]        pending;
  logic                pick_v;
  logic [IW-1:0]       pick;

  assign pending = req & ~queued;

  // Round-robin choice among the newly raised requests.
  always_comb begin
    pick_v = 1'b0;
    pick   = '0;
    for (int unsigned i = 0; i < N; i++) begin
      int unsigned j;
      j = (int'(rr_ptr) + i) % N;
      if (!pick_v && pending[j]) begin
        pick_v = 1'b1;
        pick   = IW'(j);
      end
    end
  end

  assign gnt_valid = (qcount != '0);
  assign gnt_idx   = q[0];

  logic do_deq;
  assign do_deq = take && gnt_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qcount <= '0;
      queued <= '0;
      rr_ptr <= '0;
      for (int unsigned i = 0; i < N; i++) q[i] <= '0;
    end else begin
      if (do_deq) begin
        for (int unsigned i = 0; i + 1 < N; i++) q[i] <= q[i+1];
        queued[q[0]] <= 1'b0;
      end
      if (pick_v) begin
        q[int'(qcount) - (do_deq ? 1 : 0)] <= pick;
        queued[pick] <= 1'b1;
        rr_ptr       <= IW'((int'(pick) + 1) % N);
      end
      qcount <= qcount + (pick_v ? 1'b1 : 1'b0) - (do_deq ? 1'b1 : 1'b0);
    end
  end

  a_take_valid: assert property (@(posedge clk) disable iff (!rst_n) take |-> gnt_valid);

endmodule
