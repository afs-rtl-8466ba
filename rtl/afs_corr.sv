// afs_corr: Correction (CORR) Engine, third stage of the AFS decoder.
//
// Performs the peeling step of Union-Find decoding.  It pops the edge stacks
// filled by the DFS Engine, which lists each spanning tree's edges in
// depth-first order; popping therefore visits every edge after all edges of the
// subtree below it, i.e. the tree is walked back from the leaves to the root.
//
// For an edge (child, parent) the current syndrome of the child is its stored
// syndrome bit XOR its Syndrome Hold Register bit.  If that value is 1 the edge
// is part of the correction: the engine reports it on the corr_* outputs and
// toggles the parent's hold bit.  The syndrome bits come from the stack entry,
// so the STM is never read, and local syndrome changes live only in the hold
// registers, which are cleared again as each node is finished (the child at
// its own edge, the root when its tree ends) so no state leaks into the next
// tree.  When a tree ends, a root other than the boundary must be left with a
// zero syndrome; otherwise `peel_err` pulses (an odd cluster reached peeling).
//
// The two edge stacks are served alternately, S0 first, in the order the DFS
// Engine hands them over.  An empty stack marked `es_last` ends one syndrome:
// `done_valid` pulses with its tag.  Timing: one edge per cycle, plus one
// cycle per tree and one per syndrome.  Reading the syndrome from the stack
// and the hold registers follow the decoder's description; the per-node hold
// bit vector and the end-of-tree check are this design's choices.
module afs_corr
  import afs_pkg::*;
#(
  parameter int unsigned D = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        es_ready,
  input  logic [1:0]        es_last,
  input  tag_t              es_tag [2],
  input  edge_entry_t       es_top [2],
  input  logic [1:0]        es_empty,
  output logic [1:0]        es_pop,
  output logic [1:0]        es_release,
  output logic              corr_valid,
  output tag_t              corr_tag,
  output node_t             corr_owner,
  output dir_t              corr_dir,
  output logic              done_valid,
  output tag_t              done_tag,
  output logic              peel_err,
  output logic              busy
);
  localparam int unsigned NLAT   = D * D * (D - 1);
  localparam int unsigned NNODES = NLAT + 1;
  localparam node_t       BND    = node_t'(NLAT);

  logic              rsel;           // edge stack being peeled
  logic              started;        // entries of the current tree were popped
  node_t             root;           // parent of the last popped entry
  logic              root_syn;
  logic [NNODES-1:0] hold;           // Syndrome Hold Registers

  edge_entry_t e;
  logic        s_child;
  logic        active;

  assign e       = es_top[rsel];
  assign active  = es_ready[rsel];
  assign s_child = e.syn_child ^ hold[e.child];
  assign busy    = active;

  always_comb begin
    es_pop     = '0;
    es_release = '0;
    corr_valid = 1'b0;
    corr_tag   = es_tag[rsel];
    corr_owner = e.owner;
    corr_dir   = e.dir;
    if (active) begin
      if (!es_empty[rsel]) begin
        es_pop[rsel] = 1'b1;
        corr_valid   = s_child;
      end else begin
        es_release[rsel] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsel       <= 1'b0;
      started    <= 1'b0;
      root       <= '0;
      root_syn   <= 1'b0;
      hold       <= '0;
      done_valid <= 1'b0;
      done_tag   <= '0;
      peel_err   <= 1'b0;
    end else begin
      done_valid <= 1'b0;
      peel_err   <= 1'b0;
      if (active) begin
        if (!es_empty[rsel]) begin
          // Peel one edge.
          started        <= 1'b1;
          root           <= e.parent;
          root_syn       <= e.syn_parent;
          hold[e.child]  <= 1'b0;
          if (s_child) hold[e.parent] <= ~hold[e.parent];
        end else if (started) begin
          // End of a tree: check and clear the root.
          started    <= 1'b0;
          hold[root] <= 1'b0;
          if (root != BND && (root_syn ^ hold[root])) peel_err <= 1'b1;
          rsel <= ~rsel;
        end else begin
          // An empty stack: the end-of-syndrome token.
          if (es_last[rsel]) begin
            done_valid <= 1'b1;
            done_tag   <= es_tag[rsel];
          end
          rsel <= ~rsel;
        end
      end
    end
  end

endmodule
