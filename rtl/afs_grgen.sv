// afs_grgen: Graph Generator (Gr-Gen), first stage of the AFS decoder pipeline.
//
// Performs the cluster-growth step of Union-Find decoding on one syndrome of
// the 3-D decoding graph (d rounds), writing the grown edges into a Spanning
// Tree Memory (afs_stm) through the STM's port A.
//
// How it works.  Every node starts as its own cluster; the Root table, Size
// table and parity registers (one bit per cluster root) are initialised in the
// cycle that `start` is seen, when the STM is loaded with the syndrome.  Then
// growth rounds repeat until no odd cluster remains:
//   Pass 1 (grow)  scans the lattice row by row, skipping rows that cannot hold
//                  a cluster node (ZDR bit of the row, of the row above and of
//                  the same row one round earlier all zero; a run of such rows
//                  is skipped in one cycle).  For each node it
//                  runs Find(); if the root is odd (parity 1 and not the
//                  boundary) every incident edge grows by half an edge.  An edge
//                  that becomes fully grown is pushed on the runtime (fusion)
//                  stack.  Cluster membership is not changed in this pass.
//   Pass 2 (merge) pops the fused edges, runs Find() on both ends and merges
//                  the two clusters: the smaller under the larger (Size table),
//                  except that the boundary cluster always stays root and is
//                  never odd.  The parity of the merged cluster is the XOR.
// Find() follows the Root table one entry per cycle, records the visited nodes
// in the tree traversal registers and afterwards writes the root into each of
// them (path compression), one write per cycle.  If the fusion stack is close
// to full during pass 1, the merges are done at once and pass 1 resumes at the
// same node; the result is still a valid Union-Find clustering.
//
// The table/stack/register structure and the half-edge growth follow the
// decoder's description; the two-pass round schedule, the row-skipping rule,
// the early-merge rule and the single boundary node are this design's choices.
//
// Interface: `start` is taken while `busy` is low; `syn` must be valid in that
// cycle only.  `done` pulses for one cycle when the STM holds the grown
// clusters.  `rounds` counts the growth rounds of the last syndrome and
// `early_merges` the number of times the fusion stack was drained mid-pass.
module afs_grgen
  import afs_pkg::*;
#(
  parameter int unsigned D          = 11,
  parameter int unsigned FUSE_DEPTH = 64,
  parameter int unsigned TTR_DEPTH  = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [D*D*(D-1)-1:0] syn,
  output logic                 busy,
  output logic                 done,
  output logic [7:0]           rounds,
  output logic [15:0]          early_merges,
  // Spanning Tree Memory, port A
  output logic                 stm_load,
  output node_t                stm_a_node,
  input  stm_word_t            stm_a_word,
  output logic                 stm_a_we,
  output dir_t                 stm_a_dir,
  output grow_t                stm_a_wdata,
  input  logic [D*D-1:0]       stm_zdr
);
  localparam int unsigned C      = D - 1;
  localparam int unsigned NLAT   = D * D * (D - 1);
  localparam int unsigned NNODES = NLAT + 1;
  localparam int unsigned NROWS  = D * D;
  localparam node_t       BND    = node_t'(NLAT);

  typedef struct packed {
    node_t owner;
    dir_t  dir;
  } fuse_t;

  typedef enum logic [3:0] {
    S_IDLE, S_P1_ROW, S_P1_NODE, S_P1_EDGE, S_P2_POP, S_FIND_WALK, S_FIND_COMP,
    S_P2_UNION, S_DONE
  } state_t;

  typedef enum logic [1:0] { RET_P1, RET_P2U, RET_P2V } ret_t;

  state_t state;
  ret_t   find_ret;

  // Root table, Size table and parity registers.
  node_t root_tbl [NNODES];
  node_t size_tbl [NNODES];
  logic  par_tbl  [NNODES];

  // Tree traversal registers of Find().
  node_t ttr [TTR_DEPTH];
  logic [$clog2(TTR_DEPTH+1)-1:0] ttr_n;
  node_t find_x;

  logic [$clog2(NROWS+1)-1:0] rw;
  logic [$clog2(C+1)-1:0]     cc;
  logic [2:0]                 k;
  logic                       found_odd;
  logic                       mid_pass;
  node_t                      ru, rv;

  // Fusion (runtime) stack of edges that became fully grown.
  logic  fs_push, fs_pop, fs_empty, fs_full, fs_ovf;
  fuse_t fs_din, fs_top;
  logic [$clog2(FUSE_DEPTH+1)-1:0] fs_count;

  afs_stack #(.T(fuse_t), .DEPTH(FUSE_DEPTH)) u_fuse (
    .clk, .rst_n, .clear(1'b0), .push(fs_push), .din(fs_din), .pop(fs_pop), .top(fs_top),
    .empty(fs_empty), .full(fs_full), .count(fs_count), .overflow(fs_ovf)
  );

  node_t u_node;
  assign u_node = node_t'(int'(rw) * C + int'(cc));

  // Row rw may hold a cluster node if its own row, the row above, or the same
  // row one round earlier has a non-zero STM bit.
  function automatic logic row_active(input int unsigned r_i);
    logic a;
    a = stm_zdr[r_i];
    if ((r_i % D) > 0) a = a | stm_zdr[r_i - 1];
    if ((r_i / D) > 0) a = a | stm_zdr[r_i - D];
    return a;
  endfunction

  // First active row at or after rw (NROWS if none): a skipped stretch of
  // rows costs one cycle.
  logic [$clog2(NROWS+1)-1:0] next_row;
  always_comb begin
    next_row = ($clog2(NROWS+1))'(NROWS);
    for (int i = NROWS - 1; i >= 0; i--)
      if (i >= int'(rw) && row_active(i)) next_row = ($clog2(NROWS+1))'(i);
  end

  // Incident edge k of the current node.
  logic  inc_valid;
  node_t inc_owner, inc_other;
  dir_t  inc_dir;
  grow_t inc_grow;
  always_comb begin
    inc_valid = incident(D, u_node, int'(k), inc_owner, inc_dir, inc_other);
    inc_grow  = stm_a_word.grow[inc_dir];
  end

  node_t walk_parent;
  assign walk_parent = root_tbl[find_x];

  // STM port A and fusion stack control.
  always_comb begin
    stm_load    = (state == S_IDLE) && start;
    stm_a_node  = inc_owner;
    stm_a_dir   = inc_dir;
    stm_a_we    = 1'b0;
    stm_a_wdata = inc_grow + 2'd1;
    fs_push     = 1'b0;
    fs_din      = '{owner: inc_owner, dir: inc_dir};
    fs_pop      = 1'b0;
    if (state == S_P1_EDGE && inc_valid && inc_grow != GROW_FULL) begin
      stm_a_we = 1'b1;
      fs_push  = (inc_grow + 2'd1 == GROW_FULL);
    end
    if (state == S_P2_POP && !fs_empty) fs_pop = 1'b1;
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      find_ret     <= RET_P1;
      ttr_n        <= '0;
      find_x       <= '0;
      rw           <= '0;
      cc           <= '0;
      k            <= '0;
      found_odd    <= 1'b0;
      mid_pass     <= 1'b0;
      ru           <= '0;
      rv           <= '0;
      done         <= 1'b0;
      rounds       <= '0;
      early_merges <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            rw           <= '0;
            found_odd    <= 1'b0;
            mid_pass     <= 1'b0;
            rounds       <= '0;
            early_merges <= '0;
            state        <= S_P1_ROW;
          end
        end

        S_P1_ROW: begin
          if (int'(rw) == NROWS) begin
            if (found_odd) begin
              state <= S_P2_POP;
            end else begin
              state <= S_DONE;
            end
          end else if (row_active(int'(rw))) begin
            cc    <= '0;
            state <= S_P1_NODE;
          end else begin
            rw <= next_row;
          end
        end

        S_P1_NODE: begin
          if (int'(fs_count) + 7 > FUSE_DEPTH) begin
            // Drain the fusion stack before it can overflow.
            mid_pass     <= 1'b1;
            early_merges <= early_merges + 1'b1;
            state        <= S_P2_POP;
          end else begin
            find_x   <= u_node;
            ttr_n    <= '0;
            find_ret <= RET_P1;
            state    <= S_FIND_WALK;
          end
        end

        S_P1_EDGE: begin
          if (k == 3'd6) begin
            if (int'(cc) == C - 1) begin
              rw    <= rw + 1'b1;
              state <= S_P1_ROW;
            end else begin
              cc    <= cc + 1'b1;
              state <= S_P1_NODE;
            end
          end else begin
            k <= k + 1'b1;
          end
        end

        S_FIND_WALK: begin
          if (walk_parent == find_x) begin
            if (ttr_n > 1) state <= S_FIND_COMP;
            else begin
              // Root found; nothing to compress.
              unique case (find_ret)
                RET_P1: begin
                  if (par_tbl[find_x] && find_x != BND) begin
                    found_odd <= 1'b1;
                    k         <= '0;
                    state     <= S_P1_EDGE;
                  end else if (int'(cc) == C - 1) begin
                    rw    <= rw + 1'b1;
                    state <= S_P1_ROW;
                  end else begin
                    cc    <= cc + 1'b1;
                    state <= S_P1_NODE;
                  end
                end
                RET_P2U: begin
                  ru       <= find_x;
                  find_x   <= edge_other(D, ru, dir_t'(rv[1:0]));
                  ttr_n    <= '0;
                  find_ret <= RET_P2V;
                end
                default: begin
                  rv    <= find_x;
                  state <= S_P2_UNION;
                end
              endcase
            end
          end else begin
            if (int'(ttr_n) < TTR_DEPTH) begin
              ttr[ttr_n] <= find_x;
              ttr_n      <= ttr_n + 1'b1;
            end
            find_x <= walk_parent;
          end
        end

        S_FIND_COMP: begin
          // Path compression: one table write per cycle; the last recorded
          // node already points at the root.
          ttr_n <= ttr_n - 1'b1;
          if (ttr_n == 2) begin
            ttr_n <= '0;
            state <= S_FIND_WALK;
          end
        end

        S_P2_POP: begin
          if (fs_empty) begin
            if (mid_pass) begin
              mid_pass <= 1'b0;
              state    <= S_P1_NODE;
            end else begin
              rounds    <= rounds + 1'b1;
              found_odd <= 1'b0;
              rw        <= '0;
              state     <= S_P1_ROW;
            end
          end else begin
            // ru holds the owner and rv the direction until both Finds are done.
            ru       <= fs_top.owner;
            rv       <= node_t'(fs_top.dir);
            find_x   <= fs_top.owner;
            ttr_n    <= '0;
            find_ret <= RET_P2U;
            state    <= S_FIND_WALK;
          end
        end

        S_P2_UNION: begin
          state <= S_P2_POP;
        end

        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // Root table, Size table and parity registers: initialised when a new
  // syndrome is loaded, written by path compression and by Union().
  logic  union_ru_root;
  assign union_ru_root = (ru == BND) || (rv != BND && size_tbl[ru] >= size_tbl[rv]);

  always_ff @(posedge clk) begin
    if (state == S_IDLE && start) begin
      for (int unsigned i = 0; i < NNODES; i++) begin
        root_tbl[i] <= node_t'(i);
        size_tbl[i] <= node_t'(1);
        par_tbl[i]  <= (i < NLAT) ? syn[i] : 1'b0;
      end
    end else if (state == S_FIND_COMP) begin
      root_tbl[ttr[ttr_n - 2]] <= find_x;
    end else if (state == S_P2_UNION && ru != rv) begin
      if (union_ru_root) begin
        root_tbl[rv] <= ru;
        size_tbl[ru] <= size_tbl[ru] + size_tbl[rv];
        par_tbl[ru]  <= par_tbl[ru] ^ par_tbl[rv];
      end else begin
        root_tbl[ru] <= rv;
        size_tbl[rv] <= size_tbl[ru] + size_tbl[rv];
        par_tbl[rv]  <= par_tbl[ru] ^ par_tbl[rv];
      end
    end
  end

endmodule
