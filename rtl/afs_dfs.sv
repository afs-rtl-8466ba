// afs_dfs: Depth First Search (DFS) Engine, second stage of the AFS decoder.
//
// Builds the spanning forest of the clusters grown by the Graph Generator.
// It reads a Spanning Tree Memory through its read-only port B and writes, for
// every cluster, the list of tree edges onto one of two edge stacks (S0, S1)
// that the Correction Engine later pops in reverse order.
//
// How it works.  On `start` the visited bits are cleared and the traversal
// begins at the boundary node, so that every cluster touching the boundary
// has the boundary as its tree root.  The boundary's neighbours are found by
// looking at the boundary edges of the rows whose Zero Data Register bit is
// set.  Afterwards the engine scans only the ZDR-marked rows for nodes that are
// not visited yet and carry a syndrome bit or an own fully-grown edge; each
// such node roots a new tree.  A traversal pops the runtime stack (nodes still
// to visit, with the edge that reached them); a node seen for the first time is
// marked visited, its tree edge is pushed on the current edge stack together
// with the syndrome bits of both ends, and its seven possible incident edges
// are examined one per cycle, pushing unvisited neighbours over fully-grown
// edges onto the runtime stack.  When the runtime stack is empty the tree is
// complete: a non-empty edge stack is handed to the Correction Engine
// (`es_ready`) and the engine switches to the other edge stack, so the next
// cluster is traversed while the previous one is peeled.  If that stack is
// still being peeled the engine stalls.  After the last row a final, empty
// stack marked `es_last` tells the Correction Engine that this syndrome is
// finished, and `done` pulses: the STM may then be reused.
//
// The ZDR-guided scan, the runtime stack, the two alternating edge stacks and
// the syndrome bits in each stack entry follow the decoder's description; the
// boundary-first order, the end-of-syndrome token and the stack depths are this
// design's choices.  Overflow of a stack sets the sticky `ovf` output (the
// decode is then unreliable) until the next `start`.
module afs_dfs
  import afs_pkg::*;
#(
  parameter int unsigned D        = 11,
  parameter int unsigned RT_DEPTH = 32,
  parameter int unsigned ES_DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  tag_t              start_tag,
  output logic              busy,
  output logic              done,
  output logic              ovf,
  output logic [15:0]       stall_cycles,
  output logic [15:0]       trees,
  // Spanning Tree Memory, port B
  output node_t             stm_b_node,
  input  stm_word_t         stm_b_word,
  input  logic [D*D-1:0]    stm_zdr,
  // Edge stacks towards the Correction Engine
  output logic [1:0]        es_ready,
  output logic [1:0]        es_last,
  output tag_t              es_tag [2],
  output edge_entry_t       es_top [2],
  output logic [1:0]        es_empty,
  input  logic [1:0]        es_pop,
  input  logic [1:0]        es_release
);
  localparam int unsigned C      = D - 1;
  localparam int unsigned NLAT   = D * D * (D - 1);
  localparam int unsigned NNODES = NLAT + 1;
  localparam int unsigned NROWS  = D * D;
  localparam node_t       BND    = node_t'(NLAT);

  typedef struct packed {
    node_t x;
    logic  has_par;
    node_t par;
    node_t owner;
    dir_t  dir;
    logic  par_nb;
  } rt_t;

  typedef enum logic [3:0] {
    S_IDLE, S_WAIT_FREE, S_BND_ROW, S_POP, S_EXPLORE, S_HANDOFF, S_WAIT_NEXT,
    S_SCAN_ROW, S_SCAN_NODE, S_END, S_DONE
  } state_t;

  state_t state;
  logic   in_bnd;          // traversing the boundary tree
  logic   bsub;            // boundary scan: 0 = west column, 1 = east column
  logic   wsel;            // edge stack being filled
  tag_t   tag;
  logic [$clog2(NROWS+1)-1:0] rw;
  logic [$clog2(C+1)-1:0]     cc;
  logic [2:0]                 k;
  node_t                      cur_x;
  logic                       cur_nb;
  logic [NNODES-1:0]          visited;

  // Runtime stack.
  logic rt_push, rt_pop, rt_empty, rt_full, rt_ovf, rt_clear;
  rt_t  rt_din, rt_top;
  logic [$clog2(RT_DEPTH+1)-1:0] rt_count;

  afs_stack #(.T(rt_t), .DEPTH(RT_DEPTH)) u_rt (
    .clk, .rst_n, .clear(rt_clear), .push(rt_push), .din(rt_din), .pop(rt_pop), .top(rt_top),
    .empty(rt_empty), .full(rt_full), .count(rt_count), .overflow(rt_ovf)
  );

  // Edge stacks S0 and S1.
  logic [1:0]  es_push, es_ovf, es_full;
  edge_entry_t es_din;
  logic [$clog2(ES_DEPTH+1)-1:0] es_count [2];

  for (genvar g = 0; g < 2; g++) begin : g_es
    afs_stack #(.T(edge_entry_t), .DEPTH(ES_DEPTH)) u_es (
      .clk, .rst_n, .clear(1'b0), .push(es_push[g]), .din(es_din), .pop(es_pop[g]),
      .top(es_top[g]), .empty(es_empty[g]), .full(es_full[g]), .count(es_count[g]),
      .overflow(es_ovf[g])
    );
  end

  // First ZDR-marked row at or after rw (NROWS if none): a run of zero rows
  // is skipped in one cycle.
  logic [$clog2(NROWS+1)-1:0] next_row;
  always_comb begin
    next_row = ($clog2(NROWS+1))'(NROWS);
    for (int i = NROWS - 1; i >= 0; i--)
      if (i >= int'(rw) && stm_zdr[i]) next_row = ($clog2(NROWS+1))'(i);
  end

  node_t scan_node;
  assign scan_node = node_t'(int'(rw) * C + int'(cc));

  // Boundary column node of the current row.
  node_t bnd_node;
  assign bnd_node = node_t'(int'(rw) * C + (bsub ? C - 1 : 0));

  // Incident edge k of the node being explored.
  logic  inc_valid;
  node_t inc_owner, inc_other;
  dir_t  inc_dir;
  always_comb inc_valid = incident(D, cur_x, int'(k), inc_owner, inc_dir, inc_other);

  logic own_full;
  always_comb begin
    own_full = 1'b0;
    for (int i = 0; i < 4; i++) own_full |= (stm_b_word.grow[i] == GROW_FULL);
  end

  logic rt_top_new;
  assign rt_top_new = !visited[rt_top.x];

  always_comb begin
    stm_b_node = scan_node;
    rt_push    = 1'b0;
    rt_pop     = 1'b0;
    rt_clear   = (state == S_IDLE) && start;
    rt_din     = '0;
    es_push    = '0;
    es_din     = '0;
    unique case (state)
      S_BND_ROW: begin
        stm_b_node = bnd_node;
        if (stm_zdr[rw] && int'(rw) < NROWS && !visited[bnd_node] &&
            stm_b_word.grow[bsub ? DIR_E : DIR_WB] == GROW_FULL) begin
          rt_push = 1'b1;
          rt_din  = '{x: bnd_node, has_par: 1'b1, par: BND, owner: bnd_node,
                      dir: (bsub ? DIR_E : DIR_WB), par_nb: 1'b0};
        end
      end
      S_POP: begin
        stm_b_node = rt_top.x;
        if (!rt_empty) begin
          rt_pop = 1'b1;
          if (rt_top_new && rt_top.has_par) begin
            es_push[wsel] = 1'b1;
            es_din = '{child: rt_top.x, parent: rt_top.par, owner: rt_top.owner,
                       dir: rt_top.dir, syn_child: stm_b_word.nb, syn_parent: rt_top.par_nb};
          end
        end
      end
      S_EXPLORE: begin
        stm_b_node = inc_owner;
        if (inc_valid && stm_b_word.grow[inc_dir] == GROW_FULL && !visited[inc_other]) begin
          rt_push = 1'b1;
          rt_din  = '{x: inc_other, has_par: 1'b1, par: cur_x, owner: inc_owner,
                      dir: inc_dir, par_nb: cur_nb};
        end
      end
      S_SCAN_NODE: begin
        stm_b_node = scan_node;
        if (!visited[scan_node] && (stm_b_word.nb || own_full)) begin
          rt_push = 1'b1;
          rt_din  = '{x: scan_node, has_par: 1'b0, par: scan_node, owner: scan_node,
                      dir: DIR_E, par_nb: 1'b0};
        end
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      in_bnd       <= 1'b0;
      bsub         <= 1'b0;
      wsel         <= 1'b0;
      tag          <= '0;
      rw           <= '0;
      cc           <= '0;
      k            <= '0;
      cur_x        <= '0;
      cur_nb       <= 1'b0;
      visited      <= '0;
      es_ready     <= '0;
      es_last      <= '0;
      es_tag[0]    <= '0;
      es_tag[1]    <= '0;
      done         <= 1'b0;
      ovf          <= 1'b0;
      stall_cycles <= '0;
      trees        <= '0;
    end else begin
      done <= 1'b0;
      for (int i = 0; i < 2; i++) if (es_release[i]) es_ready[i] <= 1'b0;
      if (rt_ovf || es_ovf[wsel]) ovf <= 1'b1;

      unique case (state)
        S_IDLE: begin
          if (start) begin
            tag              <= start_tag;
            visited          <= '0;
            visited[BND]     <= 1'b1;
            ovf              <= 1'b0;
            stall_cycles     <= '0;
            trees            <= '0;
            state            <= S_WAIT_FREE;
          end
        end

        S_WAIT_FREE: begin
          if (!es_ready[wsel]) begin
            in_bnd <= 1'b1;
            bsub   <= 1'b0;
            rw     <= '0;
            state  <= S_BND_ROW;
          end else begin
            stall_cycles <= stall_cycles + 1'b1;
          end
        end

        S_BND_ROW: begin
          if (int'(rw) == NROWS) begin
            state <= S_POP;
          end else if (!stm_zdr[rw]) begin
            rw   <= next_row;
          end else if (bsub) begin
            bsub <= 1'b0;
            rw   <= rw + 1'b1;
          end else begin
            bsub <= 1'b1;
          end
        end

        S_POP: begin
          if (rt_empty) begin
            state <= S_HANDOFF;
          end else if (rt_top_new) begin
            visited[rt_top.x] <= 1'b1;
            cur_x             <= rt_top.x;
            cur_nb            <= stm_b_word.nb;
            k                 <= '0;
            state             <= S_EXPLORE;
          end
        end

        S_EXPLORE: begin
          if (k == 3'd6) state <= S_POP;
          k <= k + 1'b1;
        end

        S_HANDOFF: begin
          if (es_count[wsel] != '0) begin
            es_ready[wsel] <= 1'b1;
            es_last[wsel]  <= 1'b0;
            es_tag[wsel]   <= tag;
            wsel           <= ~wsel;
            trees          <= trees + 1'b1;
            state          <= S_WAIT_NEXT;
          end else begin
            state <= S_WAIT_NEXT;
          end
        end

        S_WAIT_NEXT: begin
          if (!es_ready[wsel]) begin
            if (in_bnd) begin
              in_bnd <= 1'b0;
              rw     <= '0;
              state  <= S_SCAN_ROW;
            end else begin
              state <= S_SCAN_NODE;
            end
          end else begin
            stall_cycles <= stall_cycles + 1'b1;
          end
        end

        S_SCAN_ROW: begin
          if (int'(rw) == NROWS) begin
            state <= S_END;
          end else if (stm_zdr[rw]) begin
            cc    <= '0;
            state <= S_SCAN_NODE;
          end else begin
            rw <= next_row;
          end
        end

        S_SCAN_NODE: begin
          if (!visited[scan_node] && (stm_b_word.nb || own_full)) begin
            state <= S_POP;              // a new tree rooted at scan_node
          end else if (int'(cc) == C - 1) begin
            rw    <= rw + 1'b1;
            state <= S_SCAN_ROW;
          end else begin
            cc <= cc + 1'b1;
          end
        end

        S_END: begin
          // wsel is free here: S_WAIT_NEXT waited for it.
          es_ready[wsel] <= 1'b1;
          es_last[wsel]  <= 1'b1;
          es_tag[wsel]   <= tag;
          wsel           <= ~wsel;
          state          <= S_DONE;
        end

        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
