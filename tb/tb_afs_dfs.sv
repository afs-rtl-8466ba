// tb_afs_dfs: self-checking test of the DFS Engine with a Spanning Tree
// Memory (distance 5).
//
// Each trial loads a random syndrome into the STM and marks random edges fully
// grown through port A, then starts the engine.  The testbench plays the
// Correction Engine: it drains the ready edge stack (sometimes only after a
// delay, so the engine must stall), releases it and alternates between S0 and
// S1, until the empty stack marked `es_last` arrives.  A union-find reference
// over the fully-grown edges gives the clusters.  Checks per trial:
//   * every listed edge is fully grown and joins its child and parent, and the
//     syndrome bits in the entry are the stored ones;
//   * each handed-over stack is one spanning tree of one whole cluster, listed
//     parents-first, every node appearing once as a child;
//   * the tree of a cluster touching the boundary is rooted at the boundary;
//   * the number of trees equals the number of clusters with an edge, the
//   tag is carried, `done` pulses, and there is no overflow.
// Mechanism counted: stall cycles (must occur).
module tb_afs_dfs;
  import afs_pkg::*;

  localparam int D = 5, C = D - 1, NLAT = D * D * C, NROWS = D * D;
  localparam node_t BND = node_t'(NLAT);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // STM
  logic             load_en = 0;
  logic [NLAT-1:0]  load_syn = '0;
  node_t            a_node = '0, b_node;
  stm_word_t        a_word, b_word;
  logic             a_we = 0;
  dir_t             a_dir = DIR_E;
  grow_t            a_wdata = '0;
  logic [NROWS-1:0] zdr;

  afs_stm #(.D(D)) u_stm (
    .clk, .rst_n, .load_en, .load_syn, .a_node, .a_word, .a_we, .a_dir, .a_wdata,
    .b_node, .b_word, .zdr
  );

  logic        start = 0, busy, done, ovf;
  tag_t        start_tag = '0;
  logic [15:0] stall_cycles, trees;
  logic [1:0]  es_ready, es_last, es_empty, es_pop = '0, es_release = '0;
  tag_t        es_tag [2];
  edge_entry_t es_top [2];

  afs_dfs #(.D(D), .RT_DEPTH(256), .ES_DEPTH(256)) dut (
    .clk, .rst_n, .start, .start_tag, .busy, .done, .ovf, .stall_cycles, .trees,
    .stm_b_node(b_node), .stm_b_word(b_word), .stm_zdr(zdr),
    .es_ready, .es_last, .es_tag, .es_top, .es_empty, .es_pop, .es_release
  );

  int checks = 0, failures = 0, n_stall = 0;
  int uf [NLAT + 1];
  bit full [NLAT][4];
  bit nb [NLAT];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int find(int x);
    while (uf[x] != x) x = uf[x];
    return x;
  endfunction

  int rsel = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 200; trial++) begin
      int nedges, ncl, ntree, kids;
      bit seen [NLAT + 1];
      int csize [NLAT + 1];
      bit tree_done [NLAT + 1];
      bit fin;
      // load
      for (int i = 0; i < NLAT; i++) begin
        nb[i] = ($urandom_range(9) == 0);
        load_syn[i] = nb[i];
        for (int k = 0; k < 4; k++) full[i][k] = 0;
      end
      for (int i = 0; i <= NLAT; i++) uf[i] = i;
      @(negedge clk);
      load_en = 1;
      @(negedge clk);
      load_en = 0;
      nedges = (trial % 4 == 3) ? 60 : $urandom_range(0, 25);
      for (int e = 0; e < nedges; e++) begin
        node_t u, o, x;
        dir_t dd;
        int k;
        u = node_t'($urandom_range(NLAT - 1));
        k = $urandom_range(3);
        if (!incident(D, u, k, o, dd, x)) continue;
        full[u][k] = 1;
        uf[find(int'(u))] = find(int'(x));
        a_we = 1;
        a_node = u;
        a_dir = dir_t'(k);
        a_wdata = GROW_FULL;
        @(negedge clk);
        a_we = 0;
      end
      // reference cluster sizes (lattice nodes with an edge, plus the boundary)
      for (int i = 0; i <= NLAT; i++) csize[i] = 0;
      for (int i = 0; i <= NLAT; i++) begin
        bit has_edge;
        node_t o, x;
        dir_t dd;
        has_edge = (i == NLAT) ? 0 : 0;
        if (i < NLAT)
          for (int k = 0; k < 7; k++)
            if (incident(D, node_t'(i), k, o, dd, x) && full[o][int'(dd)]) has_edge = 1;
        if (i == NLAT)
          for (int j = 0; j < NLAT; j++)
            for (int k = 0; k < 2; k++)
              if (incident(D, node_t'(j), k, o, dd, x) && x == BND && full[j][k]) has_edge = 1;
        if (has_edge) csize[find(i)]++;
        seen[i] = 0;
        tree_done[i] = 0;
      end
      ncl = 0;
      for (int i = 0; i <= NLAT; i++) if (csize[i] > 1) ncl++;
      // run
      start_tag = tag_t'(trial);
      start = 1;
      @(negedge clk);
      start = 0;
      ntree = 0;
      fin = 0;
      while (!fin) begin
        edge_entry_t ents [$];
        ents.delete();
        while (!es_ready[rsel]) @(negedge clk);
        if ($urandom_range(2) == 0) repeat ($urandom_range(5, 60)) @(negedge clk);
        check(es_tag[rsel] == tag_t'(trial), "tag");
        while (!es_empty[rsel]) begin
          ents.push_front(es_top[rsel]);
          es_pop[rsel] = 1;
          @(negedge clk);
          es_pop[rsel] = 0;
        end
        es_release[rsel] = 1;
        if (es_last[rsel]) fin = 1;
        @(negedge clk);
        es_release = '0;
        rsel = 1 - rsel;
        if (ents.size() == 0) begin
          check(fin, "empty stack not marked last");
          continue;
        end
        // one tree
        ntree++;
        begin
          int root, comp;
          root = int'(ents[0].parent);
          comp = find(root);
          check(!tree_done[comp], "cluster listed twice");
          tree_done[comp] = 1;
          if (comp == find(NLAT)) check(root == NLAT, "boundary cluster not rooted at the boundary");
          check(ents.size() == csize[comp] - 1, $sformatf("tree has %0d edges, cluster %0d nodes",
                                                        ents.size(), csize[comp]));
          seen[root] = 1;
          foreach (ents[j]) begin
            edge_entry_t e;
            node_t x;
            e = ents[j];
            x = edge_other(D, e.owner, e.dir);
            check(full[e.owner][int'(e.dir)], "edge not fully grown");
            check((e.owner == e.child && x == e.parent) || (e.owner == e.parent && x == e.child),
                  "edge does not join child and parent");
            check(seen[e.parent] && !seen[e.child], "not a parents-first tree");
            check(find(int'(e.child)) == comp, "edge of another cluster");
            check(e.syn_child == ((int'(e.child) < NLAT) ? nb[e.child] : 1'b0) &&
                  e.syn_parent == ((int'(e.parent) < NLAT) ? nb[e.parent] : 1'b0),
                  "syndrome bits");
            seen[e.child] = 1;
          end
        end
      end
      while (busy) @(negedge clk);
      check(ntree == ncl, $sformatf("%0d trees, %0d clusters", ntree, ncl));
      check(!ovf, "overflow");
      if (stall_cycles != 0) n_stall++;
    end
    $display("mechanisms: trials_with_stalls=%0d", n_stall);
    check(n_stall > 0, "the engine never stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_done = 0;
  always @(posedge clk) if (done) n_done++;

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
