// tb_afs_corr: self-checking test of the Correction (peeling) Engine
// (distance 5).
//
// The testbench plays the DFS Engine: it builds random trees on random
// distinct lattice nodes, writes each tree's edges in depth-first order into
// one of two modelled edge stacks (alternating S0/S1), marks a stack ready,
// and serves the engine's pop and release requests.  After a random number of
// trees an empty stack marked `es_last` closes the syndrome.  Syndrome bits are
// random; for trees not rooted at the boundary the total parity is made even,
// except in a few trees where it is deliberately odd.
// Reference: an edge belongs to the correction exactly when the subtree below
// it holds an odd number of syndrome bits.  Checks: the reported edges equal
// the reference set per tree, `peel_err` pulses exactly for the odd trees,
// `done_valid` reports the syndrome's tag once.  Mechanism counted: trees
// rooted at the boundary, odd trees, and trees served while the other stack
// was already waiting.
module tb_afs_corr;
  import afs_pkg::*;

  localparam int D = 5, NLAT = D * D * (D - 1);
  localparam node_t BND = node_t'(NLAT);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0]  es_ready = '0, es_last = '0, es_empty, es_pop, es_release;
  tag_t        es_tag [2];
  edge_entry_t es_top [2];
  logic        corr_valid, done_valid, peel_err, busy;
  tag_t        corr_tag, done_tag;
  node_t       corr_owner;
  dir_t        corr_dir;

  afs_corr #(.D(D)) dut (.*);

  edge_entry_t stk [2][$];
  always_comb begin
    for (int g = 0; g < 2; g++) begin
      es_empty[g] = (stk[g].size() == 0);
      es_top[g]   = (stk[g].size() != 0) ? stk[g][stk[g].size() - 1] : '0;
    end
  end

  int checks = 0, failures = 0, n_bnd = 0, n_odd = 0, n_overlap = 0;
  int n_err = 0, n_done = 0;
  bit [31:0] got [$];
  int g;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      for (int g = 0; g < 2; g++) begin
        if (es_pop[g]) void'(stk[g].pop_back());
        if (es_release[g]) es_ready[g] <= 1'b0;
      end
      if (corr_valid) got.push_back({corr_tag, 6'd0, corr_dir, corr_owner});
      if (peel_err) n_err++;
      if (done_valid) begin
        n_done++;
        check(done_tag == 8'h5c, "done tag");
      end
    end
  end

  // Build one random tree and return the expected correction edges.
  task automatic make_tree(input int g, input bit odd, output bit [31:0] exp [$],
                           output bit exp_err);
    int    nn;
    node_t nodes [$];
    int    par [$];
    bit    syn [$];
    int    cnt [$];
    bit    from_bnd;
    int    total;
    nn = $urandom_range(2, 12);
    from_bnd = ($urandom_range(2) == 0);
    // node 0 is the root
    nodes.push_back(from_bnd ? BND : node_t'($urandom_range(NLAT - 1)));
    par.push_back(-1);
    for (int i = 1; i < nn; i++) begin
      node_t x;
      bit dup;
      do begin
        x = node_t'($urandom_range(NLAT - 1));
        dup = 0;
        foreach (nodes[j]) if (nodes[j] == x) dup = 1;
      end while (dup);
      nodes.push_back(x);
      par.push_back($urandom_range(i - 1));    // parents precede children
    end
    total = 0;
    for (int i = 0; i < nn; i++) begin
      syn.push_back((i == 0 && from_bnd) ? 1'b0 : 1'($urandom_range(1)));
      total += syn[i];
    end
    if (!from_bnd && ((total % 2 == 1) != odd)) syn[nn - 1] = !syn[nn - 1];
    exp_err = !from_bnd && odd;
    if (from_bnd) n_bnd++;
    if (exp_err) n_odd++;
    // subtree parities (children have larger indices)
    for (int i = 0; i < nn; i++) cnt.push_back(syn[i]);
    for (int i = nn - 1; i > 0; i--) cnt[par[i]] += cnt[i];
    exp.delete();
    for (int i = 1; i < nn; i++)
      if (cnt[i] % 2 == 1) exp.push_back({8'h5c, 6'd0, 2'(i % 4), nodes[i]});
    // depth-first (pre-order) listing: parents before children
    begin
      int order [$];
      int st [$];
      st.push_back(0);
      while (st.size() != 0) begin
        int v;
        v = st.pop_back();
        order.push_back(v);
        for (int i = nn - 1; i > 0; i--) if (par[i] == v) st.push_back(i);
      end
      foreach (order[j]) begin
        int i;
        i = order[j];
        if (i != 0)
          stk[g].push_back('{child: nodes[i], parent: nodes[par[i]], owner: nodes[i],
                             dir: dir_t'(i % 4), syn_child: syn[i], syn_parent: syn[par[i]]});
      end
    end
  endtask

  initial begin
    es_tag[0] = 8'h5c;
    es_tag[1] = 8'h5c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Like the DFS Engine, the stack choice carries over between syndromes.
    g = 0;
    for (int s = 0; s < 60; s++) begin
      int ntrees;
      bit [31:0] exp_all [$];
      int exp_errs;
      ntrees = $urandom_range(1, 6);
      exp_errs = 0;
      got.delete();
      exp_all.delete();
      n_err = 0;
      for (int k = 0; k <= ntrees; k++) begin
        bit [31:0] e [$];
        bit ee;
        // wait for the stack to be free, as the DFS Engine does
        while (es_ready[g]) @(negedge clk);
        if (k < ntrees) begin
          make_tree(g, ($urandom_range(7) == 0), e, ee);
          exp_all = {exp_all, e};
          exp_errs += ee;
          es_last[g] = 1'b0;
        end else begin
          es_last[g] = 1'b1;
        end
        if (es_ready[!g]) n_overlap++;
        es_ready[g] = 1'b1;
        @(negedge clk);
        g = !g;
      end
      while (es_ready != 0) @(negedge clk);
      repeat (3) @(negedge clk);
      exp_all.sort();
      got.sort();
      check(got == exp_all, $sformatf("syndrome %0d: %0d correction edges, expected %0d", s,
                                      got.size(), exp_all.size()));
      check(n_err == exp_errs, $sformatf("syndrome %0d: %0d peeling errors, expected %0d", s,
                                         n_err, exp_errs));
      check(n_done == s + 1, "one done pulse per syndrome");
      check(!busy, "engine idle at the end");
    end
    $display("mechanisms: boundary_trees=%0d odd_trees=%0d overlapped_handoffs=%0d", n_bnd, n_odd,
             n_overlap);
    check(n_bnd > 0 && n_odd > 0 && n_overlap > 0, "a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
