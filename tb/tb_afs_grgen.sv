// tb_afs_grgen: self-checking test of the Graph Generator with a Spanning
// Tree Memory (distance 5, fusion stack of 16 entries).
//
// Each trial starts the Graph Generator on a random syndrome (sparse, medium,
// dense, or a single pair of neighbouring defects) and waits for `done`.  The
// testbench then reads the whole STM through port B and checks, with its own
// flood fill over fully-grown edges:
//   * every cluster holding syndrome bits has an even number of them or
//     touches the boundary (the Union-Find stopping rule);
//   * the STM syndrome bits are the loaded ones and every ZDR bit is set
//     exactly for rows holding a syndrome bit or a grown edge;
//   * a half-grown edge touches a cluster holding a syndrome bit;
//   * for a neighbouring pair away from the boundary, exactly the edge between
//     them is fully grown after one growth round.
// Mechanisms counted (each must occur): decodes needing several growth
// rounds, early merges forced by a nearly full fusion stack.
module tb_afs_grgen;
  import afs_pkg::*;

  localparam int D = 5, C = D - 1, NLAT = D * D * C, NROWS = D * D;
  localparam node_t BND = node_t'(NLAT);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             start = 0, busy, done;
  logic [NLAT-1:0]  syn = '0;
  logic [7:0]       rounds;
  logic [15:0]      early_merges;
  logic             stm_load, a_we;
  node_t            a_node, b_node = '0;
  stm_word_t        a_word, b_word;
  dir_t             a_dir;
  grow_t            a_wdata;
  logic [NROWS-1:0] zdr;

  afs_stm #(.D(D)) u_stm (
    .clk, .rst_n, .load_en(stm_load), .load_syn(syn), .a_node, .a_word, .a_we, .a_dir,
    .a_wdata, .b_node, .b_word, .zdr
  );

  afs_grgen #(.D(D), .FUSE_DEPTH(16)) dut (
    .clk, .rst_n, .start, .syn, .busy, .done, .rounds, .early_merges,
    .stm_load, .stm_a_node(a_node), .stm_a_word(a_word), .stm_a_we(a_we), .stm_a_dir(a_dir),
    .stm_a_wdata(a_wdata), .stm_zdr(zdr)
  );

  int checks = 0, failures = 0, n_multi = 0, n_early = 0, n_pair = 0;
  int uf [NLAT + 1];
  grow_t g [NLAT][4];

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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 300; trial++) begin
      int kind, pair_a;
      int par [NLAT + 1];
      bit hasdef [NLAT + 1];
      bit [NROWS-1:0] ezdr;
      kind = trial % 4;
      syn = '0;
      pair_a = -1;
      case (kind)
        0: for (int i = 0; i < NLAT; i++) syn[i] = ($urandom_range(40) == 0);
        1: for (int i = 0; i < NLAT; i++) syn[i] = ($urandom_range(10) == 0);
        2: for (int i = 0; i < NLAT; i++) syn[i] = ($urandom_range(2) == 0);
        default: begin
          // neighbouring pair (east neighbours) with c in 1..C-3, away from boundary
          int t, r, c;
          t = $urandom_range(D - 1);
          r = $urandom_range(D - 1);
          c = $urandom_range(1, C - 3);
          pair_a = (t * D + r) * C + c;
          syn[pair_a] = 1;
          syn[pair_a + 1] = 1;
        end
      endcase
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      if (rounds > 1) n_multi++;
      if (early_merges != 0) n_early++;
      // read back the STM
      for (int i = 0; i <= NLAT; i++) begin
        uf[i] = i;
        par[i] = 0;
        hasdef[i] = 0;
      end
      ezdr = '0;
      for (int i = 0; i < NLAT; i++) begin
        b_node = node_t'(i);
        #1;
        check(b_word.nb == syn[i], "syndrome bit in the STM");
        if (syn[i]) ezdr[i / C] = 1;
        for (int k = 0; k < 4; k++) begin
          g[i][k] = b_word.grow[k];
          if (g[i][k] != 0) ezdr[i / C] = 1;
        end
      end
      check(zdr == ezdr, "zero data register");
      for (int i = 0; i < NLAT; i++)
        for (int k = 0; k < 4; k++)
          if (g[i][k] == GROW_FULL) begin
            node_t o, x;
            dir_t dd;
            check(incident(D, node_t'(i), k, o, dd, x), "grown edge does not exist");
            uf[find(i)] = find(int'(x));
          end
      for (int i = 0; i < NLAT; i++) if (syn[i]) begin
        par[find(i)]++;
        hasdef[find(i)] = 1;
      end
      for (int i = 0; i <= NLAT; i++)
        if (find(i) == i && i != find(NLAT))
          check(par[i] % 2 == 0, $sformatf("trial %0d: odd cluster without boundary", trial));
      for (int i = 0; i < NLAT; i++)
        for (int k = 0; k < 4; k++)
          if (g[i][k] == 1) begin
            node_t o, x;
            dir_t dd;
            void'(incident(D, node_t'(i), k, o, dd, x));
            check(hasdef[find(i)] || hasdef[find(int'(x))] ||
                  (x == BND) || find(i) == find(NLAT),
                  "half-grown edge away from any syndrome");
          end
      if (pair_a >= 0) begin
        int nfull;
        nfull = 0;
        for (int i = 0; i < NLAT; i++)
          for (int k = 0; k < 4; k++) if (g[i][k] == GROW_FULL) nfull++;
        check(nfull == 1 && g[pair_a][0] == GROW_FULL && rounds == 1,
              "neighbouring pair not joined by exactly its edge in one round");
        n_pair++;
      end
      @(negedge clk);
    end
    $display("mechanisms: multi_round=%0d early_merge=%0d pairs=%0d", n_multi, n_early, n_pair);
    check(n_multi > 0, "no decode needed several growth rounds");
    check(n_early > 0, "no early merge occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
