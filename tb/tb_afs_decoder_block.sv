// tb_afs_decoder_block: self-checking test of a conjoined decoder block
// (distance 5, two logical qubits sharing one DFS and one Correction Engine).
//
// Each trial draws errors on the 3-D decoding graph of every qubit and type,
// derives the node syndrome from them with the testbench's own geometry, and
// hands both qubits their logical cycle in the same cycle, so the two qubits'
// four memories compete for the DFS Engine.  Checks per qubit and type:
//   * every node's syndrome equals the parity of the peeled edges that touch it
//     (the correction explains the syndrome exactly);
//   * with a single error, the Pauli frame changes exactly on that error's data
//     qubit (nothing for a measurement error);
//   * no stack overflow or peeling error, and the decode finishes.
// It also counts how often the block's mechanisms occurred: DFS stalls on a
// busy edge stack, simultaneous requests to the select logic, growth over
// several rounds, timeouts and early merges; each must happen at least once.
module tb_afs_decoder_block;
  import afs_pkg::*;

  localparam int unsigned D     = 5;
  localparam int unsigned N     = 2;
  localparam int unsigned C     = D - 1;
  localparam int unsigned NLAT  = D * D * (D - 1);
  localparam int unsigned NDATA = D * D + (D - 1) * (D - 1);
  localparam int unsigned TRIALS = 150;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]       in_valid, in_ready, dec_done, timeout;
  logic [NLAT-1:0]    in_syn_x [N];
  logic [NLAT-1:0]    in_syn_z [N];
  logic [NDATA-1:0]   frame_x [N];
  logic [NDATA-1:0]   frame_z [N];
  logic [15:0]        latency [N];
  logic               corr_valid, err;
  tag_t               corr_tag;
  node_t              corr_owner;
  dir_t               corr_dir;
  logic [15:0]        dfs_stall_cycles, early_merges;

  afs_decoder_block #(.D(D), .N(N), .TIMEOUT_CYCLES(400), .FUSE_DEPTH(16),
                    .RT_DEPTH(512), .ES_DEPTH(256)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_syn_x, .in_syn_z, .frame_x, .frame_z,
    .dec_done, .timeout, .latency, .corr_valid, .corr_tag, .corr_owner, .corr_dir,
    .dfs_stall_cycles, .early_merges, .err
  );

  int checks = 0;
  int failures = 0;
  int n_stall = 0, n_simul = 0, n_multi_round = 0, n_timeout = 0, n_early = 0;

  // ---------------- testbench geometry ----------------
  function automatic int nid(int t, int r, int c);
    return (t * D + r) * C + c;
  endfunction

  // Endpoints of edge (owner, dir); -1 stands for the boundary.
  function automatic void ends(int owner, int dir, output int a, output int b);
    int c, r, t;
    c = owner % C;
    r = (owner / C) % D;
    t = owner / (C * D);
    a = owner;
    case (dir)
      0: b = (c == C - 1) ? -1 : nid(t, r, c + 1);
      1: b = -1;
      2: b = nid(t, r + 1, c);
      default: b = nid(t + 1, r, c);
    endcase
  endfunction

  function automatic int dq(int owner, int dir);
    int c, r;
    c = owner % C;
    r = (owner / C) % D;
    case (dir)
      0: return r * C + c;
      1: return D * C + r;
      2: return D * C + D + r * C + c;
      default: return -1;
    endcase
  endfunction

  // Random valid edge.
  function automatic void rand_edge(input int tmax, output int owner, output int dir);
    int c, r, t;
    forever begin
      c = $urandom_range(C - 1);
      r = $urandom_range(D - 1);
      t = $urandom_range(tmax);
      dir = $urandom_range(3);
      if (dir == 1 && c != 0) continue;
      if (dir == 2 && r == D - 1) continue;
      if (dir == 3 && t == D - 1) continue;
      break;
    end
    owner = nid(t, r, c);
  endfunction

  // ---------------- per-trial state ----------------
  logic [NLAT-1:0]  syn  [N][2];
  logic [NLAT-1:0]  par  [N][2];
  logic [NDATA-1:0] exp_flip [N][2];
  logic             single [N][2];
  logic [NDATA-1:0] frame_before [N][2];
  int               nerr;
  logic [15:0]      stall_prev = '0;

  always @(posedge clk) begin
    if (rst_n && corr_valid) begin
      int a, b, q, xz;
      q  = int'(corr_tag[7:2]);
      xz = int'(corr_tag[0]);
      ends(int'(corr_owner), int'(corr_dir), a, b);
      par[q][xz][a] ^= 1'b1;
      if (b >= 0) par[q][xz][b] ^= 1'b1;
    end
    if (rst_n && dfs_stall_cycles != stall_prev && dfs_stall_cycles != 0) n_stall++;
    stall_prev <= dfs_stall_cycles;
    if (rst_n && $countones(dut.u_select.pending) > 1) n_simul++;
    if (rst_n && |timeout) n_timeout++;
    if (rst_n && (dut.g_q[0].u_grgen.mid_pass || dut.g_q[1].u_grgen.mid_pass)) n_early++;
    if (rst_n && ((dut.g_q[0].u_grgen.done && dut.g_q[0].u_grgen.rounds > 1) ||
                  (dut.g_q[1].u_grgen.done && dut.g_q[1].u_grgen.rounds > 1))) n_multi_round++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int q = 0; q < N; q++) begin
      in_syn_x[q] = '0;
      in_syn_z[q] = '0;
    end
    in_valid = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    for (int trial = 0; trial < TRIALS; trial++) begin
      // Draw errors: trials cycle through single errors, a few errors, and
      // dense patterns that grow large clusters.
      for (int q = 0; q < N; q++) begin
        for (int xz = 0; xz < 2; xz++) begin
          int o, d;
          syn[q][xz]      = '0;
          par[q][xz]      = '0;
          exp_flip[q][xz] = '0;
          // Pattern 4: a dense cluster in the first two rounds (it touches the
          // boundary, so it is traversed first) plus one isolated error in the
          // last round, so that a long peel is followed by a short traversal.
          case (trial % 5)
            0, 1: nerr = 1;
            2:    nerr = $urandom_range(2, 6);
            3:    nerr = $urandom_range(8, 30);
            default: nerr = 40;
          endcase
          single[q][xz] = (nerr == 1);
          for (int e = 0; e < nerr; e++) begin
            int a, b, k, tmax;
            tmax = (trial % 5 == 4) ? 2 : D - 1;
            if (trial % 5 == 4 && e == nerr - 1) begin
              o = ((D - 1) * D + D / 2) * C + 1;
              d = 0;
            end else begin
              rand_edge(tmax, o, d);
            end
            ends(o, d, a, b);
            syn[q][xz][a] ^= 1'b1;
            if (b >= 0) syn[q][xz][b] ^= 1'b1;
            k = dq(o, d);
            if (k >= 0) exp_flip[q][xz][k] ^= 1'b1;
          end
          frame_before[q][xz] = (xz == 0) ? frame_x[q] : frame_z[q];
        end
        in_syn_x[q] = syn[q][0];
        in_syn_z[q] = syn[q][1];
      end

      // Both qubits hand over their logical cycle together.
      wait (&in_ready);
      @(negedge clk);
      in_valid = '1;
      @(negedge clk);
      in_valid = '0;

      begin
        logic [N-1:0] seen;
        seen = '0;
        while (seen != '1) begin
          @(posedge clk);
          seen |= dec_done;
        end
      end
      repeat (2) @(posedge clk);

      for (int q = 0; q < N; q++) begin
        for (int xz = 0; xz < 2; xz++) begin
          logic [NDATA-1:0] now;
          now = (xz == 0) ? frame_x[q] : frame_z[q];
          check(par[q][xz] == syn[q][xz],
                $sformatf("trial %0d q%0d %s: correction does not explain the syndrome",
                          trial, q, xz ? "Z" : "X"));
          if (single[q][xz])
            check((now ^ frame_before[q][xz]) == exp_flip[q][xz],
                  $sformatf("trial %0d q%0d %s: single error not corrected exactly",
                            trial, q, xz ? "Z" : "X"));
        end
      end
      check(!err, $sformatf("trial %0d: overflow or peeling error", trial));
    end

    $display("mechanisms: dfs_stall=%0d simultaneous_requests=%0d multi_round_growth=%0d timeouts=%0d early_merge_cycles=%0d",
             n_stall, n_simul, n_multi_round, n_timeout, n_early);
    check(n_stall > 0, "DFS Engine never stalled on a busy edge stack");
    check(n_simul > 0, "select logic never saw simultaneous requests");
    check(n_multi_round > 0, "no syndrome needed more than one growth round");
    check(n_timeout > 0, "no decode ran into the timeout");
    check(n_early > 0, "the fusion stack never forced an early merge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
