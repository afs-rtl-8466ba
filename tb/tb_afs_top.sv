// tb_afs_top: end-to-end test of the decoding subsystem (distance 5, four
// logical qubits in two conjoined decoder blocks).
//
// The testbench keeps its own model of every qubit: data errors of both types
// accumulate round by round (phenomenological noise), and each round's
// syndrome is the syndrome of the accumulated errors with some measurement
// outcomes flipped.  The rounds go through compression, the link,
// decompression and the round buffer into the decoder blocks.  Checks:
//   * phase 1 (rounds spaced out): every logical cycle the decoder accepts
//     equals the testbench's own round-difference syndrome, and the peeled
//     edges of each qubit and type explain that syndrome exactly;
//   * the link-bit counter equals the sum of the reference packet lengths
//     (shortest scheme plus a 2-bit header) and the raw-bit counter NS per
//     qubit and round;
//   * phase 2 (rounds back to back): the decoder falls behind, so the round
//     buffer reports a backlog, yet what it accepts is still decoded
//     consistently;
//   * no stack overflow or peeling error.
// Mechanisms counted (each must occur): each compression scheme, a backlog,
// a timeout, a DFS stall, a memory waiting at the select logic while the DFS Engine is busy, an early
// merge in a Graph Generator.
module tb_afs_top;
  import afs_pkg::*;
  import tb_sc_ref_pkg::*;

  localparam int D = 5, L = 4, N = 2;
  localparam int C = D - 1, RC = D * (D - 1), NS = 2 * RC, NLAT = D * RC;
  localparam int NDATA = D * D + (D - 1) * (D - 1);
  localparam int CYCLES1 = 12, CYCLES2 = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              rnd_valid = 0;
  logic [NS-1:0]     rnd_syn [L];
  logic [NDATA-1:0]  frame_x [L];
  logic [NDATA-1:0]  frame_z [L];
  logic [L-1:0]      dec_done, timeout, backlog;
  logic              err;
  logic [39:0]       link_bits, raw_bits;

  afs_top #(.D(D), .L(L), .N(N), .TIMEOUT_CYCLES(600), .FUSE_DEPTH(16),
            .RT_DEPTH(128), .ES_DEPTH(128)) dut (
    .clk, .rst_n, .rnd_valid, .rnd_syn, .frame_x, .frame_z, .dec_done, .timeout, .backlog,
    .err, .link_bits, .raw_bits
  );

  int checks = 0, failures = 0;
  int n_scheme [3] = '{0, 0, 0};
  int n_backlog = 0, n_timeout = 0, n_stall = 0, n_simul = 0, n_early = 0, n_decoded = 0;
  longint exp_link = 0, exp_raw = 0;
  longint lat_sum = 0;
  int lat_n = 0, lat_max = 0;
  bit phase1 = 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- testbench geometry (X-type graph; Z uses the same) -----
  function automatic void ends2d(int r, int c, int dir, output int a, output int b);
    a = r * C + c;
    case (dir)
      0: b = (c == C - 1) ? -1 : r * C + c + 1;
      1: b = -1;
      default: b = (r + 1) * C + c;
    endcase
  endfunction

  function automatic void ends3d(int owner, int dir, output int a, output int b);
    int c, r, t;
    c = owner % C;
    r = (owner / C) % D;
    t = owner / RC;
    a = owner;
    case (dir)
      0: b = (c == C - 1) ? -1 : owner + 1;
      1: b = -1;
      2: b = owner + C;
      default: b = owner + RC;
    endcase
  endfunction

  // ---------------- qubit model ----------------
  bit [RC-1:0]   errsyn [L][2];   // syndrome of the accumulated data errors
  bit [NS-1:0]   prev_meas [L];
  bit [NLAT-1:0] exp_cyc [L][2];  // round-difference syndrome of the current cycle
  bit [NLAT-1:0] last_cyc [L][2]; // of the last completed cycle
  int            round_in_cycle = 0;

  task automatic send_round(input int derr, input int merr);
    for (int q = 0; q < L; q++) begin
      bit [NS-1:0] meas;
      for (int xz = 0; xz < 2; xz++) begin
        for (int e = 0; e < derr; e++) begin
          int r, c, dir, a, b;
          r = $urandom_range(D - 1);
          c = $urandom_range(C - 1);
          dir = $urandom_range(2);
          if (dir == 1 && c != 0) dir = 0;
          if (dir == 2 && r == D - 1) dir = 0;
          ends2d(r, c, dir, a, b);
          errsyn[q][xz][a] ^= 1'b1;
          if (b >= 0) errsyn[q][xz][b] ^= 1'b1;
        end
      end
      meas = {errsyn[q][1], errsyn[q][0]};
      for (int e = 0; e < merr; e++) meas[$urandom_range(NS - 1)] ^= 1'b1;
      begin
        bit [NS-1:0] diff;
        diff = meas ^ prev_meas[q];
        exp_cyc[q][0][round_in_cycle * RC +: RC] = diff[RC-1:0];
        exp_cyc[q][1][round_in_cycle * RC +: RC] = diff[NS-1:RC];
      end
      prev_meas[q] = meas;
      rnd_syn[q] = meas;
      begin
        bits_t s, p;
        int ld, ls, lg, le, es;
        s = '0;
        s[NS-1:0] = meas;
        ref_dzc(D, 8, s, p, ld);
        ref_sparse(D, s, p, ls);
        ref_geo(D, 2, 2, s, p, lg);
        es = 0; le = ld;
        if (ls < le) begin es = 1; le = ls; end
        if (lg < le) begin es = 2; le = lg; end
        exp_link += 2 + le;
        exp_raw  += NS;
        n_scheme[es]++;
      end
    end
    @(negedge clk);
    rnd_valid = 1;
    @(negedge clk);
    rnd_valid = 0;
    round_in_cycle++;
    if (round_in_cycle == D) begin
      round_in_cycle = 0;
      last_cyc = exp_cyc;
    end
  endtask

  // ---------------- decoder monitors ----------------
  bit [NLAT-1:0] acc_syn [L][2];
  bit [NLAT-1:0] par [L][2];
  bit            pending [L];

  for (genvar q = 0; q < L; q++) begin : g_mon
    always @(posedge clk) begin
      // A decode may end in the cycle before the next hand-over: finish it first.
      if (rst_n && dec_done[q]) begin
        check(pending[q], $sformatf("qubit %0d: decode done without a logical cycle", q));
        for (int xz = 0; xz < 2; xz++) begin
          if (par[q][xz] != acc_syn[q][xz])
            $display("  t=%0t q=%0d xz=%0d syn=%0d par=%0d diff=%0d", $time, q, xz,
                     $countones(acc_syn[q][xz]), $countones(par[q][xz]),
                     $countones(acc_syn[q][xz] ^ par[q][xz]));
          check(par[q][xz] == acc_syn[q][xz],
                $sformatf("qubit %0d %s: correction does not explain the syndrome", q,
                          xz ? "Z" : "X"));
        end
        pending[q] = 0;
        n_decoded++;
      end
      if (rst_n && dut.rb_valid[q] && dut.rb_ready[q]) begin
        acc_syn[q][0] = dut.rb_syn_x[q];
        acc_syn[q][1] = dut.rb_syn_z[q];
        par[q][0] = '0;
        par[q][1] = '0;
        pending[q] = 1;
        if (phase1) begin
          check(acc_syn[q][0] == last_cyc[q][0] && acc_syn[q][1] == last_cyc[q][1],
                $sformatf("qubit %0d: accepted syndrome differs from the sent rounds", q));
        end
      end
      if (rst_n && backlog[q]) n_backlog++;
      if (rst_n && timeout[q]) n_timeout++;
    end
  end

  for (genvar b = 0; b < L / N; b++) begin : g_bmon
    logic [15:0] stall_prev = '0;
    always @(posedge clk) begin
      for (int i = 0; i < N; i++)
        if (rst_n && dec_done[b * N + i] && phase1) begin
          lat_sum += dut.g_blk[b].lat[i];
          lat_n++;
          if (dut.g_blk[b].lat[i] > lat_max) lat_max = dut.g_blk[b].lat[i];
        end
      if (rst_n && dut.g_blk[b].cv) begin
        int a, e, q, xz;
        q  = b * N + int'(dut.g_blk[b].ctag[7:2]);
        xz = int'(dut.g_blk[b].ctag[0]);
        ends3d(int'(dut.g_blk[b].cown), int'(dut.g_blk[b].cdir), a, e);
        par[q][xz][a] ^= 1'b1;
        if (e >= 0) par[q][xz][e] ^= 1'b1;
      end
      if (rst_n && dut.g_blk[b].stalls != stall_prev && dut.g_blk[b].stalls != 0) n_stall++;
      stall_prev <= dut.g_blk[b].stalls;
      if (rst_n && dut.g_blk[b].u_blk.m_req != 0 && dut.g_blk[b].u_blk.dfs_busy) n_simul++;
      if (rst_n && (dut.g_blk[b].u_blk.g_q[0].u_grgen.mid_pass ||
                    dut.g_blk[b].u_blk.g_q[1].u_grgen.mid_pass)) n_early++;
    end
  end

  initial begin
    for (int q = 0; q < L; q++) begin
      rnd_syn[q] = '0;
      prev_meas[q] = '0;
      errsyn[q][0] = '0;
      errsyn[q][1] = '0;
      pending[q] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // Phase 1: one round every 1500 cycles, enough for any decode here.
    for (int cyc = 0; cyc < CYCLES1; cyc++) begin
      for (int r = 0; r < D; r++) begin
        int derr, merr;
        case (cyc % 4)
          0: begin derr = 0; merr = $urandom_range(0, 1); end
          1: begin derr = $urandom_range(0, 1); merr = $urandom_range(0, 1); end
          2: begin derr = 1; merr = 3; end
          default: begin derr = 3; merr = 12; end
        endcase
        // Every fourth cycle starts from a clean code state, as if the data
        // qubits had been corrected, so that sparse syndromes occur too.
        if (cyc % 4 == 0 && r == 0)
          for (int q = 0; q < L; q++) begin
            errsyn[q][0] = '0;
            errsyn[q][1] = '0;
          end
        send_round(derr, merr);
        repeat (1500) @(posedge clk);
      end
    end
    repeat (20) @(posedge clk);
    check(64'(link_bits) == 64'(exp_link), $sformatf("link bits %0d expected %0d", link_bits, exp_link));
    check(64'(raw_bits) == 64'(exp_raw), $sformatf("raw bits %0d expected %0d", raw_bits, exp_raw));
    $display("phase 1: %0d decodes, compression ratio %0.2f, decode latency mean %0.1f max %0d cycles",
             n_decoded, real'(raw_bits) / real'(link_bits), real'(lat_sum) / real'(lat_n), lat_max);

    // Phase 2: back-to-back rounds with many errors.
    phase1 = 0;
    for (int cyc = 0; cyc < CYCLES2; cyc++) begin
      for (int r = 0; r < D; r++) begin
        send_round(2, 6);
        repeat (8) @(posedge clk);
      end
    end
    repeat (30000) @(posedge clk);

    check(!err, "stack overflow or peeling error reported");
    $display("mechanisms: dzc=%0d sparse=%0d geo=%0d backlog=%0d timeout=%0d dfs_stall=%0d waiting_requests=%0d early_merge_cycles=%0d decodes=%0d",
             n_scheme[0], n_scheme[1], n_scheme[2], n_backlog, n_timeout, n_stall, n_simul,
             n_early, n_decoded);
    check(n_scheme[0] > 0, "DZC never chosen");
    check(n_scheme[1] > 0, "sparse representation never chosen");
    check(n_scheme[2] > 0, "Geo-Comp never chosen");
    check(n_backlog > 0, "no backlog occurred");
    check(n_timeout > 0, "no timeout occurred");
    check(n_stall > 0, "no DFS stall occurred");
    check(n_simul > 0, "no memory waiting at the select logic while the DFS Engine is busy");
    check(n_early > 0, "no early merge occurred");
    check(n_decoded >= CYCLES1 * L, "too few logical cycles decoded");
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
