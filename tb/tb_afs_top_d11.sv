// tb_afs_top_d11: complete logical cycles through the decoding subsystem at
// the default distance 11 and every other default parameter, except that the
// subsystem holds two logical qubits (one decoder block) instead of 1000, so
// that the simulation stays short.
//
// In each of CYCLES logical cycles every qubit gets one random X-type and one
// random Z-type data-qubit error in round 3 of the 11 rounds, and no
// measurement errors.  After each cycle the testbench waits until every qubit
// has reported `dec_done`, then checks that the X and Z Pauli frames changed by
// exactly the injected errors (a single error is always corrected exactly).
// At the end it checks that no timeout, backlog or error was reported and
// that the link carried fewer bits than the raw syndromes.  It also reports
// the decode latency in cycles, which the timeout check bounds by the 350 ns
// (1400-cycle) budget.
module tb_afs_top_d11;
  import afs_pkg::*;

  localparam int D = 11, L = 2, CYCLES = 20, C = D - 1, RC = D * C, NS = 2 * RC;
  localparam int NDATA = D * D + C * C;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              rnd_valid = 0;
  logic [NS-1:0]     rnd_syn [L];
  logic [NDATA-1:0]  frame_x [L];
  logic [NDATA-1:0]  frame_z [L];
  logic [L-1:0]      dec_done, timeout, backlog;
  logic              err;
  logic [39:0]       link_bits, raw_bits;

  afs_top #(.L(L)) dut (.*);

  int checks = 0, failures = 0, n_done = 0, n_timeout = 0, n_backlog = 0;
  int ex [L], ez [L];
  int lat_max = 0;
  longint lat_sum = 0;
  bit [NS-1:0] meas [L];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Random data-qubit error of one type: returns its index and flips the
  // syndrome bits of its end points in s (offset selects X or Z bits).
  function automatic int inject(inout bit [NS-1:0] s, input int off);
    int r, c, kind;
    r = $urandom_range(D - 1);
    c = $urandom_range(C - 1);
    kind = $urandom_range(2);
    if (kind == 1 && c != 0) kind = 0;
    if (kind == 2 && r == D - 1) kind = 0;
    case (kind)
      0: begin
        s[off + r * C + c] ^= 1'b1;
        if (c != C - 1) s[off + r * C + c + 1] ^= 1'b1;
        return r * C + c;
      end
      1: begin
        s[off + r * C] ^= 1'b1;
        return RC + r;
      end
      default: begin
        s[off + r * C + c] ^= 1'b1;
        s[off + (r + 1) * C + c] ^= 1'b1;
        return RC + D + r * C + c;
      end
    endcase
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      n_done    <= n_done + $countones(dec_done);
      n_timeout <= n_timeout + $countones(timeout);
      n_backlog <= n_backlog + $countones(backlog);
    end
  end

  initial begin
    for (int q = 0; q < L; q++) begin
      meas[q] = '0;
      rnd_syn[q] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      logic [NDATA-1:0] fx0 [L];
      logic [NDATA-1:0] fz0 [L];
      int done0;
      for (int q = 0; q < L; q++) begin
        fx0[q] = frame_x[q];
        fz0[q] = frame_z[q];
      end
      done0 = n_done;
      for (int r = 0; r < D; r++) begin
        if (r == 3)
          for (int q = 0; q < L; q++) begin
            ex[q] = inject(meas[q], 0);
            ez[q] = inject(meas[q], RC);
          end
        for (int q = 0; q < L; q++) rnd_syn[q] = meas[q];
        rnd_valid = 1;
        @(negedge clk);
        rnd_valid = 0;
        repeat (3) @(negedge clk);
      end
      while (n_done < done0 + L) @(negedge clk);
      repeat (3) @(negedge clk);
      for (int q = 0; q < L; q++) begin
        logic [NDATA-1:0] wx, wz;
        wx = '0;
        wz = '0;
        wx[ex[q]] = 1'b1;
        wz[ez[q]] = 1'b1;
        check((frame_x[q] ^ fx0[q]) == wx, $sformatf("cycle %0d qubit %0d: X frame", cyc, q));
        check((frame_z[q] ^ fz0[q]) == wz, $sformatf("cycle %0d qubit %0d: Z frame", cyc, q));
        if (int'(dut.g_blk[0].lat[q]) > lat_max) lat_max = int'(dut.g_blk[0].lat[q]);
        lat_sum += dut.g_blk[0].lat[q];
      end
    end
    check(n_done == CYCLES * L, "every qubit decoded once per cycle");
    check(n_timeout == 0, "timeout");
    check(n_backlog == 0, "backlog");
    check(!err, "error flag");
    check(link_bits < raw_bits, "no compression");
    $display("decoded %0d logical cycles, compression ratio %0.1f, latency mean %0.1f max %0d cycles",
             n_done, real'(raw_bits) / real'(link_bits), real'(lat_sum) / real'(n_done), lat_max);
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
