// tb_afs_sc_compress: checks the hybrid syndrome compressor (distance 11).
// For rounds of varying density it works out the three packet lengths with
// the reference formats, expects the shortest scheme (ties: DZC, then sparse,
// then Geo-Comp), its length and payload one cycle after the input, and
// requires every scheme to win at least once.  It also reports the mean
// compression ratio NS / (2 + len) of the sparse-dominated rounds.
module tb_afs_sc_compress;
  import afs_pkg::*;
  import tb_sc_ref_pkg::*;
  localparam int D = 11, W = 8;
  localparam int NS = 2 * D * (D - 1);
  localparam int PW = sc_pw(D, W, 2, 2);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid = 0, out_valid;
  logic [NS-1:0] syn = '0;
  sc_scheme_t    out_scheme;
  logic [15:0]   out_len;
  logic [PW-1:0] out_payload;
  int checks = 0, failures = 0;
  int wins [3] = '{0, 0, 0};
  longint sent = 0, raw = 0;

  afs_sc_compress #(.D(D)) dut (.clk, .rst_n, .in_valid, .syn, .out_valid, .out_scheme,
                                .out_len, .out_payload);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      bits_t s, pd, ps, pg, pe;
      int ld, ls, lg, le, es;
      case (t % 4)
        0: s = rand_round(D, $urandom_range(0, 3));
        1: s = rand_round(D, $urandom_range(4, 20));
        2: begin
          // One Y error: an X and a Z ancilla of the same neighbourhood, plus
          // their neighbours, all in one tile region.
          int r, c;
          s = '0;
          r = $urandom_range(D - 2);
          c = $urandom_range(D - 3);
          s[r * (D - 1) + c] = 1;
          s[r * (D - 1) + c + 1] = 1;
          s[D * (D - 1) + r * (D - 1) + c] = 1;
          s[D * (D - 1) + (r + 1) * (D - 1) + c] = 1;
          for (int k = 0; k < 12; k++) begin
            int rr, cc;
            rr = $urandom_range(D - 1);
            cc = $urandom_range(D - 2);
            s[rr * (D - 1) + cc] = 1;
            s[D * (D - 1) + rr * (D - 1) + cc] = 1;
          end
        end
        default: s = rand_round(D, $urandom_range(60, 200));
      endcase
      ref_dzc(D, W, s, pd, ld);
      ref_sparse(D, s, ps, ls);
      ref_geo(D, 2, 2, s, pg, lg);
      es = 0; le = ld; pe = pd;
      if (ls < le) begin es = 1; le = ls; pe = ps; end
      if (lg < le) begin es = 2; le = lg; pe = pg; end
      @(negedge clk);
      syn = s[NS-1:0];
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(out_scheme) != es || int'(out_len) != le ||
          out_payload != pe[PW-1:0]) begin
        failures++;
        $display("FAIL: round %0d scheme %0d/%0d len %0d/%0d", t, out_scheme, es, out_len, le);
      end
      wins[es]++;
      if (t % 4 == 0) begin
        sent += 2 + le;
        raw  += NS;
      end
    end
    $display("scheme wins: DZC=%0d sparse=%0d Geo-Comp=%0d; sparse rounds ratio=%0.1f",
             wins[0], wins[1], wins[2], real'(raw) / real'(sent));
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (wins[i] == 0) begin
        failures++;
        $display("FAIL: scheme %0d never selected", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
