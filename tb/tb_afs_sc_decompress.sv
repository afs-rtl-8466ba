// tb_afs_sc_decompress: checks the decoder-side expansion (distance 11).  Each
// syndrome round is encoded with the reference DZC, sparse and Geo-Comp formats
// in turn (sparse only when its indices fit the payload); the unit must return
// the original round one cycle later.
module tb_afs_sc_decompress;
  import afs_pkg::*;
  import tb_sc_ref_pkg::*;
  localparam int D = 11, W = 8;
  localparam int NS = 2 * D * (D - 1);
  localparam int PW = sc_pw(D, W, 2, 2);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid = 0, out_valid;
  sc_scheme_t    in_scheme = SC_DZC;
  logic [15:0]   in_len = '0;
  logic [PW-1:0] in_payload = '0;
  logic [NS-1:0] syn;
  int checks = 0, failures = 0;

  afs_sc_decompress #(.D(D)) dut (.clk, .rst_n, .in_valid, .in_scheme, .in_len, .in_payload,
                                  .out_valid, .syn);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      bits_t s, p;
      int l, sch;
      sch = t % 3;
      s = rand_round(D, (sch == 1) ? $urandom_range(0, 25) : $urandom_range(0, 120));
      case (sch)
        0: ref_dzc(D, W, s, p, l);
        1: ref_sparse(D, s, p, l);
        default: ref_geo(D, 2, 2, s, p, l);
      endcase
      @(negedge clk);
      in_scheme  = sc_scheme_t'(sch);
      in_len     = 16'(l);
      in_payload = p[PW-1:0];
      in_valid   = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || syn != s[NS-1:0]) begin
        failures++;
        $display("FAIL: round %0d scheme %0d not restored", t, sch);
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
