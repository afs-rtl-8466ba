// afs_sc_compress: hybrid Syndrome Compression of one syndrome round.
//
// Runs dynamic zero compression, the sparse representation and geometry-based
// compression side by side on the same round and sends the shortest packet,
// i.e. the one with the highest compression ratio (on equal length DZC wins
// over sparse and sparse over Geo-Comp).  A packet is the 2-bit scheme
// identifier plus `len` payload bits, so 2 + len bits cross the link instead
// of NS = 2d(d-1).  The three encoders are combinational; the chosen packet is
// registered, so `out_valid` follows `in_valid` by one cycle.  Choosing the
// best of the three per round follows the syndrome compression description;
// the header, the tie order and the output register are this design's choices.
module afs_sc_compress
  import afs_pkg::*;
#(
  parameter int unsigned D  = 11,
  parameter int unsigned W  = 8,
  parameter int unsigned GH = 2,
  parameter int unsigned GW = 2,
  parameter int unsigned PW = sc_pw(D, W, GH, GW)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [2*D*(D-1)-1:0] syn,
  output logic                 out_valid,
  output sc_scheme_t           out_scheme,
  output logic [15:0]          out_len,
  output logic [PW-1:0]        out_payload
);
  logic [15:0]   len_dzc, len_sp, len_geo;
  logic [PW-1:0] pl_dzc, pl_sp, pl_geo;

  afs_sc_dzc    #(.D(D), .W(W), .PW(PW))             u_dzc (.syn, .len(len_dzc), .payload(pl_dzc));
  afs_sc_sparse #(.D(D), .PW(PW))                    u_sp  (.syn, .len(len_sp),  .payload(pl_sp));
  afs_sc_geo    #(.D(D), .GH(GH), .GW(GW), .PW(PW))  u_geo (.syn, .len(len_geo), .payload(pl_geo));

  sc_scheme_t    best;
  logic [15:0]   best_len;
  logic [PW-1:0] best_pl;

  always_comb begin
    best     = SC_DZC;
    best_len = len_dzc;
    best_pl  = pl_dzc;
    if (len_sp < best_len) begin
      best     = SC_SPARSE;
      best_len = len_sp;
      best_pl  = pl_sp;
    end
    if (len_geo < best_len) begin
      best     = SC_GEO;
      best_len = len_geo;
      best_pl  = pl_geo;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_scheme  <= SC_DZC;
      out_len     <= '0;
      out_payload <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_scheme  <= best;
        out_len     <= best_len;
        out_payload <= best_pl;
      end
    end
  end

endmodule
