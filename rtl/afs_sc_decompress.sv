// afs_sc_decompress: decoder-side expansion of a compressed syndrome round.
//
// Inverts the three Syndrome Compression schemes: for DZC and Geo-Comp it
// walks the zero-indicator vector and takes the next W-bit (or tile) block
// from the payload for every block marked non-zero; for the sparse
// representation it sets the bit at each transmitted index (none when the SRB
// is 1).  The packet formats are those of afs_sc_dzc, afs_sc_sparse and
// afs_sc_geo.  The expansion is combinational and registered: `out_valid`
// follows `in_valid` by one cycle.  The receiving side is not detailed with
// the compression schemes; this unit is this design's inverse of them.
module afs_sc_decompress
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
  input  sc_scheme_t           in_scheme,
  input  logic [15:0]          in_len,
  input  logic [PW-1:0]        in_payload,
  output logic                 out_valid,
  output logic [2*D*(D-1)-1:0] syn
);
  localparam int unsigned R  = D;
  localparam int unsigned C  = D - 1;
  localparam int unsigned NS = 2 * D * (D - 1);
  localparam int unsigned K  = (NS + W - 1) / W;
  localparam int unsigned IW = $clog2(NS);
  localparam int unsigned TR = (R + GH - 1) / GH;
  localparam int unsigned TC = (C + GW - 1) / GW;
  localparam int unsigned KG = TR * TC;
  localparam int unsigned GB = 2 * GH * GW;
  localparam int unsigned MAXIDX = (PW - 1) / IW;

  logic [NS-1:0]  s_dzc, s_sp, s_geo, s_sel;
  logic [K*W-1:0] dzc_pad;

  // Dynamic zero compression.
  always_comb begin
    int unsigned pos;
    dzc_pad = '0;
    pos     = K;
    for (int unsigned i = 0; i < K; i++) begin
      if (!in_payload[i]) begin
        dzc_pad[i*W +: W] = in_payload[pos +: W];
        pos += W;
      end
    end
    s_dzc = dzc_pad[NS-1:0];
  end

  // Sparse representation.
  always_comb begin
    int unsigned cnt;
    s_sp = '0;
    cnt  = (int'(in_len) - 1) / IW;
    if (!in_payload[0]) begin
      for (int unsigned j = 0; j < MAXIDX; j++) begin
        if (j < cnt && int'(in_payload[1 + j*IW +: IW]) < NS) s_sp[in_payload[1 + j*IW +: IW]] = 1'b1;
      end
    end
  end

  // Geometry-based compression.
  always_comb begin
    int unsigned pos;
    logic [GB-1:0] blk;
    s_geo = '0;
    pos   = KG;
    for (int unsigned b = 0; b < KG; b++) begin
      blk = '0;
      if (!in_payload[b]) begin
        blk = in_payload[pos +: GB];
        pos += GB;
      end
      for (int unsigned i = 0; i < GH; i++) begin
        for (int unsigned j = 0; j < GW; j++) begin
          if ((b / TC)*GH + i < R && (b % TC)*GW + j < C) begin
            s_geo[((b / TC)*GH + i)*C + (b % TC)*GW + j]       = blk[i*GW + j];
            s_geo[R*C + ((b / TC)*GH + i)*C + (b % TC)*GW + j] = blk[GH*GW + i*GW + j];
          end
        end
      end
    end
  end

  always_comb begin
    unique case (in_scheme)
      SC_SPARSE: s_sel = s_sp;
      SC_GEO:    s_sel = s_geo;
      default:   s_sel = s_dzc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      syn       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) syn <= s_sel;
    end
  end

endmodule
