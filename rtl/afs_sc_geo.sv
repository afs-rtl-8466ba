// afs_sc_geo: geometry-based compression (Geo-Comp) of one syndrome round.
//
// A zero-compression scheme whose blocks follow the surface-code lattice: the
// d x (d-1) ancilla grid is tiled into GH x GW tiles, and each block holds the
// X-type and the Z-type syndrome bits of one tile together (X bits of the tile
// row by row, then Z bits; positions outside the lattice read as 0).  Errors
// flip neighbouring ancillas, and a Y error flips both types in the same
// neighbourhood, so the non-zero bits of one error tend to fall into one
// block.  The packet is the KG-bit zero-indicator vector (1 = tile all zero)
// followed by the non-zero blocks in tile order (row-major over the tiles).
// Purely combinational.  The idea follows the syndrome compression
// description; the 2 x 2 tile and the bit order are this design's choices.
module afs_sc_geo
  import afs_pkg::*;
#(
  parameter int unsigned D  = 11,
  parameter int unsigned GH = 2,
  parameter int unsigned GW = 2,
  parameter int unsigned PW = sc_pw(D, 8, GH, GW)
) (
  input  logic [2*D*(D-1)-1:0] syn,
  output logic [15:0]          len,
  output logic [PW-1:0]        payload
);
  localparam int unsigned R   = D;
  localparam int unsigned C   = D - 1;
  localparam int unsigned TR  = (R + GH - 1) / GH;
  localparam int unsigned TC  = (C + GW - 1) / GW;
  localparam int unsigned KG  = TR * TC;
  localparam int unsigned GB  = 2 * GH * GW;

  logic [GB-1:0] blk [KG];

  always_comb begin
    for (int unsigned tr = 0; tr < TR; tr++) begin
      for (int unsigned tc = 0; tc < TC; tc++) begin
        blk[tr*TC + tc] = '0;
        for (int unsigned i = 0; i < GH; i++) begin
          for (int unsigned j = 0; j < GW; j++) begin
            if (tr*GH + i < R && tc*GW + j < C) begin
              blk[tr*TC + tc][i*GW + j]         = syn[(tr*GH + i)*C + tc*GW + j];
              blk[tr*TC + tc][GH*GW + i*GW + j] = syn[R*C + (tr*GH + i)*C + tc*GW + j];
            end
          end
        end
      end
    end
  end

  always_comb begin
    int unsigned pos;
    payload = '0;
    pos     = KG;
    for (int unsigned b = 0; b < KG; b++) begin
      payload[b] = (blk[b] == '0);
      if (blk[b] != '0) begin
        payload[pos +: GB] = blk[b];
        pos += GB;
      end
    end
    len = 16'(pos);
  end

endmodule
