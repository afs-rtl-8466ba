// afs_sc_dzc: Dynamic Zero Compression (DZC) of one syndrome round.
//
// The NS-bit syndrome round is cut into K = ceil(NS/W) blocks of W bits (the
// last block is padded with zeros).  The packet starts with the K-bit Zero
// Indicator Bit vector, ZIB[i] = 1 when block i is all zero, followed by the
// non-zero blocks in increasing block order, so its length is K + W x (number
// of non-zero blocks).  Purely combinational.  The scheme follows the syndrome
// compression description; the block width W = 8 and the bit order are this
// design's choices.  `payload` bits beyond `len` are zero.
module afs_sc_dzc
  import afs_pkg::*;
#(
  parameter int unsigned D  = 11,
  parameter int unsigned W  = 8,
  parameter int unsigned PW = sc_pw(D, W, 2, 2)
) (
  input  logic [2*D*(D-1)-1:0] syn,
  output logic [15:0]          len,
  output logic [PW-1:0]        payload
);
  localparam int unsigned NS = 2 * D * (D - 1);
  localparam int unsigned K  = (NS + W - 1) / W;

  logic [K*W-1:0] padded;
  assign padded = {{(K*W-NS){1'b0}}, syn};

  always_comb begin
    int unsigned pos;
    payload = '0;
    pos     = K;
    for (int unsigned i = 0; i < K; i++) begin
      payload[i] = (padded[i*W +: W] == '0);
      if (padded[i*W +: W] != '0) begin
        payload[pos +: W] = padded[i*W +: W];
        pos += W;
      end
    end
    len = 16'(pos);
  end

endmodule
