// afs_sc_sparse: sparse representation of one syndrome round.
//
// Bit 0 of the packet is the Sparse Representation Bit (SRB): 1 when the whole
// round is zero, in which case the packet is that single bit.  Otherwise the
// SRB is 0 and the IW-bit indices (IW = ceil(log2 NS)) of the non-zero bits
// follow in increasing order, so the packet length is 1 + IW x (number of
// ones).  `len` always reports that length; only the indices that fit into the
// PW-bit payload are written, which is enough because the hybrid selector only
// sends a sparse packet when it is shorter than the DZC one.  Purely
// combinational.  The scheme follows the syndrome compression description; the
// index order and width are this design's choices.
module afs_sc_sparse
  import afs_pkg::*;
#(
  parameter int unsigned D  = 11,
  parameter int unsigned PW = sc_pw(D, 8, 2, 2)
) (
  input  logic [2*D*(D-1)-1:0] syn,
  output logic [15:0]          len,
  output logic [PW-1:0]        payload
);
  localparam int unsigned NS = 2 * D * (D - 1);
  localparam int unsigned IW = $clog2(NS);

  always_comb begin
    int unsigned pos;
    payload    = '0;
    payload[0] = (syn == '0);
    pos        = 1;
    for (int unsigned i = 0; i < NS; i++) begin
      if (syn[i]) begin
        if (pos + IW <= PW) payload[pos +: IW] = IW'(i);
        pos += IW;
      end
    end
    len = 16'(pos);
  end

endmodule
