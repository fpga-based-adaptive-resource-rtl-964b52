// routing_encoder: hop-to-hop ECC encoder at a router output.
//
// When the router's mode bit S1 is 1 (dual-layer or pre-single-layer state)
// the 34-bit flit (type + data) is protected by an extended Hamming code:
// 6 check bits and an overall parity bit. When S1 is 0 the link carries the
// flit with the check bits at zero and the downstream decoder ignores them.
// Link word layout: {parity, check[5:0], flit[33:0]}. The hop code itself
// is only called a systematic linear code in the design; SEC-DED Hamming is
// this design's choice. Purely combinational.
module routing_encoder
  import noc_pkg::*;
(
  input  logic              ecc_on,
  input  flit_t             payload,
  output logic [LINK_W-1:0] word
);

  logic [HOP_R-1:0] check;
  logic             par;

  secded_enc #(.K(PAYLOAD_W), .EXT(1'b1)) u_enc (
    .data (payload),
    .check(check),
    .par  (par)
  );

  assign word = ecc_on ? {par, check, payload} : {1'b0, {HOP_R{1'b0}}, payload};

endmodule
