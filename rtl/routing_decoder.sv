// routing_decoder: hop-to-hop ECC decoder at a router input.
//
// Decodes the 41-bit link word written by routing_encoder. When the upstream
// router signals S1 = 1 the syndrome is computed, a single error is
// corrected and a double error is flagged. The corrected flit type is the
// flit identification information used by the EHF identifier, and err is
// the per-hop error indication written into the error history. When S1 = 0
// the flit passes unchecked and no error is reported. Purely combinational.
module routing_decoder
  import noc_pkg::*;
(
  input  logic              ecc_on,
  input  logic [LINK_W-1:0] word,
  output flit_t             payload,
  output flit_type_e        id_bits,
  output logic [HOP_R-1:0]  syndrome,
  output logic              err,
  output logic              uncorrectable
);

  logic [PAYLOAD_W-1:0] corrected;
  logic [HOP_R-1:0]     syn;
  logic                 e, u;

  secded_dec #(.K(PAYLOAD_W), .EXT(1'b1)) u_dec (
    .data         (word[PAYLOAD_W-1:0]),
    .check        (word[PAYLOAD_W +: HOP_R]),
    .par          (word[LINK_W-1]),
    .data_out     (corrected),
    .syndrome     (syn),
    .err          (e),
    .uncorrectable(u)
  );

  always_comb begin
    payload       = ecc_on ? flit_t'(corrected) : flit_t'(word[PAYLOAD_W-1:0]);
    id_bits       = payload.ftype;
    syndrome      = ecc_on ? syn : '0;
    err           = ecc_on && e;
    uncorrectable = ecc_on && u;
  end

endmodule
