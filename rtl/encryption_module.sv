// encryption_module: cipher stage of one router output port.
//
// The 32-bit data field of a body flit is split into four bytes and each
// byte goes through the 8-bit block cipher with the subkeys K1/K2. Head
// flits and error history flits pass unchanged, so that routing and error
// accounting keep working downstream. The router selects the mode per
// output: packets that enter the network at the local port are encrypted
// when they leave it, and packets that leave the network at the local port
// are decrypted, so data is only ever in clear inside the end nodes. The
// placement after the switch follows the router's block diagram; the
// per-byte split and the choice of which flits and ports are ciphered are
// this design's own. Purely combinational.
module encryption_module
  import noc_pkg::*;
(
  input  cipher_mode_e mode,
  input  flit_t        flit_in,
  input  logic [7:0]   k1,
  input  logic [7:0]   k2,
  output flit_t        flit_out
);

  logic [FLIT_W-1:0] ciphered;

  for (genvar b = 0; b < FLIT_W / 8; b++) begin : g_byte
    sdes_cipher u_cipher (
      .decrypt(mode == C_DECRYPT),
      .din    (flit_in.data[8*b +: 8]),
      .k1     (k1),
      .k2     (k2),
      .dout   (ciphered[8*b +: 8])
    );
  end

  always_comb begin
    flit_out = flit_in;
    if (flit_in.ftype == FT_BODY && mode != C_PASS) flit_out.data = ciphered;
  end

endmodule
