// sdes_keygen: subkey generator of the router's 8-bit block cipher.
//
// The 10-bit initial key is permuted by P10 and split into two 5-bit halves.
// Each half is rotated left by one (LS-1) and the ten bits pass through P8 to
// give K1. The LS-1 outputs are rotated left by two more (LS-2) and P8 gives
// K2. This structure follows the key generation flow of the design; the
// contents of P10 and P8 are the standard Simplified-DES tables, as the
// design only names them. Bit 1 of a table is the most significant bit.
// Purely combinational. Permutations and rotations only move bits, so the
// whole key schedule is a fixed wiring: after synthesis each subkey bit is
// one key bit, with no gates. That is the nature of this key schedule, not
// an omission.
module sdes_keygen (
  input  logic [9:0] key,
  output logic [7:0] k1,
  output logic [7:0] k2
);

  // P10 = 3 5 2 7 4 10 1 9 8 6
  function automatic logic [9:0] p10(input logic [9:0] k);
    return {k[7], k[5], k[8], k[3], k[6], k[0], k[9], k[1], k[2], k[4]};
  endfunction

  // P8 = 6 3 7 4 8 5 10 9 (drops bits 1 and 2)
  function automatic logic [7:0] p8(input logic [9:0] k);
    return {k[4], k[7], k[3], k[6], k[2], k[5], k[0], k[1]};
  endfunction

  function automatic logic [4:0] rol5(input logic [4:0] v, input int n);
    logic [9:0] d;
    d = {v, v} << n;
    return d[9:5];
  endfunction

  logic [9:0] perm;
  logic [4:0] l1, r1, l2, r2;

  always_comb begin
    perm = p10(key);
    l1   = rol5(perm[9:5], 1);   // LS-1
    r1   = rol5(perm[4:0], 1);
    l2   = rol5(l1, 2);          // LS-2
    r2   = rol5(r1, 2);
    k1   = p8({l1, r1});
    k2   = p8({l2, r2});
  end

endmodule
