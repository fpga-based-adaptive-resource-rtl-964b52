// sdes_cipher: 8-bit block cipher of the router (Simplified DES).
//
// Encryption runs IP, the round function fK with K1, the half swap SW, fK
// with K2 and the inverse permutation IP^-1. Decryption is the same network
// with K2 used before K1. fK(L,R) = (L xor F(R,K), R), where F expands R
// with E/P, XORs the subkey, looks up the S-boxes S0 and S1 and permutes
// with P4. The order of stages follows the cipher flow of the design; the
// tables (IP, E/P, S0, S1, P4) are the standard Simplified-DES ones. Bit 1
// of a table is the most significant bit. Purely combinational.
module sdes_cipher (
  input  logic       decrypt,   // 0: encrypt, 1: decrypt
  input  logic [7:0] din,
  input  logic [7:0] k1,
  input  logic [7:0] k2,
  output logic [7:0] dout
);

  // IP = 2 6 3 1 4 8 5 7
  function automatic logic [7:0] ip(input logic [7:0] b);
    return {b[6], b[2], b[5], b[7], b[4], b[0], b[3], b[1]};
  endfunction

  // IP^-1 = 4 1 3 5 7 2 8 6
  function automatic logic [7:0] ip_inv(input logic [7:0] b);
    return {b[4], b[7], b[5], b[3], b[1], b[6], b[0], b[2]};
  endfunction

  function automatic logic [1:0] sbox(input logic [31:0] table_, input logic [3:0] b);
    // row = bits 1,4 ; column = bits 2,3 ; table packed row-major, 2 bits each
    logic [1:0] row, col;
    row = {b[3], b[0]};
    col = {b[2], b[1]};
    return table_[30 - 2 * (4 * int'(row) + int'(col)) +: 2];
  endfunction

  // S0 = 1 0 3 2 / 3 2 1 0 / 0 2 1 3 / 3 1 3 2
  localparam logic [31:0] S0 = {2'd1, 2'd0, 2'd3, 2'd2,
                                2'd3, 2'd2, 2'd1, 2'd0,
                                2'd0, 2'd2, 2'd1, 2'd3,
                                2'd3, 2'd1, 2'd3, 2'd2};
  // S1 = 0 1 2 3 / 2 0 1 3 / 3 0 1 0 / 2 1 0 3
  localparam logic [31:0] S1 = {2'd0, 2'd1, 2'd2, 2'd3,
                                2'd2, 2'd0, 2'd1, 2'd3,
                                2'd3, 2'd0, 2'd1, 2'd0,
                                2'd2, 2'd1, 2'd0, 2'd3};

  function automatic logic [3:0] f_func(input logic [3:0] r, input logic [7:0] sk);
    logic [7:0] ep;
    logic [1:0] s0, s1;
    logic [3:0] s;
    // E/P = 4 1 2 3 2 3 4 1
    ep = {r[0], r[3], r[2], r[1], r[2], r[1], r[0], r[3]} ^ sk;
    s0 = sbox(S0, ep[7:4]);
    s1 = sbox(S1, ep[3:0]);
    s  = {s0, s1};
    // P4 = 2 4 3 1
    return {s[2], s[0], s[1], s[3]};
  endfunction

  function automatic logic [7:0] fk(input logic [7:0] b, input logic [7:0] sk);
    return {b[7:4] ^ f_func(b[3:0], sk), b[3:0]};
  endfunction

  logic [7:0] ka, kb, s_ip, s_f1, s_sw, s_f2;

  always_comb begin
    ka   = decrypt ? k2 : k1;
    kb   = decrypt ? k1 : k2;
    s_ip = ip(din);
    s_f1 = fk(s_ip, ka);
    s_sw = {s_f1[3:0], s_f1[7:4]};
    s_f2 = fk(s_sw, kb);
    dout = ip_inv(s_f2);
  end

endmodule
