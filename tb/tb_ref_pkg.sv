// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL: Simplified-DES from its permutation tables
// (1-based positions, bit 1 = MSB) and a Hamming encoder built from the
// parity-check matrix column by column.
package tb_ref_pkg;

  typedef int tab_t [];

  function automatic logic [31:0] permute(input logic [31:0] v, input int n_in,
                                          input int tab [], input int n_out);
    logic [31:0] r;
    r = '0;
    for (int i = 0; i < n_out; i++) r[n_out-1-i] = v[n_in - tab[i]];
    return r;
  endfunction

  function automatic void sdes_keys(input logic [9:0] key, output logic [7:0] k1,
                                    output logic [7:0] k2);
    int p10 [] = '{3, 5, 2, 7, 4, 10, 1, 9, 8, 6};
    int p8  [] = '{6, 3, 7, 4, 8, 5, 10, 9};
    logic [9:0] p;
    logic [4:0] l, r;
    p  = 10'(permute(32'(key), 10, p10, 10));
    l  = p[9:5];
    r  = p[4:0];
    l  = {l[3:0], l[4]};
    r  = {r[3:0], r[4]};
    k1 = 8'(permute(32'({l, r}), 10, p8, 8));
    l  = {l[2:0], l[4:3]};
    r  = {r[2:0], r[4:3]};
    k2 = 8'(permute(32'({l, r}), 10, p8, 8));
  endfunction

  function automatic logic [7:0] sdes_fk(input logic [7:0] b, input logic [7:0] sk);
    int ep [] = '{4, 1, 2, 3, 2, 3, 4, 1};
    int p4 [] = '{2, 4, 3, 1};
    int s0 [4][4] = '{'{1, 0, 3, 2}, '{3, 2, 1, 0}, '{0, 2, 1, 3}, '{3, 1, 3, 2}};
    int s1 [4][4] = '{'{0, 1, 2, 3}, '{2, 0, 1, 3}, '{3, 0, 1, 0}, '{2, 1, 0, 3}};
    logic [7:0] e;
    logic [3:0] s, f;
    e = 8'(permute(32'(b[3:0]), 4, ep, 8)) ^ sk;
    s[3:2] = 2'(s0[{e[7], e[4]}][{e[6], e[5]}]);
    s[1:0] = 2'(s1[{e[3], e[0]}][{e[2], e[1]}]);
    f = 4'(permute(32'(s), 4, p4, 4));
    return {b[7:4] ^ f, b[3:0]};
  endfunction

  function automatic logic [7:0] sdes(input logic [7:0] din, input logic [9:0] key,
                                      input bit decrypt);
    int ip  [] = '{2, 6, 3, 1, 4, 8, 5, 7};
    int ipi [] = '{4, 1, 3, 5, 7, 2, 8, 6};
    logic [7:0] k1, k2, ka, kb, b;
    sdes_keys(key, k1, k2);
    ka = decrypt ? k2 : k1;
    kb = decrypt ? k1 : k2;
    b = 8'(permute(32'(din), 8, ip, 8));
    b = sdes_fk(b, ka);
    b = {b[3:0], b[7:4]};
    b = sdes_fk(b, kb);
    return 8'(permute(32'(b), 8, ipi, 8));
  endfunction

  // Hamming check bits of k data bits: walk the codeword positions 1..n,
  // data bits fill the positions that are not powers of two, and every data
  // bit adds its position (its parity-check column) into the syndrome.
  function automatic logic [7:0] ham_check(input logic [63:0] data, input int k);
    logic [7:0] c;
    int d;
    c = '0;
    d = 0;
    for (int pos = 1; d < k; pos++) begin
      if ($countones(pos) != 1) begin
        if (data[d]) c ^= 8'(pos);
        d++;
      end
    end
    return c;
  endfunction

endpackage
