// Reference product-code encoder shared by the product-code testbenches:
// column code = extended Hamming over 26 bits (5 check bits + parity),
// row code = Hamming over the 4 bits of a row (3 check bits).
function automatic logic [31:0] ref_col(input logic [25:0] d);
  logic [7:0] c;
  c = tb_ref_pkg::ham_check(64'(d), 26);
  return {^{d, c[4:0]}, c[4:0], d};
endfunction

function automatic void ref_pc(input logic [25:0] m [4], output logic [31:0] cf [4],
                               output logic [31:0] kf [3]);
  logic [25:0] pcb [3];
  logic [7:0]  rc;
  for (int f = 0; f < 4; f++) cf[f] = ref_col(m[f]);
  for (int r = 0; r < 26; r++) begin
    rc = tb_ref_pkg::ham_check(64'({m[3][r], m[2][r], m[1][r], m[0][r]}), 4);
    for (int c = 0; c < 3; c++) pcb[c][r] = rc[c];
  end
  for (int c = 0; c < 3; c++) kf[c] = ref_col(pcb[c]);
endfunction
