// secded_enc: systematic Hamming encoder, optionally extended with an overall
// parity bit (SEC-DED). Shared by the hop-to-hop link code and by both
// component codes of the end-to-end product code.
//
// Data bit i occupies the i-th non-power-of-two position of the classic
// Hamming numbering; check bit j is the XOR of all data bits whose position
// has bit j set. The overall parity bit (EXT=1) makes the XOR of data, check
// and parity bits even. Purely combinational.
//   data  : K data bits
//   check : R = hamming_r(K) check bits
//   par   : overall parity (tied to 0 when EXT = 0)
module secded_enc
  import noc_pkg::*;
#(
  parameter int K   = 34,
  parameter bit EXT = 1'b1,
  localparam int R  = hamming_r(K)
) (
  input  logic [K-1:0] data,
  output logic [R-1:0] check,
  output logic         par
);

  // Hamming position of every data bit, fixed at elaboration
  logic [R-1:0] pos_of [K];
  for (genvar i = 0; i < K; i++) begin : g_pos
    localparam int POS = hamming_data_pos(i);
    assign pos_of[i] = R'(POS);
  end

  always_comb begin
    check = '0;
    for (int i = 0; i < K; i++) begin
      for (int j = 0; j < R; j++) begin
        if (pos_of[i][j]) check[j] = check[j] ^ data[i];
      end
    end
    par = EXT ? (^data ^ ^check) : 1'b0;
  end

endmodule
