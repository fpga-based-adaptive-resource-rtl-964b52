// secded_dec: decoder matching secded_enc. Recomputes the check bits from
// the received data; the syndrome (recomputed XOR received) is the Hamming
// position of a single flipped bit. With EXT=1 the overall parity tells a
// single error (odd parity, corrected) from a double error (even parity,
// non-zero syndrome, flagged uncorrectable). With EXT=0 every non-zero
// syndrome is treated as a single error. Purely combinational.
module secded_dec
  import noc_pkg::*;
#(
  parameter int K   = 34,
  parameter bit EXT = 1'b1,
  localparam int R  = hamming_r(K)
) (
  input  logic [K-1:0] data,
  input  logic [R-1:0] check,
  input  logic         par,
  output logic [K-1:0] data_out,      // corrected data
  output logic [R-1:0] syndrome,
  output logic         err,           // any error detected
  output logic         uncorrectable  // error that could not be corrected
);

  logic [R-1:0] recomputed;
  logic         unused_par;
  logic         par_err;
  logic         single;
  logic [K-1:0] hit;            // syndrome equals the position of data bit i

  for (genvar i = 0; i < K; i++) begin : g_pos
    localparam int POS = hamming_data_pos(i);
    assign hit[i] = (syndrome == R'(POS));
  end

  secded_enc #(.K(K), .EXT(1'b0)) u_recalc (
    .data (data),
    .check(recomputed),
    .par  (unused_par)
  );

  always_comb begin
    syndrome = recomputed ^ check;
    par_err  = EXT ? (^data ^ ^check ^ par) : 1'b0;
    if (EXT) begin
      single        = par_err;
      err           = par_err || (syndrome != '0);
      uncorrectable = !par_err && (syndrome != '0);
      // A syndrome beyond the last used position cannot come from one error.
      if (par_err && (int'(syndrome) > K + R)) uncorrectable = 1'b1;
    end else begin
      single        = (syndrome != '0);
      err           = single;
      uncorrectable = int'(syndrome) > K + R;
    end
    data_out = (single && !uncorrectable) ? (data ^ hit) : data;
  end

endmodule
