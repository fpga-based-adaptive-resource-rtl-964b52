// pc_decoder: end-to-end product code decoder of the network interface.
//
// First step (have_check = 0): every received data flit is decoded by its
// own column decoder, which corrects one error and detects two per flit.
// If a flit is uncorrectable the receiver requests the check packet. Second
// step (have_check = 1): each of the 32 rows of the full array (data flits
// followed by the PCB/CoC flits) is corrected by a row decoder, then the
// array of column decoders decodes the data flits again. This corrects,
// for example, any two errors that fall into the same flit. err reports
// that any decoder saw an error; uncorrectable that errors remain that the
// active step could not correct. The two steps follow the decoder
// description; the codes and the row-then-column order are this design's
// choices. Purely combinational.
module pc_decoder
  import noc_pkg::*;
#(
  parameter int N_FLITS = 4,
  localparam int DW     = 26,
  localparam int CR     = hamming_r(DW),
  localparam int RR     = hamming_r(N_FLITS),
  localparam int NC     = N_FLITS + RR      // columns of the full array
) (
  input  logic              have_check,
  input  logic [FLIT_W-1:0] coded_flits [N_FLITS],
  input  logic [FLIT_W-1:0] check_flits [RR],
  output logic [DW-1:0]     msg         [N_FLITS],
  output logic              err,
  output logic              uncorrectable
);

  logic [FLIT_W-1:0] rowfixed [N_FLITS];   // data columns after row decoding
  logic [NC-1:0]     row_in   [FLIT_W];
  logic [N_FLITS-1:0] row_out [FLIT_W];
  logic [FLIT_W-1:0] row_err;
  logic [FLIT_W-1:0] row_unc;

  // Row decoders over the full array
  for (genvar r = 0; r < FLIT_W; r++) begin : g_row
    logic [RR-1:0] unused_syn;
    for (genvar f = 0; f < N_FLITS; f++) begin : g_d
      assign row_in[r][f] = coded_flits[f][r];
    end
    for (genvar c = 0; c < RR; c++) begin : g_c
      assign row_in[r][N_FLITS + c] = check_flits[c][r];
    end
    secded_dec #(.K(N_FLITS), .EXT(1'b0)) u_row (
      .data         (row_in[r][N_FLITS-1:0]),
      .check        (row_in[r][NC-1:N_FLITS]),
      .par          (1'b0),
      .data_out     (row_out[r]),
      .syndrome     (unused_syn),
      .err          (row_err[r]),
      .uncorrectable(row_unc[r])
    );
    for (genvar f = 0; f < N_FLITS; f++) begin : g_o
      assign rowfixed[f][r] = have_check ? row_out[r][f] : coded_flits[f][r];
    end
  end

  // Array of column decoders
  logic [N_FLITS-1:0] col_err, col_unc;
  for (genvar f = 0; f < N_FLITS; f++) begin : g_col
    logic [CR-1:0] unused_syn;
    secded_dec #(.K(DW), .EXT(1'b1)) u_col (
      .data         (rowfixed[f][DW-1:0]),
      .check        (rowfixed[f][DW +: CR]),
      .par          (rowfixed[f][FLIT_W-1]),
      .data_out     (msg[f]),
      .syndrome     (unused_syn),
      .err          (col_err[f]),
      .uncorrectable(col_unc[f])
    );
  end

  assign err           = (|col_err) || (have_check && (|row_err));
  assign uncorrectable = |col_unc;

  logic unused_unc;
  assign unused_unc = ^row_unc;

endmodule
