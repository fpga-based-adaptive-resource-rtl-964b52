// pc_encoder: end-to-end product code encoder of the network interface.
//
// A packet of N_FLITS data words is seen as an array whose columns are the
// flits. Stage 1 encodes each column with the column code (extended Hamming,
// 26 data bits -> 32-bit flit) to give the Flit Check Bits. Stage 2 encodes
// every row (bit r of all data words) with the row code (Hamming, N_FLITS
// data bits) to give the Packet Check Bits. Stage 3 encodes each PCB column
// with the column code to give the Checks on Checks. The coded data flits
// form the first packet; the PCB+CoC columns form the check packet, sent
// only when the receiver asks for it. The three stages follow the encoder
// description; both component codes and N_FLITS are this design's choices.
// Purely combinational. Both codes are systematic, so the 26 data bits of
// every coded flit are the message bits wired straight through; only the
// check bits are logic.
module pc_encoder
  import noc_pkg::*;
#(
  parameter int N_FLITS = 4,
  localparam int DW     = 26,                 // data bits per flit
  localparam int CR     = hamming_r(DW),      // column check bits (5)
  localparam int RR     = hamming_r(N_FLITS)  // row check bits (3)
) (
  input  logic [DW-1:0]     msg          [N_FLITS],
  output logic [FLIT_W-1:0] coded_flits  [N_FLITS],
  output logic [FLIT_W-1:0] check_flits  [RR]
);

  logic [N_FLITS-1:0] row_data [DW];
  logic [RR-1:0]      row_chk  [DW];
  logic [DW-1:0]      pcb      [RR];

  // Stage 1: column encoder per flit (FCB)
  for (genvar f = 0; f < N_FLITS; f++) begin : g_col
    logic [CR-1:0] fcb;
    logic          par;
    secded_enc #(.K(DW), .EXT(1'b1)) u_col (.data(msg[f]), .check(fcb), .par(par));
    assign coded_flits[f] = {par, fcb, msg[f]};
  end

  // Stage 2: row encoder per row (PCB)
  for (genvar r = 0; r < DW; r++) begin : g_row
    logic unused_par;
    for (genvar f = 0; f < N_FLITS; f++) begin : g_bit
      assign row_data[r][f] = msg[f][r];
    end
    secded_enc #(.K(N_FLITS), .EXT(1'b0)) u_row (
      .data(row_data[r]), .check(row_chk[r]), .par(unused_par));
    for (genvar c = 0; c < RR; c++) begin : g_pcb
      assign pcb[c][r] = row_chk[r][c];
    end
  end

  // Stage 3: column encoder on the PCB (CoC)
  for (genvar c = 0; c < RR; c++) begin : g_coc
    logic [CR-1:0] coc;
    logic          par;
    secded_enc #(.K(DW), .EXT(1'b1)) u_coc (.data(pcb[c]), .check(coc), .par(par));
    assign check_flits[c] = {par, coc, pcb[c]};
  end

endmodule
