// router: five-port router with adaptive dual-layer error control.
//
// Per input port (North, South, West, East, local) a flit passes the
// routing decoder (hop-to-hop SEC-DED decoder, active when the upstream
// router's S1 is 1), the EHF update system (error history extraction) and
// a FIFO. The information extractor routes the head flit (XY routing); the
// router control module (arbiter) grants outputs packet by packet and stops
// while an output's NACK_in is 1; the crossbar switching selector sets the
// 2x2 elements of the hybrid crossbar; per output the encryption module
// enciphers data leaving the source node or deciphers data arriving at the
// destination node, and the routing encoder adds hop-to-hop check bits
// while this router's S1 is 1. The ECC mode switch (SL / Pre-DL / DL /
// Pre-SL) is driven by the local NI's requests and the neighbours' DL
// requests. The local port never uses hop-to-hop ECC.
//
// Timing: a flit written into an input FIFO at one clock edge can leave on
// the output link (combinational from the FIFO) in the next cycle, so the
// router has one cycle of latency per hop. NACK (FIFO full) is registered.
// The chain of units follows the router block diagram and the EHF update
// diagram; routing function, FIFO depth and link word format are this
// design's choices.
module router
  import noc_pkg::*;
#(
  parameter logic [COORD_W-1:0] MY_X = '0,
  parameter logic [COORD_W-1:0] MY_Y = '0,
  parameter int FIFO_DEPTH = 4,
  parameter int T_PROP     = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [9:0]        key,
  // links, indexed by port_e
  input  logic [LINK_W-1:0] in_word   [NPORTS],
  input  logic [NPORTS-1:0] in_valid,
  output logic [NPORTS-1:0] nack_out,
  output logic [LINK_W-1:0] out_word  [NPORTS],
  output logic [NPORTS-1:0] out_valid,
  input  logic [NPORTS-1:0] nack_in,
  // ECC mode signals; neighbours indexed North, South, West, East
  input  logic [3:0]        s1_in,
  input  logic [3:0]        nbr_dl_req,
  input  logic              local_dl_req,
  input  logic              local_sl_req,
  output logic              s1_out,
  output logic              dl_req_out,
  output ecc_mode_e         mode,
  // per-input hop decoder status (for monitoring)
  output logic [NPORTS-1:0] hop_err,
  output logic [NPORTS-1:0] hop_uncorrectable
);

  logic [7:0] k1, k2;

  sdes_keygen u_keygen (.key(key), .k1(k1), .k2(k2));

  ecc_mode_fsm #(.T_PROP(T_PROP)) u_mode (
    .clk         (clk),
    .rst_n       (rst_n),
    .local_dl_req(local_dl_req),
    .local_sl_req(local_sl_req),
    .nbr_dl_req  (nbr_dl_req),
    .mode        (mode),
    .s1          (s1_out),
    .dl_req_out  (dl_req_out)
  );

  // ------------------------------------------------------------ inputs
  flit_t              fifo_out  [NPORTS];
  logic [NPORTS-1:0]  fifo_empty;
  logic [NPORTS-1:0]  pop;
  logic [NPORTS-1:0]  req       [NPORTS];
  logic [NPORTS-1:0]  tail;
  logic [NPORTS-1:0]  route_q   [NPORTS];
  logic [PAYLOAD_W-1:0] xbar_in [NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    flit_t             dec_flit, ehf_flit;
    flit_type_e        id_bits;
    logic [HOP_R-1:0]  syndrome;
    logic              err, unc;
    logic [NPORTS-1:0] route_head;

    routing_decoder u_dec (
      .ecc_on       ((p == P_LOCAL) ? 1'b0 : s1_in[p % 4]),
      .word         (in_word[p]),
      .payload      (dec_flit),
      .id_bits      (id_bits),
      .syndrome     (syndrome),
      .err          (err),
      .uncorrectable(unc)
    );

    assign hop_err[p]           = in_valid[p] && err;
    assign hop_uncorrectable[p] = in_valid[p] && unc;

    ehf_update u_ehf (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_valid   (in_valid[p]),
      .payload    (dec_flit),
      .hop_err    (err),
      .out_payload(ehf_flit)
    );

    input_fifo #(.DEPTH(FIFO_DEPTH), .W(PAYLOAD_W)) u_fifo (
      .clk  (clk),
      .rst_n(rst_n),
      .push (in_valid[p]),
      .din  (ehf_flit),
      .pop  (pop[p]),
      .dout (fifo_out[p]),
      .empty(fifo_empty[p]),
      .full (nack_out[p])
    );

    info_extractor #(.MY_X(MY_X), .MY_Y(MY_Y)) u_route (
      .head_data(fifo_out[p].data),
      .out_port (route_head)
    );

    always_comb begin
      if (fifo_empty[p])                     req[p] = '0;
      else if (fifo_out[p].ftype == FT_HEAD) req[p] = route_head;
      else                                   req[p] = route_q[p];
    end
    assign tail[p]    = !fifo_empty[p] && fifo_out[p].ftype == FT_EHF;
    assign xbar_in[p] = fifo_out[p];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                                          route_q[p] <= '0;
      else if (pop[p] && fifo_out[p].ftype == FT_HEAD)     route_q[p] <= route_head;
    end

    logic unused_dec;
    assign unused_dec = ^{id_bits, syndrome};
  end

  // ------------------------------------------------- switch allocation
  logic [NPORTS-1:0] grant [NPORTS];
  logic [NPORTS-1:0] xfer;

  router_arbiter #(.PORTS(NPORTS)) u_arb (
    .clk    (clk),
    .rst_n  (rst_n),
    .req    (req),
    .tail   (tail),
    .nack_in(nack_in),
    .grant  (grant),
    .xfer   (xfer),
    .pop    (pop)
  );

  logic [PAYLOAD_W-1:0] xbar_out [NPORTS];

  hybrid_crossbar #(.PORTS(NPORTS), .W(PAYLOAD_W)) u_xbar (
    .grant(grant),
    .din  (xbar_in),
    .dout (xbar_out)
  );

  // ----------------------------------------------------------- outputs
  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    cipher_mode_e cmode;
    flit_t        ciph;

    always_comb begin
      if (o != P_LOCAL && grant[o][P_LOCAL])       cmode = C_ENCRYPT;
      else if (o == P_LOCAL && !grant[o][P_LOCAL]) cmode = C_DECRYPT;
      else                                         cmode = C_PASS;
    end

    encryption_module u_cipher (
      .mode    (cmode),
      .flit_in (flit_t'(xbar_out[o])),
      .k1      (k1),
      .k2      (k2),
      .flit_out(ciph)
    );

    routing_encoder u_enc (
      .ecc_on (s1_out && (o != P_LOCAL)),
      .payload(ciph),
      .word   (out_word[o])
    );

    assign out_valid[o] = xfer[o];
  end

endmodule
