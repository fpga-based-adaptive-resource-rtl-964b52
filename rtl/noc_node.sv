// noc_node: one node of the dual-layer ECC network on chip: a five-port
// router and its network interface, joined at the router's local port.
//
// The four neighbour links (indexed North, South, West, East) are brought
// out as 41-bit link words with valid and NACK, together with the mode
// signals exchanged between neighbours: S1 (this node's hop-to-hop ECC is
// on) and the DL request. On the user side a message of N_FLITS 26-bit
// words is sent to (tx_dst_x, tx_dst_y) and received messages come out with
// their source. The retransmission request for the check packet travels
// outside the network in this design: retx_req_out of the receiving node is
// to be delivered to retx_req_in of the source node. Nodes are tiled into a
// mesh by connecting East of (x,y) to West of (x+1,y) and North of (x,y) to
// South of (x,y+1). All parameters keep their defaults in a full-size build.
module noc_node
  import noc_pkg::*;
#(
  parameter logic [COORD_W-1:0] MY_X = '0,
  parameter logic [COORD_W-1:0] MY_Y = '0,
  parameter int FIFO_DEPTH = 4,
  parameter int T_PROP     = 16,
  parameter int N_FLITS    = 4,
  parameter int TC         = 256,
  parameter int ERR_TH     = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [9:0]         key,
  // neighbour links
  input  logic [LINK_W-1:0]  link_in_word  [4],
  input  logic [3:0]         link_in_valid,
  output logic [3:0]         link_nack_out,
  output logic [LINK_W-1:0]  link_out_word [4],
  output logic [3:0]         link_out_valid,
  input  logic [3:0]         link_nack_in,
  input  logic [3:0]         s1_in,
  input  logic [3:0]         nbr_dl_req,
  output logic               s1_out,
  output logic               dl_req_out,
  output ecc_mode_e          mode,
  // user side
  input  logic               tx_valid,
  output logic               tx_ready,
  input  logic [25:0]        tx_msg [N_FLITS],
  input  logic [COORD_W-1:0] tx_dst_x,
  input  logic [COORD_W-1:0] tx_dst_y,
  input  logic               retx_req_in,
  output logic               rx_valid,
  output logic [25:0]        rx_msg [N_FLITS],
  output logic [COORD_W-1:0] rx_src_x,
  output logic [COORD_W-1:0] rx_src_y,
  output logic               rx_corrected,
  output logic               rx_uncorrectable,
  output logic               retx_req_out,
  // monitoring
  output logic [NPORTS-1:0]  hop_err,
  output logic [NPORTS-1:0]  hop_uncorrectable,
  output logic               err_event
);

  logic [LINK_W-1:0] r_in_word  [NPORTS];
  logic [LINK_W-1:0] r_out_word [NPORTS];
  logic [NPORTS-1:0] r_in_valid, r_nack_out, r_out_valid, r_nack_in;

  logic  ni_valid;
  flit_t ni_flit;
  logic  dl_req, sl_req;

  for (genvar p = 0; p < 4; p++) begin : g_link
    assign r_in_word[p]     = link_in_word[p];
    assign link_out_word[p] = r_out_word[p];
  end
  assign r_in_word[P_LOCAL] = {{(LINK_W-PAYLOAD_W){1'b0}}, ni_flit};
  assign r_in_valid         = {ni_valid, link_in_valid};
  assign link_nack_out      = r_nack_out[3:0];
  assign link_out_valid     = r_out_valid[3:0];
  assign r_nack_in          = {1'b0, link_nack_in};   // the NI always accepts

  router #(
    .MY_X(MY_X), .MY_Y(MY_Y), .FIFO_DEPTH(FIFO_DEPTH), .T_PROP(T_PROP)
  ) u_router (
    .clk              (clk),
    .rst_n            (rst_n),
    .key              (key),
    .in_word          (r_in_word),
    .in_valid         (r_in_valid),
    .nack_out         (r_nack_out),
    .out_word         (r_out_word),
    .out_valid        (r_out_valid),
    .nack_in          (r_nack_in),
    .s1_in            (s1_in),
    .nbr_dl_req       (nbr_dl_req),
    .local_dl_req     (dl_req),
    .local_sl_req     (sl_req),
    .s1_out           (s1_out),
    .dl_req_out       (dl_req_out),
    .mode             (mode),
    .hop_err          (hop_err),
    .hop_uncorrectable(hop_uncorrectable)
  );

  network_interface #(
    .MY_X(MY_X), .MY_Y(MY_Y), .N_FLITS(N_FLITS), .TC(TC), .ERR_TH(ERR_TH)
  ) u_ni (
    .clk              (clk),
    .rst_n            (rst_n),
    .tx_valid         (tx_valid),
    .tx_ready         (tx_ready),
    .tx_msg           (tx_msg),
    .tx_dst_x         (tx_dst_x),
    .tx_dst_y         (tx_dst_y),
    .retx_req_in      (retx_req_in),
    .rx_valid         (rx_valid),
    .rx_msg           (rx_msg),
    .rx_src_x         (rx_src_x),
    .rx_src_y         (rx_src_y),
    .rx_corrected     (rx_corrected),
    .rx_uncorrectable (rx_uncorrectable),
    .retx_req_out     (retx_req_out),
    .to_router_valid  (ni_valid),
    .to_router_flit   (ni_flit),
    .router_nack      (r_nack_out[P_LOCAL]),
    .from_router_valid(r_out_valid[P_LOCAL]),
    .from_router_flit (flit_t'(r_out_word[P_LOCAL][PAYLOAD_W-1:0])),
    .s1               (s1_out),
    .dl_req           (dl_req),
    .sl_req           (sl_req),
    .err_event        (err_event)
  );

endmodule
