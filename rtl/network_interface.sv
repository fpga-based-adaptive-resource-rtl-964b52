// network_interface: network interface (NI) of a node in the dual-layer ECC
// network.
//
// Transmit side: a message of N_FLITS 26-bit words is product-code encoded
// (pc_encoder), bit-interleaved across its flits (see interleave below) and
// sent to the router's local port as one packet: a head flit with source
// and destination, N_FLITS coded body flits and an empty
// Error History Flit (EHF) that the routers fill in on the way. The check
// columns (PCB + CoC) are kept; when the destination asks for them
// (retx_req_in) they are sent as a second, shorter packet marked as a check
// packet in its head flit. Flits are offered only while the router's local
// input is not full (router_nack = 0).
//
// Receive side: body flits of a data packet go to the data buffer, those of
// a check packet to the check buffer (the two NI buffers). The data buffer
// is de-interleaved back into coded columns. When the closing
// EHF arrives, the data packet is column decoded; if a flit is
// uncorrectable, the message is held and retx_req_out asks the source for
// the check packet, after which row and column decoding deliver it. The EHF
// is decoded as the OR of its history bits, masked by S1, i.e. only counted
// while hop-to-hop ECC is on. A packet with an end-to-end or EHF error is an
// error event for ni_error_monitor, which produces the DL/SL requests of the
// ECC mode switch.
//
// Packet structure, the EHF handling, the error counting, the deferred
// check packet and the use of interleaving follow the design; the
// interleaving map, field layouts, the one-outstanding-packet limit of each
// side and the request port protocol are this design's own. The check
// packet is not interleaved: its columns already sit in different rows of
// the array than a garbled data byte. A check packet is only meaningful for
// the last message sent, so a source must not start a new message before
// the previous one has been delivered, and a destination must not receive
// a second data packet while it waits for a check packet.
module network_interface
  import noc_pkg::*;
#(
  parameter logic [COORD_W-1:0] MY_X = '0,
  parameter logic [COORD_W-1:0] MY_Y = '0,
  parameter int N_FLITS = 4,
  parameter int TC      = 256,
  parameter int ERR_TH  = 4,
  localparam int DW     = 26,
  localparam int RR     = hamming_r(N_FLITS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // user transmit side
  input  logic               tx_valid,
  output logic               tx_ready,
  input  logic [DW-1:0]      tx_msg [N_FLITS],
  input  logic [COORD_W-1:0] tx_dst_x,
  input  logic [COORD_W-1:0] tx_dst_y,
  input  logic               retx_req_in,     // destination asks for the check packet
  // user receive side
  output logic               rx_valid,
  output logic [DW-1:0]      rx_msg [N_FLITS],
  output logic [COORD_W-1:0] rx_src_x,
  output logic [COORD_W-1:0] rx_src_y,
  output logic               rx_corrected,    // errors were seen and corrected
  output logic               rx_uncorrectable,
  output logic               retx_req_out,    // ask rx_src for the check packet
  // router local port
  output logic               to_router_valid,
  output flit_t              to_router_flit,
  input  logic               router_nack,
  input  logic               from_router_valid,
  input  flit_t              from_router_flit,
  // ECC mode
  input  logic               s1,
  output logic               dl_req,
  output logic               sl_req,
  output logic               err_event
);

  localparam int IW  = $clog2(N_FLITS + 1);
  localparam int STEP = FLIT_W / N_FLITS;   // row offset between sent words

  if (STEP % N_FLITS != 0) begin : g_bad_n_flits
    $error("network_interface: interleaver needs (32 / N_FLITS) to be a multiple of N_FLITS");
  end

  // Interleaver of the data packet: bit k of sent word t carries bit
  // (k + STEP*t) mod 32 of coded column (k + t) mod N_FLITS. Any byte of a
  // sent word then holds bits of 8 different rows, 8/N_FLITS per column, so
  // a byte garbled by the cipher stays within what column detection and
  // row correction can handle. The map is a bijection when STEP is a
  // multiple of N_FLITS.
  function automatic void interleave(input logic [FLIT_W-1:0] col [N_FLITS],
                                     output logic [FLIT_W-1:0] sent [N_FLITS]);
    for (int t = 0; t < N_FLITS; t++)
      for (int k = 0; k < FLIT_W; k++)
        sent[t][k] = col[(k + t) % N_FLITS][(k + STEP * t) % FLIT_W];
  endfunction

  function automatic void deinterleave(input logic [FLIT_W-1:0] sent [N_FLITS],
                                       output logic [FLIT_W-1:0] col [N_FLITS]);
    for (int t = 0; t < N_FLITS; t++)
      for (int k = 0; k < FLIT_W; k++)
        col[(k + t) % N_FLITS][(k + STEP * t) % FLIT_W] = sent[t][k];
  endfunction
  localparam int RIW = (RR > 1) ? $clog2(RR) : 1;
  localparam int NIW = (N_FLITS > 1) ? $clog2(N_FLITS) : 1;

  // ------------------------------------------------------------ transmit
  typedef enum logic [1:0] {T_IDLE, T_HEAD, T_BODY, T_EHF} tx_state_e;
  tx_state_e tx_state;

  logic [FLIT_W-1:0]  enc_coded [N_FLITS];
  logic [FLIT_W-1:0]  enc_check [RR];
  logic [FLIT_W-1:0]  tx_coded  [N_FLITS];
  logic [FLIT_W-1:0]  tx_check  [RR];
  logic [COORD_W-1:0] dst_x_q, dst_y_q;
  logic               tx_is_check, retx_pending;
  logic [IW-1:0]      tx_idx;
  logic               tx_go;
  logic [FLIT_W-1:0]  tx_sent   [N_FLITS];

  always_comb interleave(tx_coded, tx_sent);

  pc_encoder #(.N_FLITS(N_FLITS)) u_enc (
    .msg        (tx_msg),
    .coded_flits(enc_coded),
    .check_flits(enc_check)
  );

  assign tx_ready        = (tx_state == T_IDLE) && !retx_pending;
  assign to_router_valid = (tx_state != T_IDLE) && !router_nack;
  assign tx_go           = to_router_valid;

  always_comb begin
    to_router_flit = '{ftype: FT_EHF, data: '0};
    unique case (tx_state)
      T_HEAD: begin
        to_router_flit.ftype = FT_HEAD;
        to_router_flit.data[HEAD_CHECK_BIT] = tx_is_check;
        to_router_flit.data[15:0] = {MY_X, MY_Y, dst_x_q, dst_y_q};
      end
      T_BODY: begin
        to_router_flit.ftype = FT_BODY;
        to_router_flit.data  = tx_is_check ? tx_check[RIW'(tx_idx)]
                                           : tx_sent[NIW'(tx_idx)];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_state     <= T_IDLE;
      tx_is_check  <= 1'b0;
      retx_pending <= 1'b0;
      tx_idx       <= '0;
      dst_x_q      <= '0;
      dst_y_q      <= '0;
    end else begin
      if (retx_req_in) retx_pending <= 1'b1;
      unique case (tx_state)
        T_IDLE: begin
          if (retx_pending) begin
            tx_is_check <= 1'b1;
            tx_state    <= T_HEAD;
          end else if (tx_valid) begin
            tx_is_check <= 1'b0;
            dst_x_q     <= tx_dst_x;
            dst_y_q     <= tx_dst_y;
            tx_state    <= T_HEAD;
          end
        end
        T_HEAD: if (tx_go) begin
          tx_idx   <= '0;
          tx_state <= T_BODY;
        end
        T_BODY: if (tx_go) begin
          tx_idx <= tx_idx + 1'b1;
          if (int'(tx_idx) == (tx_is_check ? RR : N_FLITS) - 1) tx_state <= T_EHF;
        end
        T_EHF: if (tx_go) begin
          tx_state <= T_IDLE;
          if (tx_is_check) retx_pending <= retx_req_in;
        end
        default: tx_state <= T_IDLE;
      endcase
    end
  end

  // Coded and check columns of the message being (or last) sent.
  always_ff @(posedge clk) begin
    if (tx_state == T_IDLE && !retx_pending && tx_valid) begin
      tx_coded <= enc_coded;
      tx_check <= enc_check;
    end
  end

  // ------------------------------------------------------------- receive
  logic [FLIT_W-1:0]  data_buf [N_FLITS];   // as received (interleaved)
  logic [FLIT_W-1:0]  data_col [N_FLITS];   // coded columns
  logic [FLIT_W-1:0]  chk_buf  [RR];
  logic               rx_is_check, waiting;
  logic [IW-1:0]      rx_idx;
  logic [COORD_W-1:0] src_x_q, src_y_q;
  logic [DW-1:0]      dec_msg [N_FLITS];
  logic               dec_err, dec_unc;
  logic               ehf_err;
  logic               at_ehf;

  pc_decoder #(.N_FLITS(N_FLITS)) u_dec (
    .have_check   (rx_is_check),
    .coded_flits  (data_col),
    .check_flits  (chk_buf),
    .msg          (dec_msg),
    .err          (dec_err),
    .uncorrectable(dec_unc)
  );

  always_comb deinterleave(data_buf, data_col);

  assign at_ehf    = from_router_valid && from_router_flit.ftype == FT_EHF;
  assign ehf_err   = s1 && (|from_router_flit.data[EHF_HOPS-1:0]);
  assign err_event = at_ehf && (ehf_err || (!rx_is_check && dec_err));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_is_check      <= 1'b0;
      waiting          <= 1'b0;
      rx_idx           <= '0;
      src_x_q          <= '0;
      src_y_q          <= '0;
      rx_valid         <= 1'b0;
      rx_corrected     <= 1'b0;
      rx_uncorrectable <= 1'b0;
      retx_req_out     <= 1'b0;
      rx_src_x         <= '0;
      rx_src_y         <= '0;
    end else begin
      rx_valid     <= 1'b0;
      retx_req_out <= 1'b0;
      if (from_router_valid) begin
        unique case (from_router_flit.ftype)
          FT_HEAD: begin
            rx_is_check <= from_router_flit.data[HEAD_CHECK_BIT];
            src_x_q     <= from_router_flit.data[15:12];
            src_y_q     <= from_router_flit.data[11:8];
            rx_idx      <= '0;
          end
          FT_BODY: rx_idx <= rx_idx + 1'b1;
          FT_EHF: begin
            rx_src_x <= src_x_q;
            rx_src_y <= src_y_q;
            if (!rx_is_check) begin
              if (dec_unc) begin
                waiting      <= 1'b1;
                retx_req_out <= 1'b1;
              end else begin
                rx_valid         <= 1'b1;
                rx_corrected     <= dec_err;
                rx_uncorrectable <= 1'b0;
              end
            end else if (waiting) begin
              waiting          <= 1'b0;
              rx_valid         <= 1'b1;
              rx_corrected     <= 1'b1;
              rx_uncorrectable <= dec_unc;
            end
          end
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (from_router_valid && from_router_flit.ftype == FT_BODY) begin
      if (rx_is_check) begin
        if (int'(rx_idx) < RR) chk_buf[RIW'(rx_idx)] <= from_router_flit.data;
      end else begin
        if (int'(rx_idx) < N_FLITS) data_buf[NIW'(rx_idx)] <= from_router_flit.data;
      end
    end
    if (at_ehf && (!rx_is_check ? !dec_unc : waiting)) rx_msg <= dec_msg;
  end

  ni_error_monitor #(.TC(TC), .ERR_TH(ERR_TH)) u_mon (
    .clk      (clk),
    .rst_n    (rst_n),
    .err_event(err_event),
    .dl_req   (dl_req),
    .sl_req   (sl_req)
  );

endmodule
