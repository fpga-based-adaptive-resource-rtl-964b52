// noc_pkg: types and constants shared by the dual-layer ECC router and its
// network interface.
//
// A flit is 32 data bits plus a 2-bit flit type. The type field carries the
// flit identification bits that the hop decoder hands to the EHF identifier:
// it marks the head flit, the body flits and the Error History Flit (EHF),
// which is always the last flit of a packet. On a router-to-router link the
// 34-bit flit is protected by an extended Hamming (SEC-DED) code, giving a
// 41-bit link word. The 32-bit flit width and the 24-hop EHF capacity follow
// the router description; the field layout below is this design's own.
package noc_pkg;

  localparam int FLIT_W    = 32;            // uncoded flit width
  localparam int PAYLOAD_W = FLIT_W + 2;    // flit type + data
  localparam int HOP_R     = 6;             // Hamming check bits for 34 data bits
  localparam int LINK_W    = PAYLOAD_W + HOP_R + 1;  // + overall parity = 41

  localparam int NPORTS    = 5;

  // Port order as listed for the router: North, South, West, East, local.
  typedef enum logic [2:0] {
    P_NORTH = 3'd0,
    P_SOUTH = 3'd1,
    P_WEST  = 3'd2,
    P_EAST  = 3'd3,
    P_LOCAL = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FT_HEAD = 2'd0,
    FT_BODY = 2'd1,
    FT_CTRL = 2'd2,   // reserved
    FT_EHF  = 2'd3    // error history flit, closes the packet
  } flit_type_e;

  typedef struct packed {
    flit_type_e        ftype;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Error history flit: [31:24] number of hops already recorded,
  // [23:0] one bit per hop, 1 = the hop decoder of that hop saw an error.
  localparam int EHF_HOPS = 24;

  // Head flit: [3:0] destination y, [7:4] destination x,
  // [11:8] source y, [15:12] source x, [16] 1 = check packet (PCB + CoC).
  localparam int COORD_W = 4;
  localparam int HEAD_CHECK_BIT = 16;

  // ECC mode of the mode switch.
  typedef enum logic [1:0] {
    M_SL     = 2'd0,   // single layer: end-to-end ECC only
    M_PRE_DL = 2'd1,
    M_DL     = 2'd2,   // dual layer: hop-to-hop + end-to-end ECC
    M_PRE_SL = 2'd3
  } ecc_mode_e;

  // Mode of the cipher at an output port.
  typedef enum logic [1:0] {
    C_PASS    = 2'd0,
    C_ENCRYPT = 2'd1,
    C_DECRYPT = 2'd2
  } cipher_mode_e;

  // Number of Hamming check bits for k data bits: smallest r with 2^r >= k+r+1.
  function automatic int hamming_r(input int k);
    int r;
    r = 1;
    while ((1 << r) < k + r + 1) r++;
    return r;
  endfunction

  // Position (1-based, Hamming numbering) of data bit i: the i-th position
  // that is not a power of two. Starting from i + 1, every power of two at
  // or below the running position pushes it up by one.
  function automatic int hamming_data_pos(input int i);
    int p;
    p = i + 1;
    for (int j = 0; j < 31; j++)
      if ((1 << j) <= p) p++;
    return p;
  endfunction

endpackage
