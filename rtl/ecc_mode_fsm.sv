// ecc_mode_fsm: ECC mode switch and mode propagation counter of a router.
//
// Four states: SL (single layer, end-to-end ECC only), Pre-DL, DL (dual
// layer, hop-to-hop ECC added) and Pre-SL. S1 = 1 in DL and Pre-SL, so that
// neighbours keep hop-to-hop ECC on; S1 = 0 in SL and Pre-DL. A DL request
// from the local network interface or from any neighbour moves SL to Pre-DL;
// only the local network-layer request for SL moves DL to Pre-SL, which
// prevents oscillation. The Pre states last T_PROP cycles, counted by the
// mode propagation counter, so a request can propagate through the network.
// A DL request during Pre-SL returns to DL; otherwise Pre-SL ends in SL.
// During Pre-DL the router forwards the DL request to its neighbours.
// The states, S1 values and the propagation counter follow the router
// description; T_PROP, the reset state (SL) and the request wires are this
// design's choices.
module ecc_mode_fsm
  import noc_pkg::*;
#(
  parameter int T_PROP = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       local_dl_req,   // NI: errors in Tc exceeded the threshold
  input  logic       local_sl_req,   // NI: a quiet Tc interval ended
  input  logic [3:0] nbr_dl_req,     // DL requests of the four neighbours
  output ecc_mode_e  mode,
  output logic       s1,
  output logic       dl_req_out      // DL request forwarded to neighbours
);

  localparam int CW = (T_PROP > 1) ? $clog2(T_PROP) : 1;

  logic [CW-1:0] prop_cnt;
  logic          prop_end;
  logic          any_dl;
  ecc_mode_e     mode_next;

  assign prop_end   = (int'(prop_cnt) == T_PROP - 1);
  assign any_dl     = local_dl_req || (|nbr_dl_req);
  assign s1         = (mode == M_DL) || (mode == M_PRE_SL);
  assign dl_req_out = local_dl_req || (mode == M_PRE_DL);

  always_comb begin
    mode_next = mode;
    unique case (mode)
      M_SL:     if (any_dl) mode_next = M_PRE_DL;
      M_PRE_DL: if (prop_end) mode_next = M_DL;
      M_DL:     if (local_sl_req && !local_dl_req) mode_next = M_PRE_SL;
      M_PRE_SL: if (any_dl) mode_next = M_DL;
                else if (prop_end) mode_next = M_SL;
      default:  mode_next = M_SL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= M_SL;
      prop_cnt <= '0;
    end else begin
      mode <= mode_next;
      if (mode_next != mode) prop_cnt <= '0;
      else if (!prop_end)    prop_cnt <= prop_cnt + 1'b1;
    end
  end

endmodule
