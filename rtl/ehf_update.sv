// ehf_update: EHF update system of one router input port.
//
// The EHF identifier watches the flit identification bits from the hop
// decoder. While a packet passes, it remembers whether the decoder reported
// an error on any of its flits. When the packet's Error History Flit
// arrives, the selector writes that result (1 = error at this hop, 0 = none)
// into the history bit of the current hop, increments the hop count held in
// the EHF and forwards the flit to the FIFO; all other flits pass unchanged.
// The structure follows the EHF update diagram; the EHF field layout (hop
// count in [31:24], history in [23:0]) is this design's own. A route longer
// than 24 hops leaves the history full and unchanged. One state flip-flop;
// the flit path is combinational.
module ehf_update
  import noc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  flit_t payload,       // from the hop decoder
  input  logic  hop_err,       // decoder detected an error on this flit
  output flit_t out_payload    // to the input FIFO
);

  logic pkt_err;        // error seen on an earlier flit of this packet
  logic this_err;
  logic [7:0] hop_cnt;

  always_comb begin
    this_err    = pkt_err || hop_err;
    hop_cnt     = payload.data[31:24];
    out_payload = payload;
    if (payload.ftype == FT_EHF && int'(hop_cnt) < EHF_HOPS) begin
      out_payload.data[hop_cnt[4:0]] = this_err;
      out_payload.data[31:24]        = hop_cnt + 8'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt_err <= 1'b0;
    end else if (in_valid) begin
      pkt_err <= (payload.ftype == FT_EHF) ? 1'b0 : this_err;
    end
  end

endmodule
