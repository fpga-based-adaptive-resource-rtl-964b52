// router_arbiter: switch allocation of the router (router control module).
//
// Each input presents a one-hot request for the output its current packet
// is routed to, and whether its front flit closes the packet (the EHF).
// Each output is granted to one input at a time, chosen round-robin, and
// stays granted to it until the closing flit has passed (wormhole
// switching). A flit moves only while the downstream router's NACK_in for
// that output is 0; otherwise the input FIFO holds it. Grants take effect in
// the same cycle (combinational); lock and round-robin state are registered.
// The arbiter and its use of NACK_in follow the router description; round
// robin and packet-long grants are this design's choices.
module router_arbiter
  import noc_pkg::*;
#(
  parameter int PORTS = NPORTS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PORTS-1:0] req  [PORTS],   // req[i][o]: input i wants output o
  input  logic [PORTS-1:0] tail,           // front flit of input i is the last
  input  logic [PORTS-1:0] nack_in,        // per output
  output logic [PORTS-1:0] grant [PORTS],  // grant[o][i]: output o connected to input i
  output logic [PORTS-1:0] xfer,           // per output: a flit moves this cycle
  output logic [PORTS-1:0] pop             // per input: its front flit leaves
);

  localparam int IW = (PORTS > 1) ? $clog2(PORTS) : 1;

  logic [PORTS-1:0] locked;
  logic [PORTS-1:0] owner [PORTS];
  logic [IW-1:0]    rr_last [PORTS];
  logic [IW-1:0]    gnt_idx [PORTS];

  function automatic logic [PORTS-1:0] column(input int o);
    logic [PORTS-1:0] c;
    for (int i = 0; i < PORTS; i++) c[i] = req[i][o];
    return c;
  endfunction

  always_comb begin
    pop  = '0;
    xfer = '0;
    for (int o = 0; o < PORTS; o++) begin
      grant[o]   = '0;
      gnt_idx[o] = '0;
      if (locked[o]) begin
        for (int i = 0; i < PORTS; i++) begin
          if (owner[o][i]) begin
            grant[o][i] = 1'b1;
            gnt_idx[o]  = IW'(i);
          end
        end
      end else begin
        // search from the input after the last one served
        for (int n = PORTS; n >= 1; n--) begin
          if (req[(int'(rr_last[o]) + n) % PORTS][o]) begin
            grant[o]    = '0;
            grant[o][(int'(rr_last[o]) + n) % PORTS] = 1'b1;
            gnt_idx[o]  = IW'((int'(rr_last[o]) + n) % PORTS);
          end
        end
      end
      xfer[o] = |(grant[o] & column(o)) && !nack_in[o];
      if (xfer[o]) pop[gnt_idx[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= '0;
      for (int o = 0; o < PORTS; o++) begin
        owner[o]   <= '0;
        rr_last[o] <= IW'(PORTS - 1);
      end
    end else begin
      for (int o = 0; o < PORTS; o++) begin
        if (xfer[o]) begin
          if (tail[gnt_idx[o]]) begin
            locked[o]  <= 1'b0;
            rr_last[o] <= gnt_idx[o];
          end else begin
            locked[o] <= 1'b1;
            owner[o]  <= grant[o];
          end
        end
      end
    end
  end

  // An output is connected to at most one input, and an input is popped by
  // at most one output.
  for (genvar o = 0; o < PORTS; o++) begin : g_chk
    a_onehot_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant[o]));
  end
  a_single_pop: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(xfer) == $countones(pop));

endmodule
