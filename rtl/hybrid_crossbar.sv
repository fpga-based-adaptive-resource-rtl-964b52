// hybrid_crossbar: the router's PORTS x PORTS switch, built from 2x2
// parallel/cross-over elements.
//
// The elements form a PORTS x PORTS grid. Input i enters row i from the
// left, output j leaves column j at the bottom. Element (i,j) passes row
// and column straight through (IH = 0) unless output j is granted to input
// i, in which case it crosses (IH = 1) and turns row i down into column j.
// The crossbar switching selector is the mapping from the arbiter's grant
// matrix to the IH bit of every element. An output with no grant delivers
// zero. The use of 2x2 parallel/cross elements follows the design; the grid
// arrangement is this design's choice. Purely combinational.
module hybrid_crossbar
  import noc_pkg::*;
#(
  parameter int PORTS = NPORTS,
  parameter int W     = PAYLOAD_W
) (
  input  logic [PORTS-1:0] grant [PORTS],  // grant[o][i]
  input  logic [W-1:0]     din   [PORTS],
  output logic [W-1:0]     dout  [PORTS]
);

  // Each element owns the wires it drives: h = to its right, v = below it.
  for (genvar i = 0; i < PORTS; i++) begin : g_row
    for (genvar j = 0; j < PORTS; j++) begin : g_col
      logic [W-1:0] h, v, left, above;
      logic         ih;                  // crossbar switching selector output
      assign ih = grant[j][i];
      if (j == 0) begin : g_l0
        assign left = din[i];
      end else begin : g_l
        assign left = g_row[i].g_col[j-1].h;
      end
      if (i == 0) begin : g_a0
        assign above = '0;
      end else begin : g_a
        assign above = g_row[i-1].g_col[j].v;
      end
      crossbar_2x2 #(.W(W)) u_elem (
        .ia(left),
        .ib(above),
        .ih(ih),
        .oa(h),
        .ob(v)
      );
    end
  end

  for (genvar j = 0; j < PORTS; j++) begin : g_out
    assign dout[j] = g_row[PORTS-1].g_col[j].v;
  end

endmodule
