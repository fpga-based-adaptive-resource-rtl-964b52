// info_extractor: information extractor of an input port.
//
// Takes the destination address from a head flit and returns the output
// port, one-hot in the order North, South, West, East, local. The design
// names this unit but not its routing function; dimension-ordered XY
// routing on a 2D mesh is this design's choice: first along x (East for a
// larger x), then along y (North for a larger y), local when both match.
// Purely combinational.
module info_extractor
  import noc_pkg::*;
#(
  parameter logic [COORD_W-1:0] MY_X = '0,
  parameter logic [COORD_W-1:0] MY_Y = '0
) (
  input  logic [FLIT_W-1:0] head_data,
  output logic [NPORTS-1:0] out_port
);

  logic [COORD_W-1:0] dx, dy;

  always_comb begin
    dy       = head_data[COORD_W-1:0];
    dx       = head_data[2*COORD_W-1:COORD_W];
    out_port = '0;
    if (dx > MY_X)      out_port[P_EAST]  = 1'b1;
    else if (dx < MY_X) out_port[P_WEST]  = 1'b1;
    else if (dy > MY_Y) out_port[P_NORTH] = 1'b1;
    else if (dy < MY_Y) out_port[P_SOUTH] = 1'b1;
    else                out_port[P_LOCAL] = 1'b1;
  end

endmodule
