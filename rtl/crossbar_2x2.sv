// crossbar_2x2: 2x2 switch element of the hybrid crossbar.
//
// Two input port controllers (IPC) attach the internal header IH, which
// carries the forwarding route, to the words on inputs a and b. The control
// unit reads IH: IH = 0 connects the element in parallel (a->a, b->b),
// IH = 1 crosses it over (a->b, b->a). The output port controllers (OPC)
// strip IH again. IPC/OPC/control unit structure and the meaning of IH
// follow the 2x2 crossbar description. Purely combinational.
module crossbar_2x2 #(
  parameter int W = 34
) (
  input  logic [W-1:0] ia,
  input  logic [W-1:0] ib,
  input  logic         ih,
  output logic [W-1:0] oa,
  output logic [W-1:0] ob
);

  typedef struct packed {
    logic         ih;
    logic [W-1:0] data;
  } internal_t;

  internal_t ipc_a, ipc_b, opc_a, opc_b;

  always_comb begin
    // input port controllers
    ipc_a = '{ih: ih, data: ia};
    ipc_b = '{ih: ih, data: ib};
    // control unit
    if (ipc_a.ih) begin
      opc_a = ipc_b;
      opc_b = ipc_a;
    end else begin
      opc_a = ipc_a;
      opc_b = ipc_b;
    end
    // output port controllers
    oa = opc_a.data;
    ob = opc_b.data;
  end

endmodule
