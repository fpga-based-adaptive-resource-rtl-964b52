// tb_network_interface: the NI's local-port output is looped back to its
// input through a channel that can delay flits (router NACK), flip bits in
// body flits and set EHF history bits. Checks: clean delivery with the
// source address; single errors corrected in the first step; a double error
// raises the retransmission request, the check packet is sent and the
// message is recovered; EHF history counts as an error only while S1 = 1;
// enough errors within Tc raise the DL request and a quiet interval gives
// the SL request; packet format (head, 4 bodies, EHF; check packet head bit).
module tb_network_interface;
  import noc_pkg::*;
  localparam int TC = 64, TH = 2;
  logic clk = 0, rst_n = 0;
  logic tx_valid, tx_ready, retx_req_in, rx_valid, rx_corrected, rx_unc, retx_req_out;
  logic [25:0] tx_msg [4], rx_msg [4];
  logic [3:0] rx_src_x, rx_src_y;
  logic to_router_valid, router_nack, from_router_valid, s1, dl_req, sl_req, err_event;
  flit_t to_router_flit, from_router_flit;
  int checks = 0, failures = 0;
  int flip_flit = -1, flip_bits = 0, ehf_bits = 0;
  int body_count = 0, n_err_events = 0, n_dl = 0, n_sl = 0, n_retx = 0;

  network_interface #(.MY_X(4'd1), .MY_Y(4'd2), .N_FLITS(4), .TC(TC), .ERR_TH(TH)) dut (
    .clk(clk), .rst_n(rst_n), .tx_valid(tx_valid), .tx_ready(tx_ready), .tx_msg(tx_msg),
    .tx_dst_x(4'd1), .tx_dst_y(4'd2), .retx_req_in(retx_req_in), .rx_valid(rx_valid),
    .rx_msg(rx_msg), .rx_src_x(rx_src_x), .rx_src_y(rx_src_y), .rx_corrected(rx_corrected),
    .rx_uncorrectable(rx_unc), .retx_req_out(retx_req_out), .to_router_valid(to_router_valid),
    .to_router_flit(to_router_flit), .router_nack(router_nack),
    .from_router_valid(from_router_valid), .from_router_flit(from_router_flit), .s1(s1),
    .dl_req(dl_req), .sl_req(sl_req), .err_event(err_event));

  always #5 clk = ~clk;

  // loopback channel with error injection, one cycle of delay
  always_ff @(posedge clk) begin
    from_router_valid <= to_router_valid;
    from_router_flit  <= to_router_flit;
    if (to_router_valid && to_router_flit.ftype == FT_BODY) begin
      if (body_count == flip_flit) from_router_flit.data <= to_router_flit.data ^ 32'(flip_bits);
      body_count <= body_count + 1;
    end
    if (to_router_valid && to_router_flit.ftype == FT_EHF) begin
      from_router_flit.data <= to_router_flit.data | 32'(ehf_bits);
      body_count <= 0;
    end
    if (to_router_valid && to_router_flit.ftype == FT_HEAD) begin
      checks++;
      if (to_router_flit.data[15:0] !== 16'h1212) failures++;
    end
  end
  // the router's local input is full one cycle in four
  always @(negedge clk) router_nack <= !rst_n || ($urandom % 4) == 0;

  always_ff @(posedge clk) begin
    if (err_event) n_err_events++;
    if (dl_req) n_dl++;
    if (sl_req) n_sl++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 8) $display("FAIL %s", what);
    end
  endtask

  // send one message and wait for its delivery (answering a retransmission
  // request when one comes); returns the number of requests seen
  task automatic xfer(input int ff, input int fb, input int eb, output int retx);
    logic [25:0] m [4];
    int t;
    for (int f = 0; f < 4; f++) m[f] = 26'($urandom);
    flip_flit = ff; flip_bits = fb; ehf_bits = eb;
    @(negedge clk);
    while (!tx_ready) @(negedge clk);
    tx_msg = m;
    tx_valid = 1;
    @(negedge clk);
    tx_valid = 0;
    retx = 0;
    t = 0;
    while (!rx_valid && t < 500) begin
      if (retx_req_out) begin
        retx++;
        flip_flit = -1;
        retx_req_in = 1;
        @(negedge clk);
        retx_req_in = 0;
      end else @(negedge clk);
      t++;
    end
    expect_(rx_valid && rx_msg == m && !rx_unc && rx_src_x == 1 && rx_src_y == 2, "delivery");
    @(negedge clk);
  endtask

  initial begin
    int r, e0;
    tx_valid = 0; retx_req_in = 0; s1 = 0;
    for (int f = 0; f < 4; f++) tx_msg[f] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // clean
    xfer(-1, 0, 0, r);
    expect_(r == 0 && !rx_corrected, "clean no retx");
    // single error
    xfer(2, 32'h0000_0400, 0, r);
    expect_(r == 0 && rx_corrected, "single corrected");
    // double error -> check packet
    xfer(1, 32'h0010_0001, 0, r);
    expect_(r == 1, "double -> retransmission");
    n_retx += r;
    // EHF masked with S1 = 0
    e0 = n_err_events;
    xfer(-1, 0, 1, r);
    expect_(n_err_events == e0, "EHF masked in SL");
    s1 = 1;
    xfer(-1, 0, 2, r);
    expect_(n_err_events == e0 + 1, "EHF counted in DL");
    // many errors within an interval -> DL request
    e0 = n_dl;
    repeat (4) xfer(-1, 0, 4, r);
    expect_(n_dl > e0, "dl request");
    // quiet intervals -> SL request
    e0 = n_sl;
    repeat (3 * TC) @(negedge clk);
    expect_(n_sl > e0, "sl request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
