// tb_noc_node_full: one node with every parameter at its default (no
// parameter list), taken through complete message transfers.
//
// A behavioural neighbour on the East link acts as a mirror: every flit
// the node sends East is queued and sent back into the node's East input,
// with the destination of head flits rewritten to the node itself and the
// hop check bits recomputed (they are sent only while the mirror's S1,
// here the node's own S1, is 1). A message addressed to (1,0) therefore
// leaves through the encryption module and routing encoder, returns through
// the routing decoder, EHF update and decryption, and is decoded by the NI.
// Messages addressed to (0,0) take the local-to-local path. The mirror
// refuses flits at random (NACK) and flips bits in returning body flits of
// data packets: singles while single layer, singles and doubles while dual
// layer. The retransmission request of the NI is looped back to its own
// retx_req_in, as the node is the source of every message. Dual layer is
// requested by asserting the East neighbour's DL request for a while;
// afterwards the node must return to single layer on its own.
// Every delivery is compared with the message sent; hop corrections,
// retransmissions, NACK stalls and all four modes must occur.
module tb_noc_node_full;
  import noc_pkg::*;
  import tb_ref_pkg::*;
  localparam logic [9:0] KEY = 10'h2c7;
  logic clk = 0, rst_n = 0;

  logic [LINK_W-1:0] li [4], lo [4];
  logic [3:0] liv, lnack_o, lov, lnack_i, s1i, nbr;
  logic s1o, dlo;
  ecc_mode_e mode;
  logic tx_valid, tx_ready, retx_in, rx_valid, rx_corr, rx_unc, retx_out, err_ev;
  logic [25:0] tx_msg [4], rx_msg [4];
  logic [3:0] dst_x, dst_y, src_x, src_y;
  logic [NPORTS-1:0] hop_err, hop_unc;

  int checks = 0, failures = 0;

  noc_node u_node (
    .clk(clk), .rst_n(rst_n), .key(KEY),
    .link_in_word(li), .link_in_valid(liv), .link_nack_out(lnack_o),
    .link_out_word(lo), .link_out_valid(lov), .link_nack_in(lnack_i),
    .s1_in(s1i), .nbr_dl_req(nbr), .s1_out(s1o), .dl_req_out(dlo),
    .mode(mode), .tx_valid(tx_valid), .tx_ready(tx_ready), .tx_msg(tx_msg),
    .tx_dst_x(dst_x), .tx_dst_y(dst_y), .retx_req_in(retx_in),
    .rx_valid(rx_valid), .rx_msg(rx_msg), .rx_src_x(src_x), .rx_src_y(src_y),
    .rx_corrected(rx_corr), .rx_uncorrectable(rx_unc), .retx_req_out(retx_out),
    .hop_err(hop_err), .hop_uncorrectable(hop_unc), .err_event(err_ev));

  always #5 clk = ~clk;

  function automatic logic [LINK_W-1:0] link_word(input flit_t p, input logic on);
    logic [7:0] c;
    c = ham_check(64'(p), PAYLOAD_W);
    return on ? {^{p, c[5:0]}, c[5:0], p} : {7'b0, p};
  endfunction

  // ---------------------------------------------------------- East mirror
  flit_t mirror_q [$];
  int  err_mode = 0;          // 0 none, 1 single, 2 single or double
  bit  hit_msg = 0;           // the current message already took a hit
  bit  in_check = 0, hit_pkt = 0;
  logic dl_force = 0;
  int  n_flits_out = 0, n_inj = 0, n_stall = 0, n_retx = 0, n_hop_corr = 0, n_hop_unc = 0;
  int  n_state [4];

  always @(posedge clk) begin
    if (rst_n) begin
      if (lov[3]) mirror_q.push_back(flit_t'(lo[3][PAYLOAD_W-1:0]));
      for (int d = 0; d < 4; d++) if (d != 3 && lov[d]) begin
        failures++;
        $display("FAIL flit left through port %0d", d);
      end
      n_stall    += $countones(u_node.u_router.nack_out);
      n_hop_corr += $countones(hop_err & ~hop_unc);
      n_hop_unc  += $countones(hop_unc);
      n_state[mode]++;
    end
  end

  always @(negedge clk) begin
    liv[3]     = 1'b0;
    lnack_i[3] = ($urandom % 3) == 0;
    retx_in    = retx_out;
    if (retx_out) n_retx++;
    if (rst_n && mirror_q.size() > 0 && !lnack_o[3]) begin
      flit_t f;
      logic [LINK_W-1:0] w;
      f = mirror_q.pop_front();
      if (f.ftype == FT_HEAD) begin
        in_check = f.data[HEAD_CHECK_BIT];
        hit_pkt  = err_mode != 0 && !in_check && !hit_msg && ($urandom % 2) == 0;
        if (hit_pkt) hit_msg = 1;
        f.data[7:0] = 8'h00;          // destination (0,0)
      end
      w = link_word(f, s1o);
      if (f.ftype == FT_BODY && hit_pkt) begin
        int b1, b2;
        b1 = $urandom_range(0, 31);
        w[b1] = ~w[b1];
        if (err_mode == 2 && ($urandom % 3) == 0) begin
          do b2 = $urandom_range(0, 31); while (b2 == b1 || b2 / 8 != b1 / 8);
          w[b2] = ~w[b2];
        end
        hit_pkt = 0;
        n_inj++;
      end
      li[3]  = w;
      liv[3] = 1'b1;
    end
  end

  always_comb begin
    for (int d = 0; d < 3; d++) begin
      li[d] = '0; liv[d] = 1'b0; lnack_i[d] = 1'b0;
    end
    s1i = {s1o, 3'b000};
    nbr = {dl_force, 3'b000};
  end

  // ---------------------------------------------------------- traffic
  logic [25:0] sent [4];
  bit got;
  int n_msg = 0, n_far = 0;

  always @(posedge clk) begin
    if (rst_n && rx_valid) begin
      checks++;
      if (rx_msg != sent || rx_unc || got || src_x != 0 || src_y != 0) begin
        failures++;
        if (failures < 8) $display("FAIL delivery t=%0t unc %0d got %0d", $time, rx_unc, got);
      end
      got = 1;
    end
  end

  task automatic send_one(output bit ok);
    bit far;
    int t;
    far = ($urandom % 4) != 0;
    got = 0; hit_msg = 0;
    for (int f = 0; f < 4; f++) sent[f] = 26'($urandom);
    while (!tx_ready) @(negedge clk);
    tx_msg   = sent;
    dst_x    = far ? 4'd1 : 4'd0;
    dst_y    = 4'd0;
    tx_valid = 1'b1;
    @(negedge clk);
    tx_valid = 1'b0;
    t = 0;
    while (!got && t < 3000) begin
      @(negedge clk);
      t++;
    end
    ok = got;
    n_msg++;
    if (far) n_far++;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok;
    int r;
    tx_valid = 0; retx_in = 0; liv = '0; lnack_i = '0;
    for (int d = 0; d < 4; d++) li[d] = '0;
    for (int f = 0; f < 4; f++) tx_msg[f] = '0;
    dst_x = '0; dst_y = '0;
    for (int s = 0; s < 4; s++) n_state[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // quiet single layer
    for (r = 0; r < 20; r++) begin
      send_one(ok); checks++; if (!ok) failures++;
    end
    checks++; if (mode != M_SL) begin failures++; $display("FAIL not in SL"); end
    // single-bit errors while single layer: end-to-end correction only
    err_mode = 1;
    for (r = 0; r < 60; r++) begin
      send_one(ok); checks++; if (!ok) failures++;
    end
    // the East neighbour requests dual layer
    dl_force = 1;
    repeat (40) @(negedge clk);
    checks++; if (mode != M_DL || !s1o) begin failures++; $display("FAIL DL not reached"); end
    err_mode = 2;
    for (r = 0; r < 60; r++) begin
      send_one(ok); checks++; if (!ok) failures++;
    end
    dl_force = 0;
    // quiet: the error monitor asks for single layer again
    err_mode = 0;
    for (r = 0; r < 200 && mode != M_SL; r++) begin
      send_one(ok); checks++; if (!ok) failures++;
    end
    checks++; if (mode != M_SL) begin failures++; $display("FAIL SL not reached again"); end
    repeat (50) @(negedge clk);
    checks++;
    if (mirror_q.size() != 0) begin failures++; $display("FAIL flits left in the mirror"); end
    $display("messages %0d (%0d over the link), injected %0d, hop corrected %0d, hop uncorrectable %0d",
             n_msg, n_far, n_inj, n_hop_corr, n_hop_unc);
    $display("retransmissions %0d, NACK stall cycles %0d, cycles SL %0d Pre-DL %0d DL %0d Pre-SL %0d",
             n_retx, n_stall, n_state[M_SL], n_state[M_PRE_DL], n_state[M_DL], n_state[M_PRE_SL]);
    checks++;
    if (n_inj == 0 || n_hop_corr == 0 || n_hop_unc == 0 || n_retx == 0 || n_stall == 0 ||
        n_state[M_SL] == 0 || n_state[M_PRE_DL] == 0 || n_state[M_DL] == 0 || n_state[M_PRE_SL] == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
