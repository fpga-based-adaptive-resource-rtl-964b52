// tb_noc_node: end-to-end test of a 2 x 2 mesh of nodes with every
// parameter at its default. In each round every node sends one message to
// a different node (a random derangement) and the round ends when all four
// have been delivered; a retransmission request of a receiver is passed to
// the source node's NI. Link errors are injected into body flits of data
// packets (at most one hit packet per message):
//   phase A  quiet, single layer           - plain delivery
//   phase B  single-bit errors, SL         - end-to-end product code only;
//            a flipped ciphertext bit garbles a byte, so the receiver asks
//            for the check packet; the error count exceeds the threshold
//            and the network switches to dual layer (Pre-DL, then DL)
//   phase C  single- and double-bit errors, DL - the hop decoders correct
//            singles and record them in the EHF, doubles reach the end
//            nodes and are fixed with the check packet
//   phase D  quiet                         - the network returns to SL
//            through Pre-SL
// Throughout, through traffic from outside the mesh crosses nodes 0 and 1
// towards a sink that refuses flits half of the time, so messages and
// through packets contend for node 0's East output and NACKs stall them.
// Every delivered message is compared with what was sent. Counted and
// required at least once: hop corrections, hop uncorrectable errors,
// non-zero EHF at a destination, retransmissions, each mode state, NACK
// stalls, cipher use on the links (a body flit on a link, deciphered with
// the key, is a valid column codeword while its plain form is not).
module tb_noc_node;
  import noc_pkg::*;
  import tb_ref_pkg::*;
  localparam logic [9:0] KEY = 10'h1b5;
  localparam int NN = 4;
  logic clk = 0, rst_n = 0;

  logic [LINK_W-1:0] li [NN][4], lo [NN][4];
  logic [3:0] liv [NN], lnack_o [NN], lov [NN], lnack_i [NN], s1i [NN], nbr [NN];
  logic s1o [NN], dlo [NN];
  ecc_mode_e mode [NN];
  logic tx_valid [NN], tx_ready [NN], retx_in [NN], rx_valid [NN], rx_corr [NN], rx_unc [NN];
  logic retx_out [NN], err_ev [NN];
  logic [25:0] tx_msg [NN][4], rx_msg [NN][4];
  logic [3:0] dst_x [NN], dst_y [NN], src_x [NN], src_y [NN];
  logic [NPORTS-1:0] hop_err [NN], hop_unc [NN];
  logic [LINK_W-1:0] inj [NN][4];

  int checks = 0, failures = 0;
  int n_stall_n [NN];

  // through traffic: packets from an external source west of node 0 to an
  // external sink east of node 1, which refuses flits at random (NACK)
  logic [LINK_W-1:0] ext_word;
  logic ext_valid, sink_nack, ext_on;
  flit_t ext_q [$], ext_exp [$];
  int n_ext_in = 0, n_ext_out = 0;

  always @(negedge clk) begin
    ext_valid <= 1'b0;
    if (ext_on && ext_q.size() == 0 && ($urandom % 4) == 0) begin
      ext_q.push_back('{ftype: FT_HEAD, data: 32'h0000_0020});     // to (2,0)
      for (int b = 0; b < 3; b++) ext_q.push_back('{ftype: FT_BODY, data: $urandom});
      ext_q.push_back('{ftype: FT_EHF, data: 32'h0});
      n_ext_in++;
    end
    if (rst_n && ext_q.size() > 0 && !lnack_o[0][2]) begin
      flit_t f;
      f = ext_q.pop_front();
      ext_word  <= {7'b0, f};
      ext_valid <= 1'b1;
      if (f.ftype == FT_EHF) f.data = 32'h0200_0000;   // two hops recorded, no errors
      ext_exp.push_back(f);
    end
    sink_nack <= ($urandom % 2) == 0;
  end

  always @(posedge clk) begin
    if (rst_n && lov[1][3]) begin
      flit_t f, e;
      f = flit_t'(lo[1][3][PAYLOAD_W-1:0]);
      e = ext_exp.pop_front();
      checks++;
      if (f.data !== e.data || f.ftype !== e.ftype) begin
        failures++;
        if (failures < 8) $display("FAIL through traffic %h exp %h", f, e);
      end
      if (f.ftype == FT_EHF) n_ext_out++;
    end
  end

  for (genvar n = 0; n < NN; n++) begin : g_node
    // cycles in which an input FIFO of this router refuses flits (NACK)
    always @(posedge clk) if (rst_n) n_stall_n[n] += $countones(u_node.u_router.nack_out);

    noc_node #(.MY_X(4'(n % 2)), .MY_Y(4'(n / 2))) u_node (
      .clk(clk), .rst_n(rst_n), .key(KEY),
      .link_in_word(li[n]), .link_in_valid(liv[n]), .link_nack_out(lnack_o[n]),
      .link_out_word(lo[n]), .link_out_valid(lov[n]), .link_nack_in(lnack_i[n]),
      .s1_in(s1i[n]), .nbr_dl_req(nbr[n]), .s1_out(s1o[n]), .dl_req_out(dlo[n]),
      .mode(mode[n]), .tx_valid(tx_valid[n]), .tx_ready(tx_ready[n]), .tx_msg(tx_msg[n]),
      .tx_dst_x(dst_x[n]), .tx_dst_y(dst_y[n]), .retx_req_in(retx_in[n]),
      .rx_valid(rx_valid[n]), .rx_msg(rx_msg[n]), .rx_src_x(src_x[n]), .rx_src_y(src_y[n]),
      .rx_corrected(rx_corr[n]), .rx_uncorrectable(rx_unc[n]), .retx_req_out(retx_out[n]),
      .hop_err(hop_err[n]), .hop_uncorrectable(hop_unc[n]), .err_event(err_ev[n]));
  end

  // neighbour of node n in direction d (0 N, 1 S, 2 W, 3 E), -1 at the edge
  function automatic int nbr_of(input int n, input int d);
    int x, y;
    x = n % 2; y = n / 2;
    case (d)
      0: return (y == 0) ? n + 2 : -1;
      1: return (y == 1) ? n - 2 : -1;
      2: return (x == 1) ? n - 1 : -1;
      default: return (x == 0) ? n + 1 : -1;
    endcase
  endfunction

  function automatic int opp(input int d);
    return d ^ 1;   // N<->S, W<->E
  endfunction

  always_comb begin
    for (int n = 0; n < NN; n++) begin
      for (int d = 0; d < 4; d++) begin
        int m;
        m = nbr_of(n, d);
        if (m < 0) begin
          li[n][d] = '0; liv[n][d] = 1'b0; lnack_i[n][d] = 1'b0; s1i[n][d] = 1'b0; nbr[n][d] = 1'b0;
          if (n == 0 && d == 2) begin      // through traffic enters node 0 from the West
            li[n][d]  = ext_word;
            liv[n][d] = ext_valid;
          end
          if (n == 1 && d == 3) lnack_i[n][d] = sink_nack;   // and leaves node 1 to the East
        end else begin
          li[n][d]      = lo[m][opp(d)] ^ inj[n][d];
          liv[n][d]     = lov[m][opp(d)];
          lnack_i[n][d] = lnack_o[m][opp(d)];
          s1i[n][d]     = s1o[m];
          nbr[n][d]     = dlo[m];
        end
      end
    end
  end

  always #5 clk = ~clk;

  // ---------------------------------------------------------- error injection
  int  err_mode = 0;        // 0 none, 1 single (SL phase), 2 single+double (DL phase)
  bit  pkt_check [NN][4];   // current packet on the link is a check packet
  int  pkt_src [NN][4];
  bit  hit [NN];            // the message of this source already took a hit
  bit  hit_now [NN][4];     // the packet now on this link is being hit
  int  n_inj = 0, n_hop_corr = 0, n_hop_unc = 0, n_ehf = 0, n_retx = 0, n_stall = 0;
  int  n_cipher = 0, n_plain_bad = 0;
  int  n_state [4];

  always @(negedge clk) begin
    for (int n = 0; n < NN; n++) begin
      for (int d = 0; d < 4; d++) begin
        int m;
        flit_t f;
        inj[n][d] = '0;
        m = nbr_of(n, d);
        if (m >= 0 && lov[m][opp(d)]) begin
          f = flit_t'(lo[m][opp(d)][PAYLOAD_W-1:0]);
          if (f.ftype == FT_HEAD) begin
            pkt_check[n][d] = f.data[HEAD_CHECK_BIT];
            pkt_src[n][d]   = int'(f.data[15:12]) + 2 * int'(f.data[11:8]);
            hit_now[n][d]   = err_mode != 0 && !pkt_check[n][d] && !hit[pkt_src[n][d]] &&
                              f.data[7:4] < 2 &&
                              ($urandom % 2) == 0;
            if (hit_now[n][d]) hit[pkt_src[n][d]] = 1;
          end
          if (f.ftype == FT_BODY) begin
            logic [31:0] plain;
            logic [7:0] c;
            for (int b = 0; b < 4; b++) plain[8*b +: 8] = sdes(f.data[8*b +: 8], KEY, 1'b1);
            c = ham_check(64'(plain[25:0]), 26);
            // check packets are not interleaved: deciphered, each body
            // flit is a column codeword
            if (pkt_check[n][d]) begin
              checks++;
              if (plain[30:26] == c[4:0]) n_cipher++;
              else begin
                failures++;
                $display("FAIL check flit on link is not an enciphered codeword");
              end
              c = ham_check(64'(f.data[25:0]), 26);
              if (f.data[30:26] != c[4:0]) n_plain_bad++;
            end
            if (hit_now[n][d]) begin
              int b1, b2;
              b1 = $urandom_range(0, 31);
              inj[n][d][b1] = 1'b1;
              if (err_mode == 2 && ($urandom % 3) == 0) begin
                do b2 = $urandom_range(0, 31); while (b2 == b1 || b2 / 8 != b1 / 8);
                inj[n][d][b2] = 1'b1;
              end
              hit_now[n][d] = 0;
              n_inj++;
            end
          end
        end
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < NN; n++) begin
        n_hop_corr += $countones(hop_err[n] & ~hop_unc[n]);
        n_hop_unc  += $countones(hop_unc[n]);
        if (err_ev[n] && s1o[n]) n_ehf++;
        n_state[mode[n]]++;
      end
    end
  end

  // ---------------------------------------------------------- traffic
  logic [25:0] sent [NN][4];
  int   dest [NN];
  bit   got [NN];

  always @(negedge clk) begin
    for (int n = 0; n < NN; n++) begin
      retx_in[n] = 1'b0;
    end
    for (int n = 0; n < NN; n++) begin
      if (retx_out[n]) begin
        retx_in[int'(src_x[n]) + 2 * int'(src_y[n])] = 1'b1;
        n_retx++;
      end
    end
  end

  always @(posedge clk) begin
    for (int n = 0; n < NN; n++) begin
      if (rst_n && rx_valid[n]) begin
        int s;
        s = int'(src_x[n]) + 2 * int'(src_y[n]);
        checks++;
        if (dest[s] != n || rx_msg[n] != sent[s] || rx_unc[n] || got[s]) begin
          failures++;
          if (failures < 8) $display("FAIL delivery %0d -> %0d t=%0t dest %0d msgok %0d unc %0d got %0d mode %0d corr %0d", s, n, $time, dest[s], rx_msg[n] == sent[s], rx_unc[n], got[s], err_mode, rx_corr[n]);
        end
        got[s] = 1;
      end
    end
  end

  task automatic round_(output bit ok);
    int perm [NN];
    bit der;
    int t;
    do begin
      for (int n = 0; n < NN; n++) perm[n] = n;
      perm.shuffle();
      der = 1;
      for (int n = 0; n < NN; n++) if (perm[n] == n) der = 0;
    end while (!der);
    for (int n = 0; n < NN; n++) begin
      got[n] = 0; hit[n] = 0;
      dest[n] = perm[n];
      for (int f = 0; f < 4; f++) sent[n][f] = 26'($urandom);
    end
    @(negedge clk);
    for (int n = 0; n < NN; n++) begin
      tx_msg[n] = sent[n];
      dst_x[n] = 4'(dest[n] % 2);
      dst_y[n] = 4'(dest[n] / 2);
      tx_valid[n] = 1'b1;
    end
    @(negedge clk);
    for (int n = 0; n < NN; n++) tx_valid[n] = 1'b0;
    t = 0;
    while (!(got[0] && got[1] && got[2] && got[3]) && t < 2000) begin
      @(negedge clk);
      t++;
    end
    ok = (t < 2000);
  endtask

  function automatic bit all_in(input ecc_mode_e m);
    for (int n = 0; n < NN; n++) if (mode[n] != m) return 0;
    return 1;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok;
    int r;
    for (int n = 0; n < NN; n++) begin
      tx_valid[n] = 0; retx_in[n] = 0; dest[n] = -1; got[n] = 0; hit[n] = 0;
      dst_x[n] = '0; dst_y[n] = '0;
      for (int f = 0; f < 4; f++) tx_msg[n][f] = '0;
      for (int d = 0; d < 4; d++) begin
        inj[n][d] = '0; pkt_check[n][d] = 0; pkt_src[n][d] = 0; hit_now[n][d] = 0;
      end
    end
    for (int s = 0; s < 4; s++) n_state[s] = 0;
    for (int n = 0; n < NN; n++) n_stall_n[n] = 0;
    ext_on = 1; ext_word = '0; ext_valid = 0; sink_nack = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase A
    err_mode = 0;
    for (r = 0; r < 10; r++) begin
      round_(ok);
      checks++; if (!ok) begin failures++; $display("FAIL round A%0d", r); end
    end
    checks++; if (!all_in(M_SL)) failures++;
    // phase B
    err_mode = 1;
    for (r = 0; r < 200 && !all_in(M_DL); r++) begin
      round_(ok);
      checks++; if (!ok) begin failures++; $display("FAIL round B%0d", r); end
    end
    $display("phase B: DL reached after %0d rounds", r);
    checks++; if (!all_in(M_DL)) failures++;
    // phase C
    err_mode = 2;
    for (r = 0; r < 40; r++) begin
      round_(ok);
      checks++; if (!ok) begin failures++; $display("FAIL round C%0d", r); end
    end
    // phase D
    err_mode = 0;
    for (r = 0; r < 300 && !all_in(M_SL); r++) begin
      round_(ok);
      checks++; if (!ok) begin failures++; $display("FAIL round D%0d", r); end
    end
    $display("phase D: SL reached after %0d rounds", r);
    checks++; if (!all_in(M_SL)) failures++;
    for (r = 0; r < 5; r++) begin
      round_(ok);
      checks++; if (!ok) failures++;
    end
    for (int n = 0; n < NN; n++) n_stall += n_stall_n[n];
    ext_on = 0;
    repeat (200) @(posedge clk);
    checks++;
    if (n_ext_out != n_ext_in || n_ext_in == 0) begin
      failures++;
      $display("FAIL through traffic: %0d in, %0d out", n_ext_in, n_ext_out);
    end
    $display("injected %0d, hop corrected %0d, hop uncorrectable %0d, EHF errors at NI %0d",
             n_inj, n_hop_corr, n_hop_unc, n_ehf);
    $display("retransmissions %0d, NACK stall cycles %0d, enciphered body flits %0d (plain form invalid %0d)",
             n_retx, n_stall, n_cipher, n_plain_bad);
    $display("node-cycles in SL %0d, Pre-DL %0d, DL %0d, Pre-SL %0d",
             n_state[M_SL], n_state[M_PRE_DL], n_state[M_DL], n_state[M_PRE_SL]);
    checks++;
    if (n_inj == 0 || n_hop_corr == 0 || n_hop_unc == 0 || n_ehf == 0 || n_retx == 0 ||
        n_stall == 0 || n_cipher == 0 || n_plain_bad == 0 ||
        n_state[M_SL] == 0 || n_state[M_PRE_DL] == 0 || n_state[M_DL] == 0 || n_state[M_PRE_SL] == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
