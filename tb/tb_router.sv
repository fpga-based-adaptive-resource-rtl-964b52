// tb_router: one router at (1,1) with traffic on all five inputs. Packets
// (head, 1-4 bodies, EHF) go to random destinations; single-bit link errors
// are injected on neighbour inputs whose S1 is 1; outputs and inputs are
// throttled by random NACKs. Every flit leaving the router is checked
// against a model: XY output port, packets kept whole, body data encrypted
// when entering the network at the local port and decrypted when leaving
// at it (reference cipher), the EHF bit of this hop set exactly for
// packets that had a link error, hop check bits present exactly while the
// router's S1 is 1. The router is switched from SL to DL by a local DL
// request halfway through.
module tb_router;
  import noc_pkg::*;
  import tb_ref_pkg::*;
  localparam logic [9:0] KEY = 10'h2c7;
  logic clk = 0, rst_n = 0;
  logic [LINK_W-1:0] in_word [NPORTS], out_word [NPORTS];
  logic [NPORTS-1:0] in_valid, nack_out, out_valid, nack_in, hop_err, hop_unc;
  logic [3:0] s1_in, nbr_dl_req;
  logic local_dl_req, local_sl_req, s1_out, dl_req_out;
  ecc_mode_e mode;
  int checks = 0, failures = 0;

  router #(.MY_X(4'd1), .MY_Y(4'd1)) dut (
    .clk(clk), .rst_n(rst_n), .key(KEY), .in_word(in_word), .in_valid(in_valid),
    .nack_out(nack_out), .out_word(out_word), .out_valid(out_valid), .nack_in(nack_in),
    .s1_in(s1_in), .nbr_dl_req(nbr_dl_req), .local_dl_req(local_dl_req),
    .local_sl_req(local_sl_req), .s1_out(s1_out), .dl_req_out(dl_req_out), .mode(mode),
    .hop_err(hop_err), .hop_uncorrectable(hop_unc));

  always #5 clk = ~clk;

  // expected flits per packet id, and the output port of each packet
  flit_t exp_flits [int][$];
  int    exp_port  [int];
  flit_t txq [NPORTS][$];     // flits waiting to be sent per input
  bit    txerr [NPORTS][$];   // inject a single error on that flit
  int    cur_pkt [NPORTS];    // packet being received on each output (-1 none)
  int    n_sent = 0, n_done = 0, n_err = 0, n_stall = 0, n_dl_flits = 0;

  function automatic int xy_port(input int dx, input int dy);
    if (dx > 1) return P_EAST;
    if (dx < 1) return P_WEST;
    if (dy > 1) return P_NORTH;
    if (dy < 1) return P_SOUTH;
    return P_LOCAL;
  endfunction

  function automatic logic [LINK_W-1:0] link_word(input flit_t f, input bit on);
    logic [7:0] c;
    c = ham_check(64'(f), PAYLOAD_W);
    return on ? {^{f, c[5:0]}, c[5:0], f} : {7'b0, f};
  endfunction

  task automatic make_packet(input int p, input int id);
    int dx, dy, o, nb;
    bit err;
    flit_t f, e;
    logic [31:0] ehf_exp;
    do begin
      dx = $urandom_range(0, 2); dy = $urandom_range(0, 2);
      o = xy_port(dx, dy);
    end while (o == p && p != P_LOCAL);   // no U-turns
    exp_port[id] = o;
    exp_flits[id] = {};
    err = 0;
    nb = $urandom_range(1, 4);
    for (int k = 0; k < nb + 2; k++) begin
      bit inj;
      if (k == 0) f = '{ftype: FT_HEAD, data: {15'(id), 1'b0, 8'h00, 4'(dx), 4'(dy)}};
      else if (k <= nb) f = '{ftype: FT_BODY, data: $urandom};
      else f = '{ftype: FT_EHF, data: {8'd3, 24'h000005}};
      inj = (p != P_LOCAL) && s1_in[p % 4] && (($urandom % 5) == 0);
      err |= inj;
      txq[p].push_back(f);
      txerr[p].push_back(inj);
      e = f;
      if (f.ftype == FT_BODY) begin
        if (p == P_LOCAL && o != P_LOCAL)
          for (int b = 0; b < 4; b++) e.data[8*b +: 8] = sdes(f.data[8*b +: 8], KEY, 1'b0);
        if (o == P_LOCAL && p != P_LOCAL)
          for (int b = 0; b < 4; b++) e.data[8*b +: 8] = sdes(f.data[8*b +: 8], KEY, 1'b1);
      end
      if (f.ftype == FT_EHF) begin
        ehf_exp = f.data;
        ehf_exp[3] = err;
        ehf_exp[31:24] = 8'd4;
        e.data = ehf_exp;
      end
      exp_flits[id].push_back(e);
    end
    n_sent++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drivers
  always @(negedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p] <= 1'b0;
      if (rst_n && txq[p].size() > 0 && !nack_out[p] && ($urandom % 4) != 0) begin
        flit_t f;
        logic [LINK_W-1:0] w;
        bit on;
        f  = txq[p].pop_front();
        on = (p != P_LOCAL) && s1_in[p % 4];
        w  = link_word(f, on);
        if (txerr[p].pop_front() && on) begin
          w[$urandom_range(0, LINK_W - 1)] ^= 1'b1;
          n_err++;
        end
        in_word[p]  <= w;
        in_valid[p] <= 1'b1;
      end
    end
    nack_in <= NPORTS'($urandom) & NPORTS'($urandom) & NPORTS'($urandom);
  end

  // monitor
  always @(posedge clk) begin
    if (rst_n) begin
      for (int o = 0; o < NPORTS; o++) begin
        if (nack_in[o]) n_stall++;
        if (out_valid[o]) begin
          flit_t f;
          logic [7:0] c;
          f = flit_t'(out_word[o][PAYLOAD_W-1:0]);
          c = ham_check(64'(f), PAYLOAD_W);
          checks++;
          if (out_word[o] !== link_word(f, s1_out && o != P_LOCAL)) begin
            failures++;
            if (failures < 8) $display("FAIL out %0d check bits", o);
          end
          if (s1_out && o != P_LOCAL) n_dl_flits++;
          if (nack_in[o]) begin
            failures++;
            $display("FAIL out %0d sent while NACK", o);
          end
          if (f.ftype == FT_HEAD) begin
            cur_pkt[o] = int'(f.data[31:17]);
            checks++;
            if (!exp_port.exists(cur_pkt[o]) || exp_port[cur_pkt[o]] != o) begin
              failures++;
              $display("FAIL head of %0d on port %0d", cur_pkt[o], o);
            end
          end
          if (cur_pkt[o] >= 0 && exp_flits.exists(cur_pkt[o]) && exp_flits[cur_pkt[o]].size() > 0) begin
            flit_t e;
            e = exp_flits[cur_pkt[o]].pop_front();
            checks++;
            if (f !== e) begin
              failures++;
              if (failures < 8) $display("FAIL pkt %0d out %0d: %h exp %h", cur_pkt[o], o, f, e);
            end
            if (f.ftype == FT_EHF) begin
              exp_flits.delete(cur_pkt[o]);
              cur_pkt[o] = -1;
              n_done++;
            end
          end else begin
            failures++;
            if (failures < 8) $display("FAIL unexpected flit on %0d", o);
          end
        end
      end
    end
  end

  initial begin
    int id = 0;
    for (int o = 0; o < NPORTS; o++) cur_pkt[o] = -1;
    in_valid = '0; nack_in = '0; s1_in = 4'b0000; nbr_dl_req = '0;
    local_dl_req = 0; local_sl_req = 0;
    for (int p = 0; p < NPORTS; p++) in_word[p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      for (int n = 0; n < 300; n++) begin
        int p;
        p = $urandom_range(0, NPORTS - 1);
        make_packet(p, id++);
      end
      while (n_done < n_sent) @(posedge clk);
      if (phase == 0) begin
        checks++;
        if (s1_out !== 1'b0) failures++;
        @(negedge clk);
        local_dl_req = 1;
        @(negedge clk);
        local_dl_req = 0;
        repeat (20) @(negedge clk);
        checks++;
        if (s1_out !== 1'b1 || mode != M_DL) failures++;
        s1_in = 4'b1111;
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (n_err == 0 || n_stall == 0 || n_dl_flits == 0 || n_done != 600) begin
      failures++;
      $display("FAIL coverage: errors %0d stalls %0d dl flits %0d done %0d", n_err, n_stall, n_dl_flits, n_done);
    end
    $display("packets %0d, link errors %0d, NACK cycles %0d, hop-coded flits %0d", n_done, n_err, n_stall, n_dl_flits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
