// tb_router_arbiter: five inputs send packets of random length to random
// outputs while NACK_in toggles randomly. Every cycle the grants, transfers
// and pops are compared with a reference allocator (packet-long grants,
// round robin starting after the last input served, no transfer while
// NACK_in is 1). Also checks that every packet is delivered and that
// NACK stalls and contention both occur.
module tb_router_arbiter;
  localparam int P = 5;
  logic clk = 0, rst_n = 0;
  logic [P-1:0] req [P];
  logic [P-1:0] tail, nack_in, xfer, pop;
  logic [P-1:0] grant [P];
  int checks = 0, failures = 0;
  int remaining [P];   // flits left in the current packet (0 = idle)
  int dest [P];
  int sent_pkts = 0, done_pkts = 0, stalls = 0, contention = 0;
  bit r_locked [P];
  int r_owner [P];
  int r_last [P];

  router_arbiter #(.PORTS(P)) dut (.clk(clk), .rst_n(rst_n), .req(req), .tail(tail),
                                   .nack_in(nack_in), .grant(grant), .xfer(xfer), .pop(pop));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb begin
    for (int i = 0; i < P; i++) begin
      req[i]  = '0;
      tail[i] = 1'b0;
      if (remaining[i] > 0) begin
        req[i][dest[i]] = 1'b1;
        tail[i] = (remaining[i] == 1);
      end
    end
  end

  initial begin
    int cand, nreq;
    logic [P-1:0] e_pop, e_xfer;
    for (int i = 0; i < P; i++) begin
      remaining[i] = 0; dest[i] = 0; r_locked[i] = 0; r_owner[i] = 0; r_last[i] = P - 1;
    end
    nack_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // new packets on idle inputs
      for (int i = 0; i < P; i++) begin
        if (remaining[i] == 0 && cyc < 19000 && ($urandom % 3) == 0) begin
          remaining[i] = $urandom_range(1, 5);
          dest[i] = $urandom_range(0, P - 1);
          sent_pkts++;
        end
      end
      nack_in = P'($urandom) & P'($urandom);
      #1;
      // reference allocation
      e_pop = '0; e_xfer = '0;
      for (int o = 0; o < P; o++) begin
        cand = -1;
        nreq = 0;
        for (int i = 0; i < P; i++) if (req[i][o]) nreq++;
        if (nreq > 1) contention++;
        if (r_locked[o]) begin
          if (req[r_owner[o]][o]) cand = r_owner[o];
        end else begin
          for (int n = 1; n <= P && cand < 0; n++)
            if (req[(r_last[o] + n) % P][o]) cand = (r_last[o] + n) % P;
        end
        if (cand >= 0 && nack_in[o]) stalls++;
        if (cand >= 0 && !nack_in[o]) begin
          e_xfer[o] = 1'b1;
          e_pop[cand] = 1'b1;
          checks++;
          if (grant[o] !== P'(1) << cand) begin
            failures++;
            if (failures < 6) $display("FAIL cyc %0d out %0d grant %b exp input %0d locked %b/%0d last %0d/%0d", cyc, o, grant[o], cand, dut.locked, r_locked[o], dut.rr_last[o], r_last[o]);
          end
          if (tail[cand]) begin r_locked[o] = 0; r_last[o] = cand; end
          else begin r_locked[o] = 1; r_owner[o] = cand; end
        end
      end
      checks++;
      if (xfer !== e_xfer || pop !== e_pop) begin
        failures++;
        if (failures < 6) $display("FAIL cyc %0d xfer %b/%b pop %b/%b", cyc, xfer, e_xfer, pop, e_pop);
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < P; i++) begin
        if (e_pop[i]) begin
          remaining[i]--;
          if (remaining[i] == 0) done_pkts++;
        end
      end
    end
    checks++;
    if (done_pkts != sent_pkts) begin
      failures++;
      $display("FAIL %0d packets sent, %0d delivered", sent_pkts, done_pkts);
    end
    checks++;
    if (stalls == 0 || contention == 0) failures++;
    $display("packets %0d, NACK stalls %0d, contended cycles %0d", done_pkts, stalls, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
