// tb_pc_decoder: random messages, reference-encoded, with error patterns:
// none; one error in every flit (first step corrects); two errors in one
// flit (first step reports uncorrectable, second step with the check
// packet corrects); two errors in one flit plus one in every other flit and
// in a check flit, all in different rows (second step corrects).
module tb_pc_decoder;
  logic        have_check;
  logic [31:0] coded [4], check [3];
  logic [25:0] msg [4], m [4];
  logic [31:0] cf [4], kf [3];
  logic        err, unc;
  int checks = 0, failures = 0;

  `include "tb_pc_common.svh"

  pc_decoder #(.N_FLITS(4)) dut (.have_check(have_check), .coded_flits(coded),
    .check_flits(check), .msg(msg), .err(err), .uncorrectable(unc));

  task automatic expect_(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 8) $display("FAIL %s err=%b unc=%b", what, err, unc);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rows [$];
    int r;
    for (int n = 0; n < 1000; n++) begin
      for (int f = 0; f < 4; f++) m[f] = 26'($urandom);
      ref_pc(m, cf, kf);
      // none
      coded = cf; check = kf; have_check = 0;
      #1;
      expect_(msg == m && !err && !unc, "clean");
      // one per flit
      for (int f = 0; f < 4; f++) coded[f] = cf[f] ^ (32'd1 << $urandom_range(0, 31));
      #1;
      expect_(msg == m && err && !unc, "single per flit");
      // two distinct rows in one flit, plus more errors in other rows
      rows.delete();
      for (int i = 0; i < 32; i++) rows.push_back(i);
      rows.shuffle();
      coded = cf;
      r = $urandom_range(0, 3);
      coded[r] ^= (32'd1 << rows[0]) | (32'd1 << rows[1]);
      #1;
      expect_(unc, "double detected");
      have_check = 1;
      #1;
      expect_(msg == m && !unc && err, "double corrected with check packet");
      for (int f = 0; f < 4; f++) if (f != r) coded[f] ^= 32'd1 << rows[2 + f];
      check[n % 3] ^= 32'd1 << rows[7];
      #1;
      expect_(msg == m && !unc, "multiple corrected with check packet");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
