// tb_hybrid_crossbar: random partial permutations (each output granted to
// at most one input, each input to at most one output); every granted
// output must carry its input's word and every other output zero.
module tb_hybrid_crossbar;
  localparam int P = 5;
  logic [P-1:0]  grant [P];
  logic [33:0]   din  [P];
  logic [33:0]   dout [P];
  int perm [P];
  int checks = 0, failures = 0;

  hybrid_crossbar #(.PORTS(P), .W(34)) dut (.grant(grant), .din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < P; i++) perm[i] = i;
      perm.shuffle();
      for (int o = 0; o < P; o++) begin
        grant[o] = '0;
        if ($urandom % 4 != 0) grant[o][perm[o]] = 1'b1;
      end
      for (int i = 0; i < P; i++) din[i] = {$urandom, $urandom};
      #1;
      for (int o = 0; o < P; o++) begin
        checks++;
        if (dout[o] !== (grant[o] != 0 ? din[perm[o]] : 34'h0)) begin
          failures++;
          if (failures < 6) $display("FAIL out %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
