// tb_routing_decoder: builds link words with the reference encoder, flips
// zero, one or two random bits and checks that the decoder returns the flit
// unchanged (0 or 1 error, err set for 1), flags two errors as
// uncorrectable, returns the flit type as identification bits and, with
// S1 = 0, neither checks nor reports anything.
module tb_routing_decoder;
  import noc_pkg::*;
  import tb_ref_pkg::*;
  logic              ecc_on;
  logic [LINK_W-1:0] word, clean;
  flit_t             payload, f;
  flit_type_e        id_bits;
  logic [HOP_R-1:0]  syndrome;
  logic              err, unc;
  logic [7:0]        c;
  int b1, b2;
  int checks = 0, failures = 0;

  routing_decoder dut (.ecc_on(ecc_on), .word(word), .payload(payload), .id_bits(id_bits),
                       .syndrome(syndrome), .err(err), .uncorrectable(unc));

  task automatic expect_(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 8) $display("FAIL %s word=%h", what, word);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      f = flit_t'({$urandom, $urandom});
      c = ham_check(64'(f), PAYLOAD_W);
      clean = {^{f, c[5:0]}, c[5:0], f};
      ecc_on = 1'b1;
      word = clean;
      #1;
      expect_(payload == f && !err && !unc && syndrome == 0 && id_bits == f.ftype, "clean");
      b1 = $urandom_range(0, LINK_W - 1);
      word = clean ^ (LINK_W'(1) << b1);
      #1;
      expect_(payload == f && err && !unc, "single");
      do b2 = $urandom_range(0, LINK_W - 1); while (b2 == b1);
      word = clean ^ (LINK_W'(1) << b1) ^ (LINK_W'(1) << b2);
      #1;
      expect_(err && unc, "double");
      ecc_on = 1'b0;
      word = {7'b0, f} ^ (LINK_W'(1) << (b1 % PAYLOAD_W));
      #1;
      expect_(payload == flit_t'(word[PAYLOAD_W-1:0]) && !err && !unc, "ecc off");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
