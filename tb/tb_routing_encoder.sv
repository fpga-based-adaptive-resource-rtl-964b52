// tb_routing_encoder: with S1 = 1 the link word carries the flit and the
// Hamming check bits and overall parity of the reference encoder; with
// S1 = 0 the check bits are zero.
module tb_routing_encoder;
  import noc_pkg::*;
  import tb_ref_pkg::*;
  logic              ecc_on;
  flit_t             payload;
  logic [LINK_W-1:0] word;
  logic [7:0]        c;
  int checks = 0, failures = 0;

  routing_encoder dut (.ecc_on(ecc_on), .payload(payload), .word(word));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      payload = flit_t'({$urandom, $urandom});
      ecc_on  = 1'b1;
      #1;
      c = ham_check(64'(payload), PAYLOAD_W);
      checks++;
      if (word !== {^{payload, c[5:0]}, c[5:0], payload}) begin
        failures++;
        if (failures < 5) $display("FAIL on: %h", word);
      end
      ecc_on = 1'b0;
      #1;
      checks++;
      if (word !== {7'b0, payload}) begin
        failures++;
        if (failures < 5) $display("FAIL off: %h", word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
