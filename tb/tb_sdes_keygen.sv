// tb_sdes_keygen: checks the subkeys against the published Simplified-DES
// example (key 1010000010 -> K1 10100100, K2 01000011) and against the
// table-driven reference model for 1024 keys, i.e. every key.
module tb_sdes_keygen;
  import tb_ref_pkg::*;
  logic [9:0] key;
  logic [7:0] k1, k2, e1, e2;
  int checks = 0, failures = 0;

  sdes_keygen dut (.key(key), .k1(k1), .k2(k2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key = 10'b1010000010;
    #1;
    checks++;
    if (k1 !== 8'b10100100 || k2 !== 8'b01000011) begin
      failures++;
      $display("FAIL known vector: k1=%b k2=%b", k1, k2);
    end
    for (int k = 0; k < 1024; k++) begin
      key = 10'(k);
      #1;
      sdes_keys(key, e1, e2);
      checks++;
      if (k1 !== e1 || k2 !== e2) begin
        failures++;
        if (failures < 5) $display("FAIL key %b: got %h %h exp %h %h", key, k1, k2, e1, e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
