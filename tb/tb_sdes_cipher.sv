// tb_sdes_cipher: checks the block cipher against the published
// Simplified-DES example (plaintext 10010111, key 1010000010 -> ciphertext
// 00111000), against the reference model for random keys and blocks in both
// directions, and that decryption undoes encryption.
module tb_sdes_cipher;
  import tb_ref_pkg::*;
  logic       decrypt;
  logic [7:0] din, k1, k2, dout, ct;
  logic [9:0] key;
  int checks = 0, failures = 0;

  sdes_cipher dut (.decrypt(decrypt), .din(din), .k1(k1), .k2(k2), .dout(dout));

  task automatic run(input logic [7:0] d, input logic [9:0] kk, input bit dec,
                     input logic [7:0] exp);
    sdes_keys(kk, k1, k2);
    din = d;
    decrypt = dec;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      if (failures < 6) $display("FAIL d=%h key=%h dec=%0d got %h exp %h", d, kk, dec, dout, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(8'b10010111, 10'b1010000010, 1'b0, 8'b00111000);
    run(8'b00111000, 10'b1010000010, 1'b1, 8'b10010111);
    run(8'h5c, 10'h2ab, 1'b0, 8'h61);
    run(8'ha7, 10'h155, 1'b0, 8'h73);
    for (int n = 0; n < 2000; n++) begin
      key = 10'($urandom);
      din = 8'($urandom);
      run(din, key, 1'b0, sdes(din, key, 1'b0));
      ct = dout;
      run(ct, key, 1'b1, din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
