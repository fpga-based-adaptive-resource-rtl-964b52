// tb_encryption_module: body flits are enciphered byte by byte (checked
// against the reference cipher), deciphered back, and head and EHF flits
// and the pass mode leave the flit unchanged.
module tb_encryption_module;
  import noc_pkg::*;
  import tb_ref_pkg::*;
  cipher_mode_e mode;
  flit_t        fin, fout, ct;
  logic [7:0]   k1, k2;
  logic [9:0]   key;
  logic [31:0]  exp;
  int checks = 0, failures = 0;

  encryption_module dut (.mode(mode), .flit_in(fin), .k1(k1), .k2(k2), .flit_out(fout));

  task automatic chk(input flit_t e, input string what);
    checks++;
    if (fout !== e) begin
      failures++;
      if (failures < 6) $display("FAIL %s: got %h exp %h", what, fout, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      key = 10'($urandom);
      sdes_keys(key, k1, k2);
      fin.data  = $urandom;
      fin.ftype = FT_BODY;
      mode = C_ENCRYPT;
      #1;
      for (int b = 0; b < 4; b++) exp[8*b +: 8] = sdes(fin.data[8*b +: 8], key, 1'b0);
      chk('{ftype: FT_BODY, data: exp}, "encrypt");
      ct = fout;
      fin = ct;
      mode = C_DECRYPT;
      #1;
      for (int b = 0; b < 4; b++) exp[8*b +: 8] = sdes(ct.data[8*b +: 8], key, 1'b1);
      chk('{ftype: FT_BODY, data: exp}, "decrypt");
      mode = C_PASS;
      #1;
      chk(fin, "pass");
      fin.ftype = (n % 2) ? FT_HEAD : FT_EHF;
      mode = C_ENCRYPT;
      #1;
      chk(fin, "head/ehf untouched");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
