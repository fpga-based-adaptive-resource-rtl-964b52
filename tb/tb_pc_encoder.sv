// tb_pc_encoder: compares the coded data flits (FCB) and the check flits
// (PCB + CoC) with a reference product-code encoder for random messages.
module tb_pc_encoder;
  logic [25:0] msg [4];
  logic [31:0] coded [4], check [3], e_coded [4], e_check [3];
  int checks = 0, failures = 0;

  `include "tb_pc_common.svh"

  pc_encoder #(.N_FLITS(4)) dut (.msg(msg), .coded_flits(coded), .check_flits(check));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int f = 0; f < 4; f++) msg[f] = 26'($urandom);
      #1;
      ref_pc(msg, e_coded, e_check);
      checks++;
      if (coded != e_coded || check != e_check) begin
        failures++;
        if (failures < 5) $display("FAIL %h %h / %h %h", coded[0], check[0], e_coded[0], e_check[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
