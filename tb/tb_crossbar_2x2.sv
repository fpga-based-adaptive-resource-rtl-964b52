// tb_crossbar_2x2: IH = 0 connects the element in parallel, IH = 1 crosses.
module tb_crossbar_2x2;
  logic [33:0] ia, ib, oa, ob;
  logic ih;
  int checks = 0, failures = 0;

  crossbar_2x2 #(.W(34)) dut (.ia(ia), .ib(ib), .ih(ih), .oa(oa), .ob(ob));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      ia = {$urandom, $urandom};
      ib = {$urandom, $urandom};
      ih = n[0];
      #1;
      checks++;
      if (ih ? (oa !== ib || ob !== ia) : (oa !== ia || ob !== ib)) begin
        failures++;
        $display("FAIL ih=%b", ih);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
