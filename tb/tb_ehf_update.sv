// tb_ehf_update: sends packets (head, bodies, EHF) through the EHF update
// stage with errors injected on random flits, and checks that the EHF
// leaving it has the hop's bit set exactly when the packet had an error,
// the hop count incremented, other flits unchanged, and that a full
// 24-hop history is left alone.
module tb_ehf_update;
  import noc_pkg::*;
  logic  clk = 0, rst_n = 0;
  logic  in_valid;
  flit_t payload, out_payload;
  logic  hop_err;
  int checks = 0, failures = 0;

  ehf_update dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .payload(payload),
                  .hop_err(hop_err), .out_payload(out_payload));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input flit_type_e t, input logic [31:0] d, input bit e,
                      input logic [31:0] exp);
    in_valid = 1'b1;
    payload  = '{ftype: t, data: d};
    hop_err  = e;
    #1;
    checks++;
    if (out_payload !== '{ftype: t, data: exp}) begin
      failures++;
      if (failures < 6) $display("FAIL t=%0d d=%h e=%0d pkt_err=%0d got %h exp %h", t, d, e, dut.pkt_err, out_payload.data, exp);
    end
    @(posedge clk);
    #1;
    in_valid = 1'b0;
  endtask

  initial begin
    logic [31:0] ehf, hd;
    bit any;
    int hops;
    in_valid = 0; payload = '0; hop_err = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    ehf = 32'h0;
    for (int p = 0; p < 400; p++) begin
      any = 0;
      hd = $urandom;
      any = ($urandom % 8) == 0;
      send(FT_HEAD, hd, any, hd);
      for (int b = 0; b < 3; b++) begin
        bit e;
        hd = $urandom;
        e = ($urandom % 8) == 0;
        any |= e;
        send(FT_BODY, hd, e, hd);
        if ($urandom % 2) begin             // idle cycles keep the state
          @(posedge clk);
          #1;
        end
      end
      if (p % 30 == 0) ehf = 32'h0;          // a new route starts
      hops = ehf[31:24];
      begin
        bit e;
        logic [31:0] exp;
        e = ($urandom % 10) == 0;
        exp = ehf;
        if (hops < 24) begin
          exp[hops] = any | e;
          exp[31:24] = 8'(hops + 1);
        end
        send(FT_EHF, ehf, e, exp);
        ehf = exp;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
