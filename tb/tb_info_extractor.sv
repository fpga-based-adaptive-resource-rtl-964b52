// tb_info_extractor: for a router at (2,1) checks the XY output port of
// every destination of a 16 x 16 mesh.
module tb_info_extractor;
  import noc_pkg::*;
  logic [31:0] head;
  logic [4:0]  port;
  logic [4:0]  exp;
  int checks = 0, failures = 0;

  info_extractor #(.MY_X(4'd2), .MY_Y(4'd1)) dut (.head_data(head), .out_port(port));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        head = {$urandom, 8'h00} | 32'(x * 16 + y);
        head[7:0] = 8'(x * 16 + y);
        #1;
        if (x > 2)      exp = 5'b01000;   // East
        else if (x < 2) exp = 5'b00100;   // West
        else if (y > 1) exp = 5'b00001;   // North
        else if (y < 1) exp = 5'b00010;   // South
        else            exp = 5'b10000;   // local
        checks++;
        if (port !== exp) begin
          failures++;
          $display("FAIL dst (%0d,%0d): %b exp %b", x, y, port, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
