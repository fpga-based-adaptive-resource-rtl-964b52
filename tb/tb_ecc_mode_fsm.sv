// tb_ecc_mode_fsm: walks the mode switch through SL -> Pre-DL -> DL ->
// Pre-SL -> SL, checks S1 in each state, that each Pre state lasts T_PROP
// cycles, that a neighbour DL request also starts Pre-DL, that a DL request
// aborts Pre-SL back to DL and that an SL request in SL or while DL is
// still requested changes nothing.
module tb_ecc_mode_fsm;
  import noc_pkg::*;
  localparam int TP = 6;
  logic clk = 0, rst_n = 0;
  logic local_dl_req, local_sl_req, s1, dl_req_out;
  logic [3:0] nbr_dl_req;
  ecc_mode_e mode;
  int checks = 0, failures = 0;

  ecc_mode_fsm #(.T_PROP(TP)) dut (.clk(clk), .rst_n(rst_n), .local_dl_req(local_dl_req),
    .local_sl_req(local_sl_req), .nbr_dl_req(nbr_dl_req), .mode(mode), .s1(s1),
    .dl_req_out(dl_req_out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_mode(input ecc_mode_e m, input bit s, input string what);
    checks++;
    if (mode !== m || s1 !== s) begin
      failures++;
      $display("FAIL %s: mode %0d s1 %b, exp %0d %b", what, mode, s1, m, s);
    end
  endtask

  task automatic tick(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    local_dl_req = 0; local_sl_req = 0; nbr_dl_req = 0;
    tick(2);
    rst_n = 1;
    tick(3);
    expect_mode(M_SL, 0, "reset");
    local_sl_req = 1; tick(1); local_sl_req = 0;
    expect_mode(M_SL, 0, "sl req ignored in SL");
    // local DL request
    local_dl_req = 1; tick(1); local_dl_req = 0;
    expect_mode(M_PRE_DL, 0, "pre-dl");
    checks++; if (!dl_req_out) failures++;
    tick(TP - 1);
    expect_mode(M_PRE_DL, 0, "pre-dl still");
    tick(1);
    expect_mode(M_DL, 1, "dl after T_PROP");
    // SL request while DL still requested: stays
    local_sl_req = 1; local_dl_req = 1; tick(1);
    expect_mode(M_DL, 1, "sl blocked by dl req");
    local_dl_req = 0; tick(1); local_sl_req = 0;
    expect_mode(M_PRE_SL, 1, "pre-sl");
    tick(TP - 1);
    expect_mode(M_PRE_SL, 1, "pre-sl still");
    tick(1);
    expect_mode(M_SL, 0, "sl after T_PROP");
    // neighbour request
    nbr_dl_req = 4'b0100; tick(1); nbr_dl_req = 0;
    expect_mode(M_PRE_DL, 0, "pre-dl from neighbour");
    tick(TP);
    expect_mode(M_DL, 1, "dl");
    local_sl_req = 1; tick(1); local_sl_req = 0;
    expect_mode(M_PRE_SL, 1, "pre-sl 2");
    tick(2);
    nbr_dl_req = 4'b0001; tick(1); nbr_dl_req = 0;
    expect_mode(M_DL, 1, "pre-sl aborted");
    tick(10);
    expect_mode(M_DL, 1, "dl holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
