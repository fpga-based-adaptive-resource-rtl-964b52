// tb_ni_error_monitor: random error events over many Tc intervals; checks
// dl_req against a count of the events in the current interval (raised
// once it exceeds ERR_TH) and sl_req at the end of each quiet interval.
module tb_ni_error_monitor;
  localparam int TC = 40, TH = 3;
  logic clk = 0, rst_n = 0;
  logic err_event, dl_req, sl_req;
  int checks = 0, failures = 0;
  int cnt = 0, pos = 0, n_dl = 0, n_sl = 0;
  bit exp_sl = 0;

  ni_error_monitor #(.TC(TC), .ERR_TH(TH)) dut (.clk(clk), .rst_n(rst_n),
    .err_event(err_event), .dl_req(dl_req), .sl_req(sl_req));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rate;
    err_event = 0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    for (int c = 0; c < 40 * TC; c++) begin
      rate = ((c / TC) % 3 == 0) ? 40 : 4;   // noisy and quiet intervals
      err_event = ($urandom % rate) == 0;
      #1;
      checks++;
      if (dl_req !== (cnt > TH) || sl_req !== exp_sl) begin
        failures++;
        if (failures < 6) $display("FAIL c=%0d cnt=%0d dl=%b sl=%b exp_sl=%b", c, cnt, dl_req, sl_req, exp_sl);
      end
      if (dl_req) n_dl++;
      if (sl_req) n_sl++;
      @(posedge clk);
      #1;
      exp_sl = 0;
      if (pos == TC - 1) begin
        exp_sl = (cnt + err_event) <= TH;
        cnt = 0;
        pos = 0;
      end else begin
        cnt += err_event;
        pos++;
      end
    end
    checks++;
    if (n_dl == 0 || n_sl == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
