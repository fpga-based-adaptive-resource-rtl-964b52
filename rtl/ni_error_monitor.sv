// ni_error_monitor: error counting part of the network interface.
//
// A modular counter counts clock cycles and closes an interval every TC
// cycles; a ripple counter counts erroneous packets (err_event pulses) and
// is cleared at the end of each interval. dl_req is raised as soon as the
// count exceeds ERR_TH and held until the interval ends. sl_req pulses at
// the end of an interval whose count stayed at or below ERR_TH. The counter
// structure follows the network interface description (counter widths
// ceil(log2(TC)) and about ceil(log2(ERR_TH)), here one more bit so that
// "exceeds" can be seen); the values of TC and ERR_TH are this design's.
module ni_error_monitor #(
  parameter int TC     = 256,
  parameter int ERR_TH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic err_event,
  output logic dl_req,
  output logic sl_req
);

  localparam int TW = (TC > 1) ? $clog2(TC) : 1;
  localparam int EW = $clog2(ERR_TH + 2);

  logic [TW-1:0] tc_cnt;    // modular counter
  logic [EW-1:0] err_cnt;   // ripple counter (saturating at ERR_TH + 1)
  logic          win_end;

  assign win_end = (int'(tc_cnt) == TC - 1);
  assign dl_req  = (int'(err_cnt) > ERR_TH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tc_cnt  <= '0;
      err_cnt <= '0;
      sl_req  <= 1'b0;
    end else begin
      tc_cnt <= win_end ? '0 : tc_cnt + 1'b1;
      sl_req <= win_end && (int'(err_cnt) + int'(err_event) <= ERR_TH);
      if (win_end)                                 err_cnt <= '0;
      else if (err_event && int'(err_cnt) <= ERR_TH) err_cnt <= err_cnt + 1'b1;
    end
  end

endmodule
