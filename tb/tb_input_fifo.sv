// tb_input_fifo: random pushes and pops against a queue model; checks the
// front word, empty and full (the NACK) every cycle, including pushes and
// pops in the same cycle on a full buffer.
module tb_input_fifo;
  localparam int DEPTH = 4;
  localparam int W = 34;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0;
  int saw_full = 0;

  input_fifo #(.DEPTH(DEPTH), .W(W)) dut (.clk(clk), .rst_n(rst_n), .push(push), .din(din),
                                          .pop(pop), .dout(dout), .empty(empty), .full(full));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH) ||
          (q.size() > 0 && dout !== q[0])) begin
        failures++;
        if (failures < 6) $display("FAIL n=%0d size=%0d empty=%b full=%b", n, q.size(), empty, full);
      end
      if (full) saw_full++;
      pop  = ($urandom % 3) != 0 && q.size() > 0 ? (n % 200 < 100) : 0;
      push = ($urandom % 3) != 0 && (q.size() < DEPTH || pop);
      din  = W'({$urandom, $urandom});
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++;
    if (saw_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
