// tb_vc_buffer: random push/pop traffic against a queue model; checks the
// front flit and the occupancy every cycle, including full and empty.
module tb_vc_buffer;
  localparam int DEPTH = 5, W = 128;
  logic clk = 0, rst_n = 0;
  logic push, pop;
  logic [W-1:0] din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, fulls = 0;

  vc_buffer #(.DEPTH(DEPTH), .W(W)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .count);

  always #5 clk = ~clk;

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (int'(count) != q.size()) begin
        failures++; $display("FAIL count %0d exp %0d", count, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("FAIL dout"); end
      end
      if (q.size() == DEPTH) fulls++;
      din  = {$urandom, $urandom, $urandom, $urandom};
      pop  = q.size() > 0 && ($urandom % 3 == 0 || (t / 500) % 2 == 1);
      push = (q.size() < DEPTH || pop) && ($urandom % 2 == 0);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
