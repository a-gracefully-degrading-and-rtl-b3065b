// tb_rr_arbiter: random requests against a reference round-robin model.
// The model keeps its own pointer; the grant must be the first requester at
// or after it, and the pointer moves past the winner only on update.
module tb_rr_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt, exp_gnt;
  logic update;
  int ptr = 0, checks = 0, failures = 0;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .update, .gnt);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] model(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++) if (r[(p + k) % N]) return N'(1) << ((p + k) % N);
    return '0;
  endfunction

  initial begin
    req = '0; update = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      req = N'($urandom);
      update = ($urandom % 4) != 0;
      #1;
      exp_gnt = model(req, ptr);
      checks++;
      if (gnt !== exp_gnt) begin
        failures++;
        $display("FAIL t=%0d req=%b gnt=%b exp=%b", t, req, gnt, exp_gnt);
      end
      @(posedge clk);
      if (update && exp_gnt != '0)
        for (int i = 0; i < N; i++) if (exp_gnt[i]) ptr = (i + 1) % N;
    end
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
