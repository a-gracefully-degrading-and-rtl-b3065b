// tb_crossbar_2x2: every legal select pattern with random data; each output
// must carry the selected input and follow its valid.
module tb_crossbar_2x2;
  localparam int W = 128;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] in_data [2], out_data [2];
  logic sel_vld [2], sel_src [2], out_vld [2];
  int checks = 0, failures = 0;

  crossbar_2x2 #(.W(W)) dut (.clk, .rst_n, .in_data, .sel_vld, .sel_src, .out_data, .out_vld);

  always #5 clk = ~clk;

  initial begin
    sel_vld = '{0, 0}; sel_src = '{0, 1};
    in_data = '{'0, '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_data[0] = {$urandom, $urandom, $urandom, $urandom};
      in_data[1] = {$urandom, $urandom, $urandom, $urandom};
      sel_src[0] = t[0];
      sel_src[1] = !t[0];
      sel_vld[0] = t[1];
      sel_vld[1] = t[2];
      #1;
      for (int o = 0; o < 2; o++) begin
        checks++;
        if (out_vld[o] !== sel_vld[o] || (sel_vld[o] && out_data[o] !== in_data[sel_src[o]])) begin
          failures++; $display("FAIL t=%0d o=%0d", t, o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
