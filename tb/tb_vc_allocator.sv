// tb_vc_allocator: random request patterns. Every grant must name a slot
// the input asked for, no downstream VC may go to two inputs, some input must
// win whenever any asks, and six inputs competing for one VC must each win
// once in six cycles (round-robin). In borrow mode the allocator must grant
// nothing itself and serve the lent arbiters instead.
module tb_vc_allocator;
  import roco_pkg::*;
  localparam int NIN = 6, NS = 4;
  logic clk = 0, rst_n = 0;
  logic [NS-1:0] req [NIN];
  logic req_dir [NIN], gnt_vld [NIN];
  logic [1:0] gnt_slot [NIN];
  logic busy, borrow_en, borrow_upd;
  logic [NS-1:0] borrow_l_req [4], borrow_l_gnt [4];
  logic [NIN-1:0] borrow_g_req, borrow_g_gnt;
  int checks = 0, failures = 0;

  vc_allocator #(.NIN(NIN), .NS(NS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    int wins [NIN];
    for (int i = 0; i < NIN; i++) begin req[i] = '0; req_dir[i] = 0; end
    borrow_en = 0; borrow_upd = 0; borrow_g_req = '0;
    for (int k = 0; k < 4; k++) borrow_l_req[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // random traffic
    for (int t = 0; t < 2000; t++) begin
      bit any, taken [2][NS];
      @(negedge clk);
      any = 0;
      for (int i = 0; i < NIN; i++) begin
        req[i] = ($urandom % 3 == 0) ? '0 : NS'($urandom);
        req_dir[i] = $urandom % 2;
        any |= (req[i] != '0);
      end
      #1;
      check(busy == any, "busy");
      taken = '{default: 0};
      begin
        bit some;
        some = 0;
        for (int i = 0; i < NIN; i++) if (gnt_vld[i]) begin
          some = 1;
          check(req[i][gnt_slot[i]], "grant not requested");
          check(!taken[req_dir[i]][gnt_slot[i]], "slot granted twice");
          taken[req_dir[i]][gnt_slot[i]] = 1;
        end
        check(some == any, "no grant although requested");
      end
    end
    // fairness: all inputs want slot 2 of output 1
    @(negedge clk);
    for (int i = 0; i < NIN; i++) begin req[i] = 4'b0100; req_dir[i] = 1; wins[i] = 0; end
    for (int t = 0; t < NIN; t++) begin
      #1;
      for (int i = 0; i < NIN; i++) if (gnt_vld[i]) wins[i]++;
      @(negedge clk);
    end
    for (int i = 0; i < NIN; i++) check(wins[i] == 1, "round-robin fairness");
    // borrow mode
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      borrow_en = 1; borrow_upd = 1;
      for (int k = 0; k < 4; k++) borrow_l_req[k] = NS'($urandom);
      borrow_g_req = NIN'($urandom);
      #1;
      for (int i = 0; i < NIN; i++) check(!gnt_vld[i], "VA granted while lent");
      for (int k = 0; k < 4; k++)
        check($onehot0(borrow_l_gnt[k]) && (borrow_l_gnt[k] & ~borrow_l_req[k]) == 0 &&
              ((borrow_l_req[k] != 0) == (borrow_l_gnt[k] != 0)), "lent stage-1 arbiter");
      check($onehot0(borrow_g_gnt) && (borrow_g_gnt & ~borrow_g_req) == 0 &&
            ((borrow_g_req != 0) == (borrow_g_gnt != 0)), "lent stage-2 arbiter");
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
