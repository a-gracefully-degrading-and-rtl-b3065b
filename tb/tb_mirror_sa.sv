// tb_mirror_sa: random switch requests. Grants must go to requesting VCs,
// the two ports must take opposite directions (mirroring), and the number
// of grants must equal the maximum matching of the 2x2 request pattern,
// worked out here by enumeration. With sa_fault the same must hold on the
// lent arbiters (modelled here as fixed-priority), and while the VC
// allocator is busy grants may appear only on every other cycle.
module tb_mirror_sa;
  import roco_pkg::*;
  localparam int NV = 3, NS = 4, NIN = 6;
  logic clk = 0, rst_n = 0;
  logic [NV-1:0] req [2][2];
  logic sa_fault, va_busy;
  logic gnt_vld [2], gnt_dir [2];
  logic [1:0] gnt_vc [2];
  logic borrow_en, borrow_upd;
  logic [NS-1:0] borrow_l_req [4], borrow_l_gnt [4];
  logic [NIN-1:0] borrow_g_req, borrow_g_gnt;
  int checks = 0, failures = 0, dual = 0, borrowed = 0, lost_turns = 0;

  mirror_sa #(.NV(NV), .NS(NS), .NIN(NIN)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [NIN-1:0] lowest(logic [NIN-1:0] r);
    return r & (~r + 1'b1);
  endfunction
  always_comb begin
    for (int k = 0; k < 4; k++) borrow_l_gnt[k] = NS'(lowest(NIN'(borrow_l_req[k])));
    borrow_g_gnt = lowest(borrow_g_req);
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    sa_fault = 0; va_busy = 0;
    for (int p = 0; p < 2; p++) for (int d = 0; d < 2; d++) req[p][d] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int best, ng;
      bit r1 [2], r2 [2];
      @(negedge clk);
      sa_fault = (t >= 2000);
      va_busy  = sa_fault && (t % 7 != 0);
      for (int p = 0; p < 2; p++) for (int d = 0; d < 2; d++)
        req[p][d] = ($urandom % 2) ? NV'($urandom) : '0;
      #1;
      for (int d = 0; d < 2; d++) begin r1[d] = req[0][d] != 0; r2[d] = req[1][d] != 0; end
      // maximum matching of the 2x2 pattern
      best = 0;
      for (int d = 0; d < 2; d++) begin
        int m;
        m = int'(r1[d]) + int'(r2[1-d]);
        if (m > best) best = m;
      end
      ng = int'(gnt_vld[0]) + int'(gnt_vld[1]);
      for (int p = 0; p < 2; p++)
        if (gnt_vld[p]) check(req[p][gnt_dir[p]][gnt_vc[p]], "grant to a non-requesting VC");
      if (gnt_vld[0] && gnt_vld[1]) begin
        dual++;
        check(gnt_dir[0] != gnt_dir[1], "ports not mirrored");
      end
      if (!sa_fault || borrow_en) begin
        check(ng == best, "not a maximum matching");
        if (sa_fault) borrowed++;
      end else begin
        check(ng == 0, "granted while VA owns the arbiters");
        lost_turns++;
      end
      check(borrow_en == (sa_fault && (!va_busy || dut.turn)), "borrow timing");
    end
    check(dual > 0 && borrowed > 0 && lost_turns > 0, "mechanisms exercised");
    $display("dual=%0d borrowed=%0d lost=%0d", dual, borrowed, lost_turns);
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
