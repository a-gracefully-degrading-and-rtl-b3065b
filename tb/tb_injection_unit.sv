// tb_injection_unit: packets from the PE at node (3,3) with adaptive
// routing. X-only packets must enter the Inj_xy VC (2), Y-only ones the
// Inj_yx VC (8), packets that may go either way the Row VC when it has room
// and the Column VC otherwise; a whole packet stays in one VC, a full VC or
// a failed module holds the PE back.
module tb_injection_unit;
  import roco_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] cur_x = 3, cur_y = 3;
  logic inj_valid, inj_ready;
  flit_t inj_flit, vc_flit;
  logic [NVC-1:0] vc_space, vc_valid;
  logic [1:0] module_ok;
  int checks = 0, failures = 0;

  injection_unit #(.ROUTING(RT_ADAPTIVE)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // send one 4-flit packet; expect every flit in VC `exp_vc`
  task automatic send(int dx, int dy, int exp_vc, int block_cycle);
    for (int f = 0; f < 4; f++) begin
      @(negedge clk);
      inj_valid = 1;
      inj_flit = '0;
      inj_flit.ftype = (f == 0) ? FT_HEAD : (f == 3) ? FT_TAIL : FT_BODY;
      inj_flit.dst_x = 3'(dx); inj_flit.dst_y = 3'(dy);
      inj_flit.payload = PAYLOAD_W'(f);
      if (f == block_cycle) begin
        // the VC in use fills up: the PE must wait
        vc_space[exp_vc] = 0;
        #1 check(!inj_ready && vc_valid == '0, "not held back by a full VC");
        @(negedge clk);
        vc_space[exp_vc] = 1;
      end
      #1;
      check(inj_ready && vc_valid == (NVC'(1) << exp_vc) && vc_flit == inj_flit, "flit in wrong VC");
    end
    @(negedge clk);
    inj_valid = 0;
  endtask

  initial begin
    inj_valid = 0; inj_flit = '0;
    vc_space = '1; module_ok = 2'b11;
    repeat (2) @(posedge clk);
    rst_n = 1;
    send(6, 3, 2, -1);     // X only
    send(3, 0, 8, 2);      // Y only, VC fills mid-packet
    send(5, 6, 2, -1);     // either: Row first
    vc_space[2] = 0;
    send(0, 7, 8, -1);     // either, Row full: Column
    // the VC choice is held for the whole packet even if Row frees up
    vc_space[2] = 1;
    module_ok = 2'b10;     // Row-Module failed
    send(1, 5, 8, -1);
    @(negedge clk);
    inj_valid = 1; inj_flit = '0; inj_flit.ftype = FT_HEAD; inj_flit.dst_x = 6; inj_flit.dst_y = 3;
    #1 check(!inj_ready && vc_valid == '0, "X-only packet accepted into a failed module");
    @(negedge clk);
    inj_valid = 0;
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
