// tb_roco_router: one adaptive router at (1,1); the testbench plays its four
// neighbours (taking every flit, returning credits a cycle later) and its
// PE. Checks: PE packets leave by a productive output, on a VC the
// neighbour's link owns in the module the next hop needs (or the ejection
// channel when the neighbour is the destination); link packets are steered
// by VCID into either module and leave two cycles after arriving; packets
// for this node are ejected in the cycle they arrive; credits come back for
// each buffered flit; the fault status is reported.
module tb_roco_router;
  import roco_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] cur_x = 1, cur_y = 1;
  link_t lnk_in [4], lnk_out [4];
  logic [NVC-1:0] credit_in [4], credit_out;
  status_t status_in [4], status_out;
  logic inj_valid, inj_ready;
  flit_t inj_flit;
  logic ej_valid [4];
  flit_t ej_flit [4];
  logic [1:0] module_fault, sa_fault;
  logic rc_fault;
  logic [NVC-1:0] buf_fault;
  int checks = 0, failures = 0, cyc = 0, ejected = 0, credits = 0;
  flit_t rx_f [4][$];
  int    rx_t [4][$];
  logic [VCID_W-1:0] rx_v [4][$];
  int first_cyc;

  roco_router #(.ROUTING(RT_ADAPTIVE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d", msg, cyc); end
  endtask

  always @(posedge clk) begin
    #1;
    for (int d = 0; d < 4; d++) begin
      credit_in[d] = '0;
      if (lnk_out[d].valid) begin
        rx_f[d].push_back(lnk_out[d].flit);
        rx_t[d].push_back(cyc);
        rx_v[d].push_back(lnk_out[d].vcid);
        if (lnk_out[d].vcid != VCID_EJECT) credit_in[d][lnk_out[d].vcid] = 1'b1;
      end
      if (ej_valid[d]) ejected++;
    end
    credits += $countones(credit_out);
  end

  function automatic flit_t mk(int f, int len, int dx, int dy, int tag);
    flit_t x;
    x = '0;
    x.ftype = (f == 0) ? FT_HEAD : (f == len - 1) ? FT_TAIL : FT_BODY;
    x.dst_x = 3'(dx); x.dst_y = 3'(dy);
    x.payload = PAYLOAD_W'(tag * 100 + f);
    return x;
  endfunction

  task automatic inject(int dx, int dy, int tag);
    for (int f = 0; f < 4; f++) begin
      @(negedge clk);
      inj_valid = 1; inj_flit = mk(f, 4, dx, dy, tag);
      #1;
      while (!inj_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk) inj_valid = 0;
  endtask

  task automatic on_link(int d, int vc, int dx, int dy, int tag);
    for (int f = 0; f < 4; f++) begin
      @(negedge clk);
      lnk_in[d].valid = 1; lnk_in[d].vcid = VCID_W'(vc); lnk_in[d].flit = mk(f, 4, dx, dy, tag);
      if (f == 0) first_cyc = cyc;
      #1;
      if (vc == VCID_EJECT) begin
        check(ej_valid[d] && ej_flit[d] == lnk_in[d].flit, "early ejection in the arrival cycle");
      end
    end
    @(negedge clk) lnk_in[d].valid = 0;
  endtask

  // where packet `tag` left: direction and downstream VC; also checks order
  task automatic find(int tag, output int dir, output logic [VCID_W-1:0] vc, output int t);
    int n;
    dir = -1; n = 0; t = 0;
    for (int d = 0; d < 4; d++)
      for (int k = 0; k < rx_f[d].size(); k++)
        if (rx_f[d][k].payload / 100 == tag) begin
          if (n == 0) begin dir = d; vc = rx_v[d][k]; t = rx_t[d][k]; end
          check(d == dir && rx_f[d][k].payload % 100 == n, "packet split or out of order");
          n++;
        end
    check(n == 4, $sformatf("packet %0d delivered (%0d flits)", tag, n));
  endtask

  // legal downstream VC for leaving by `dir` when the next hop routes `dim`
  function automatic bit legal(int dir, logic [VCID_W-1:0] vc, int dim);
    if (vc == VCID_EJECT) return dim == 2;
    return vc_owner(RT_ADAPTIVE, int'(vc)) == opposite(dir_e'(dir)) && (int'(vc) / 6) == dim;
  endfunction

  initial begin
    int dir, t;
    logic [VCID_W-1:0] vc;
    for (int d = 0; d < 4; d++) begin
      lnk_in[d] = '0; credit_in[d] = '0;
      status_in[d] = '0; status_in[d].module_ok = 2'b11;
    end
    inj_valid = 0; inj_flit = '0;
    module_fault = 0; sa_fault = 0; rc_fault = 0; buf_fault = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // PE packets
    inject(3, 1, 1);  repeat (8) @(posedge clk);
    find(1, dir, vc, t); check(dir == D_E && legal(dir, vc, 0), "to (3,1): East, Row VC");
    inject(1, 3, 2);  repeat (8) @(posedge clk);
    find(2, dir, vc, t); check(dir == D_N && legal(dir, vc, 1), "to (1,3): North, Column VC");
    inject(0, 1, 3);  repeat (8) @(posedge clk);
    find(3, dir, vc, t); check(dir == D_W && legal(dir, vc, 2), "to (0,1): West, eject there");
    inject(3, 3, 4);  repeat (8) @(posedge clk);
    find(4, dir, vc, t);
    check((dir == D_E && (legal(dir, vc, 0) || legal(dir, vc, 1))) ||
          (dir == D_N && (legal(dir, vc, 0) || legal(dir, vc, 1))), "to (3,3): productive output");
    inject(1, 0, 5);  repeat (8) @(posedge clk);
    find(5, dir, vc, t); check(dir == D_S && legal(dir, vc, 2), "to (1,0): South, eject there");

    // link packets: guided into either module by VCID, two cycles per hop
    on_link(D_W, 3, 4, 1, 6);  repeat (8) @(posedge clk);
    find(6, dir, vc, t); check(dir == D_E && legal(dir, vc, 0), "W->E through the Row-Module");
    check(t - first_cyc == 2, $sformatf("hop latency %0d", t - first_cyc));
    on_link(D_W, 10, 1, 4, 7); repeat (8) @(posedge clk);
    find(7, dir, vc, t); check(dir == D_N && legal(dir, vc, 1), "W->N through the Column-Module");
    on_link(D_S, 9, 1, 2, 8);  repeat (8) @(posedge clk);
    find(8, dir, vc, t); check(dir == D_N && legal(dir, vc, 2), "S->N, eject at (1,2)");
    ejected = 0;
    on_link(D_E, VCID_EJECT, 1, 1, 9);
    check(ejected == 4, "all four flits ejected");
    check(credits == 32, $sformatf("credits returned %0d", credits));

    // status
    module_fault = 2'b01; rc_fault = 1; buf_fault = 12'h0a5;
    #1 check(status_out.module_ok == 2'b10 && status_out.rc_fail && status_out.buf_fail == 12'h0a5, "status out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
