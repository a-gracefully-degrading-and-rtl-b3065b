// tb_roco_module: a Row-Module at node (2,2) with adaptive routing, driven
// through its VC write ports; the testbench plays both downstream routers
// (returning a credit for each flit it receives, when enabled).
// Checks: 2-cycle latency from VC write to link; ejection VC at the next hop
// when it is the destination; a legal downstream VC otherwise; order and
// content of every flit; both outputs busy in the same cycle for opposite
// packets from the two path sets (mirroring); the 5-credit limit; virtual
// queuing towards a failed downstream buffer (link held until its credit);
// the bypass path of a failed local buffer; module isolation; switch
// allocation on borrowed arbiters; routes taken from the head flit when the
// RC has failed; the second route written for a neighbour with a failed RC.
module tb_roco_module;
  import roco_pkg::*;
  localparam int DEPTH = 5;
  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] cur_x = 2, cur_y = 2;
  logic vc_in_valid [6];
  flit_t vc_in_flit [6];
  logic [5:0] vc_space, credit_out, buf_fault;
  logic module_fault, sa_fault, rc_fault;
  logic [NVC-1:0] nb_credit [2];
  status_t nb_status [2];
  link_t out_link [2];
  int checks = 0, failures = 0, cyc = 0, dual = 0;
  bit auto_credit;
  // received flits per output
  flit_t rx_f [2][$];
  int    rx_t [2][$];
  logic [VCID_W-1:0] rx_v [2][$];

  roco_module #(.ROUTING(RT_ADAPTIVE), .DIM(1'b0), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d", msg, cyc); end
  endtask

  // downstream routers: record each flit once (when the link register was
  // loaded at this edge) and, if enabled, return its credit a cycle later
  logic ld [2];
  int first_cyc;
  always @(posedge clk) begin
    for (int o = 0; o < 2; o++) ld[o] = dut.out_free[o];
    #1;
    if (auto_credit) begin nb_credit[0] = '0; nb_credit[1] = '0; end
    for (int o = 0; o < 2; o++)
      if (out_link[o].valid && ld[o]) begin
        rx_f[o].push_back(out_link[o].flit);
        rx_t[o].push_back(cyc);
        rx_v[o].push_back(out_link[o].vcid);
        if (auto_credit && out_link[o].vcid != VCID_EJECT) nb_credit[o][out_link[o].vcid] = 1'b1;
      end
    if (out_link[0].valid && out_link[1].valid) dual++;
  end

  function automatic flit_t mk(int f, int len, int dx, int dy, int tag);
    flit_t x;
    x = '0;
    x.ftype = (len == 1) ? FT_HT : (f == 0) ? FT_HEAD : (f == len - 1) ? FT_TAIL : FT_BODY;
    x.dst_x = 3'(dx); x.dst_y = 3'(dy);
    x.payload = PAYLOAD_W'(tag * 100 + f);
    return x;
  endfunction

  // write a packet into VC i, one flit per cycle while it has room
  task automatic put(int i, int len, int dx, int dy, int tag);
    for (int f = 0; f < len; f++) begin
      @(negedge clk);
      while (!vc_space[i] && !buf_fault[i]) @(negedge clk);
      vc_in_valid[i] = 1; vc_in_flit[i] = mk(f, len, dx, dy, tag);
      if (f == 0) first_cyc = cyc;
      if (buf_fault[i]) begin
        // bypass: the flit waits "upstream" until taken
        @(posedge clk);
        while (!dut.pop[i]) @(posedge clk);
        #1;
      end
      @(negedge clk) vc_in_valid[i] = 0;
    end
  endtask

  task automatic clear_rx();
    for (int o = 0; o < 2; o++) begin rx_f[o].delete(); rx_t[o].delete(); rx_v[o].delete(); end
  endtask

  // the packet with `tag` must have arrived complete and in order on output o
  task automatic expect_pkt(int o, int len, int tag, output logic [VCID_W-1:0] vc);
    int n;
    n = 0;
    vc = '1;
    for (int k = 0; k < rx_f[o].size(); k++)
      if (rx_f[o][k].payload / 100 == tag) begin
        check(rx_f[o][k].payload % 100 == n, "flit order");
        if (n == 0) vc = rx_v[o][k];
        else check(rx_v[o][k] == vc, "packet changed VC");
        n++;
      end
    check(n == len, $sformatf("packet %0d complete (%0d of %0d flits)", tag, n, len));
  endtask

  initial begin
    logic [VCID_W-1:0] vc;
    int t0;
    for (int i = 0; i < 6; i++) begin vc_in_valid[i] = 0; vc_in_flit[i] = '0; end
    buf_fault = '0; module_fault = 0; sa_fault = 0; rc_fault = 0;
    nb_status[0] = '0; nb_status[1] = '0;
    nb_status[0].module_ok = 2'b11; nb_status[1].module_ok = 2'b11;
    auto_credit = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. eject at the next hop, latency
    put(0, 4, 1, 2, 1);
    t0 = first_cyc;
    repeat (10) @(posedge clk);
    expect_pkt(0, 4, 1, vc);
    check(vc == VCID_EJECT, "ejection VC at the destination");
    check(rx_t[0].size() > 0 && rx_t[0][0] - t0 == 2, $sformatf("latency %0d", rx_t[0][0] - t0));
    clear_rx();

    // 2. both dimensions productive at the next hop: VC 0, 4 (Row) or 7 (Column)
    put(0, 4, 0, 5, 2);
    repeat (10) @(posedge clk);
    expect_pkt(0, 4, 2, vc);
    check(vc == 0 || vc == 4 || vc == 7, $sformatf("adaptive downstream VC %0d", vc));
    clear_rx();

    // 3. mirroring: port 1 goes East while port 2 goes West
    dual = 0;
    fork
      put(1, 4, 6, 2, 3);
      put(4, 4, 0, 2, 4);
    join
    repeat (10) @(posedge clk);
    expect_pkt(1, 4, 3, vc);
    check(vc == 3 || vc == 10 || vc == 11, "East downstream VC");
    expect_pkt(0, 4, 4, vc);
    check(dual >= 3, $sformatf("both outputs used together (%0d cycles)", dual));
    clear_rx();

    // 4. credit limit: 7-flit packet, no credits returned
    auto_credit = 0;
    fork put(0, 7, 0, 2, 5); join_none
    repeat (20) @(posedge clk);
    check(rx_f[0].size() == DEPTH, $sformatf("stopped at %0d flits without credits", rx_f[0].size()));
    @(negedge clk); nb_credit[0][rx_v[0][0]] = 1; @(negedge clk); nb_credit[0] = '0;
    @(negedge clk); nb_credit[0][rx_v[0][0]] = 1; @(negedge clk); nb_credit[0] = '0;
    repeat (10) @(posedge clk);
    expect_pkt(0, 7, 5, vc);
    auto_credit = 1;
    clear_rx();

    // 5. virtual queuing towards a failed downstream buffer
    nb_status[1].buf_fail = '1;
    auto_credit = 0;
    fork put(3, 2, 6, 2, 6); join_none
    repeat (12) @(posedge clk);
    check(out_link[1].valid && out_link[1].flit.payload == 600, "link held for virtual queuing");
    check(rx_f[1].size() == 1, "only one flit sent to a failed buffer");
    @(negedge clk); nb_credit[1][out_link[1].vcid] = 1; @(negedge clk); nb_credit[1] = '0;
    repeat (4) @(posedge clk);
    check(out_link[1].valid && out_link[1].flit.payload == 601, "next flit after the credit");
    @(negedge clk); nb_credit[1][out_link[1].vcid] = 1; @(negedge clk); nb_credit[1] = '0;
    repeat (4) @(posedge clk);
    expect_pkt(1, 2, 6, vc);
    nb_status[1].buf_fail = '0;
    auto_credit = 1;
    clear_rx();

    // 6. failed local buffer: bypass path
    buf_fault[3] = 1;
    put(3, 4, 7, 2, 7);
    repeat (6) @(posedge clk);
    expect_pkt(1, 4, 7, vc);
    buf_fault[3] = 0;
    clear_rx();

    // 7. module isolation
    module_fault = 1;
    fork put(0, 2, 0, 2, 8); join_none
    repeat (12) @(posedge clk);
    check(rx_f[0].size() == 0, "failed module sent flits");
    module_fault = 0;
    repeat (8) @(posedge clk);
    expect_pkt(0, 2, 8, vc);
    clear_rx();

    // 8. switch allocator failed: runs on the VC allocator's arbiters
    sa_fault = 1;
    fork
      put(1, 4, 6, 2, 9);
      put(4, 4, 0, 2, 10);
    join
    repeat (15) @(posedge clk);
    expect_pkt(1, 4, 9, vc);
    expect_pkt(0, 4, 10, vc);
    sa_fault = 0;
    clear_rx();

    // 9. failed RC: the head's second route (eject) is obeyed
    rc_fault = 1;
    @(negedge clk);
    vc_in_valid[0] = 1; vc_in_flit[0] = mk(0, 1, 0, 2, 11);
    vc_in_flit[0].la2_vld = 1; vc_in_flit[0].la2 = route_t'(3'b100);
    @(negedge clk) vc_in_valid[0] = 0;
    repeat (6) @(posedge clk);
    expect_pkt(0, 1, 11, vc);
    check(vc == VCID_EJECT, "route from the head flit used");
    rc_fault = 0;
    clear_rx();

    // 10. neighbour with a failed RC: second route written into the head.
    // (2,2) -> (1,2) -> route at the node after it, towards (0,2): eject there
    // if the VC chosen at (1,2) is in the Row-Module.
    nb_status[0].rc_fail = 1;
    put(0, 1, 0, 2, 12);
    repeat (6) @(posedge clk);
    expect_pkt(0, 1, 12, vc);
    check(rx_f[0].size() == 1 && rx_f[0][0].la2_vld && rx_f[0][0].la2.eject, "second look-ahead route");
    nb_status[0].rc_fail = 0;

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
