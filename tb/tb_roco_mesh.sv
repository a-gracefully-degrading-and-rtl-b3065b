// tb_roco_mesh: end-to-end test of 4x4 RoCo meshes.
//
// Three meshes run side by side under random uniform traffic: XY routing
// at a high load and XY-YX routing, both without faults, and a minimal
// adaptive mesh with permanent faults: the Column-Module of node (1,1)
// isolated, the RC of node (2,2) failed, one VC buffer on each input link
// of node (2,1) failed, and both switch allocators of node (1,2) failed.
// Every packet must arrive whole, in order, at its destination (checked by
// tb_traffic). The test also counts how
// often each mechanism of the router acted and fails if one never did:
// early ejection, both crossbar outputs granted in one cycle (mirroring),
// a lost speculative switch grant, a credit stall, virtual queuing (link
// held), the buffer bypass, switch allocation on borrowed VA arbiters,
// double routing, and traffic through the surviving Row-Module of (1,1).
module tb_roco_mesh;
  import roco_pkg::*;
  localparam int MX = 4, MY = 4, NN = MX * MY, NPKT = 25;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // per-mesh signals
  logic  inj_valid [3][NN];
  flit_t inj_flit  [3][NN];
  logic  inj_ready [3][NN];
  logic  ej_valid  [3][NN][4];
  flit_t ej_flit   [3][NN][4];
  int sent [3], received [3], errors [3];
  longint lat_sum [3];
  logic [1:0]     mf [3][NN], sf [3][NN];
  logic           rf [3][NN];
  logic [NVC-1:0] bf [3][NN];

  always_comb begin
    for (int m = 0; m < 3; m++)
      for (int n = 0; n < NN; n++) begin
        mf[m][n] = '0; sf[m][n] = '0; rf[m][n] = 1'b0; bf[m][n] = '0;
      end
    mf[2][1*MX+1] = 2'b10;      // (1,1): Column-Module isolated
    rf[2][2*MX+2] = 1'b1;       // (2,2): RC failed
    bf[2][1*MX+2] = 12'h249;    // (2,1): VCs 0, 3, 6, 9 failed, one per input link
    sf[2][2*MX+1] = 2'b11;      // (1,2): both switch allocators failed
  end

  roco_mesh #(.MESH_X(MX), .MESH_Y(MY), .ROUTING(RT_XY)) m_xy (
    .clk, .rst_n, .inj_valid(inj_valid[0]), .inj_flit(inj_flit[0]), .inj_ready(inj_ready[0]),
    .ej_valid(ej_valid[0]), .ej_flit(ej_flit[0]),
    .module_fault(mf[0]), .sa_fault(sf[0]), .rc_fault(rf[0]), .buf_fault(bf[0]));
  roco_mesh #(.MESH_X(MX), .MESH_Y(MY), .ROUTING(RT_XYYX)) m_xyyx (
    .clk, .rst_n, .inj_valid(inj_valid[1]), .inj_flit(inj_flit[1]), .inj_ready(inj_ready[1]),
    .ej_valid(ej_valid[1]), .ej_flit(ej_flit[1]),
    .module_fault(mf[1]), .sa_fault(sf[1]), .rc_fault(rf[1]), .buf_fault(bf[1]));
  roco_mesh #(.MESH_X(MX), .MESH_Y(MY), .ROUTING(RT_ADAPTIVE)) m_ft (
    .clk, .rst_n, .inj_valid(inj_valid[2]), .inj_flit(inj_flit[2]), .inj_ready(inj_ready[2]),
    .ej_valid(ej_valid[2]), .ej_flit(ej_flit[2]),
    .module_fault(mf[2]), .sa_fault(sf[2]), .rc_fault(rf[2]), .buf_fault(bf[2]));

  tb_traffic #(.MX(MX), .MY(MY), .NPKT(NPKT), .INJ_PCT(30), .ROUTING(RT_XY)) g0 (
    .clk, .rst_n, .inj_valid(inj_valid[0]), .inj_flit(inj_flit[0]), .inj_ready(inj_ready[0]),
    .ej_valid(ej_valid[0]), .ej_flit(ej_flit[0]),
    .sent(sent[0]), .received(received[0]), .errors(errors[0]), .lat_sum(lat_sum[0]));
  tb_traffic #(.MX(MX), .MY(MY), .NPKT(NPKT), .INJ_PCT(12), .ROUTING(RT_XYYX)) g1 (
    .clk, .rst_n, .inj_valid(inj_valid[1]), .inj_flit(inj_flit[1]), .inj_ready(inj_ready[1]),
    .ej_valid(ej_valid[1]), .ej_flit(ej_flit[1]),
    .sent(sent[1]), .received(received[1]), .errors(errors[1]), .lat_sum(lat_sum[1]));
  tb_traffic #(.MX(MX), .MY(MY), .NPKT(NPKT), .INJ_PCT(12), .ROUTING(RT_ADAPTIVE),
               .SKIP_X(1), .SKIP_Y(1), .NO_SRC(2*MX+2)) g2 (
    .clk, .rst_n, .inj_valid(inj_valid[2]), .inj_flit(inj_flit[2]), .inj_ready(inj_ready[2]),
    .ej_valid(ej_valid[2]), .ej_flit(ej_flit[2]),
    .sent(sent[2]), .received(received[2]), .errors(errors[2]), .lat_sum(lat_sum[2]));

  // mechanism counters
  int n_dual = 0, n_spec = 0, n_stall = 0, n_hold = 0, n_bypass = 0, n_borrow = 0,
      n_double = 0, n_degraded = 0, n_eject = 0;

  for (genvar y = 0; y < MY; y++) begin : g_cy
    for (genvar x = 0; x < MX; x++) begin : g_cx
      always @(posedge clk) if (rst_n) begin
        for (int l = 0; l < 4; l++) n_eject += int'(ej_valid[0][y*MX+x][l]) + int'(ej_valid[2][y*MX+x][l]);
        if (m_xy.g_y[y].g_x[x].u_rt.u_row.go[0] && m_xy.g_y[y].g_x[x].u_rt.u_row.go[1]) n_dual++;
        if (m_xy.g_y[y].g_x[x].u_rt.u_col.go[0] && m_xy.g_y[y].g_x[x].u_rt.u_col.go[1]) n_dual++;
        for (int p = 0; p < 2; p++) begin
          n_spec += int'(m_xy.g_y[y].g_x[x].u_rt.u_row.spec_miss[p]) + int'(m_xy.g_y[y].g_x[x].u_rt.u_col.spec_miss[p]);
          n_hold += int'(!m_ft.g_y[y].g_x[x].u_rt.u_row.out_free[p]) + int'(!m_ft.g_y[y].g_x[x].u_rt.u_col.out_free[p]);
        end
        for (int i = 0; i < 6; i++) begin
          if (m_xy.g_y[y].g_x[x].u_rt.u_row.alloc[i] && m_xy.g_y[y].g_x[x].u_rt.u_row.head_vld[i] &&
              !m_xy.g_y[y].g_x[x].u_rt.u_row.ds_cred[m_xy.g_y[y].g_x[x].u_rt.u_row.odir[i]][m_xy.g_y[y].g_x[x].u_rt.u_row.aslot[i]])
            n_stall++;
          if (m_ft.g_y[y].g_x[x].u_rt.u_row.pop[i] && m_ft.g_y[y].g_x[x].u_rt.u_row.buf_fault[i]) n_bypass++;
          if (m_ft.g_y[y].g_x[x].u_rt.u_col.pop[i] && m_ft.g_y[y].g_x[x].u_rt.u_col.buf_fault[i]) n_bypass++;
        end
        if (m_ft.g_y[y].g_x[x].u_rt.u_row.u_sa.borrow_en && m_ft.g_y[y].g_x[x].u_rt.u_row.u_sa.gnt_vld[0]) n_borrow++;
        if (m_ft.g_y[y].g_x[x].u_rt.u_col.u_sa.borrow_en && m_ft.g_y[y].g_x[x].u_rt.u_col.u_sa.gnt_vld[0]) n_borrow++;
      end
    end
  end
  // double routing: heads leaving the router with the failed RC
  // degraded mode: flits through the working Row-Module of (1,1)
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 2; p++) begin
      if (m_ft.g_y[2].g_x[2].u_rt.u_row.go[p] && is_head(m_ft.g_y[2].g_x[2].u_rt.u_row.xin[p])) n_double++;
      if (m_ft.g_y[2].g_x[2].u_rt.u_col.go[p] && is_head(m_ft.g_y[2].g_x[2].u_rt.u_col.xin[p])) n_double++;
      if (m_ft.g_y[1].g_x[1].u_rt.u_row.go[p]) n_degraded++;
    end
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int exp_pkts [3];
    exp_pkts = '{NN * NPKT, NN * NPKT, (NN - 1) * NPKT};
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (received[0] == exp_pkts[0] && received[1] == exp_pkts[1] &&
          received[2] == exp_pkts[2]);
    repeat (20) @(posedge clk);
    for (int m = 0; m < 3; m++) begin
      $display("mesh %0d: sent %0d received %0d errors %0d avg latency %0d.%02d cycles", m,
               sent[m], received[m], errors[m], lat_sum[m] / received[m],
               (lat_sum[m] * 100 / received[m]) % 100);
      check(sent[m] == exp_pkts[m] && received[m] == sent[m] && errors[m] == 0,
            $sformatf("mesh %0d delivery", m));
    end
    $display("ejected flits %0d, dual grants %0d, lost speculation %0d, credit stalls %0d",
             n_eject, n_dual, n_spec, n_stall);
    $display("virtual queuing holds %0d, bypass reads %0d, borrowed SA grants %0d, heads double-routed %0d, degraded-mode flits %0d",
             n_hold, n_bypass, n_borrow, n_double, n_degraded);
    check(n_eject > 0, "early ejection");
    check(n_dual > 0, "mirrored dual grants");
    check(n_spec > 0, "lost speculative switch grant");
    check(n_stall > 0, "credit stall");
    check(n_hold > 0, "virtual queuing");
    check(n_bypass > 0, "buffer bypass");
    check(n_borrow > 0, "switch allocation on VA arbiters");
    check(n_double > 0, "double routing");
    check(n_degraded > 0, "degraded-mode operation");
    $display("finished at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    for (int m = 0; m < 3; m++) $display("watchdog: mesh %0d sent %0d received %0d", m, sent[m], received[m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
