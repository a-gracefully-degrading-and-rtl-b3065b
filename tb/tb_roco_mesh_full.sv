// tb_roco_mesh_full: the top at its default size, an 8x8 mesh of RoCo
// routers with minimal adaptive routing and five-flit VC buffers.
//
// Every node sends NPKT four-flit packets to uniformly random destinations
// (tb_traffic), while four routers carry permanent faults of each kind:
// the Column-Module of (3,3) is isolated, the RC of (5,5) has failed, one
// VC buffer on each input link of (2,6) has failed (virtual queuing), and
// both switch allocators of (6,2) run on borrowed VC-allocator arbiters.
// Destinations in column 3 other than (3,3) are not used, since the failed
// Column-Module could be the only way into them, and (5,5) injects nothing.
// Passes when every packet arrives whole, in order, at the right node; the
// average latency is printed. A watchdog stops a run that stops delivering.
module tb_roco_mesh_full;
  import roco_pkg::*;
  localparam int MX = 8, MY = 8, NN = MX * MY, NPKT = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic           inj_valid [NN];
  flit_t          inj_flit  [NN];
  logic           inj_ready [NN];
  logic           ej_valid  [NN][4];
  flit_t          ej_flit   [NN][4];
  logic [1:0]     mf [NN], sf [NN];
  logic           rf [NN];
  logic [NVC-1:0] bf [NN];
  int sent, received, errors;
  longint lat_sum;

  always_comb begin
    for (int n = 0; n < NN; n++) begin
      mf[n] = '0; sf[n] = '0; rf[n] = 1'b0; bf[n] = '0;
    end
    mf[3*MX+3] = 2'b10;      // (3,3): Column-Module isolated
    rf[5*MX+5] = 1'b1;       // (5,5): RC failed
    bf[6*MX+2] = 12'h249;    // (2,6): VCs 0, 3, 6, 9 failed, one per input link
    sf[2*MX+6] = 2'b11;      // (6,2): both switch allocators failed
  end

  roco_mesh u_dut (
    .clk, .rst_n, .inj_valid, .inj_flit, .inj_ready, .ej_valid, .ej_flit,
    .module_fault(mf), .sa_fault(sf), .rc_fault(rf), .buf_fault(bf));

  tb_traffic #(.MX(MX), .MY(MY), .NPKT(NPKT), .INJ_PCT(10), .ROUTING(RT_ADAPTIVE),
               .SKIP_X(3), .SKIP_Y(3), .NO_SRC(5*MX+5)) u_gen (.*);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (received == (NN - 1) * NPKT);
    repeat (20) @(posedge clk);
    $display("8x8 mesh: sent %0d received %0d errors %0d avg latency %0d cycles at cycle %0d",
             sent, received, errors, lat_sum / received, cyc);
    check(sent == (NN - 1) * NPKT, "all packets injected");
    check(received == sent, "all packets delivered");
    check(errors == 0, "no misrouted or reordered flit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: sent %0d received %0d", sent, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
