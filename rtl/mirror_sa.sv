// mirror_sa: switch allocator of one RoCo module using the Mirroring Effect.
//
// The module's 2x2 crossbar has two inputs (path sets, "ports") and two
// outputs (East/West or North/South; direction 1 = East/North). Local
// stage: each port has one V:1 arbiter per direction, choosing among its
// VCs whose front flit goes that way. Global stage: only port 1 (index 0)
// has a 2:1 arbiter; it picks port 1's direction, and port 2 (index 1)
// simply takes the opposite direction with its local winner for that
// direction. Because the two results are mirror images, both crossbar
// outputs are used whenever the requests allow it: the global arbiter sees
// port 2's requests ("state info") and prefers a direction for which port 2
// can take the other one (this preference rule is this design's reading).
//
// Hardware recycling: with sa_fault set, the module's own arbiters are not
// used; the same decisions are made on arbiters borrowed from the VC
// allocator, in any cycle the VC allocator has no requests and, so that
// neither side starves, on every other cycle regardless (turn bit).
//
// Combinational grants; arbiter pointers and the turn bit are registers.
module mirror_sa
  import roco_pkg::*;
#(
  parameter int NV  = V,
  parameter int NS  = NSLOT,
  parameter int NIN = 2 * V
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NV-1:0]         req [2][2],   // [port][dir] VC requests
  input  logic                  sa_fault,
  input  logic                  va_busy,
  output logic                  gnt_vld [2],
  output logic                  gnt_dir [2],
  output logic [$clog2(NV)-1:0] gnt_vc  [2],
  // arbiters borrowed from the VC allocator
  output logic                  borrow_en,
  output logic                  borrow_upd,
  output logic [NS-1:0]         borrow_l_req [4],
  input  logic [NS-1:0]         borrow_l_gnt [4],
  output logic [NIN-1:0]        borrow_g_req,
  input  logic [NIN-1:0]        borrow_g_gnt
);
  localparam int VW = $clog2(NV);

  logic [1:0]    r1, r2, full, g_req, g_gnt_own, g_gnt;
  logic [NV-1:0] l_gnt_own [2][2];
  logic [NV-1:0] l_gnt     [2][2];
  logic          l_upd     [2][2];
  logic          turn, active, gd;

  always_comb begin
    for (int d = 0; d < 2; d++) begin
      r1[d] = (req[0][d] != '0);
      r2[d] = (req[1][d] != '0);
    end
    // bit d: port 1 goes d, port 2 goes !d
    full  = r1 & {r2[0], r2[1]};
    g_req = (full != 2'b00) ? full : (r1 | {r2[0], r2[1]});
  end

  assign active     = !sa_fault || turn || !va_busy;
  assign borrow_en  = sa_fault && active;
  assign borrow_upd = borrow_en;

  always_comb begin
    for (int p = 0; p < 2; p++)
      for (int d = 0; d < 2; d++)
        borrow_l_req[p*2+d] = NS'(req[p][d]);
    borrow_g_req = NIN'(g_req);
  end

  always_comb begin
    for (int p = 0; p < 2; p++)
      for (int d = 0; d < 2; d++)
        l_gnt[p][d] = sa_fault ? NV'(borrow_l_gnt[p*2+d]) : l_gnt_own[p][d];
    g_gnt = sa_fault ? borrow_g_gnt[1:0] : g_gnt_own;
  end

  always_comb begin
    gd = g_gnt[1];
    gnt_vld[0] = active && g_gnt != 2'b00 && r1[gd];
    gnt_dir[0] = gd;
    gnt_vld[1] = active && g_gnt != 2'b00 && r2[!gd];
    gnt_dir[1] = !gd;
    for (int p = 0; p < 2; p++) begin
      gnt_vc[p] = '0;
      for (int k = 0; k < NV; k++)
        if (l_gnt[p][gnt_dir[p]][k]) gnt_vc[p] = VW'(k);
    end
    for (int p = 0; p < 2; p++)
      for (int d = 0; d < 2; d++)
        l_upd[p][d] = !sa_fault && gnt_vld[p] && gnt_dir[p] == d[0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) turn <= 1'b0;
    else        turn <= sa_fault ? !turn : 1'b0;
  end

  for (genvar p = 0; p < 2; p++) begin : g_port
    for (genvar d = 0; d < 2; d++) begin : g_dir
      rr_arbiter #(.N(NV)) u_local (
        .clk, .rst_n, .req(req[p][d]), .update(l_upd[p][d]), .gnt(l_gnt_own[p][d]));
    end
  end

  rr_arbiter #(.N(2)) u_global (
    .clk, .rst_n, .req(g_req), .update(!sa_fault && g_gnt_own != 2'b00), .gnt(g_gnt_own));

  // Maximal matching: never leave an output idle that a request could use.
  assert property (@(posedge clk) disable iff (!rst_n)
    (active && (r1 != 2'b00 || r2 != 2'b00)) |-> (gnt_vld[0] || gnt_vld[1]));
  assert property (@(posedge clk) disable iff (!rst_n)
    (gnt_vld[0] && gnt_vld[1]) |-> (gnt_dir[0] != gnt_dir[1]));
endmodule
