// injection_unit: entry point of the local PE into a RoCo router.
//
// A packet heading along X (East/West) is queued in an Inj_xy VC of the
// Row-Module, one heading along Y in an Inj_yx VC of the Column-Module; with
// adaptive routing a packet that may go either way takes whichever has room
// first (Row-Module preferred). The choice is made for the head flit and the
// rest of the packet follows into the same VC (wormhole). Injection VCs of a
// failed module or with a failed buffer are not used.
//
// Interface: valid/ready per flit (this design's choice). inj_ready is
// combinational from the VC occupancy and, for a head, from the flit's
// destination. A flit is written into the VC at the clock edge where
// inj_valid && inj_ready. The PE must not address its own node.
module injection_unit
  import roco_pkg::*;
#(
  parameter routing_e ROUTING = RT_ADAPTIVE
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic               inj_valid,
  input  flit_t              inj_flit,
  output logic               inj_ready,
  input  logic [NVC-1:0]     vc_space,
  input  logic [1:0]         module_ok,
  output logic [NVC-1:0]     vc_valid,
  output flit_t              vc_flit
);
  logic              in_pkt;
  logic [VCID_W-1:0] cur_vc;
  logic              found;
  logic [VCID_W-1:0] pick;
  route_t            r;

  always_comb begin
    r     = route_at(ROUTING, cur_x, cur_y, inj_flit);
    found = 1'b0;
    pick  = '0;
    for (int v = 0; v < NVC; v++) begin
      if (!found && vc_owner(ROUTING, v) == D_L && vc_space[v] &&
          module_ok[v / (NVC/2)] && ((v >= NVC/2) ? r.y_ok : r.x_ok)) begin
        found = 1'b1;
        pick  = VCID_W'(v);
      end
    end
  end

  always_comb begin
    if (in_pkt) inj_ready = vc_space[cur_vc];
    else        inj_ready = is_head(inj_flit) && found;
    vc_valid = '0;
    if (inj_valid && inj_ready) vc_valid[in_pkt ? cur_vc : pick] = 1'b1;
    vc_flit = inj_flit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_pkt <= 1'b0;
      cur_vc <= '0;
    end else if (inj_valid && inj_ready) begin
      if (!in_pkt) cur_vc <= pick;
      in_pkt <= !is_tail(inj_flit);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
    (inj_valid && is_head(inj_flit)) |-> !r.eject);
  assert property (@(posedge clk) disable iff (!rst_n)
    (inj_valid && inj_ready && in_pkt) |-> !is_head(inj_flit));
endmodule
