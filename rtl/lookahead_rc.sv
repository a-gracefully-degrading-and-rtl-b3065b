// lookahead_rc: look-ahead routing computation for one VC of a module.
//
// The router a head flit is in already knows which module (dimension) the
// flit leaves by and, from the destination, which way (dir bit). This unit
// computes the route at the *next* router: eject there, or which of its two
// modules may carry the packet on (XY, XY-YX or minimal adaptive). The VC
// allocator uses it to reserve a VC of the right module downstream, so the
// flit is steered into place by that router's DEMUX on arrival.
//
// Double routing: when this router's own RC has failed (rc_fault) it uses
// the second route carried in the head flit (la2), which the router before
// it computed. Conversely, when the next router reports a failed RC
// (nb_rc_fail), this unit computes the route one hop beyond it (la2_out),
// using the module of the VC reserved there (dn_vc), for the head to carry.
// The published scheme performs the extra routing at the router after the
// faulty one; computing it one hop earlier is this design's choice, because
// the VC at the router after the faulty one must be known before the flit
// leaves the faulty router.
//
// Combinational.
module lookahead_rc
  import roco_pkg::*;
#(
  parameter routing_e ROUTING = RT_ADAPTIVE,
  parameter bit       DIM     = 1'b0   // module this VC belongs to: 0 Row, 1 Column
) (
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  flit_t              flit,      // front flit (a head when it matters)
  input  logic               rc_fault,  // this router's RC has failed
  input  logic               nb_rc_fail,// the next router's RC has failed
  input  logic [VCID_W-1:0]  dn_vc,     // VC reserved at the next router
  output logic               out_dir,   // 1 = East/North, 0 = West/South
  output logic               la_vld,
  output route_t             la,
  output logic               la2_vld,
  output route_t             la2_out
);
  logic [COORD_W-1:0] nx, ny, n2x, n2y;
  logic               dim2, dir2;

  assign out_dir = dir_bit(DIM, cur_x, cur_y, flit);

  always_comb begin
    nx = cur_x;
    ny = cur_y;
    if (DIM == 1'b0) nx = out_dir ? cur_x + 1'b1 : cur_x - 1'b1;
    else             ny = out_dir ? cur_y + 1'b1 : cur_y - 1'b1;
  end

  always_comb begin
    if (rc_fault) begin
      la_vld = flit.la2_vld;
      la     = flit.la2;
    end else begin
      la_vld = 1'b1;
      la     = route_at(ROUTING, nx, ny, flit);
    end
  end

  // Second look-ahead: route at the router after the next one.
  always_comb begin
    dim2 = (dn_vc >= VCID_W'(NVC/2));
    dir2 = dir_bit(dim2, nx, ny, flit);
    n2x  = nx;
    n2y  = ny;
    if (dim2 == 1'b0) n2x = dir2 ? nx + 1'b1 : nx - 1'b1;
    else              n2y = dir2 ? ny + 1'b1 : ny - 1'b1;
    la2_vld = nb_rc_fail && dn_vc != VCID_EJECT;
    la2_out = route_at(ROUTING, n2x, n2y, flit);
  end
endmodule
