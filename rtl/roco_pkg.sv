// roco_pkg: types, constants and pure functions shared by the Row-Column
// (RoCo) decoupled router.
//
// A RoCo router splits a 2D-mesh router into two independent halves: the
// Row-Module switches East/West traffic through a 2x2 crossbar and the
// Column-Module switches North/South traffic through a second 2x2 crossbar.
// Each module has two input ports ("path sets") of three virtual channels,
// 12 VCs per router. Which VC may hold which traffic class (d_x, d_y, t_xy,
// t_yx, Inj_xy, Inj_yx) depends on the routing algorithm and follows the
// published VC table; which incoming link owns each VC is this design's own
// choice and is encoded in vc_owner() below.
//
// VC numbering: vc = module*6 + port*3 + slot, module 0 = Row, 1 = Column,
// port 0 = first path set, port 1 = second path set. VC number 12 on a link
// means "eject at the receiving router" (early ejection).
//
// Coordinates: x grows towards East, y grows towards North. Inside a module
// direction bit 1 is the positive direction (East or North) and 0 the
// negative one (West or South), as printed for the Row switch allocator
// (EAST=1, WEST=0).
package roco_pkg;

  localparam int FLIT_W  = 128;  // four 128-bit flits per packet
  localparam int COORD_W = 3;    // up to 8x8 nodes
  localparam int NVC     = 12;   // VCs per router
  localparam int V       = 3;    // VCs per path set
  localparam int VCID_W  = 4;    // 0..11 = VC, 12 = eject
  localparam logic [VCID_W-1:0] VCID_EJECT = 4'd12;
  localparam int NSLOT   = V + 1; // downstream slots per output: 3 VCs + ejection

  typedef enum logic [1:0] {
    RT_XY       = 2'd0,
    RT_XYYX     = 2'd1,
    RT_ADAPTIVE = 2'd2
  } routing_e;

  // Router link directions; also used as "the link a flit arrived on".
  typedef enum logic [2:0] {
    D_E = 3'd0,
    D_W = 3'd1,
    D_N = 3'd2,
    D_S = 3'd3,
    D_L = 3'd4   // local PE
  } dir_e;

  typedef enum logic [1:0] {
    FT_BODY = 2'b00,
    FT_TAIL = 2'b01,
    FT_HEAD = 2'b10,
    FT_HT   = 2'b11   // single-flit packet
  } ftype_e;

  // Route at one router: eject there, or which modules may carry it on.
  typedef struct packed {
    logic eject;
    logic x_ok;
    logic y_ok;
  } route_t;

  localparam int HDR_W     = 2 + 2*COORD_W + 1 + 1 + $bits(route_t);
  localparam int PAYLOAD_W = FLIT_W - HDR_W;

  typedef struct packed {
    ftype_e                 ftype;
    logic [COORD_W-1:0]     dst_x;
    logic [COORD_W-1:0]     dst_y;
    logic                   yx;      // XY-YX routing: this packet goes Y first
    logic                   la2_vld; // la2 holds the route one hop further
    route_t                 la2;     // (double routing around a failed RC)
    logic [PAYLOAD_W-1:0]   payload;
  } flit_t;

  // One link between neighbouring routers.
  typedef struct packed {
    logic              valid;
    logic [VCID_W-1:0] vcid;
    flit_t             flit;
  } link_t;

  // Static fault status a router reports to its neighbours.
  typedef struct packed {
    logic [1:0]     module_ok; // [0] Row-Module, [1] Column-Module usable
    logic           rc_fail;   // RC unit failed: send second look-ahead
    logic [NVC-1:0] buf_fail;  // VC buffer failed: use virtual queuing
  } status_t;

  function automatic logic is_head(flit_t f);
    return f.ftype == FT_HEAD || f.ftype == FT_HT;
  endfunction

  function automatic logic is_tail(flit_t f);
    return f.ftype == FT_TAIL || f.ftype == FT_HT;
  endfunction

  // Link that feeds a VC, for each routing algorithm. Class per path set
  // follows the VC table (adaptive: Row {d_x t_yx Inj_xy}{d_x d_x t_yx},
  // Column {d_y t_xy Inj_yx}{d_y t_xy t_xy}; XY-YX: Column second set
  // {d_y d_y t_xy}; XY: Row {d_x d_x Inj_xy}{d_x d_x Inj_xy}).
  // A d_x VC is fed by E or W, t_yx by N or S, d_y by N or S, t_xy by E or W.
  function automatic dir_e vc_owner(routing_e rt, int unsigned vc);
    dir_e o;
    case (rt)
      RT_XY: begin
        case (vc)
          0, 1:    o = D_E;  // d_x, d_x
          2, 5, 8: o = D_L;  // Inj_xy, Inj_xy, Inj_yx
          3, 4:    o = D_W;  // d_x, d_x
          6:       o = D_N;  // d_y
          7:       o = D_E;  // t_xy
          9, 10:   o = D_S;  // d_y, d_y
          default: o = D_W;  // 11: t_xy
        endcase
      end
      RT_XYYX: begin
        case (vc)
          0, 4:    o = D_E;  // d_x, d_x
          1:       o = D_N;  // t_yx
          2, 8:    o = D_L;  // Inj_xy, Inj_yx
          3:       o = D_W;  // d_x
          5:       o = D_S;  // t_yx
          6:       o = D_N;  // d_y
          7:       o = D_E;  // t_xy
          9, 10:   o = D_S;  // d_y, d_y
          default: o = D_W;  // 11: t_xy
        endcase
      end
      default: begin  // RT_ADAPTIVE
        case (vc)
          0, 4:    o = D_E;  // d_x, d_x
          1:       o = D_N;  // t_yx
          2, 8:    o = D_L;  // Inj_xy, Inj_yx
          3:       o = D_W;  // d_x
          5:       o = D_S;  // t_yx
          6:       o = D_N;  // d_y
          7:       o = D_E;  // t_xy
          9:       o = D_S;  // d_y
          default: o = D_W;  // 10, 11: t_xy, t_xy
        endcase
      end
    endcase
    return o;
  endfunction

  // The s-th VC (s = 0..V-1) owned by link `from`, in ascending VC order.
  // Returns 1 in bit VCID_W when the slot exists.
  function automatic logic [VCID_W:0] owned_vc(routing_e rt, dir_e from, int unsigned s);
    int unsigned n;
    logic [VCID_W:0] r;
    n = 0;
    r = '0;
    for (int unsigned vc = 0; vc < NVC; vc++) begin
      if (vc_owner(rt, vc) == from) begin
        if (n == s) r = {1'b1, VCID_W'(vc)};
        n++;
      end
    end
    return r;
  endfunction

  // Link direction seen by the neighbour: my East output is its West input.
  function automatic dir_e opposite(dir_e d);
    case (d)
      D_E:     return D_W;
      D_W:     return D_E;
      D_N:     return D_S;
      D_S:     return D_N;
      default: return D_L;
    endcase
  endfunction

  // Route a packet may take at router (x, y). Minimal routing only.
  function automatic route_t route_at(routing_e rt, logic [COORD_W-1:0] x,
                                      logic [COORD_W-1:0] y, flit_t f);
    route_t r;
    logic dx, dy;
    dx = (f.dst_x != x);
    dy = (f.dst_y != y);
    r = '0;
    if (!dx && !dy) r.eject = 1'b1;
    else begin
      case (rt)
        RT_XY:   begin r.x_ok = dx; r.y_ok = !dx; end
        RT_XYYX: begin
          if (f.yx) begin r.y_ok = dy; r.x_ok = !dy; end
          else      begin r.x_ok = dx; r.y_ok = !dx; end
        end
        default: begin r.x_ok = dx; r.y_ok = dy; end
      endcase
    end
    return r;
  endfunction

  // Direction bit inside a module: 1 = East/North, 0 = West/South.
  function automatic logic dir_bit(logic dim, logic [COORD_W-1:0] x,
                                   logic [COORD_W-1:0] y, flit_t f);
    return dim ? (f.dst_y > y) : (f.dst_x > x);
  endfunction

  function automatic dir_e module_dir(logic dim, logic b);
    if (dim) return b ? D_N : D_S;
    else     return b ? D_E : D_W;
  endfunction

endpackage
