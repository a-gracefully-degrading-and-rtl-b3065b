// roco_mesh: a MESH_X x MESH_Y 2D mesh of RoCo routers (8x8 by default,
// the size the architecture was evaluated on).
//
// Node n = y*MESH_X + x sits at (x, y); x grows towards East, y towards
// North. Each router's East output link feeds its East neighbour's West
// input, and so on; credits and fault status travel back the same way.
// Links off the edge of the mesh are tied idle and report both modules of
// the missing neighbour as down, so no VC is ever reserved towards them
// (minimal routing never needs one).
//
// Every node brings out its PE ports (valid/ready injection, four ejection
// lanes) and its static fault inputs. All flits of a packet carry the
// destination; see roco_pkg for the flit layout.
module roco_mesh
  import roco_pkg::*;
#(
  parameter int       MESH_X  = 8,
  parameter int       MESH_Y  = 8,
  parameter routing_e ROUTING = RT_ADAPTIVE,
  parameter int       DEPTH   = 5
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           inj_valid    [MESH_X*MESH_Y],
  input  flit_t          inj_flit     [MESH_X*MESH_Y],
  output logic           inj_ready    [MESH_X*MESH_Y],
  output logic           ej_valid     [MESH_X*MESH_Y][4],
  output flit_t          ej_flit      [MESH_X*MESH_Y][4],
  input  logic [1:0]     module_fault [MESH_X*MESH_Y],
  input  logic [1:0]     sa_fault     [MESH_X*MESH_Y],
  input  logic           rc_fault     [MESH_X*MESH_Y],
  input  logic [NVC-1:0] buf_fault    [MESH_X*MESH_Y]
);
  localparam int NN = MESH_X * MESH_Y;

  link_t          lnk_out    [NN][4];
  logic [NVC-1:0] credit_out [NN];
  status_t        status_out [NN];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;
      link_t          lnk_in    [4];
      logic [NVC-1:0] credit_in [4];
      status_t        status_in [4];

      // neighbour in direction d: E (x+1), W (x-1), N (y+1), S (y-1)
      always_comb begin
        for (int d = 0; d < 4; d++) begin
          lnk_in[d]    = '0;
          credit_in[d] = '0;
          status_in[d] = '0;
        end
        if (x < MESH_X - 1) begin
          lnk_in[int'(D_E)] = lnk_out[N+1][int'(D_W)];  credit_in[int'(D_E)] = credit_out[N+1];  status_in[int'(D_E)] = status_out[N+1];
        end
        if (x > 0) begin
          lnk_in[int'(D_W)] = lnk_out[N-1][int'(D_E)];  credit_in[int'(D_W)] = credit_out[N-1];  status_in[int'(D_W)] = status_out[N-1];
        end
        if (y < MESH_Y - 1) begin
          lnk_in[int'(D_N)] = lnk_out[N+MESH_X][int'(D_S)];  credit_in[int'(D_N)] = credit_out[N+MESH_X];  status_in[int'(D_N)] = status_out[N+MESH_X];
        end
        if (y > 0) begin
          lnk_in[int'(D_S)] = lnk_out[N-MESH_X][int'(D_N)];  credit_in[int'(D_S)] = credit_out[N-MESH_X];  status_in[int'(D_S)] = status_out[N-MESH_X];
        end
      end

      roco_router #(.ROUTING(ROUTING), .DEPTH(DEPTH)) u_rt (
        .clk, .rst_n,
        .cur_x(COORD_W'(x)), .cur_y(COORD_W'(y)),
        .lnk_in, .lnk_out(lnk_out[N]),
        .credit_in, .credit_out(credit_out[N]),
        .status_in, .status_out(status_out[N]),
        .inj_valid(inj_valid[N]), .inj_flit(inj_flit[N]), .inj_ready(inj_ready[N]),
        .ej_valid(ej_valid[N]), .ej_flit(ej_flit[N]),
        .module_fault(module_fault[N]), .sa_fault(sa_fault[N]),
        .rc_fault(rc_fault[N]), .buf_fault(buf_fault[N]));
    end
  end
endmodule
