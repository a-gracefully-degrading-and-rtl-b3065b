// roco_router: Row-Column decoupled router for a 2D mesh.
//
// Four input links (from the East, West, North and South neighbours) each
// end in a DEMUX that steers a flit into the VC its upstream router reserved
// for it, in either module, or ejects it to the local PE at once when this
// router is its destination (one ejection lane per input link). The local PE
// injects through the injection unit. The Row-Module owns the East and West
// output links, the Column-Module the North and South ones; each has two
// path sets of three VCs, its own VC and switch allocator and a 2x2
// crossbar. There is no PE input or output port on either crossbar.
//
// The router reports a static status to its neighbours (which modules work,
// whether its RC has failed, which VC buffers have failed) and reads theirs,
// so that they stop reserving VCs in a failed module, compute the second
// look-ahead route around a failed RC, and use virtual queuing for a failed
// buffer. Credits go out as one 12-bit registered vector; since each VC is
// fed by exactly one link, every neighbour reads only the bits it owns.
//
// Arrays of links are indexed by dir_e: 0 East, 1 West, 2 North, 3 South.
// Per-hop latency is two cycles (see roco_module); an ejected flit appears
// on ej_valid in the cycle it arrives on the link.
module roco_router
  import roco_pkg::*;
#(
  parameter routing_e ROUTING = RT_ADAPTIVE,
  parameter int       DEPTH   = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  // links to and from the four neighbours
  input  link_t              lnk_in     [4],
  output link_t              lnk_out    [4],
  input  logic [NVC-1:0]     credit_in  [4],
  output logic [NVC-1:0]     credit_out,
  input  status_t            status_in  [4],
  output status_t            status_out,
  // local PE
  input  logic               inj_valid,
  input  flit_t              inj_flit,
  output logic               inj_ready,
  output logic               ej_valid   [4],
  output flit_t              ej_flit    [4],
  // permanent faults of this router (static)
  input  logic [1:0]         module_fault, // [0] Row, [1] Column: VA/crossbar/MUX
  input  logic [1:0]         sa_fault,
  input  logic               rc_fault,
  input  logic [NVC-1:0]     buf_fault
);
  logic [NVC-1:0] dm_valid [4];
  flit_t          dm_flit  [4];
  logic [NVC-1:0] inj_vc_valid;
  flit_t          inj_vc_flit;
  logic [NVC-1:0] vc_space;
  logic           vc_in_valid [NVC];
  flit_t          vc_in_flit  [NVC];

  for (genvar d = 0; d < 4; d++) begin : g_dmx
    input_demux #(.ROUTING(ROUTING), .FROM(dir_e'(d))) u_dmx (
      .clk, .rst_n, .lnk(lnk_in[d]),
      .vc_valid(dm_valid[d]), .vc_flit(dm_flit[d]),
      .eject_valid(ej_valid[d]), .eject_flit(ej_flit[d]));
  end

  injection_unit #(.ROUTING(ROUTING)) u_inj (
    .clk, .rst_n, .cur_x, .cur_y,
    .inj_valid, .inj_flit, .inj_ready,
    .vc_space, .module_ok(~module_fault),
    .vc_valid(inj_vc_valid), .vc_flit(inj_vc_flit));

  // each VC listens to the one link (or the PE) that owns it
  always_comb begin
    for (int v = 0; v < NVC; v++) begin
      dir_e o;
      o = vc_owner(ROUTING, v);
      if (o == D_L) begin
        vc_in_valid[v] = inj_vc_valid[v];
        vc_in_flit[v]  = inj_vc_flit;
      end else begin
        vc_in_valid[v] = dm_valid[o[1:0]][v];
        vc_in_flit[v]  = dm_flit[o[1:0]];
      end
    end
  end

  // Row-Module: output 1 = East, 0 = West. Column-Module: 1 = North, 0 = South.
  logic           row_in_valid [2*V], col_in_valid [2*V];
  flit_t          row_in_flit  [2*V], col_in_flit  [2*V];
  logic [NVC-1:0] row_nb_credit [2], col_nb_credit [2];
  status_t        row_nb_status [2], col_nb_status [2];
  link_t          row_out [2], col_out [2];

  always_comb begin
    for (int i = 0; i < 2*V; i++) begin
      row_in_valid[i] = vc_in_valid[i];
      row_in_flit[i]  = vc_in_flit[i];
      col_in_valid[i] = vc_in_valid[2*V + i];
      col_in_flit[i]  = vc_in_flit[2*V + i];
    end
    row_nb_credit[1] = credit_in[int'(D_E)];  row_nb_status[1] = status_in[int'(D_E)];
    row_nb_credit[0] = credit_in[int'(D_W)];  row_nb_status[0] = status_in[int'(D_W)];
    col_nb_credit[1] = credit_in[int'(D_N)];  col_nb_status[1] = status_in[int'(D_N)];
    col_nb_credit[0] = credit_in[int'(D_S)];  col_nb_status[0] = status_in[int'(D_S)];
    lnk_out[int'(D_E)] = row_out[1];
    lnk_out[int'(D_W)] = row_out[0];
    lnk_out[int'(D_N)] = col_out[1];
    lnk_out[int'(D_S)] = col_out[0];
  end

  roco_module #(.ROUTING(ROUTING), .DIM(1'b0), .DEPTH(DEPTH)) u_row (
    .clk, .rst_n, .cur_x, .cur_y,
    .vc_in_valid(row_in_valid), .vc_in_flit(row_in_flit),
    .vc_space(vc_space[2*V-1:0]), .credit_out(credit_out[2*V-1:0]),
    .module_fault(module_fault[0]), .sa_fault(sa_fault[0]), .rc_fault,
    .buf_fault(buf_fault[2*V-1:0]),
    .nb_credit(row_nb_credit), .nb_status(row_nb_status), .out_link(row_out));

  roco_module #(.ROUTING(ROUTING), .DIM(1'b1), .DEPTH(DEPTH)) u_col (
    .clk, .rst_n, .cur_x, .cur_y,
    .vc_in_valid(col_in_valid), .vc_in_flit(col_in_flit),
    .vc_space(vc_space[NVC-1:2*V]), .credit_out(credit_out[NVC-1:2*V]),
    .module_fault(module_fault[1]), .sa_fault(sa_fault[1]), .rc_fault,
    .buf_fault(buf_fault[NVC-1:2*V]),
    .nb_credit(col_nb_credit), .nb_status(col_nb_status), .out_link(col_out));

  assign status_out.module_ok = ~module_fault;
  assign status_out.rc_fail   = rc_fault;
  assign status_out.buf_fail  = buf_fault;
endmodule
