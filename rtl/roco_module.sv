// roco_module: the Row-Module (DIM = 0, East/West) or Column-Module
// (DIM = 1, North/South) of a RoCo router.
//
// Two path sets of V = 3 VC buffers feed a 2x2 crossbar whose outputs drive
// the two links of the module's dimension. The module runs on its own: it
// has its own look-ahead RC, VC allocator and mirrored switch allocator, and
// shares nothing with the other module, so a fault here leaves the other
// module working.
//
// Pipeline (per hop two cycles): in stage 1 the front flit of each VC goes
// through look-ahead routing, VC allocation and, in parallel, speculative
// switch allocation; a head flit whose switch grant is not matched by a VC
// grant in the same cycle wastes that crossbar slot. In stage 2 the winners
// cross the crossbar into the output registers, which drive the links. A
// flit written into a VC at clock edge t can thus be on the next link
// after edge t+1.
//
// Flow control: each output keeps, per downstream VC this link owns, a busy
// bit (reserved from head to tail) and a count of flits sent and not yet
// credited. The ejection channel of the next router is a fourth slot that
// never runs out of credits. Popping a flit here raises the VC's bit in
// credit_out for one cycle (registered).
//
// Fault handling:
//  - module_fault (VA, crossbar or MUX/DEMUX failed): the module grants
//    nothing and the router reports it down to its neighbours, which stop
//    reserving VCs in it.
//  - sa_fault: the switch allocator runs on arbiters borrowed from the VC
//    allocator (see mirror_sa, vc_allocator).
//  - rc_fault: look-ahead routes come from the second route in the head flit.
//  - buf_fault[i]: VC i stores nothing (virtual queuing). Its only flit is
//    the one the upstream router holds on the link; it is read through the
//    bypass path when it wins the switch here, and the credit returned for
//    it releases the link upstream. Upstream, a failed downstream VC is
//    given a single credit.
// The pipeline arrangement, the speculation policy and the single credit for
// virtual queuing are this design's choices; the module split, the VC
// classes, the mirrored allocation and the recovery schemes follow the
// published architecture.
module roco_module
  import roco_pkg::*;
#(
  parameter routing_e ROUTING = RT_ADAPTIVE,
  parameter bit       DIM     = 1'b0,
  parameter int       DEPTH   = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  // writes from the input DEMUXes, one per VC of this module
  input  logic               vc_in_valid [2*V],
  input  flit_t              vc_in_flit  [2*V],
  output logic [2*V-1:0]     vc_space,      // VC can take one more flit
  output logic [2*V-1:0]     credit_out,    // registered, one cycle per pop
  // faults of this router
  input  logic               module_fault,
  input  logic               sa_fault,
  input  logic               rc_fault,
  input  logic [2*V-1:0]     buf_fault,
  // the two downstream routers: index 1 = East/North, 0 = West/South
  input  logic [NVC-1:0]     nb_credit [2],
  input  status_t            nb_status [2],
  output link_t              out_link  [2]
);
  localparam int NIN = 2 * V;
  localparam int CW  = $clog2(DEPTH + 1);
  localparam int SW  = $clog2(NSLOT);
  localparam int VW  = $clog2(V);

  // ---------------------------------------------------------------- VCs
  flit_t          head      [NIN];
  logic           head_vld  [NIN];
  logic [CW-1:0]  cnt_buf   [NIN];
  logic [FLIT_W-1:0] buf_dout [NIN];
  logic           pop       [NIN];

  for (genvar i = 0; i < NIN; i++) begin : g_vc
    vc_buffer #(.DEPTH(DEPTH), .W(FLIT_W)) u_buf (
      .clk, .rst_n,
      .push (vc_in_valid[i] && !buf_fault[i]),
      .din  (vc_in_flit[i]),
      .pop  (pop[i] && !buf_fault[i]),
      .dout (buf_dout[i]),
      .count(cnt_buf[i]));

    // bypass path of a failed buffer: the flit held on the upstream link,
    // ignored for the one cycle after it was taken (credit in flight)
    assign head_vld[i] = buf_fault[i] ? (vc_in_valid[i] && !credit_out[i])
                                      : (cnt_buf[i] != '0);
    assign head[i]     = buf_fault[i] ? vc_in_flit[i] : flit_t'(buf_dout[i]);
    assign vc_space[i] = !buf_fault[i] && (int'(cnt_buf[i]) < DEPTH);
  end

  // ------------------------------------------------ downstream VC state
  logic              ds_busy [2][NSLOT];
  logic [CW-1:0]     ds_cnt  [2][NSLOT];
  logic [VCID_W-1:0] ds_vcid [2][NSLOT];
  logic              ds_has  [2][NSLOT];
  logic              ds_cred [2][NSLOT];   // a flit may be sent
  logic              ds_free [2][NSLOT];   // a packet may reserve it

  always_comb begin
    for (int o = 0; o < 2; o++) begin
      for (int s = 0; s < NSLOT; s++) begin
        logic [VCID_W:0] ov;
        if (s < V) begin
          ov = owned_vc(ROUTING, opposite(module_dir(DIM, o[0])), s);
          ds_has[o][s]  = ov[VCID_W];
          ds_vcid[o][s] = ov[VCID_W-1:0];
          ds_cred[o][s] = int'(ds_cnt[o][s]) <
                          (nb_status[o].buf_fail[ov[VCID_W-1:0]] ? 1 : DEPTH);
          ds_free[o][s] = ds_has[o][s] && !ds_busy[o][s] && ds_cred[o][s] &&
                          nb_status[o].module_ok[int'(ov[VCID_W-1:0]) / (NVC/2)];
        end else begin
          ds_has[o][s]  = 1'b1;
          ds_vcid[o][s] = VCID_EJECT;
          ds_cred[o][s] = 1'b1;
          ds_free[o][s] = !ds_busy[o][s];
        end
      end
    end
  end

  // A link is held while it carries a flit for a failed downstream buffer
  // that has not been taken yet.
  logic out_free [2];
  always_comb begin
    for (int o = 0; o < 2; o++) begin
      out_free[o] = 1'b1;
      if (out_link[o].valid && out_link[o].vcid != VCID_EJECT &&
          nb_status[o].buf_fail[out_link[o].vcid] && !nb_credit[o][out_link[o].vcid])
        out_free[o] = 1'b0;
    end
  end

  // ------------------------------------------ RC, VA and SA requests
  logic           alloc     [NIN];
  logic [SW-1:0]  aslot     [NIN];
  logic           odir      [NIN];
  logic           la_vld    [NIN];
  route_t         la        [NIN];
  logic           la2_vld   [NIN];
  route_t         la2       [NIN];
  logic [SW-1:0]  use_slot  [NIN];
  logic [NSLOT-1:0] va_req  [NIN];
  logic           va_gvld   [NIN];
  logic [SW-1:0]  va_gslot  [NIN];
  logic           va_busy;

  for (genvar i = 0; i < NIN; i++) begin : g_rc
    lookahead_rc #(.ROUTING(ROUTING), .DIM(DIM)) u_rc (
      .cur_x, .cur_y,
      .flit      (head[i]),
      .rc_fault,
      .nb_rc_fail(nb_status[odir[i]].rc_fail),
      .dn_vc     (ds_vcid[odir[i]][use_slot[i]]),
      .out_dir   (odir[i]),
      .la_vld    (la_vld[i]),
      .la        (la[i]),
      .la2_vld   (la2_vld[i]),
      .la2_out   (la2[i]));
  end

  always_comb begin
    for (int i = 0; i < NIN; i++) begin
      va_req[i] = '0;
      if (head_vld[i] && is_head(head[i]) && !alloc[i] && la_vld[i] && !module_fault) begin
        for (int s = 0; s < NSLOT; s++) begin
          if (s < V) begin
            if (!la[i].eject && ds_free[odir[i]][s] &&
                ((ds_vcid[odir[i]][s] >= VCID_W'(NVC/2)) ? la[i].y_ok : la[i].x_ok))
              va_req[i][s] = 1'b1;
          end else begin
            if (la[i].eject && ds_free[odir[i]][s]) va_req[i][s] = 1'b1;
          end
        end
      end
      use_slot[i] = alloc[i] ? aslot[i] : va_gslot[i];
    end
  end

  logic [V-1:0]  sa_req [2][2];
  logic          sa_gvld [2];
  logic          sa_gdir [2];
  logic [VW-1:0] sa_gvc  [2];

  always_comb begin
    for (int p = 0; p < 2; p++)
      for (int d = 0; d < 2; d++)
        for (int k = 0; k < V; k++) begin
          int i;
          i = p * V + k;
          sa_req[p][d][k] = head_vld[i] && (odir[i] == d[0]) && out_free[d] && !module_fault &&
                            (alloc[i] ? ds_cred[d][aslot[i]] : (is_head(head[i]) && va_req[i] != '0));
        end
  end

  // arbiters lent by the VA to the SA
  logic             b_en, b_upd;
  logic [NSLOT-1:0] b_l_req [4];
  logic [NSLOT-1:0] b_l_gnt [4];
  logic [NIN-1:0]   b_g_req, b_g_gnt;

  vc_allocator #(.NIN(NIN), .NS(NSLOT)) u_va (
    .clk, .rst_n,
    .req(va_req), .req_dir(odir), .gnt_vld(va_gvld), .gnt_slot(va_gslot), .busy(va_busy),
    .borrow_en(b_en), .borrow_upd(b_upd), .borrow_l_req(b_l_req), .borrow_l_gnt(b_l_gnt),
    .borrow_g_req(b_g_req), .borrow_g_gnt(b_g_gnt));

  mirror_sa #(.NV(V), .NS(NSLOT), .NIN(NIN)) u_sa (
    .clk, .rst_n,
    .req(sa_req), .sa_fault, .va_busy,
    .gnt_vld(sa_gvld), .gnt_dir(sa_gdir), .gnt_vc(sa_gvc),
    .borrow_en(b_en), .borrow_upd(b_upd), .borrow_l_req(b_l_req), .borrow_l_gnt(b_l_gnt),
    .borrow_g_req(b_g_req), .borrow_g_gnt(b_g_gnt));

  // ------------------------------------------------ commit and crossbar
  logic              go     [2];   // port p sends a flit this cycle
  logic [2:0]        gi     [2];   // its input VC
  flit_t             xin    [2];
  logic [FLIT_W-1:0] xin_w  [2];
  logic              xsel_v [2];
  logic              xsel_s [2];
  logic [FLIT_W-1:0] xout   [2];
  logic              xout_v [2];
  logic              spec_miss [2]; // speculative switch grant wasted

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      gi[p]        = 3'(p * V + int'(sa_gvc[p]));
      go[p]        = sa_gvld[p] && (alloc[gi[p]] || va_gvld[gi[p]]);
      spec_miss[p] = sa_gvld[p] && !go[p];
      xin[p]       = head[gi[p]];
      xin[p].la2_vld = la2_vld[gi[p]];
      xin[p].la2     = la2[gi[p]];
      xin_w[p]     = xin[p];
    end
    for (int i = 0; i < NIN; i++) pop[i] = 1'b0;
    for (int p = 0; p < 2; p++) if (go[p]) pop[gi[p]] = 1'b1;
    for (int o = 0; o < 2; o++) begin
      xsel_v[o] = 1'b0;
      xsel_s[o] = 1'b0;
      for (int p = 0; p < 2; p++)
        if (go[p] && sa_gdir[p] == o[0]) begin
          xsel_v[o] = 1'b1;
          xsel_s[o] = p[0];
        end
    end
  end

  crossbar_2x2 #(.W(FLIT_W)) u_xbar (
    .clk, .rst_n, .in_data(xin_w), .sel_vld(xsel_v), .sel_src(xsel_s),
    .out_data(xout), .out_vld(xout_v));

  // ------------------------------------------------------------ state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NIN; i++) begin
        alloc[i] <= 1'b0;
        aslot[i] <= '0;
      end
      for (int o = 0; o < 2; o++) begin
        out_link[o] <= '0;
        for (int s = 0; s < NSLOT; s++) begin
          ds_busy[o][s] <= 1'b0;
          ds_cnt[o][s]  <= '0;
        end
      end
      credit_out <= '0;
    end else begin
      // credits coming back from downstream
      for (int o = 0; o < 2; o++)
        for (int s = 0; s < V; s++) begin
          logic inc, dec;
          inc = 1'b0;
          for (int p = 0; p < 2; p++)
            if (go[p] && sa_gdir[p] == o[0] && use_slot[gi[p]] == SW'(s)) inc = 1'b1;
          dec = ds_has[o][s] && nb_credit[o][ds_vcid[o][s]];
          ds_cnt[o][s] <= ds_cnt[o][s] + CW'(inc) - CW'(dec);
        end
      // VC allocation (with or without a switch grant this cycle)
      for (int i = 0; i < NIN; i++)
        if (va_gvld[i]) begin
          alloc[i] <= 1'b1;
          aslot[i] <= va_gslot[i];
          ds_busy[odir[i]][va_gslot[i]] <= 1'b1;
        end
      // flits leaving; a tail frees the input VC and the downstream VC
      for (int p = 0; p < 2; p++)
        if (go[p] && is_tail(head[gi[p]])) begin
          alloc[gi[p]] <= 1'b0;
          ds_busy[sa_gdir[p]][use_slot[gi[p]]] <= 1'b0;
        end
      for (int i = 0; i < NIN; i++) credit_out[i] <= pop[i];
      // output registers drive the links
      for (int o = 0; o < 2; o++) begin
        if (out_free[o]) begin
          out_link[o].valid <= xout_v[o];
          out_link[o].flit  <= flit_t'(xout[o]);
          out_link[o].vcid  <= '0;
          for (int p = 0; p < 2; p++)
            if (go[p] && sa_gdir[p] == o[0])
              out_link[o].vcid <= ds_vcid[o][use_slot[gi[p]]];
        end
      end
    end
  end

  // The switch allocator never grants a held link.
  for (genvar o = 0; o < 2; o++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) (xout_v[o] |-> out_free[o]));
  end
endmodule
