// input_demux: the input DEMUX of one router link.
//
// Every flit arrives with the number of the VC that the upstream router's
// VC allocator reserved for it. The DEMUX turns that number into a write
// strobe for one of the 12 VCs of the router, which may sit in either the
// Row-Module or the Column-Module; placing each flit by the dimension it
// will leave in is the "Guided Flit Queuing" of the RoCo router. VC number
// 12 marks a flit whose look-ahead route ends here: it leaves straight to the
// local PE without entering any buffer ("Early Ejection"), saving switch
// allocation and traversal at the destination.
//
// Purely combinational: the link is driven by a register in the upstream
// router, and the strobes are sampled at the next clock edge by the VC
// buffers. The flit itself is fanned out unchanged to all VCs. The
// assertion checks that a link only addresses the VCs it owns (ownership is
// this design's VC table in roco_pkg).
module input_demux
  import roco_pkg::*;
#(
  parameter routing_e ROUTING = RT_ADAPTIVE,
  parameter dir_e     FROM    = D_E
) (
  input  logic           clk,
  input  logic           rst_n,
  input  link_t          lnk,
  output logic [NVC-1:0] vc_valid,
  output flit_t          vc_flit,
  output logic           eject_valid,
  output flit_t          eject_flit
);
  always_comb begin
    vc_valid = '0;
    for (int unsigned v = 0; v < NVC; v++)
      if (lnk.valid && lnk.vcid == VCID_W'(v)) vc_valid[v] = 1'b1;
  end

  assign vc_flit     = lnk.flit;
  assign eject_valid = lnk.valid && lnk.vcid == VCID_EJECT;
  assign eject_flit  = lnk.flit;

  // A link may only address VCs it owns, or the ejection channel.
  assert property (@(posedge clk) disable iff (!rst_n)
    lnk.valid |-> (lnk.vcid == VCID_EJECT ||
                   (lnk.vcid < VCID_W'(NVC) && vc_owner(ROUTING, int'(lnk.vcid)) == FROM)));
endmodule
