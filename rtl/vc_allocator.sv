// vc_allocator: virtual-channel allocator of one RoCo module.
//
// Two arbitration stages, as in a separable allocator whose routing function
// returns the VCs of one physical channel. Stage 1: every input VC of the
// module (2 path sets x v VCs = NIN) has an NSLOT:1 arbiter that picks one of
// the downstream slots it may use on its output. Stage 2: every downstream
// slot of the module's two outputs has an NIN:1 arbiter that picks one of
// the input VCs that chose it. A slot is one of the (up to v = 3) VCs the
// downstream router keeps for this link, or the ejection channel there; the
// ejection channel counts as a slot so that two packets never interleave on
// one ejection lane (this design's choice), giving 2(v+1) second-stage
// arbiters where the published design has 2v.
//
// Hardware recycling: when the module's switch allocator has failed, it
// borrows the stage-1 arbiters of input VCs 0..3 and the stage-2 arbiter of
// slot 0 through 2-to-1 input muxes (borrow_en). In a borrowed cycle the VC
// allocator itself grants nothing.
//
// Timing: req is combinational from VC state; grants are combinational; the
// arbiter pointers update at the clock edge of a used grant.
module vc_allocator
  import roco_pkg::*;
#(
  parameter int NIN = 2 * V,
  parameter int NS  = NSLOT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NS-1:0]       req     [NIN],  // candidate slots per input VC
  input  logic                req_dir [NIN],  // output each input VC goes to
  output logic                gnt_vld [NIN],
  output logic [$clog2(NS)-1:0] gnt_slot [NIN],
  output logic                busy,           // some input VC is requesting
  // arbiters lent to the switch allocator
  input  logic                borrow_en,
  input  logic                borrow_upd,
  input  logic [NS-1:0]       borrow_l_req [4],
  output logic [NS-1:0]       borrow_l_gnt [4],
  input  logic [NIN-1:0]      borrow_g_req,
  output logic [NIN-1:0]      borrow_g_gnt
);
  localparam int NO = 2 * NS;       // output VCs of the module
  localparam int SW = $clog2(NS);

  logic [NS-1:0]  s1_req [NIN];
  logic [NS-1:0]  s1_gnt [NIN];
  logic           s1_upd [NIN];
  logic [NIN-1:0] s2_req [NO];
  logic [NIN-1:0] s2_gnt [NO];
  logic           s2_upd [NO];

  always_comb begin
    busy = 1'b0;
    for (int i = 0; i < NIN; i++) busy |= (req[i] != '0);
  end

  // Stage 1: 2-to-1 muxes in front of the first four arbiters.
  always_comb begin
    for (int i = 0; i < NIN; i++) begin
      s1_req[i] = borrow_en ? ((i < 4) ? borrow_l_req[i % 4] : '0) : req[i];
    end
    for (int k = 0; k < 4; k++) borrow_l_gnt[k] = borrow_en ? s1_gnt[k] : '0;
  end

  // Stage 2: per output slot, the input VCs whose stage-1 winner it is.
  always_comb begin
    for (int o = 0; o < NO; o++) begin
      s2_req[o] = '0;
      for (int i = 0; i < NIN; i++)
        if (s1_gnt[i][o % NS] && (req_dir[i] == (o >= NS))) s2_req[o][i] = 1'b1;
      if (borrow_en) s2_req[o] = (o == 0) ? borrow_g_req : '0;
    end
    borrow_g_gnt = borrow_en ? s2_gnt[0] : '0;
  end

  // Results back to the input VCs.
  always_comb begin
    for (int i = 0; i < NIN; i++) begin
      gnt_vld[i]  = 1'b0;
      gnt_slot[i] = '0;
      s1_upd[i]   = borrow_en && borrow_upd;
      if (!borrow_en) begin
        for (int o = 0; o < NO; o++) begin
          if (s2_gnt[o][i]) begin
            gnt_vld[i]  = 1'b1;
            gnt_slot[i] = SW'(o % NS);
          end
        end
        s1_upd[i] = gnt_vld[i];
      end
    end
    for (int o = 0; o < NO; o++)
      s2_upd[o] = borrow_en ? (o == 0 && borrow_upd) : (s2_gnt[o] != '0);
  end

  for (genvar i = 0; i < NIN; i++) begin : g_s1
    rr_arbiter #(.N(NS)) u_arb (
      .clk, .rst_n, .req(s1_req[i]), .update(s1_upd[i]), .gnt(s1_gnt[i]));
  end
  for (genvar o = 0; o < NO; o++) begin : g_s2
    rr_arbiter #(.N(NIN)) u_arb (
      .clk, .rst_n, .req(s2_req[o]), .update(s2_upd[o]), .gnt(s2_gnt[o]));
  end
endmodule
