// crossbar_2x2: the small crossbar of a RoCo module.
//
// Two inputs (the two path sets) and two outputs (East/West in the
// Row-Module, North/South in the Column-Module). Each output has a valid
// bit and the index of the input it takes; out_valid follows the selected
// input's valid. Combinational; the module registers the outputs, and the
// register drives the link. Two outputs never select the same input
// (asserted), which the mirrored switch allocator guarantees.
module crossbar_2x2 #(
  parameter int W = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_data  [2],
  input  logic         sel_vld  [2],   // per output
  input  logic         sel_src  [2],   // per output: input index
  output logic [W-1:0] out_data [2],
  output logic         out_vld  [2]
);
  always_comb begin
    for (int o = 0; o < 2; o++) begin
      out_vld[o]  = sel_vld[o];
      out_data[o] = sel_src[o] ? in_data[1] : in_data[0];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
    (sel_vld[0] && sel_vld[1]) |-> (sel_src[0] != sel_src[1]));
endmodule
