// rr_arbiter: N-input round-robin arbiter, the building block of the
// virtual-channel allocator (v:1 and 2v:1 arbiters) and of the switch
// allocator (v:1 local and 2:1 global arbiters).
//
// gnt is a combinational one-hot grant of the first requester at or after
// the priority pointer. The pointer is a register; it moves to the position
// after the granted input on a clock edge where `update` is high, so a
// grant that is not used (a lost speculation, a borrowed cycle) does not
// cost that requester its turn. The round-robin policy is this design's
// choice; the published architecture only names the arbiters.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         update,
  output logic [N-1:0] gnt
);
  localparam int PW = (N > 1) ? $clog2(N) : 1;
  logic [PW-1:0] ptr;

  always_comb begin
    int unsigned idx;
    gnt = '0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = (int'(ptr) + k) % N;
      if (req[idx] && gnt == '0) gnt[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (update && gnt != '0) begin
      for (int unsigned i = 0; i < N; i++)
        if (gnt[i]) ptr <= PW'((i + 1) % N);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);
endmodule
