// vc_buffer: one virtual-channel flit queue of a path set.
//
// A circular buffer of DEPTH words (5 flits of 128 bits by default, the
// published buffer size). dout shows the front flit whenever count > 0
// (show-ahead), so the switch allocator can decode the front flit in the
// same cycle. push and pop may happen in the same cycle; a push into a full
// queue or a pop from an empty one is a protocol error that the credit
// flow control upstream rules out (checked by assertions).
module vc_buffer #(
  parameter int DEPTH = 5,
  parameter int W     = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [W-1:0]             din,
  input  logic                     pop,
  output logic [W-1:0]             dout,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd, wr;

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd    <= '0;
      wr    <= '0;
      count <= '0;
    end else begin
      if (push) wr <= nxt(wr);
      if (pop)  rd <= nxt(rd);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) if (push) mem[wr] <= din;

  assign dout = mem[rd];

  assert property (@(posedge clk) disable iff (!rst_n) !(pop && count == '0));
  assert property (@(posedge clk) disable iff (!rst_n) !(push && !pop && int'(count) == DEPTH));
endmodule
