// tb_traffic: traffic source and scoreboard for a RoCo mesh (testbench only).
//
// Every node sends NPKT packets of four flits to random destinations other
// than itself, starting a new packet with probability INJ_PCT percent in a
// cycle. XY-YX routing gets a random order bit per packet. Destinations with
// x == SKIP_X are not used (except (SKIP_X, SKIP_Y)), so a test can fail the
// Column-Module there without cutting packets off; node NO_SRC sends
// nothing (a router whose RC has failed cannot route its own PE's packets). On the ejection lanes the
// scoreboard checks that each flit arrives at its destination, that the flits
// of a packet come in order on one lane, and counts whole packets delivered
// and total latency (cycles from head injection to tail ejection).
module tb_traffic
  import roco_pkg::*;
#(
  parameter int       MX      = 4,
  parameter int       MY      = 4,
  parameter int       NPKT    = 20,
  parameter int       INJ_PCT = 10,
  parameter routing_e ROUTING = RT_ADAPTIVE,
  parameter int       SKIP_X  = -1,
  parameter int       SKIP_Y  = -1,
  parameter int       NO_SRC  = -1   // node that sends nothing
) (
  input  logic  clk,
  input  logic  rst_n,
  output logic  inj_valid [MX*MY],
  output flit_t inj_flit  [MX*MY],
  input  logic  inj_ready [MX*MY],
  input  logic  ej_valid  [MX*MY][4],
  input  flit_t ej_flit   [MX*MY][4],
  output int    sent,
  output int    received,
  output int    errors,
  output longint lat_sum
);
  localparam int NN = MX * MY;
  int  seq    [NN];   // packets started per node
  int  fidx   [NN];   // next flit of the current packet
  int  dstx   [NN], dsty [NN];
  bit  yxb    [NN];
  int  exp_f  [NN][4]; // next flit index expected per lane
  int  cyc;

  // payload: [31:24] source, [23:8] sequence, [7:0] flit index;
  // [63:32] injection cycle of the head
  function automatic flit_t mk(int n, int f);
    flit_t x;
    x = '0;
    x.ftype = (f == 0) ? FT_HEAD : (f == 3) ? FT_TAIL : FT_BODY;
    x.dst_x = COORD_W'(dstx[n]);
    x.dst_y = COORD_W'(dsty[n]);
    x.yx    = yxb[n];
    x.payload[7:0]   = 8'(f);
    x.payload[23:8]  = 16'(seq[n]);
    x.payload[31:24] = 8'(n);
    x.payload[63:32] = 32'(cyc);
    return x;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0;
      sent <= 0;
      for (int n = 0; n < NN; n++) begin
        seq[n] <= 0; fidx[n] <= 0; inj_valid[n] <= 0;
      end
    end else begin
      int ns;
      ns = sent;
      cyc <= cyc + 1;
      for (int n = 0; n < NN; n++) begin
        if (inj_valid[n] && inj_ready[n]) begin
          if (fidx[n] == 3) begin
            inj_valid[n] <= 0;
            fidx[n] <= 0;
            seq[n] <= seq[n] + 1;
            ns++;
          end else begin
            inj_flit[n] <= mk(n, fidx[n] + 1);
            fidx[n] <= fidx[n] + 1;
          end
        end else if (!inj_valid[n] && n != NO_SRC && seq[n] < NPKT && ($urandom % 100) < INJ_PCT) begin
          int dx, dy;
          do begin
            dx = $urandom % MX; dy = $urandom % MY;
          end while ((dx == n % MX && dy == n / MX) || (dx == SKIP_X && dy != SKIP_Y));
          dstx[n] = dx; dsty[n] = dy;
          yxb[n] = (ROUTING == RT_XYYX) ? 1'($urandom) : 1'b0;
          inj_valid[n] <= 1;
          inj_flit[n] <= mk(n, 0);
        end
      end
      sent <= ns;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      received <= 0;
      errors <= 0;
      lat_sum <= 0;
      for (int n = 0; n < NN; n++) for (int l = 0; l < 4; l++) exp_f[n][l] <= 0;
    end else begin
      int nr, ne;
      longint ls;
      nr = received; ne = errors; ls = lat_sum;
      for (int n = 0; n < NN; n++)
        for (int l = 0; l < 4; l++)
          if (ej_valid[n][l]) begin
            flit_t f;
            f = ej_flit[n][l];
            if (int'(f.dst_x) != n % MX || int'(f.dst_y) != n / MX ||
                int'(f.payload[7:0]) != exp_f[n][l]) begin
              ne++;
              $display("SCOREBOARD error at node %0d lane %0d: flit %0d from %0d, expected flit %0d",
                       n, l, f.payload[7:0], f.payload[31:24], exp_f[n][l]);
            end
            if (int'(f.payload[7:0]) == 3) begin
              exp_f[n][l] <= 0;
              nr++;
              ls += longint'(cyc - int'(f.payload[63:32]));
            end else exp_f[n][l] <= int'(f.payload[7:0]) + 1;
          end
      received <= nr; errors <= ne; lat_sum <= ls;
    end
  end
endmodule
