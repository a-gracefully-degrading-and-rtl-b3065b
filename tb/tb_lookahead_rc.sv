// tb_lookahead_rc: random positions and destinations for both modules and
// all three routing algorithms; the look-ahead route and the second route
// (double routing) are compared with a model written from the routing rules.
module tb_lookahead_rc;
  import roco_pkg::*;
  logic [COORD_W-1:0] cur_x, cur_y;
  flit_t flit;
  logic rc_fault, nb_rc_fail;
  logic [VCID_W-1:0] dn_vc;
  logic   out_dir [3][2], la_vld [3][2], la2_vld [3][2];
  route_t la [3][2], la2_out [3][2];
  int checks = 0, failures = 0, ejects = 0, doubles = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  for (genvar r = 0; r < 3; r++) begin : g_r
    for (genvar m = 0; m < 2; m++) begin : g_m
      lookahead_rc #(.ROUTING(routing_e'(r)), .DIM(m[0])) dut (
        .cur_x, .cur_y, .flit, .rc_fault, .nb_rc_fail, .dn_vc,
        .out_dir(out_dir[r][m]), .la_vld(la_vld[r][m]), .la(la[r][m]),
        .la2_vld(la2_vld[r][m]), .la2_out(la2_out[r][m]));
    end
  end

  // reference: route at (x, y) for destination (dx, dy)
  function automatic route_t ref_route(int r, int x, int y, int dx, int dy, bit yx);
    route_t o;
    o = '0;
    if (x == dx && y == dy) o.eject = 1;
    else if (r == 2) begin o.x_ok = (x != dx); o.y_ok = (y != dy); end
    else if (r == 1 && yx) begin
      if (y != dy) o.y_ok = 1; else o.x_ok = 1;
    end else begin
      if (x != dx) o.x_ok = 1; else o.y_ok = 1;
    end
    return o;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int x, y, dx, dy, nx, ny, n2x, n2y, d, m2, d2;
      x = 1 + $urandom % 6; y = 1 + $urandom % 6;
      dx = $urandom % 8; dy = $urandom % 8;
      cur_x = 3'(x); cur_y = 3'(y);
      flit = '0;
      flit.ftype = FT_HEAD; flit.dst_x = 3'(dx); flit.dst_y = 3'(dy); flit.yx = $urandom % 2;
      flit.la2_vld = 1; flit.la2 = route_t'($urandom % 8);
      rc_fault = ($urandom % 4 == 0);
      nb_rc_fail = ($urandom % 2);
      dn_vc = ($urandom % 2) ? 4'd2 : 4'd8;   // a Row VC or a Column VC downstream
      if (($urandom % 8) == 0) dn_vc = VCID_EJECT;
      #1;
      for (int r = 0; r < 3; r++)
        for (int m = 0; m < 2; m++) begin
          route_t e, e2;
          d = (m == 0) ? (dx > x) : (dy > y);
          nx = x; ny = y;
          if (m == 0) nx = d ? x + 1 : x - 1; else ny = d ? y + 1 : y - 1;
          e = rc_fault ? flit.la2 : ref_route(r, nx, ny, dx, dy, flit.yx);
          m2 = (dn_vc >= 6);
          d2 = (m2 == 0) ? (dx > nx) : (dy > ny);
          n2x = nx; n2y = ny;
          if (m2 == 0) n2x = d2 ? nx + 1 : nx - 1; else n2y = d2 ? ny + 1 : ny - 1;
          e2 = ref_route(r, n2x, n2y, dx, dy, flit.yx);
          checks++;
          if (out_dir[r][m] != d[0] || !la_vld[r][m] || la[r][m] != e) begin
            failures++; $display("FAIL la r=%0d m=%0d (%0d,%0d)->(%0d,%0d)", r, m, x, y, dx, dy);
          end
          if (e.eject) ejects++;
          checks++;
          if (la2_vld[r][m] != (nb_rc_fail && dn_vc != VCID_EJECT) ||
              (la2_vld[r][m] && la2_out[r][m] != e2)) begin
            failures++; $display("FAIL la2 r=%0d m=%0d", r, m);
          end
          if (la2_vld[r][m]) doubles++;
        end
    end
    checks++;
    if (ejects == 0 || doubles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
