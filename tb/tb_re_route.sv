// tb_re_route: exhaustive check of the O1Turn routing decision on a 3 x 3 and
// a 4 x 2 torus against shortest-way distances computed here.
module tb_re_route;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  logic [CW-1:0] mx, my;
  dni_t d;
  logic yx;
  port_e p33, p42;

  re_route #(.NX(3), .NY(3)) dut33 (.my_x(mx), .my_y(my), .dni(d), .yx_first(yx), .port(p33));
  re_route #(.NX(4), .NY(2)) dut42 (.my_x(mx), .my_y(my), .dni(d), .yx_first(yx), .port(p42));

  function automatic port_e ref_port(int nx, int ny, int x, int y, int tx, int ty, bit yxf);
    int de, dw, ds, dn;
    port_e px, py;
    de = (tx - x + nx) % nx; dw = (x - tx + nx) % nx;
    ds = (ty - y + ny) % ny; dn = (y - ty + ny) % ny;
    px = (de <= dw) ? PORT_E : PORT_W;
    py = (ds <= dn) ? PORT_S : PORT_N;
    if (x == tx && y == ty) return PORT_L;
    if (yxf) return (y != ty) ? py : px;
    return (x != tx) ? px : py;
  endfunction

  initial begin
    for (int n = 0; n < 2; n++) begin
      int nx, ny;
      nx = n ? 4 : 3; ny = n ? 2 : 3;
      for (int x = 0; x < nx; x++) for (int y = 0; y < ny; y++)
      for (int tx = 0; tx < nx; tx++) for (int ty = 0; ty < ny; ty++)
      for (int o = 0; o < 2; o++) begin
        port_e got, exp;
        mx = CW'(x); my = CW'(y); d.x = CW'(tx); d.y = CW'(ty); yx = o[0];
        #1;
        got = n ? p42 : p33;
        exp = ref_port(nx, ny, x, y, tx, ty, o[0]);
        checks++;
        if (got != exp) begin
          failures++;
          $display("route %0dx%0d (%0d,%0d)->(%0d,%0d) yx=%0d got %0d exp %0d", nx, ny, x, y, tx, ty, o, got, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
