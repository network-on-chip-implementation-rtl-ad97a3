// tb_noc_pkg: test of the shared definitions and functions in noc_pkg.
//
// No clocked logic is involved; the checks run at time zero and a clock
// only drives the watchdog. Checked against values written out here:
//  * package sizes: 16-bit header and type word, 288 data bits, 320 in all;
//  * the size code table (0, 16, 32, 64, 128, 256, 288 bits; codes 7..15
//    invalid and worth 0 bits);
//  * node addresses {x, y+1} and their inverse for every node of the
//    largest grid (16 x 15), and that none of them is 8'h00 or 8'hA0;
//  * the routing function on a 4 x 4 and a 5 x 3 torus: for every pair of
//    nodes the first port must match a reference (rows first, wrap-around
//    link only from an edge node and only when strictly shorter), and
//    following the function hop by hop must reach the destination within
//    the grid's width plus height.
module tb_noc_pkg;
  import noc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int absd(int a);
    return a < 0 ? -a : a;
  endfunction

  // reference: 0 up, 1 down, 2 left, 3 right, 4 local
  function automatic int ref_port(int x, int y, int dx, int dy, int w, int h);
    bit on_edge;
    int d;
    on_edge = (x == 0 || y == 0 || x == w - 1 || y == h - 1);
    if (dy != y) begin
      d = dy - y;
      if (on_edge && h - absd(d) < absd(d)) d = -d;
      return d > 0 ? 0 : 1;
    end
    if (dx != x) begin
      d = dx - x;
      if (on_edge && w - absd(d) < absd(d)) d = -d;
      return d > 0 ? 3 : 2;
    end
    return 4;
  endfunction

  // walk the package from (sx,sy) to (dx,dy) with the package function
  function automatic int walk(int sx, int sy, int dx, int dy, int w, int h);
    int x, y, n;
    port_e p;
    x = sx; y = sy; n = 0;
    while (n <= w + h) begin
      p = route_yx_torus(node_addr(x, y), node_addr(dx, dy), w, h);
      case (p)
        P_UP:    y = (y + 1) % h;
        P_DOWN:  y = (y + h - 1) % h;
        P_LEFT:  x = (x + w - 1) % w;
        P_RIGHT: x = (x + 1) % w;
        default: return n;
      endcase
      n++;
    end
    return -1;
  endfunction

  task automatic check_grid(int w, int h);
    int hops, worst;
    worst = 0;
    for (int sy = 0; sy < h; sy++)
      for (int sx = 0; sx < w; sx++)
        for (int dy = 0; dy < h; dy++)
          for (int dx = 0; dx < w; dx++) begin
            check(int'(route_yx_torus(node_addr(sx, sy), node_addr(dx, dy), w, h)) ==
                  ref_port(sx, sy, dx, dy, w, h),
                  $sformatf("%0dx%0d route (%0d,%0d)->(%0d,%0d)", w, h, sx, sy, dx, dy));
            hops = walk(sx, sy, dx, dy, w, h);
            check(hops >= 0, $sformatf("%0dx%0d (%0d,%0d)->(%0d,%0d) never arrives",
                                       w, h, sx, sy, dx, dy));
            if (hops > worst) worst = hops;
          end
    $display("%0dx%0d torus: longest path %0d hops", w, h, worst);
  endtask

  initial begin
    check($bits(header_t) == 16 && $bits(type_word_t) == 16, "header and type word widths");
    check($bits(packet_t) == 320, "package width");
    check(LINE_READY_WORD == 16'b0000_0010_1010_0000, "line ready word");

    for (int c = 0; c < 16; c++) begin
      int exp;
      case (c)
        1: exp = 16;   2: exp = 32;   3: exp = 64;
        4: exp = 128;  5: exp = 256;  6: exp = 288;
        default: exp = 0;
      endcase
      check(size_bits(4'(c)) == exp, $sformatf("size code %0d", c));
      check(size_code_valid(4'(c)) == (c <= 6), $sformatf("size code %0d validity", c));
    end

    for (int y = 0; y < 15; y++)
      for (int x = 0; x < 16; x++) begin
        logic [7:0] a;
        a = node_addr(x, y);
        check(a == 8'(x * 16 + y + 1), $sformatf("address of (%0d,%0d)", x, y));
        check(addr_x(a) == x && addr_y(a) == y, $sformatf("inverse of (%0d,%0d)", x, y));
        check(a != 8'h00 && a != 8'hA0, $sformatf("(%0d,%0d) has a reserved address", x, y));
      end
    check(node_addr(1, 3) == 8'b0001_0100, "node (1,3)");

    check_grid(4, 4);
    check_grid(5, 3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
