// tb_noc_switch: unit test of one router of a 4x4 torus.
//
// Two switches are tested on their own, one at edge node (0,0) and one at
// inner node (1,1); the testbench plays all their neighbours. Checked:
//  * routing of a header to every destination of the grid against a
//    reference worked out here (rows first, wrap-around only from an edge
//    node and only when strictly shorter), one cycle from input to output,
//    busy words on the unused outputs; a sender that then drops to idle
//    makes the switch close (error path);
//  * busy and line ready words do not start a connection;
//  * arbitration: headers on the up and local inputs in the same cycle, the
//    up one wins;
//  * a type word with an unknown size code closes the connection: the next
//    word is not passed on and the switch is ready two cycles later;
//  * a complete connection: line ready back one cycle later, type word and
//    two data words forwarded one cycle later each, then idle, and the
//    switch takes the next header exactly 3 cycles after the last data
//    word passed it.
module tb_noc_switch;
  import noc_pkg::*;

  localparam int W = 4, H = 4;
  localparam logic [15:0] LR = LINE_READY_WORD;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0][NPORTS-1:0][15:0] lin, lout;
  logic [1:0][7:0] snum;
  assign snum[0] = node_addr(0, 0);
  assign snum[1] = node_addr(1, 1);

  for (genvar i = 0; i < 2; i++) begin : g_dut
    noc_switch #(.LANE(16), .GRID_W(W), .GRID_H(H)) u_sw (
      .clk, .rst_n, .snum(snum[i]), .lane_in(lin[i]), .lane_out(lout[i]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference routing
  function automatic int ref_route(int x, int y, int dx, int dy);
    bit edge_node;
    int d;
    edge_node = (x == 0 || y == 0 || x == W - 1 || y == H - 1);
    if (dy != y) begin
      d = dy - y;                      // positive: up
      if (edge_node && (H - (d > 0 ? d : -d)) < (d > 0 ? d : -d)) d = -d;
      return d > 0 ? 0 : 1;
    end
    if (dx != x) begin
      d = dx - x;                      // positive: right
      if (edge_node && (W - (d > 0 ? d : -d)) < (d > 0 ? d : -d)) d = -d;
      return d > 0 ? 3 : 2;
    end
    return 4;
  endfunction

  function automatic logic [15:0] hdr(int dx, int dy, int sx, int sy);
    return {node_addr(dx, dy), node_addr(sx, sy)};
  endfunction

  // drive a header on port p of switch i and check where it comes out
  task automatic route_check(int i, int p, int sx, int sy, int dx, int dy, int exp);
    logic [15:0] h;
    h = hdr(dx, dy, (sx + 2) % W, (sy + 1) % H);
    @(negedge clk);
    lin[i][p] = h;
    @(negedge clk);
    check(lout[i][exp] == h, $sformatf("sw(%0d,%0d) header to (%0d,%0d) expected on port %0d",
                                       sx, sy, dx, dy, exp));
    for (int q = 0; q < NPORTS; q++)
      if (q != exp && q != p)
        check(lout[i][q] == 16'hFFFF, $sformatf("sw(%0d,%0d) port %0d not busy", sx, sy, q));
    // sender drops: the switch must close and be ready within 3 cycles
    lin[i][p] = '0;
    repeat (3) @(negedge clk);
    check(lout[i] == '0, $sformatf("sw(%0d,%0d) outputs not idle after error close", sx, sy));
  endtask

  initial begin
    lin = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // routing from the local input to every other node
    for (int dy = 0; dy < H; dy++)
      for (int dx = 0; dx < W; dx++) begin
        if (!(dx == 0 && dy == 0)) route_check(0, 4, 0, 0, dx, dy, ref_route(0, 0, dx, dy));
        if (!(dx == 1 && dy == 1)) route_check(1, 4, 1, 1, dx, dy, ref_route(1, 1, dx, dy));
      end
    // a few from other inputs
    route_check(1, 2, 1, 1, 3, 1, 3);   // from left, going right
    route_check(0, 0, 0, 0, 0, 0, 4);   // from above, to local

    // busy and line ready words are ignored
    @(negedge clk);
    lin[0][1] = 16'hFFFF;
    lin[0][2] = LR;
    repeat (3) @(negedge clk);
    check(lout[0] == '0, "busy or line ready word started a connection");
    lin[0] = '0;

    // arbitration: up and local at once, up wins
    @(negedge clk);
    lin[0][0] = hdr(0, 0, 0, 1);   // from above, for this node -> local
    lin[0][4] = hdr(2, 0, 0, 0);   // local, for (2,0) -> right
    @(negedge clk);
    check(lout[0][4] == hdr(0, 0, 0, 1), "arbitration: up header not passed to local");
    check(lout[0][3] == 16'hFFFF, "arbitration: local header passed");
    lin[0] = '0;
    repeat (3) @(negedge clk);

    // full connection on switch 0: local -> down (to (0,3) by wrap-around)
    begin
      logic [15:0] h;
      h = hdr(0, 3, 0, 0);
      lin[0][4] = h;
      @(negedge clk);
      check(lout[0][1] == h, "connection: header not on down");
      repeat (2) @(negedge clk);
      lin[0][1] = LR;                           // receiver answers
      @(negedge clk);
      check(lout[0][4] == LR, "connection: line ready not passed back");
      lin[0][4] = 16'h0012;                     // read type, 32 bits
      lin[0][1] = '0;
      @(negedge clk);
      check(lout[0][1] == 16'h0012, "connection: type word not forwarded");
      check(lout[0][4] == '0, "connection: return lane not idle after type");
      lin[0][4] = 16'h1234;
      @(negedge clk);
      check(lout[0][1] == 16'h1234, "connection: data word 0");
      lin[0][4] = 16'h5678;
      @(negedge clk);
      check(lout[0][1] == 16'h5678, "connection: data word 1");
      // sender starts its next header at once: must not leak through
      lin[0][4] = hdr(3, 0, 0, 0);
      @(negedge clk);
      check(lout[0][1] == '0, "connection: lane not idle after last data word");
      @(negedge clk);
      check(lout[0] == '0, "connection: not closed");
      // ready again: takes the waiting header (to (3,0): left by wrap-around)
      @(negedge clk);
      check(lout[0][2] == hdr(3, 0, 0, 0), "connection: next header not taken 3 cycles after the data");
      lin[0][4] = '0;
      repeat (3) @(negedge clk);
    end

    // invalid size code in the type word: the switch closes
    begin
      logic [15:0] h;
      h = hdr(0, 3, 0, 0);
      lin[0][4] = h;
      @(negedge clk);
      check(lout[0][1] == h, "bad size: header not on down");
      repeat (2) @(negedge clk);
      lin[0][1] = LR;
      @(negedge clk);
      lin[0][4] = 16'h002F;                     // write type, size code 15
      lin[0][1] = '0;
      @(negedge clk);
      check(lout[0][1] == 16'h002F, "bad size: type word not forwarded");
      lin[0][4] = 16'h1234;
      @(negedge clk);
      check(lout[0][1] == '0, "bad size: data passed after an unknown size code");
      lin[0][4] = '0;
      @(negedge clk);
      check(lout[0] == '0, "bad size: connection not closed");
      lin[0][4] = hdr(3, 0, 0, 0);
      @(negedge clk);
      check(lout[0][2] == hdr(3, 0, 0, 0), "bad size: switch not ready again");
      lin[0][4] = '0;
      repeat (3) @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
