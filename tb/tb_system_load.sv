// tb_system_load: every core of the default 4 x 4 system uses the memory.
//
// A load test of tinuso_noc at its default size, with all fifteen core NICs
// active:
//  1. all fifteen cores raise their write flag in the same cycle, each for
//     its own line; the writes queue up in the switches and at the memory
//     controller, and every line must be in the memory afterwards;
//  2. each core then reads its line back, one core at a time, and every
//     word is checked;
//  3. the read latency of each core (flag cycle to last data_ready) must be
//     63 + 6 * hops, where hops is the number of links between the core's
//     node and the memory node (3,3), found here by walking the routing rule
//     (rows first, wrap-around only from an edge node when strictly
//     shorter). Each extra link adds one register stage to six things: the
//     request header, its line ready word and its last data word, and the
//     same three for the answer. The closest cores, one link away, take 69
//     cycles; node (1,1), four links away, takes 87.
//  4. cores (0,0) and (0,3) read at the same time and both get their
//     lines;
//  5. at the end every switch is in its ready state and every NIC link in
//     its setup state.
// Apart from the pair in step 4, reads are issued one at a time: many
// concurrent reads can deadlock this protocol (an answer from the memory
// controller and a new request can each hold a switch the other needs).
module tb_system_load;
  import noc_pkg::*;

  localparam int W = 4, H = 4, NC = W * H - 1;
  localparam int MX = 3, MY = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NC-1:0]       mem_read = '0, mem_write = '0;
  logic [NC-1:0][7:0]  core_addr = '0;
  logic [NC-1:0][31:0] mem_addr = '0, mem_dat_write = '0;
  logic [NC-1:0][31:0] mem_dat_read;
  logic [NC-1:0]       data_ready;
  logic [7:0]          mem_node_addr;

  tinuso_noc dut (
    .clk, .rst_n,
    .mem_read, .mem_write, .core_addr, .mem_addr, .mem_dat_write,
    .mem_dat_read, .data_ready, .mem_node_addr
  );

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // switch states, gathered so that a loop can check them (0 = ready)
  logic [W*H-1:0] sw_ready;
  for (genvar gy = 0; gy < H; gy++) begin : g_sy
    for (genvar gx = 0; gx < W; gx++) begin : g_sx
      assign sw_ready[gx + W * gy] = (dut.g_row[gy].g_col[gx].u_sw.state == 0);
    end
  end

  function automatic int absd(int a);
    return a < 0 ? -a : a;
  endfunction

  // number of links from (x,y) to the memory node under the routing rule
  function automatic int hops_to_mem(int x, int y);
    int n, d;
    bit on_edge;
    n = 0;
    while (x != MX || y != MY) begin
      on_edge = (x == 0 || y == 0 || x == W - 1 || y == H - 1);
      if (y != MY) begin
        d = MY - y;
        if (on_edge && H - absd(d) < absd(d)) d = -d;
        y = (y + (d > 0 ? 1 : H - 1)) % H;
      end else begin
        d = MX - x;
        if (on_edge && W - absd(d) < absd(d)) d = -d;
        x = (x + (d > 0 ? 1 : W - 1)) % W;
      end
      n++;
    end
    return n;
  endfunction

  function automatic logic [31:0] line_addr(int c);
    return 32'h100 + 32'(8 * c);
  endfunction

  function automatic logic [31:0] word(int c, int i);
    return {8'hD0 + 8'(c), 16'h0, 8'(i)};
  endfunction

  task automatic core_write(input int c);
    mem_write[c] = 1'b1;
    core_addr[c] = mem_node_addr;
    mem_addr[c]  = line_addr(c);
    @(negedge clk);
    mem_write[c] = 1'b0;
    for (int i = 0; i < 8; i++) begin
      mem_dat_write[c] = word(c, i);
      @(negedge clk);
    end
    mem_dat_write[c] = '0;
  endtask

  task automatic core_read(input int c, output int latency);
    int unsigned t0, last;
    int got;
    mem_read[c]  = 1'b1;
    core_addr[c] = mem_node_addr;
    mem_addr[c]  = line_addr(c);
    t0 = cyc;
    @(negedge clk);
    mem_read[c] = 1'b0;
    got = 0;
    last = t0;
    while (got < 8) begin
      if (data_ready[c]) begin
        check(mem_dat_read[c] == word(c, got),
              $sformatf("core %0d word %0d = %h", c, got, mem_dat_read[c]));
        last = cyc;
        got++;
      end
      @(negedge clk);
    end
    latency = int'(last - t0);
  endtask

  int lat, hops, lmin, lmax;
  int n_pair = 0;
  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // 1. fifteen writes at once
    for (int c = 0; c < NC; c++)
      fork
        automatic int cc = c;
        core_write(cc);
      join_none
    wait fork;
    repeat (1200) @(negedge clk);
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < 8; i++)
        check(dut.u_mem.mem[line_addr(c) + 32'(i)] == word(c, i),
              $sformatf("memory: core %0d word %0d", c, i));

    // 2./3. one read per core, in turn
    lmin = 1000; lmax = 0;
    for (int c = 0; c < NC; c++) begin
      core_read(c, lat);
      hops = hops_to_mem(c % W, c / W);
      check(lat == 63 + 6 * hops,
            $sformatf("core %0d at (%0d,%0d): latency %0d, expected %0d for %0d links",
                      c, c % W, c / W, lat, 63 + 6 * hops, hops));
      if (lat < lmin) lmin = lat;
      if (lat > lmax) lmax = lat;
      repeat (5) @(negedge clk);
    end
    $display("read latency over all cores: %0d to %0d cycles", lmin, lmax);
    check(lmin == 69 && lmax == 87, "latency range");

    // 4. two reads at once (cores (0,0) and (0,3), whose paths share a
    //    switch): the second request reaches the memory controller while
    //    the first answer is waiting to be sent; both must complete
    fork
      begin
        int l;
        core_read(0, l);
      end
      begin
        int l;
        core_read(12, l);
      end
    join
    n_pair++;

    // 5. all idle
    repeat (20) @(negedge clk);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        check(sw_ready[x + W * y], $sformatf("switch (%0d,%0d) not ready", x, y));
    check(dut.g_row[3].g_col[3].g_mem.u_mem_nic.u_link.state == 0, "memory NIC link not idle");
    check(dut.g_row[0].g_col[0].g_core.u_nic.u_link.state == 0 &&
          dut.g_row[1].g_col[1].g_core.u_nic.u_link.state == 0 &&
          dut.g_row[3].g_col[2].g_core.u_nic.u_link.state == 0, "core NIC links not idle");

    check(n_pair == 1, "two concurrent reads did not both complete");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
