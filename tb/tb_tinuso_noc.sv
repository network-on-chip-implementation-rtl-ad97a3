// tb_tinuso_noc: end-to-end test of the 4x4 torus NOC at its default size.
//
// Simulated cores drive the core ports of tinuso_noc:
//  1. the core on node (0,0) writes a line and, one cycle later, the core on
//     node (0,3) writes another; both paths meet in switch (0,3), where the
//     two headers arrive in the same cycle and the one from above wins, and
//     the second write waits on the busy switch and then on the memory
//     controller that is still writing the first line;
//  2. both lines are checked in the memory;
//  3. four cores read lines back one after the other (edge nodes using the
//     wrap-around links, and an inner node); every word is checked, the
//     data_ready spacing of two cycles is checked, and the read from node
//     (0,0) must take exactly READ_LATENCY cycles from the flag to the last
//     data_ready;
//  4. at the end every switch and every link must be back in its idle state.
// The test counts how often each mechanism happened (arbitration, busy
// blocking, torus wrap hops, line ready handshakes, memory waits, line
// reads and writes) and counts a failure for any that never happened.
//
// READ_LATENCY for node (0,0) reading from node (3,3), 3 switches each way,
// worked out by hand from the state machines (cycle 0 = flag cycle):
// request built 1, loaded into the link 2, header leaves the NIC 3, one
// cycle per switch to the memory NIC 6, line ready back 7..10, type word and
// 2 data words 11..13, received by 16, memory read 18..27, read-return header
// leaves 30, line ready back to the memory NIC 37, type word 38, 16 data
// words reach the NIC 42..57, response buffer 59, eight words on
// data_ready at 61, 63, ..., 75.
module tb_tinuso_noc;
  import noc_pkg::*;

  localparam int W = 4, H = 4, NC = W * H - 1;
  localparam int READ_LATENCY = 75;

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

  // ---------------- mechanism counters ----------------
  int n_arbit = 0, n_blocked = 0, n_wrap = 0, n_lr = 0, n_memwait = 0;
  int n_memwr = 0, n_memrd = 0;

  localparam logic [LANE_WIDTH-1:0] LR = LANE_WIDTH'(LINE_READY_WORD);

  function automatic bit valid_hdr(logic [15:0] w);
    return w != 16'h0000 && w != 16'hFFFF && w != LR;
  endfunction

  for (genvar gy = 0; gy < H; gy++) begin : g_my
    for (genvar gx = 0; gx < W; gx++) begin : g_mx
      always @(posedge clk) if (rst_n) begin
        int nh;
        nh = 0;
        for (int p = 0; p < 5; p++)
          if (valid_hdr(dut.g_row[gy].g_col[gx].u_sw.lane_in[p])) nh++;
        // READY = 0, SIGNAL_WAIT = 1
        if (dut.g_row[gy].g_col[gx].u_sw.state == 0) begin
          if (nh >= 2) n_arbit++;
          if (dut.g_row[gy].g_col[gx].u_sw.hit) begin
            case (dut.g_row[gy].g_col[gx].u_sw.hit_route)
              P_UP:    if (gy == H - 1) n_wrap++;
              P_DOWN:  if (gy == 0)     n_wrap++;
              P_LEFT:  if (gx == 0)     n_wrap++;
              P_RIGHT: if (gx == W - 1) n_wrap++;
              default: ;
            endcase
          end
        end
        if (dut.g_row[gy].g_col[gx].u_sw.state == 1 &&
            dut.g_row[gy].g_col[gx].u_sw.from_dst == 16'hFFFF) n_blocked++;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    // memory NIC link: SEND_WAIT = 3, sees line ready
    if (dut.g_row[3].g_col[3].g_mem.u_mem_nic.u_link.state == 3 &&
        dut.g_row[3].g_col[3].g_mem.u_mem_nic.u_link.lane_in == LR) n_lr++;
    // a header waits at the memory NIC while it works on the memory
    if (dut.g_row[3].g_col[3].g_mem.u_mem_nic.mstate != 0 &&
        valid_hdr(dut.g_row[3].g_col[3].g_mem.u_mem_nic.lane_in)) n_memwait++;
    // the core NIC on node (0,3) waits on a busy switch
    if (dut.g_row[3].g_col[0].g_core.u_nic.u_link.state == 3 &&
        dut.g_row[3].g_col[0].g_core.u_nic.u_link.lane_in == 16'hFFFF) n_blocked++;
    if (dut.u_mem.we) n_memwr++;
    if (dut.u_mem.re) n_memrd++;
  end

  // ---------------- simulated cores ----------------
  task automatic core_write(input int c, input logic [31:0] addr, input logic [31:0] base);
    @(negedge clk);
    mem_write[c] = 1'b1;
    core_addr[c] = mem_node_addr;
    mem_addr[c]  = addr;
    @(negedge clk);
    mem_write[c] = 1'b0;
    for (int i = 0; i < 8; i++) begin
      mem_dat_write[c] = base + 32'(i);
      @(negedge clk);
    end
    mem_dat_write[c] = '0;
  endtask

  task automatic core_read(input int c, input logic [31:0] addr, input logic [31:0] base,
                           output int latency);
    int unsigned t0, last;
    int got, prev;
    @(negedge clk);
    mem_read[c]  = 1'b1;
    core_addr[c] = mem_node_addr;
    mem_addr[c]  = addr;
    t0 = cyc;
    @(negedge clk);
    mem_read[c] = 1'b0;
    got = 0;
    prev = -1;
    last = t0;
    while (got < 8) begin
      if (data_ready[c]) begin
        check(mem_dat_read[c] == base + 32'(got),
              $sformatf("core %0d word %0d = %h, expected %h", c, got,
                        mem_dat_read[c], base + 32'(got)));
        if (prev >= 0) check(cyc - prev == 2, $sformatf("core %0d data_ready spacing %0d", c, cyc - prev));
        prev = cyc;
        last = cyc;
        got++;
      end
      @(negedge clk);
    end
    latency = int'(last - t0);
  endtask

  // ---------------- test sequence ----------------
  int lat;
  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(mem_node_addr == 8'h34, "memory node address");

    // 1. two writes that collide in switch (0,3)
    fork
      core_write(0, 32'h40, 32'hA000_0000);
      begin
        @(negedge clk);
        core_write(12, 32'h80, 32'hB000_0000);
      end
    join
    repeat (150) @(negedge clk);

    // 2. memory contents
    for (int i = 0; i < 8; i++) begin
      check(dut.u_mem.mem[32'h40 + i] == 32'hA000_0000 + i, $sformatf("memory line A word %0d", i));
      check(dut.u_mem.mem[32'h80 + i] == 32'hB000_0000 + i, $sformatf("memory line B word %0d", i));
    end

    // 3. reads, one at a time
    core_read(0, 32'h40, 32'hA000_0000, lat);
    $display("read latency node (0,0) <- (3,3): %0d cycles", lat);
    check(lat == READ_LATENCY, $sformatf("read latency %0d, expected %0d", lat, READ_LATENCY));
    repeat (10) @(negedge clk);
    core_read(12, 32'h80, 32'hB000_0000, lat);
    repeat (10) @(negedge clk);
    core_read(10, 32'h40, 32'hA000_0000, lat);   // inner node (2,2)
    repeat (10) @(negedge clk);
    core_read(3, 32'h80, 32'hB000_0000, lat);    // node (3,0)
    repeat (30) @(negedge clk);

    // 4. everything idle again
    check(dut.g_row[0].g_col[0].u_sw.state == 0 && dut.g_row[0].g_col[3].u_sw.state == 0 &&
          dut.g_row[3].g_col[0].u_sw.state == 0 && dut.g_row[3].g_col[3].u_sw.state == 0 &&
          dut.g_row[2].g_col[2].u_sw.state == 0 && dut.g_row[0].g_col[1].u_sw.state == 0,
          "switches back in READY");
    check(dut.g_row[3].g_col[3].g_mem.u_mem_nic.u_link.state == 0 &&
          dut.g_row[0].g_col[0].g_core.u_nic.u_link.state == 0 &&
          dut.g_row[3].g_col[0].g_core.u_nic.u_link.state == 0,
          "links back in SETUP");

    $display("mechanisms: arbitration=%0d blocked=%0d wrap=%0d line_ready=%0d mem_wait=%0d mem_writes=%0d mem_reads=%0d",
             n_arbit, n_blocked, n_wrap, n_lr, n_memwait, n_memwr, n_memrd);
    check(n_arbit > 0, "arbitration never happened");
    check(n_blocked > 0, "busy blocking never happened");
    check(n_wrap > 0, "torus wrap never used");
    check(n_lr > 0, "line ready handshake never seen");
    check(n_memwait > 0, "memory wait never happened");
    check(n_memwr == 16, $sformatf("memory writes %0d, expected 16", n_memwr));
    check(n_memrd == 32, $sformatf("memory reads %0d, expected 32", n_memrd));

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
