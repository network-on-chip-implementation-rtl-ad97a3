// tb_nic_link: unit test of the network side of a NIC.
//
// Two links, A and B, face each other directly (A's lane goes to B and B's
// back to A), which is what a connection through any number of switches
// looks like from the ends. Checked:
//  * a write package (288 data bits) from A arrives intact in B's receive
//    buffer exactly 23 cycles after it was loaded into A (1 to fill the send
//    buffer, 1 for the header, 1 for the line ready word, 1 for the type
//    word, 18 data words, 1 to flag the buffer full), and A's send buffer is
//    empty again;
//  * while B's receive buffer is still full, a second package from A waits
//    (B does not answer), and arrives once the buffer has been taken;
//  * a package without data (size code 0) completes on the type word;
//  * a read package (32 data bits) from B to A;
//  * `hold` keeps a filled send buffer from being sent.
module tb_nic_link;
  import noc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] a2b, b2a;
  logic        a_load, b_load, a_empty, b_empty, a_full, b_full, a_take, b_take;
  logic        a_hold, b_hold, a_busy, b_busy;
  packet_t     a_pkt_in, b_pkt_in, a_rx, b_rx;

  nic_link #(.LANE(16)) u_a (
    .clk, .rst_n, .lane_in(b2a), .lane_out(a2b),
    .tx_load(a_load), .tx_load_pkt(a_pkt_in), .tx_empty(a_empty),
    .rx_pkt(a_rx), .rx_full(a_full), .rx_take(a_take), .hold(a_hold), .busy(a_busy));
  nic_link #(.LANE(16)) u_b (
    .clk, .rst_n, .lane_in(a2b), .lane_out(b2a),
    .tx_load(b_load), .tx_load_pkt(b_pkt_in), .tx_empty(b_empty),
    .rx_pkt(b_rx), .rx_full(b_full), .rx_take(b_take), .hold(b_hold), .busy(b_busy));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic packet_t make_pkt(logic [7:0] to, logic [7:0] from, logic [4:0] t,
                                       logic [3:0] sz, int seed);
    packet_t p;
    p = '0;
    p.hdr = '{receiver: to, sender: from};
    p.tw  = '{special: '0, ptype: t, size: sz};
    for (int i = 0; i < 9; i++) p.data[32*i +: 32] = 32'(seed * 1000 + i * 7 + 1);
    // only the bits the size code covers travel
    for (int i = 0; i < DATA_BITS; i++) if (i >= int'(size_bits(sz))) p.data[i] = 1'b0;
    return p;
  endfunction

  task automatic load_a(packet_t p);
    @(negedge clk);
    a_pkt_in = p;
    a_load   = 1'b1;
    @(negedge clk);
    a_load   = 1'b0;
  endtask

  int t;
  packet_t p1, p2, p3, p4;
  initial begin
    a_load = 0; b_load = 0; a_take = 0; b_take = 0; a_hold = 0; b_hold = 0;
    a_pkt_in = '0; b_pkt_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // write package A -> B, timed
    p1 = make_pkt(8'h34, 8'h01, PT_WRITE, SZ_288, 1);
    check(a_empty, "A send buffer empty after reset");
    load_a(p1);                          // load cycle = cycle 0
    t = 1;
    while (!b_full && t < 100) begin
      @(negedge clk);
      t++;
    end
    check(t == 23, $sformatf("write package took %0d cycles, expected 23", t));
    check(b_rx == p1, "write package corrupted");
    check(a_empty && !a_busy, "A not back to SETUP with an empty buffer");

    // second package waits while B's buffer is full
    p2 = make_pkt(8'h34, 8'h01, PT_READ, SZ_32, 2);
    load_a(p2);
    repeat (20) @(negedge clk);
    check(!a_empty && a_busy && !b_busy, "second package not waiting for B's buffer");
    check(b_rx == p1, "full receive buffer overwritten");
    b_take = 1'b1;
    @(negedge clk);
    b_take = 1'b0;
    repeat (10) @(negedge clk);
    check(b_full && b_rx == p2, "second package not received after take");
    check(a_empty, "A send buffer not empty after second package");
    b_take = 1'b1;
    @(negedge clk);
    b_take = 1'b0;

    // package without data
    p3 = make_pkt(8'h34, 8'h01, 5'd4, SZ_0, 3);
    load_a(p3);
    repeat (8) @(negedge clk);
    check(b_full && b_rx == p3, "zero-size package");
    b_take = 1'b1;
    @(negedge clk);
    b_take = 1'b0;

    // B -> A read, with hold first
    p4 = make_pkt(8'h01, 8'h34, PT_READ_RETURN, SZ_256, 4);
    b_hold = 1'b1;
    @(negedge clk);
    b_pkt_in = p4;
    b_load = 1'b1;
    @(negedge clk);
    b_load = 1'b0;
    repeat (10) @(negedge clk);
    check(!b_busy && !a_busy && !b_empty, "hold did not keep the package back");
    b_hold = 1'b0;
    repeat (30) @(negedge clk);
    check(a_full && a_rx == p4, "read-return package B -> A");
    check(b_empty, "B send buffer not empty");

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
