// tb_mem_nic: unit test of the memory controller with network interface.
//
// mem_nic drives a line_memory; on the network side a nic_link stands for
// the requesting NIC (node 8'h11). Checked:
//  * a write package puts its eight words at addresses A..A+7 (read back
//    straight from the memory array) and no answer is sent;
//  * a read package is answered by a read-return package addressed to the
//    requester, from the memory node, type read-return with 256 bits,
//    holding the eight words; it is complete at the requester exactly 39
//    cycles after the request was loaded (7 to receive the request, 11 for
//    the memory operations, 2 to load and start the answer, 19 to send it);
//  * two reads sent back to back: the second arrives while the first answer
//    is waiting, is received first, and both answers come back right.
module tb_mem_nic;
  import noc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam logic [7:0] ME = 8'h34, REQ = 8'h11;

  logic [15:0] m2f, f2m;
  logic        re, we;
  logic [31:0] addr, wdata, rdata;

  logic    f_load, f_empty, f_full, f_take, f_busy;
  packet_t f_pkt_in, f_rx;

  mem_nic #(.LANE(16)) dut (
    .clk, .rst_n, .my_addr(ME), .lane_in(f2m), .lane_out(m2f),
    .mem_re(re), .mem_we(we), .mem_addr(addr), .mem_wdata(wdata), .mem_rdata(rdata));

  line_memory #(.WORDS(256)) u_mem (.clk, .re, .we, .addr, .wdata, .rdata);

  nic_link #(.LANE(16)) u_req (
    .clk, .rst_n, .lane_in(m2f), .lane_out(f2m),
    .tx_load(f_load), .tx_load_pkt(f_pkt_in), .tx_empty(f_empty),
    .rx_pkt(f_rx), .rx_full(f_full), .rx_take(f_take), .hold(1'b0), .busy(f_busy));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic packet_t read_pkt(logic [31:0] a);
    packet_t p;
    p = '0;
    p.hdr = '{receiver: ME, sender: REQ};
    p.tw  = '{special: '0, ptype: PT_READ, size: SZ_32};
    p.data[31:0] = a;
    return p;
  endfunction

  task automatic load(packet_t p);
    f_pkt_in = p;
    f_load = 1'b1;
    @(negedge clk);
    f_load = 1'b0;
  endtask

  task automatic check_return(logic [31:0] base, string what);
    check(f_rx.hdr == '{receiver: REQ, sender: ME}, {what, ": header"});
    check(f_rx.tw.ptype == PT_READ_RETURN && f_rx.tw.size == SZ_256, {what, ": type word"});
    for (int i = 0; i < 8; i++)
      check(f_rx.data[32*i +: 32] == base + 32'(i), $sformatf("%s: word %0d", what, i));
  endtask

  task automatic take();
    f_take = 1'b1;
    @(negedge clk);
    f_take = 1'b0;
  endtask

  int t;
  packet_t w;
  initial begin
    f_load = 0; f_take = 0; f_pkt_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // write two lines
    for (int l = 0; l < 2; l++) begin
      w = '0;
      w.hdr = '{receiver: ME, sender: REQ};
      w.tw  = '{special: '0, ptype: PT_WRITE, size: SZ_288};
      w.data[31:0] = 32'h10 + 32'(l * 8);
      for (int i = 0; i < 8; i++) w.data[32*(i+1) +: 32] = 32'h7000_0000 + 32'(l * 8 + i);
      load(w);
      repeat (40) @(negedge clk);
    end
    for (int i = 0; i < 16; i++)
      check(u_mem.mem[16 + i] == 32'h7000_0000 + 32'(i), $sformatf("memory word %0d", 16 + i));
    check(!f_full, "a write was answered");

    // one read, timed
    load(read_pkt(32'h10));
    t = 1;
    while (!f_full && t < 200) begin
      @(negedge clk);
      t++;
    end
    check(t == 39, $sformatf("read answered after %0d cycles, expected 39", t));
    check_return(32'h7000_0000, "read 1");
    take();

    // two reads back to back
    load(read_pkt(32'h18));
    while (!f_empty) @(negedge clk);   // first request sent
    load(read_pkt(32'h11));
    t = 0;
    while (!f_full && t < 300) begin
      @(negedge clk);
      t++;
    end
    check_return(32'h7000_0008, "read 2");
    take();
    t = 0;
    while (!f_full && t < 300) begin
      @(negedge clk);
      t++;
    end
    check_return(32'h7000_0001, "read 3");
    take();

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
