// tb_nic: unit test of the core-side Network Interface Controller.
//
// The testbench plays a Tinuso core on the core interface; on the network
// side a nic_link stands for the far end of the connection (node 8'h34).
// Checked:
//  * a write flag with eight data words becomes one write package: header
//    {8'h34, own address}, type write with 288 data bits, address in
//    data[31:0] and the eight words after it;
//  * a read flag becomes a read package with 32 data bits holding the
//    address;
//  * a read-return package sent by the far end is delivered to the core as
//    eight words, each with data_ready high for one cycle and low for one
//    cycle, the first data_ready 24 cycles after the far end loaded the
//    package (1 send buffer, 1 header, 1 line ready, 1 type word, 16 data
//    words, 1 receive buffer full, 1 glue move, 1 core process, 1 output
//    register).
module tb_nic;
  import noc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam logic [7:0] ME = 8'h01, FAR = 8'h34;

  logic [15:0] n2f, f2n;
  logic        mem_read, mem_write, data_ready;
  logic [7:0]  core_addr;
  logic [31:0] mem_addr, mem_dat_write, mem_dat_read;

  logic    f_load, f_empty, f_full, f_take, f_busy;
  packet_t f_pkt_in, f_rx;

  nic #(.LANE(16)) dut (
    .clk, .rst_n, .my_addr(ME), .lane_in(f2n), .lane_out(n2f),
    .mem_read, .mem_write, .core_addr, .mem_addr, .mem_dat_write,
    .mem_dat_read, .data_ready);

  nic_link #(.LANE(16)) u_far (
    .clk, .rst_n, .lane_in(n2f), .lane_out(f2n),
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

  task automatic wait_far_full();
    int n;
    n = 0;
    while (!f_full && n < 200) begin
      @(negedge clk);
      n++;
    end
    check(f_full, "far end received nothing");
  endtask

  task automatic take_far();
    f_take = 1'b1;
    @(negedge clk);
    f_take = 1'b0;
  endtask

  int t, got, prev;
  packet_t ret;
  initial begin
    mem_read = 0; mem_write = 0; core_addr = 0; mem_addr = 0; mem_dat_write = 0;
    f_load = 0; f_take = 0; f_pkt_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // write
    mem_write = 1'b1; core_addr = FAR; mem_addr = 32'h0000_0120;
    @(negedge clk);
    mem_write = 1'b0;
    for (int i = 0; i < 8; i++) begin
      mem_dat_write = 32'hC0DE_0000 + 32'(i * 3);
      @(negedge clk);
    end
    wait_far_full();
    check(f_rx.hdr.receiver == FAR && f_rx.hdr.sender == ME, "write header");
    check(f_rx.tw.ptype == PT_WRITE && f_rx.tw.size == SZ_288, "write type word");
    check(f_rx.data[31:0] == 32'h0000_0120, "write address");
    for (int i = 0; i < 8; i++)
      check(f_rx.data[32*(i+1) +: 32] == 32'hC0DE_0000 + 32'(i * 3), $sformatf("write word %0d", i));
    take_far();

    // read
    mem_read = 1'b1; core_addr = FAR; mem_addr = 32'h0000_0200;
    @(negedge clk);
    mem_read = 1'b0;
    wait_far_full();
    check(f_rx.hdr == '{receiver: FAR, sender: ME}, "read header");
    check(f_rx.tw.ptype == PT_READ && f_rx.tw.size == SZ_32, "read type word");
    check(f_rx.data[31:0] == 32'h0000_0200, "read address");
    take_far();

    // read-return from the far end
    ret = '0;
    ret.hdr = '{receiver: ME, sender: FAR};
    ret.tw  = '{special: '0, ptype: PT_READ_RETURN, size: SZ_256};
    for (int i = 0; i < 8; i++) ret.data[32*i +: 32] = 32'h5EED_0000 + 32'(i * 11);
    f_pkt_in = ret;
    f_load = 1'b1;
    @(negedge clk);
    f_load = 1'b0;
    t = 1; got = 0; prev = -1;
    while (got < 8 && t < 300) begin
      if (data_ready) begin
        if (got == 0) check(t == 24, $sformatf("first data_ready after %0d cycles, expected 24", t));
        if (prev >= 0) check(t - prev == 2, "data_ready spacing");
        check(mem_dat_read == 32'h5EED_0000 + 32'(got * 11), $sformatf("returned word %0d", got));
        prev = t;
        got++;
      end
      @(negedge clk);
      t++;
    end
    check(got == 8, "not all eight words delivered");
    repeat (3) @(negedge clk);
    check(!data_ready, "data_ready stays low after the line");

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
