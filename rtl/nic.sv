// nic: Network Interface Controller between a Tinuso core and the NOC.
//
// Three processes, as in the protocol description:
//  * the network link (nic_link) with its own send and receive buffers;
//  * the core process, which builds request packages from the core's flags
//    and hands returned cache lines to the core;
//  * a glue process, which moves a complete request package into the empty
//    send buffer of the link, and a complete received package from the link
//    into the empty response buffer of the core process.
// Because the core only talks to buffers, the link can send or receive a
// package while the core is talking to the NIC.
//
// Core process states:
//   C_RECEIVE        samples the flags. mem_read (one-cycle pulse) builds a
//                    read package: header {core_addr, my_addr}, type read,
//                    32 data bits holding mem_addr. mem_write (one-cycle
//                    pulse) builds the header, the write type (288 bits) and
//                    the address, then goes to C_WRITE_RECEIVE. With a
//                    returned line waiting it goes to C_SEND.
//   C_WRITE_RECEIVE  takes the eight 32-bit words of the line from
//                    mem_dat_write on the eight cycles after the flag.
//   C_SEND           puts line word i on mem_dat_read and raises data_ready
//                    for one cycle, drops it for one cycle, for i = 0..7.
// Flags are only sampled in C_RECEIVE with the request buffer empty; the core
// has no way to learn that the NIC is busy, so it must not raise a flag
// while a line is being delivered to it.
//
// The flags, address lines, 32-bit data lines and the toggled data_ready
// follow the agreed core interface. The core process waits in C_RECEIVE
// rather than bouncing through C_SEND when there is nothing to deliver, so
// that a one-cycle flag cannot be missed; the write data timing (eight
// consecutive cycles after the flag) is this design's choice.
module nic
  import noc_pkg::*;
#(
  parameter int unsigned LANE = noc_pkg::LANE_WIDTH
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [7:0]      my_addr,
  // lanes to and from the local switch port
  input  logic [LANE-1:0] lane_in,
  output logic [LANE-1:0] lane_out,
  // Tinuso core interface
  input  logic            mem_read,
  input  logic            mem_write,
  input  logic [7:0]      core_addr,      // receiver of the request
  input  logic [31:0]     mem_addr,       // word address of the line
  input  logic [31:0]     mem_dat_write,
  output logic [31:0]     mem_dat_read,
  output logic            data_ready
);

  typedef enum logic [1:0] { C_RECEIVE, C_WRITE_RECEIVE, C_SEND } core_state_e;

  core_state_e cstate;
  packet_t     req_buf;
  logic        req_full;
  packet_t     resp_buf;
  logic        resp_full;
  logic [3:0]  wcnt;          // write words taken
  logic [3:0]  scnt;          // half-steps of the delivery (0..15)

  // link
  logic    tx_load, tx_empty, rx_full, rx_take;
  packet_t rx_pkt;

  nic_link #(.LANE(LANE)) u_link (
    .clk, .rst_n,
    .lane_in, .lane_out,
    .tx_load, .tx_load_pkt(req_buf), .tx_empty,
    .rx_pkt, .rx_full, .rx_take,
    .hold(1'b0), .busy()
  );

  // glue process
  assign tx_load = req_full && tx_empty;
  assign rx_take = rx_full && !resp_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate       <= C_RECEIVE;
      req_buf      <= '0;
      req_full     <= 1'b0;
      resp_buf     <= '0;
      resp_full    <= 1'b0;
      wcnt         <= '0;
      scnt         <= '0;
      mem_dat_read <= '0;
      data_ready   <= 1'b0;
    end else begin
      // glue: request buffer -> link send buffer
      if (tx_load) req_full <= 1'b0;
      // glue: link receive buffer -> response buffer
      if (rx_take) begin
        resp_buf  <= rx_pkt;
        resp_full <= 1'b1;
      end

      case (cstate)
        C_RECEIVE: begin
          data_ready <= 1'b0;
          if (mem_read && !req_full) begin
            req_buf            <= '0;
            req_buf.hdr        <= '{receiver: core_addr, sender: my_addr};
            req_buf.tw         <= '{special: '0, ptype: PT_READ, size: SZ_32};
            req_buf.data[31:0] <= mem_addr;
            req_full           <= 1'b1;
            scnt               <= '0;
            if (resp_full) cstate <= C_SEND;
          end else if (mem_write && !req_full) begin
            req_buf            <= '0;
            req_buf.hdr        <= '{receiver: core_addr, sender: my_addr};
            req_buf.tw         <= '{special: '0, ptype: PT_WRITE, size: SZ_288};
            req_buf.data[31:0] <= mem_addr;
            wcnt               <= '0;
            cstate             <= C_WRITE_RECEIVE;
          end else if (resp_full) begin
            scnt   <= '0;
            cstate <= C_SEND;
          end
        end

        C_WRITE_RECEIVE: begin
          req_buf.data[32*(int'(wcnt)+1) +: 32] <= mem_dat_write;
          wcnt <= wcnt + 1'b1;
          if (wcnt == 4'(CACHE_LINE_WORDS - 1)) begin
            req_full <= 1'b1;
            cstate   <= C_RECEIVE;
          end
        end

        C_SEND: begin
          if (!scnt[0]) begin
            mem_dat_read <= resp_buf.data[32*int'(scnt[3:1]) +: 32];
            data_ready   <= 1'b1;
          end else begin
            data_ready   <= 1'b0;
          end
          scnt <= scnt + 1'b1;
          if (scnt == 4'd15) begin
            resp_full <= 1'b0;
            cstate    <= C_RECEIVE;
          end
        end

        default: cstate <= C_RECEIVE;
      endcase
    end
  end

endmodule
