// mem_nic: memory interface controller with a network interface.
//
// The network side is the same link state machine as in every NIC
// (nic_link). In place of the core process and glue there is one extra step,
// the memory operations, run after a package has been received and after a
// package has been sent, while the link is held in SETUP:
//   write package  the eight line words data[63:32] .. data[287:256] are
//                  written, one per cycle, to word addresses A .. A+7, where A
//                  is data[31:0]. No answer is sent.
//   read package   words A .. A+7 are read, one per cycle, into the send
//                  buffer as a read-return package addressed to the sender
//                  of the request, from this node, with 256 data bits; the
//                  link then sends it.
// Other package types are dropped.
//
// Memory port: mem_re or mem_we with mem_addr (word address), mem_wdata for
// writes; mem_rdata must hold the word in the cycle after the
// memory sees mem_re (a synchronous read; mem_re is itself a register). A line read
// therefore takes 10 cycles and a line write 8.
//
// Following the protocol, an incoming package is accepted before a waiting
// read-return is sent. If a second read arrives while the first answer is
// still in the send buffer, the memory step waits and lets the link send
// first (this design's choice; it keeps the buffer from being overwritten).
module mem_nic
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
  // memory interface
  output logic            mem_re,
  output logic            mem_we,
  output logic [31:0]     mem_addr,
  output logic [31:0]     mem_wdata,
  input  logic [31:0]     mem_rdata
);

  typedef enum logic [1:0] { M_IDLE, M_WRITE, M_READ } mem_state_e;

  mem_state_e mstate;
  logic [3:0] k;           // word counter
  packet_t    ret_pkt;     // read-return package being filled
  logic       tx_load, tx_empty, rx_full, rx_take, link_busy;
  packet_t    rx_pkt;
  logic       can_run;

  // A read needs the send buffer; anything else can run at once.
  assign can_run = rx_full && (rx_pkt.tw.ptype != PT_READ || tx_empty);

  nic_link #(.LANE(LANE)) u_link (
    .clk, .rst_n,
    .lane_in, .lane_out,
    .tx_load, .tx_load_pkt(ret_pkt), .tx_empty,
    .rx_pkt, .rx_full, .rx_take,
    .hold(mstate != M_IDLE || can_run), .busy(link_busy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mstate    <= M_IDLE;
      k         <= '0;
      ret_pkt   <= '0;
      tx_load   <= 1'b0;
      rx_take   <= 1'b0;
      mem_re    <= 1'b0;
      mem_we    <= 1'b0;
      mem_addr  <= '0;
      mem_wdata <= '0;
    end else begin
      tx_load <= 1'b0;
      rx_take <= 1'b0;
      mem_re  <= 1'b0;
      mem_we  <= 1'b0;
      case (mstate)
        M_IDLE: begin
          // wait for the link to settle back in SETUP and the buffer to fill
          if (can_run && !link_busy && !rx_take) begin
            k <= '0;
            case (rx_pkt.tw.ptype)
              PT_WRITE: mstate <= M_WRITE;
              PT_READ: begin
                ret_pkt     <= '0;
                ret_pkt.hdr <= '{receiver: rx_pkt.hdr.sender, sender: my_addr};
                ret_pkt.tw  <= '{special: '0, ptype: PT_READ_RETURN, size: SZ_256};
                mstate      <= M_READ;
              end
              default: rx_take <= 1'b1;
            endcase
          end
        end

        M_WRITE: begin
          mem_we    <= 1'b1;
          mem_addr  <= rx_pkt.data[31:0] + 32'(k);
          mem_wdata <= rx_pkt.data[32*(int'(k)+1) +: 32];
          k         <= k + 1'b1;
          if (k == 4'(CACHE_LINE_WORDS - 1)) begin
            rx_take <= 1'b1;
            mstate  <= M_IDLE;
          end
        end

        M_READ: begin
          // issue address A+k; the word of A+k-2 is on mem_rdata now
          // (one cycle for the registered request, one inside the memory)
          if (k < 4'(CACHE_LINE_WORDS)) begin
            mem_re   <= 1'b1;
            mem_addr <= rx_pkt.data[31:0] + 32'(k);
          end
          if (k >= 4'd2) ret_pkt.data[32*(int'(k)-2) +: 32] <= mem_rdata;
          k <= k + 1'b1;
          if (k == 4'(CACHE_LINE_WORDS + 1)) begin
            tx_load <= 1'b1;
            rx_take <= 1'b1;
            mstate  <= M_IDLE;
          end
        end

        default: mstate <= M_IDLE;
      endcase
    end
  end

endmodule
