// nic_link: the network side of a network interface controller.
//
// Holds one send buffer and one receive buffer, each a whole package
// (header, type word and up to 288 data bits), and moves packages between
// them and the lane pair to the local switch with the five-state machine
// of the protocol:
//   SETUP        drives idle. A valid incoming header (accepted only while
//                the receive buffer is empty) is stored and leads to
//                RECV_SIGNAL; otherwise a filled send buffer leads to
//                SEND_WAIT. Nothing starts while `hold` is high.
//   RECV_SIGNAL  drives the line ready word until a word different from the
//                header arrives: that is the type word. It is stored, the
//                line ready word is removed and the data size is loaded.
//                With no data the package is complete (back to SETUP).
//   RECEIVE      stores one lane word per cycle, subtracting the lane width,
//                until nothing is left; the receive buffer is then full.
//   SEND_WAIT    drives the header until the line ready word comes back,
//                then drives the type word (SETUP if there is no data).
//   SEND         drives one data lane word per cycle until the size is used
//                up; the send buffer is then empty.
// Buffer flags: `tx_empty` is high when `tx_load` may be given a package,
// `rx_full` is high when `rx_pkt` holds a complete package, until `rx_take`.
// A buffer in use by the state machine is neither empty nor full, so the
// surrounding logic cannot touch it.
//
// Timing: lane_out is a register; a package of D data bits occupies the
// lane for D/LANE cycles after the type word. The state machine and the
// buffer flags follow the NIC description of the protocol; the `hold`
// input (used by the memory controller to run its memory operations
// between packages) and refusing headers while the receive buffer is full
// are this design's choices.
module nic_link
  import noc_pkg::*;
#(
  parameter int unsigned LANE = noc_pkg::LANE_WIDTH
) (
  input  logic            clk,
  input  logic            rst_n,
  // lanes to and from the local switch port
  input  logic [LANE-1:0] lane_in,
  output logic [LANE-1:0] lane_out,
  // send buffer
  input  logic            tx_load,
  input  packet_t         tx_load_pkt,
  output logic            tx_empty,
  // receive buffer
  output packet_t         rx_pkt,
  output logic            rx_full,
  input  logic            rx_take,
  // keep the state machine in SETUP
  input  logic            hold,
  output logic            busy          // not in SETUP
);

  localparam logic [LANE-1:0] IDLE = '0;
  localparam logic [LANE-1:0] BUSYW = '1;
  localparam logic [LANE-1:0] LR   = LANE'(LINE_READY_WORD);
  localparam int unsigned     NDW  = (DATA_BITS + LANE - 1) / LANE;

  initial begin
    assert (LANE >= 16 && DATA_BITS % LANE == 0 && 256 % LANE == 0)
      else $error("nic_link: lane width %0d does not divide the package sizes", LANE);
  end

  typedef enum logic [2:0] {
    L_SETUP, L_RECV_SIGNAL, L_RECEIVE, L_SEND_WAIT, L_SEND
  } link_state_e;

  link_state_e state;
  packet_t     tx_buf;
  logic        tx_full;
  logic [9:0]  left;                 // data bits left to move
  logic [$clog2(NDW+1)-1:0] idx;     // lane word index in the data field

  function automatic logic is_header(logic [LANE-1:0] w);
    return (w != IDLE) && (w != BUSYW) && (w != LR);
  endfunction

  assign tx_empty = !tx_full && (state != L_SEND_WAIT) && (state != L_SEND);
  assign busy     = (state != L_SETUP);

  logic [9:0] in_bits, tx_bits;
  assign in_bits = 10'(size_bits(lane_in[3:0]));
  assign tx_bits = 10'(size_bits(tx_buf.tw.size));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= L_SETUP;
      tx_buf   <= '0;
      tx_full  <= 1'b0;
      rx_pkt   <= '0;
      rx_full  <= 1'b0;
      left     <= '0;
      idx      <= '0;
      lane_out <= '0;
    end else begin
      if (tx_load && tx_empty) begin
        tx_buf  <= tx_load_pkt;
        tx_full <= 1'b1;
      end
      if (rx_take) rx_full <= 1'b0;

      case (state)
        L_SETUP: begin
          lane_out <= IDLE;
          if (!hold) begin
            if (!rx_full && is_header(lane_in)) begin
              rx_pkt.hdr <= lane_in[15:0];
              lane_out   <= LR;
              state      <= L_RECV_SIGNAL;
            end else if (tx_full) begin
              lane_out <= LANE'(tx_buf.hdr);
              left     <= tx_bits;
              state    <= L_SEND_WAIT;
            end
          end
        end

        L_RECV_SIGNAL: begin
          lane_out <= LR;
          if (lane_in == IDLE) begin
            // sender gave up: forget the header
            lane_out <= IDLE;
            state    <= L_SETUP;
          end else if (lane_in != LANE'(rx_pkt.hdr) && lane_in != BUSYW && lane_in != LR) begin
            rx_pkt.tw   <= lane_in[15:0];
            rx_pkt.data <= '0;
            lane_out    <= IDLE;
            left        <= in_bits;
            idx         <= '0;
            if (in_bits == 0) begin
              rx_full <= 1'b1;
              state   <= L_SETUP;
            end else begin
              state   <= L_RECEIVE;
            end
          end
        end

        L_RECEIVE: begin
          lane_out <= IDLE;
          rx_pkt.data[idx*LANE +: LANE] <= lane_in;
          idx <= idx + 1'b1;
          if (left <= 10'(LANE)) begin
            left    <= '0;
            rx_full <= 1'b1;
            state   <= L_SETUP;
          end else begin
            left <= left - 10'(LANE);
          end
        end

        L_SEND_WAIT: begin
          lane_out <= LANE'(tx_buf.hdr);
          if (lane_in == LR) begin
            lane_out <= LANE'(tx_buf.tw);
            idx      <= '0;
            if (left == 0) begin
              tx_full <= 1'b0;
              state   <= L_SETUP;
            end else begin
              state   <= L_SEND;
            end
          end
        end

        L_SEND: begin
          lane_out <= tx_buf.data[idx*LANE +: LANE];
          idx      <= idx + 1'b1;
          if (left <= 10'(LANE)) begin
            left    <= '0;
            tx_full <= 1'b0;
            state   <= L_SETUP;
          end else begin
            left <= left - 10'(LANE);
          end
        end

        default: state <= L_SETUP;
      endcase
    end
  end

  // The owner may only take a full receive buffer.
  a_take_full: assert property (@(posedge clk) disable iff (!rst_n) rx_take |-> rx_full);

endmodule
