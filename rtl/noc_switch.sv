// noc_switch: the routing and switching component of the Tinuso NOC.
//
// Five lanes in and five lanes out: up, down, left, right and the local
// network interface. The switch holds at most one connection at a time and
// is run by the five-state machine of the protocol:
//   READY        all outputs idle (0). A valid header word (not idle, busy
//                or line ready) on an input starts a connection; when several
//                arrive together the priority is up, down, left, right,
//                local. The output port is routed (noc_pkg::route_yx_torus)
//                and the header passed on in the same cycle.
//   SIGNAL_WAIT  input `src` is connected to output `dst` and input `dst`
//                back to output `src`, so the header travels on and the
//                receiver's line ready word travels back. It leaves when the
//                line ready word has been seen from `dst` and the sender then
//                puts a new word, the type word, on `src`. A sender that
//                drops to idle is an error and closes the connection.
//   GET_TYPE     turns the size code of the stored type word into a number
//                of bits still to come (minus the lane word of this cycle).
//                An unknown size code is an error.
//   WAIT_CLOSE   keeps the lane connected and subtracts the lane width each
//                cycle until nothing is left.
//   CLOSE        clears the outputs and returns to READY.
// While connected, every output not used by the connection carries the busy
// word (all ones), which a neighbour in READY ignores.
//
// Timing: every output is a register, so a word, the header included, takes
// one cycle per switch in each direction. The connection is held for (data bits / lane width)
// cycles after the type word, plus two cycles to close.
//
// The state machine, the busy and line ready words, the priority order and
// the YX-with-torus-edges routing follow the protocol description. This
// design's own choices: the return lane carries the line ready word only in
// SIGNAL_WAIT (idle afterwards, so a late copy cannot be mistaken for a new
// handshake), and the forward lane carries idle once the count has reached
// zero, so a sender that starts its next header at once is not passed on
// before the switch has closed.
module noc_switch
  import noc_pkg::*;
#(
  parameter int unsigned LANE   = noc_pkg::LANE_WIDTH,
  parameter int unsigned GRID_W = 4,
  parameter int unsigned GRID_H = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [7:0]                   snum,     // this node's address
  input  logic [NPORTS-1:0][LANE-1:0]  lane_in,
  output logic [NPORTS-1:0][LANE-1:0]  lane_out
);

  localparam logic [LANE-1:0] IDLE = '0;
  localparam logic [LANE-1:0] BUSY = '1;
  localparam logic [LANE-1:0] LR   = LANE'(LINE_READY_WORD);

  typedef enum logic [2:0] {
    SW_READY, SW_SIGNAL_WAIT, SW_GET_TYPE, SW_WAIT_CLOSE, SW_CLOSE
  } sw_state_e;

  sw_state_e          state;
  port_e              src, dst;
  logic [LANE-1:0]    hdr_word;
  logic [15:0]        type_word;
  logic               lr_seen;
  logic [9:0]         remaining;   // data bits still to pass

  function automatic logic is_header(logic [LANE-1:0] w);
    return (w != IDLE) && (w != BUSY) && (w != LR);
  endfunction

  // First valid header by priority.
  logic       hit;
  port_e      hit_port;
  always_comb begin
    hit      = 1'b0;
    hit_port = P_UP;
    for (int p = NPORTS - 1; p >= 0; p--) begin
      if (is_header(lane_in[p])) begin
        hit      = 1'b1;
        hit_port = port_e'(p);
      end
    end
  end

  logic [7:0] hit_dest;
  port_e      hit_route;
  assign hit_dest  = lane_in[hit_port][15:8];
  assign hit_route = route_yx_torus(snum, hit_dest, GRID_W, GRID_H);

  logic [LANE-1:0] from_src, from_dst;
  assign from_src = lane_in[src];
  assign from_dst = lane_in[dst];

  logic [9:0] type_bits;
  assign type_bits = 10'(size_bits(type_word[3:0]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= SW_READY;
      src       <= P_UP;
      dst       <= P_UP;
      hdr_word  <= '0;
      type_word <= '0;
      lr_seen   <= 1'b0;
      remaining <= '0;
      lane_out  <= '0;
    end else begin
      case (state)
        SW_READY: begin
          lane_out <= '0;
          lr_seen  <= 1'b0;
          if (hit) begin
            // route and pass the header on in the same cycle
            for (int p = 0; p < NPORTS; p++) lane_out[p] <= BUSY;
            lane_out[hit_route] <= lane_in[hit_port];
            lane_out[hit_port]  <= IDLE;
            src      <= hit_port;
            dst      <= hit_route;
            hdr_word <= lane_in[hit_port];
            state    <= SW_SIGNAL_WAIT;
          end
        end

        SW_SIGNAL_WAIT: begin
          for (int p = 0; p < NPORTS; p++) lane_out[p] <= BUSY;
          lane_out[dst] <= from_src;
          lane_out[src] <= from_dst;
          if (from_dst == LR) lr_seen <= 1'b1;
          if (from_src == IDLE) begin
            state <= SW_CLOSE;
          end else if ((lr_seen || from_dst == LR) && from_src != hdr_word
                       && from_src != BUSY) begin
            type_word     <= from_src[15:0];
            lane_out[src] <= IDLE;
            state         <= SW_GET_TYPE;
          end
        end

        SW_GET_TYPE: begin
          for (int p = 0; p < NPORTS; p++) lane_out[p] <= BUSY;
          lane_out[src] <= IDLE;
          lane_out[dst] <= (type_bits != 0) ? from_src : IDLE;
          if (!size_code_valid(type_word[3:0])) begin
            state <= SW_CLOSE;
          end else begin
            remaining <= (type_bits > 10'(LANE)) ? type_bits - 10'(LANE) : '0;
            state     <= SW_WAIT_CLOSE;
          end
        end

        SW_WAIT_CLOSE: begin
          for (int p = 0; p < NPORTS; p++) lane_out[p] <= BUSY;
          lane_out[src] <= IDLE;
          lane_out[dst] <= (remaining != 0) ? from_src : IDLE;
          if (remaining == 0) begin
            state <= SW_CLOSE;
          end else begin
            remaining <= (remaining > 10'(LANE)) ? remaining - 10'(LANE) : '0;
          end
        end

        SW_CLOSE: begin
          lane_out <= '0;
          state    <= SW_READY;
        end

        default: state <= SW_CLOSE;
      endcase
    end
  end

  // A connection never turns back on the lane it came from.
  a_no_uturn: assert property (@(posedge clk) disable iff (!rst_n)
    (state == SW_SIGNAL_WAIT) |-> (src != dst || src == P_LOCAL));

endmodule
