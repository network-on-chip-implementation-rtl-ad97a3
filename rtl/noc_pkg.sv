// noc_pkg: shared definitions of the Tinuso network-on-chip.
//
// The network is circuit switched. A sender drives a package header word on
// its lane until every switch on the way has connected the lane through and
// the receiver answers with the "line ready" word on the reverse lane; then
// the sender streams the type word and the data words, one lane word per
// clock cycle, and every switch counts them down to release the connection.
//
// Package layout (from the protocol): 8-bit receiver address, 8-bit sender
// address, 16-bit type word, 0..288 data bits. In the type word bits 3..0
// are the data size code and bits 8..4 the package type. Node addresses
// are {x, y+1}: the high nibble is the column, the low nibble the row plus
// one, so 8'h00 (idle) and 8'hA0 (low half of the line ready word) are never
// node addresses. Data is sent least significant lane word first; in a
// write package data[31:0] is the word address and data[32*(i+1)+:32] is
// line word i, in a read-return package data[32*i+:32] is line word i.
//
// Lane words with a meaning of their own: all zeros = idle, all ones =
// busy (driven by a switch on the lanes its connection does not use) and
// 16'h02A0 = line ready. The routing function implements YX routing on a
// grid whose edges wrap around (torus), taking a wrap-around link only at
// an edge node and only when it is strictly shorter.
package noc_pkg;

  // Lane width in bits. The protocol is defined for 16; 32 also works
  // because every data size is then a whole number of lane words.
  parameter int unsigned LANE_WIDTH = 16;

  parameter int unsigned CACHE_LINE_WORDS = 8;   // 8 x 32-bit words
  parameter int unsigned DATA_BITS        = 288; // largest data field
  parameter int unsigned NPORTS           = 5;

  localparam logic [15:0] LINE_READY_WORD = 16'h02A0;

  // Package types (bits 8..4 of the type word).
  typedef enum logic [4:0] {
    PT_NONE        = 5'd0,
    PT_READ        = 5'd1,  // read the line at the address in data[31:0]
    PT_WRITE       = 5'd2,  // write data[287:32] to the line at data[31:0]
    PT_READ_RETURN = 5'd3   // the line returned for a PT_READ
  } pkt_type_e;

  // Data size codes (bits 3..0 of the type word).
  typedef enum logic [3:0] {
    SZ_0   = 4'd0,
    SZ_16  = 4'd1,
    SZ_32  = 4'd2,
    SZ_64  = 4'd3,
    SZ_128 = 4'd4,
    SZ_256 = 4'd5,
    SZ_288 = 4'd6
  } size_code_e;

  typedef struct packed {
    logic [7:0] receiver;
    logic [7:0] sender;
  } header_t;

  typedef struct packed {
    logic [6:0] special;
    logic [4:0] ptype;
    logic [3:0] size;
  } type_word_t;

  typedef struct packed {
    header_t            hdr;
    type_word_t         tw;
    logic [DATA_BITS-1:0] data;
  } packet_t;

  // Router ports, in arbitration priority order (up first, local last).
  typedef enum logic [2:0] {
    P_UP    = 3'd0,
    P_DOWN  = 3'd1,
    P_LEFT  = 3'd2,
    P_RIGHT = 3'd3,
    P_LOCAL = 3'd4
  } port_e;

  // Number of data bits a size code stands for; 0 for unused codes.
  function automatic int unsigned size_bits(logic [3:0] code);
    case (code)
      4'd1:    return 16;
      4'd2:    return 32;
      4'd3:    return 64;
      4'd4:    return 128;
      4'd5:    return 256;
      4'd6:    return 288;
      default: return 0;
    endcase
  endfunction

  function automatic logic size_code_valid(logic [3:0] code);
    return code <= 4'd6;
  endfunction

  // Address of the node in column x, row y (both counted from 0).
  function automatic logic [7:0] node_addr(int unsigned x, int unsigned y);
    return {4'(x), 4'(y + 1)};
  endfunction

  function automatic int unsigned addr_x(logic [7:0] a);
    return int'(a[7:4]);
  endfunction

  function automatic int unsigned addr_y(logic [7:0] a);
    return int'(a[3:0]) - 1;
  endfunction

  // Output port for a package at node `here` heading for node `dest` on a
  // w x h torus. Rows first (YX). An edge node compares the direct distance
  // with the wrap-around distance and wraps when that is shorter; an inner
  // node always moves straight towards the destination.
  function automatic port_e route_yx_torus(logic [7:0] here, logic [7:0] dest,
                                           int unsigned w, int unsigned h);
    int x, y, dx, dy, direct, wrapd;
    logic on_edge;
    x  = int'(addr_x(here));
    y  = int'(addr_y(here));
    dx = int'(addr_x(dest));
    dy = int'(addr_y(dest));
    on_edge = (x == 0) || (x == int'(w) - 1) || (y == 0) || (y == int'(h) - 1);
    if (dy != y) begin
      direct = (dy > y) ? dy - y : y - dy;
      wrapd  = int'(h) - direct;
      if (on_edge && wrapd < direct) return (dy > y) ? P_DOWN : P_UP;
      return (dy > y) ? P_UP : P_DOWN;
    end
    if (dx != x) begin
      direct = (dx > x) ? dx - x : x - dx;
      wrapd  = int'(w) - direct;
      if (on_edge && wrapd < direct) return (dx > x) ? P_LEFT : P_RIGHT;
      return (dx > x) ? P_RIGHT : P_LEFT;
    end
    return P_LOCAL;
  endfunction

endpackage
