// tinuso_noc: a torus network on chip that lets several Tinuso cores reach
// one shared memory.
//
// A GRID_W x GRID_H grid of switches (noc_switch). Each switch connects to
// its four neighbours (up, down, left, right) and to one local resource;
// the edges wrap around, so the rightmost column also connects to the
// leftmost and the top row to the bottom row. The node in column MEM_X,
// row MEM_Y holds the memory controller (mem_nic) and the test memory
// (line_memory); every other node holds a core NIC (nic) whose core
// interface is brought out of this module, so GRID_W*GRID_H-1 cores can be
// attached. Node (x, y) has address {x, y+1} (noc_pkg::node_addr).
//
// Core port c belongs to node index n = x + GRID_W*y, skipping the memory
// node: c = n for n below the memory node's index and c = n-1 above it.
//
// Core interface, per core (see nic): a one-cycle mem_read or mem_write
// pulse with core_addr (the node to send to, normally mem_node_addr) and
// mem_addr (word address of an 8-word line); for a write the eight words
// follow on mem_dat_write on the next eight cycles. A read's line comes back
// as eight words on mem_dat_read, each marked by data_ready high for one
// cycle, one word every second cycle. mem_node_addr is a constant (the
// memory node's address), given out so that the cores need not compute it.
//
// Lanes are LANE bits wide, one word per cycle per hop. The grid, the torus
// wiring, the 16-bit lanes and the memory hanging off one node follow the
// system described for the 4x4 test configuration; placing a NIC on every
// other node and the memory size are this design's choices.
module tinuso_noc
  import noc_pkg::*;
#(
  parameter int unsigned LANE      = noc_pkg::LANE_WIDTH,
  parameter int unsigned GRID_W    = 4,
  parameter int unsigned GRID_H    = 4,
  parameter int unsigned MEM_X     = 3,
  parameter int unsigned MEM_Y     = 3,
  parameter int unsigned MEM_WORDS = 1024,
  localparam int unsigned NNODES   = GRID_W * GRID_H,
  localparam int unsigned NCORES   = NNODES - 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NCORES-1:0]       mem_read,
  input  logic [NCORES-1:0]       mem_write,
  input  logic [NCORES-1:0][7:0]  core_addr,
  input  logic [NCORES-1:0][31:0] mem_addr,
  input  logic [NCORES-1:0][31:0] mem_dat_write,
  output logic [NCORES-1:0][31:0] mem_dat_read,
  output logic [NCORES-1:0]       data_ready,
  output logic [7:0]              mem_node_addr
);

  localparam int unsigned MEM_NODE = MEM_X + GRID_W * MEM_Y;

  initial begin
    assert (GRID_W >= 2 && GRID_H >= 2 && GRID_W <= 16 && GRID_H <= 15 &&
            MEM_X < GRID_W && MEM_Y < GRID_H)
      else $error("tinuso_noc: grid %0dx%0d or memory node (%0d,%0d) out of range",
                  GRID_W, GRID_H, MEM_X, MEM_Y);
  end

  assign mem_node_addr = node_addr(MEM_X, MEM_Y);

  // lanes leaving each switch, per port
  logic [NPORTS-1:0][LANE-1:0] sw_out [NNODES];
  logic [NPORTS-1:0][LANE-1:0] sw_in  [NNODES];
  logic [LANE-1:0]             res_out [NNODES];   // resource -> switch

  // memory port
  logic        m_re, m_we;
  logic [31:0] m_addr, m_wdata, m_rdata;

  for (genvar y = 0; y < int'(GRID_H); y++) begin : g_row
    for (genvar x = 0; x < int'(GRID_W); x++) begin : g_col
      localparam int N  = x + int'(GRID_W) * y;
      localparam int NU = x + int'(GRID_W) * ((y + 1) % int'(GRID_H));
      localparam int ND = x + int'(GRID_W) * ((y + int'(GRID_H) - 1) % int'(GRID_H));
      localparam int NL = (x + int'(GRID_W) - 1) % int'(GRID_W) + int'(GRID_W) * y;
      localparam int NR = (x + 1) % int'(GRID_W) + int'(GRID_W) * y;

      // what arrives on each port is what the neighbour drives towards us
      assign sw_in[N][P_UP]    = sw_out[NU][P_DOWN];
      assign sw_in[N][P_DOWN]  = sw_out[ND][P_UP];
      assign sw_in[N][P_LEFT]  = sw_out[NL][P_RIGHT];
      assign sw_in[N][P_RIGHT] = sw_out[NR][P_LEFT];
      assign sw_in[N][P_LOCAL] = res_out[N];

      noc_switch #(.LANE(LANE), .GRID_W(GRID_W), .GRID_H(GRID_H)) u_sw (
        .clk, .rst_n,
        .snum(node_addr(x, y)),
        .lane_in(sw_in[N]),
        .lane_out(sw_out[N])
      );

      if (N == int'(MEM_NODE)) begin : g_mem
        mem_nic #(.LANE(LANE)) u_mem_nic (
          .clk, .rst_n,
          .my_addr(node_addr(x, y)),
          .lane_in(sw_out[N][P_LOCAL]),
          .lane_out(res_out[N]),
          .mem_re(m_re), .mem_we(m_we), .mem_addr(m_addr),
          .mem_wdata(m_wdata), .mem_rdata(m_rdata)
        );
      end else begin : g_core
        localparam int C = (N < int'(MEM_NODE)) ? N : N - 1;
        nic #(.LANE(LANE)) u_nic (
          .clk, .rst_n,
          .my_addr(node_addr(x, y)),
          .lane_in(sw_out[N][P_LOCAL]),
          .lane_out(res_out[N]),
          .mem_read(mem_read[C]),
          .mem_write(mem_write[C]),
          .core_addr(core_addr[C]),
          .mem_addr(mem_addr[C]),
          .mem_dat_write(mem_dat_write[C]),
          .mem_dat_read(mem_dat_read[C]),
          .data_ready(data_ready[C])
        );
      end
    end
  end

  line_memory #(.WORDS(MEM_WORDS)) u_mem (
    .clk,
    .re(m_re), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata)
  );

endmodule
