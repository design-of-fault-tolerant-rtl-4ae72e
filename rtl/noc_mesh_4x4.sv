// noc_mesh_4x4: 4x4 mesh network on chip with fault-tolerant XY routing.
//
// Sixteen noc_router instances are placed on a grid. Node n sits in row
// n/4 (row 0 at the north edge) and column n%4 (column 0 at the west edge)
// and has the 4-bit address {row, column}, so node 9 = 1001 is row 2,
// column 1. Each router's north/east/south/west ports are wired to the
// facing ports of its neighbours; ports on the mesh edge are left idle and
// reported to the router as disabled neighbours.
//
// `node_enable[n]` = 0 marks node n faulty: it stops moving data, and its
// neighbours route packets around it (detour, then Y-first). The core port of
// every node is brought out: a core injects a 24-bit packet with
// core_in_valid/core_in_ready and receives packets addressed to it on
// core_out_valid/core_out_ready (a transfer happens when valid and ready are
// both high). `ev_deflect` and `ev_detour` report, per node and input port,
// a packet parked in a side buffer and a packet sent around a faulty node.
//
// The 4x4 mesh, the address layout and the node-enable fault model follow
// the source description; the port list is this design's own. Latency with
// no contention: the packet is at the destination core port one clock cycle
// per hop after the source router accepts it (6 cycles for the 6-hop detour
// from 1110 to 0001 around a disabled node 1001).
module noc_mesh_4x4
  import noc_pkg::*;
(
  input  logic                                     clk,
  input  logic                                     reset,
  input  logic    [NUM_NODES-1:0]                  node_enable,
  input  logic    [NUM_NODES-1:0]                  core_in_valid,
  input  packet_t [NUM_NODES-1:0]                  core_in_pkt,
  output logic    [NUM_NODES-1:0]                  core_in_ready,
  output logic    [NUM_NODES-1:0]                  core_out_valid,
  output packet_t [NUM_NODES-1:0]                  core_out_pkt,
  input  logic    [NUM_NODES-1:0]                  core_out_ready,
  output logic    [NUM_NODES-1:0][NUM_PORTS-1:0]   ev_deflect,
  output logic    [NUM_NODES-1:0][NUM_PORTS-1:0]   ev_detour
);

  localparam int D = MESH_DIM;

  logic  [NUM_NODES-1:0][NUM_PORTS-1:0] in_valid, in_ready, out_valid, out_ready;
  flit_t [NUM_NODES-1:0][NUM_PORTS-1:0] in_flit, out_flit;

  for (genvar r = 0; r < D; r++) begin : g_row
    for (genvar c = 0; c < D; c++) begin : g_col
      localparam int N = r * D + c;
      logic [3:0] nbr_en;

      // neighbour enables: [0]=N [1]=E [2]=S [3]=W, 0 beyond the edge
      assign nbr_en[0] = (r > 0)     ? node_enable[(r > 0     ? N - D : N)] : 1'b0;
      assign nbr_en[1] = (c < D - 1) ? node_enable[(c < D - 1 ? N + 1 : N)] : 1'b0;
      assign nbr_en[2] = (r < D - 1) ? node_enable[(r < D - 1 ? N + D : N)] : 1'b0;
      assign nbr_en[3] = (c > 0)     ? node_enable[(c > 0     ? N - 1 : N)] : 1'b0;

      // core port
      assign in_valid[N][PORT_LOCAL]     = core_in_valid[N];
      assign in_flit[N][PORT_LOCAL]      = '{rerouted: 1'b0, pkt: core_in_pkt[N]};
      assign core_in_ready[N]            = in_ready[N][PORT_LOCAL];
      assign core_out_valid[N]           = out_valid[N][PORT_LOCAL];
      assign core_out_pkt[N]             = out_flit[N][PORT_LOCAL].pkt;
      assign out_ready[N][PORT_LOCAL]    = core_out_ready[N];

      // links: this node receives on port P what the neighbour sends on the facing port
      if (r > 0) begin : g_n
        assign in_valid[N][PORT_NORTH]  = out_valid[N - D][PORT_SOUTH];
        assign in_flit[N][PORT_NORTH]   = out_flit[N - D][PORT_SOUTH];
        assign out_ready[N][PORT_NORTH] = in_ready[N - D][PORT_SOUTH];
      end else begin : g_n_edge
        assign in_valid[N][PORT_NORTH]  = 1'b0;
        assign in_flit[N][PORT_NORTH]   = '0;
        assign out_ready[N][PORT_NORTH] = 1'b0;
      end
      if (c < D - 1) begin : g_e
        assign in_valid[N][PORT_EAST]   = out_valid[N + 1][PORT_WEST];
        assign in_flit[N][PORT_EAST]    = out_flit[N + 1][PORT_WEST];
        assign out_ready[N][PORT_EAST]  = in_ready[N + 1][PORT_WEST];
      end else begin : g_e_edge
        assign in_valid[N][PORT_EAST]   = 1'b0;
        assign in_flit[N][PORT_EAST]    = '0;
        assign out_ready[N][PORT_EAST]  = 1'b0;
      end
      if (r < D - 1) begin : g_s
        assign in_valid[N][PORT_SOUTH]  = out_valid[N + D][PORT_NORTH];
        assign in_flit[N][PORT_SOUTH]   = out_flit[N + D][PORT_NORTH];
        assign out_ready[N][PORT_SOUTH] = in_ready[N + D][PORT_NORTH];
      end else begin : g_s_edge
        assign in_valid[N][PORT_SOUTH]  = 1'b0;
        assign in_flit[N][PORT_SOUTH]   = '0;
        assign out_ready[N][PORT_SOUTH] = 1'b0;
      end
      if (c > 0) begin : g_w
        assign in_valid[N][PORT_WEST]   = out_valid[N - 1][PORT_EAST];
        assign in_flit[N][PORT_WEST]    = out_flit[N - 1][PORT_EAST];
        assign out_ready[N][PORT_WEST]  = in_ready[N - 1][PORT_EAST];
      end else begin : g_w_edge
        assign in_valid[N][PORT_WEST]   = 1'b0;
        assign in_flit[N][PORT_WEST]    = '0;
        assign out_ready[N][PORT_WEST]  = 1'b0;
      end

      noc_router u_router (
        .clk        (clk),
        .reset      (reset),
        .node_enable(node_enable[N]),
        .my_addr    (ADDR_W'(N)),
        .nbr_enable (nbr_en),
        .in_valid   (in_valid[N]),
        .in_flit    (in_flit[N]),
        .in_ready   (in_ready[N]),
        .out_valid  (out_valid[N]),
        .out_flit   (out_flit[N]),
        .out_ready  (out_ready[N]),
        .ev_deflect (ev_deflect[N]),
        .ev_detour  (ev_detour[N])
      );
    end
  end

endmodule
