// noc_router: single five-port mesh router with fault-tolerant XY routing.
//
// Ports 0..4 are core (local), north, east, south and west. Every input has
// an input_block: the arriving 24-bit packet is routed in the same cycle and
// requests one output; a packet that loses arbitration waits in that input's
// single side buffer instead of a FIFO or virtual channels. The
// islip_scheduler matches requests to free outputs, the crossbar_switch moves
// the matched packets, and an output_port register per output stores each
// one for the next hop. A packet therefore takes one clock cycle per router
// when it meets no contention.
//
// `node_enable` = 0 makes the node faulty: it accepts, forwards and sends
// nothing. `nbr_enable` carries the enable of the four neighbouring nodes
// ([0]=N [1]=E [2]=S [3]=W, 0 where the mesh has no neighbour); routing
// never sends a packet towards a disabled neighbour.
//
// The three blocks, the side buffer and the 24-bit packet follow the source
// description (its Figure 1 names the enable input `node_enable_reset`). The
// link handshake (`*_valid` / `*_ready`, transfer when both are high), the
// `rerouted` sideband bit, clearing that bit on packets injected by the core
// and the synchronous active-high reset are this design's own.
module noc_router
  import noc_pkg::*;
(
  input  logic                     clk,
  input  logic                     reset,
  input  logic                     node_enable,
  input  logic [ADDR_W-1:0]        my_addr,
  input  logic [3:0]               nbr_enable,
  input  logic  [NUM_PORTS-1:0]    in_valid,
  input  flit_t [NUM_PORTS-1:0]    in_flit,
  output logic  [NUM_PORTS-1:0]    in_ready,
  output logic  [NUM_PORTS-1:0]    out_valid,
  output flit_t [NUM_PORTS-1:0]    out_flit,
  input  logic  [NUM_PORTS-1:0]    out_ready,
  // events, one bit per input port, for observation
  output logic  [NUM_PORTS-1:0]    ev_deflect,   // packet parked in side buffer
  output logic  [NUM_PORTS-1:0]    ev_detour     // packet sent around a faulty node
);

  flit_t [NUM_PORTS-1:0]             in_flit_q;
  flit_t [NUM_PORTS-1:0]             req_flit;
  logic  [NUM_PORTS-1:0]             req_valid;
  port_e [NUM_PORTS-1:0]             req_port;
  logic  [NUM_PORTS-1:0]             clear_side_buffer;
  logic  [NUM_PORTS-1:0]             out_free;
  logic  [NUM_PORTS-1:0]             crossbar_valid;
  logic  [NUM_PORTS-1:0][PORT_W-1:0] crossbar_select;
  flit_t [NUM_PORTS-1:0]             xbar_flit;
  logic  [NUM_PORTS-1:0]             xbar_valid;

  // the packet layout must add up to the 24-bit packet
  if ($bits(packet_t) != PKT_W) begin : g_bad_packet_width
    $error("packet_t is %0d bits, expected %0d", $bits(packet_t), PKT_W);
  end

  always_comb begin
    in_flit_q = in_flit;
    in_flit_q[PORT_LOCAL].rerouted = 1'b0;
  end

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    input_block u_in (
      .clk              (clk),
      .reset            (reset),
      .node_enable      (node_enable),
      .my_addr          (my_addr),
      .nbr_enable       (nbr_enable),
      .in_valid         (in_valid[p]),
      .in_flit          (in_flit_q[p]),
      .in_ready         (in_ready[p]),
      .packet_src       (),
      .packet_dst       (),
      .packet_data      (),
      .req_valid        (req_valid[p]),
      .req_port         (req_port[p]),
      .flit_out         (req_flit[p]),
      .clear_side_buffer(clear_side_buffer[p]),
      .side_buffer_valid(),
      .deflect          (ev_deflect[p]),
      .detour           (ev_detour[p])
    );
  end

  islip_scheduler u_sched (
    .clk              (clk),
    .reset            (reset),
    .req_valid        (req_valid),
    .req_port         (req_port),
    .out_free         (out_free),
    .clear_side_buffer(clear_side_buffer),
    .crossbar_valid   (crossbar_valid),
    .crossbar_select  (crossbar_select)
  );

  crossbar_switch u_xbar (
    .in_flit        (req_flit),
    .crossbar_valid (crossbar_valid),
    .crossbar_select(crossbar_select),
    .out_flit       (xbar_flit),
    .out_valid      (xbar_valid)
  );

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_out
    output_port u_out (
      .clk        (clk),
      .reset      (reset),
      .node_enable(node_enable),
      .load       (xbar_valid[p]),
      .load_flit  (xbar_flit[p]),
      .free       (out_free[p]),
      .out_valid  (out_valid[p]),
      .out_flit   (out_flit[p]),
      .out_ready  (out_ready[p])
    );
  end

endmodule
