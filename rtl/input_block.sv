// input_block: one router input port with a single-entry side buffer.
//
// An arriving packet is not queued: it is split into source, destination and
// data, routed by ft_xy_route in the same cycle and presented to the iSLIP
// scheduler as a request for one output port. If the scheduler grants the
// request (`clear_side_buffer` high) the packet leaves through the crossbar in
// that cycle. If it loses arbitration (contention for an output) or no
// permitted neighbour is enabled, it is kept in the side buffer and competes
// again in the next cycle. While the side buffer is occupied the port
// deasserts `in_ready`, so the upstream router holds its packet.
//
// The single side buffer holding only deflected packets, and the signal names
// packet_src / packet_dst / packet_data / clear_side_buffer, follow the
// source description. The valid/ready handshake, the backpressure while the
// buffer is full and the synchronous active-high reset are this design's own.
// A disabled node (`node_enable` = 0) accepts nothing and issues no request;
// a packet already in its side buffer is kept.
//
// Timing: request and flit_out are combinational from in_flit / side buffer;
// the side buffer updates on the rising clock edge.
module input_block
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              node_enable,
  input  logic [ADDR_W-1:0] my_addr,
  input  logic [3:0]        nbr_enable,       // [0]=N [1]=E [2]=S [3]=W
  // upstream link
  input  logic              in_valid,
  input  flit_t             in_flit,
  output logic              in_ready,
  // fields of the current packet
  output logic [ADDR_W-1:0] packet_src,
  output logic [ADDR_W-1:0] packet_dst,
  output logic [DATA_W-1:0] packet_data,
  // request to the scheduler
  output logic              req_valid,
  output port_e             req_port,
  output flit_t             flit_out,         // packet with updated rerouted flag
  input  logic              clear_side_buffer, // request granted this cycle
  // status
  output logic              side_buffer_valid,
  output logic              deflect,          // a packet enters the side buffer
  output logic              detour            // granted packet takes a detour
);

  flit_t side_buffer;
  flit_t cand;
  logic  cand_valid;
  logic  route_valid, route_detour, rerouted_next;
  port_e route_port;

  assign in_ready   = node_enable && !side_buffer_valid;
  assign cand_valid = node_enable && (side_buffer_valid || in_valid);
  assign cand       = side_buffer_valid ? side_buffer : in_flit;

  assign packet_src  = cand.pkt.src;
  assign packet_dst  = cand.pkt.dst;
  assign packet_data = cand.pkt.data;

  ft_xy_route u_route (
    .my_addr     (my_addr),
    .pkt_src     (cand.pkt.src),
    .pkt_dst     (cand.pkt.dst),
    .rerouted_in (cand.rerouted),
    .nbr_enable  (nbr_enable),
    .route_valid (route_valid),
    .route_port  (route_port),
    .rerouted_out(rerouted_next),
    .detour      (route_detour)
  );

  assign req_valid         = cand_valid && route_valid;
  assign req_port          = route_port;
  assign flit_out.rerouted = rerouted_next;
  assign flit_out.pkt      = cand.pkt;
  assign deflect           = cand_valid && !clear_side_buffer && !side_buffer_valid;
  assign detour            = clear_side_buffer && route_detour;

  always_ff @(posedge clk) begin
    if (reset) begin
      side_buffer_valid <= 1'b0;
      side_buffer       <= '0;
    end else if (clear_side_buffer) begin
      side_buffer_valid <= 1'b0;
    end else if (cand_valid && !side_buffer_valid) begin
      side_buffer_valid <= 1'b1;
      side_buffer       <= in_flit;
    end
  end

  // A grant may only be given to a pending request.
  a_grant_needs_request: assert property (@(posedge clk) disable iff (reset)
    clear_side_buffer |-> req_valid);

endmodule
