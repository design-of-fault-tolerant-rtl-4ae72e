// ft_xy_route: fault-tolerant XY routing decision for one packet at one router.
//
// Combinational. Given the router's own address, the packet's source and
// destination, its `rerouted` flag and the enable state of the four
// neighbouring nodes, it returns the output port the packet should take and
// the `rerouted` flag it should carry on.
//
// Normal (XY) mode, `rerouted_in` = 0:
//   * first leg, column differs: go west if own column > destination column,
//     east otherwise. If that neighbour is disabled, detour vertically: north
//     if own row > destination row, south if own row < destination row; the
//     packet then carries on with XY routing from its new row.
//   * second leg, column equal: go north if own row > destination row, south
//     otherwise. If that neighbour is disabled, detour sideways by comparing
//     the packet's original source column with the destination column: east
//     if smaller, west if larger; when equal, east except in the right-most
//     column, where west.
//     This detour sets `rerouted_out`.
// Detour (YX) mode, `rerouted_in` = 1: correct the row first, then the column.
//
// These rules, the row/column orientation (row 00 north, column 00 west) and
// the detour directions follow the source description and its worked example
// (1110 -> 0001 with node 1001 disabled gives 1110-1101-1100-1000-0100-0000-
// 0001). This design's own choices: a first-leg detour does not switch to
// YX (YX would send the packet straight back to the row it left when the
// destination lies in that row); when the preferred detour neighbour is
// also disabled or absent, the opposite direction of the same axis is tried;
// a first-leg detour in the destination's own row goes north (south in row
// 0); in YX mode a blocked row step falls back to the column step; when no
// permitted neighbour is enabled `route_valid` is 0 and the packet waits.
// Absent neighbours at the mesh edge must be presented as disabled.
module ft_xy_route
  import noc_pkg::*;
(
  input  logic [ADDR_W-1:0] my_addr,
  input  logic [ADDR_W-1:0] pkt_src,
  input  logic [ADDR_W-1:0] pkt_dst,
  input  logic              rerouted_in,
  // enable of the neighbour behind each port: [0]=N, [1]=E, [2]=S, [3]=W
  input  logic [3:0]        nbr_enable,
  output logic              route_valid,
  output port_e             route_port,
  output logic              rerouted_out,
  output logic              detour      // this decision is a detour around a fault
);

  logic [COORD_W-1:0] cx, cy, dx, dy, sy;
  port_e h_dir, v_dir, v_det, h_det;

  function automatic logic ok(input logic [3:0] en, input port_e p);
    unique case (p)
      PORT_NORTH: return en[0];
      PORT_EAST:  return en[1];
      PORT_SOUTH: return en[2];
      PORT_WEST:  return en[3];
      default:    return 1'b0;
    endcase
  endfunction

  function automatic port_e opposite(input port_e p);
    unique case (p)
      PORT_NORTH: return PORT_SOUTH;
      PORT_SOUTH: return PORT_NORTH;
      PORT_EAST:  return PORT_WEST;
      PORT_WEST:  return PORT_EAST;
      default:    return PORT_LOCAL;
    endcase
  endfunction

  always_comb begin
    cx = addr_x(my_addr);
    cy = addr_y(my_addr);
    dx = addr_x(pkt_dst);
    dy = addr_y(pkt_dst);
    sy = addr_y(pkt_src);

    h_dir = (cy > dy) ? PORT_WEST : PORT_EAST;
    v_dir = (cx > dx) ? PORT_NORTH : PORT_SOUTH;

    // vertical detour out of the first leg
    if (cx > dx)       v_det = PORT_NORTH;
    else if (cx < dx)  v_det = PORT_SOUTH;
    else               v_det = (cx != '0) ? PORT_NORTH : PORT_SOUTH;

    // sideways detour out of the second leg
    if (sy < dy)       h_det = PORT_EAST;
    else if (sy > dy)  h_det = PORT_WEST;
    else               h_det = (cy == COORD_W'(MESH_DIM - 1)) ? PORT_WEST : PORT_EAST;

    route_valid  = 1'b0;
    route_port   = PORT_LOCAL;
    rerouted_out = rerouted_in;
    detour       = 1'b0;

    if (cx == dx && cy == dy) begin
      route_valid = 1'b1;
      route_port  = PORT_LOCAL;
    end else if (!rerouted_in) begin
      if (cy != dy) begin
        if (ok(nbr_enable, h_dir)) begin
          route_valid = 1'b1;
          route_port  = h_dir;
        end else if (ok(nbr_enable, v_det)) begin
          route_valid = 1'b1;
          route_port  = v_det;
          detour      = 1'b1;
        end else if (ok(nbr_enable, opposite(v_det))) begin
          route_valid = 1'b1;
          route_port  = opposite(v_det);
          detour      = 1'b1;
        end
      end else begin
        if (ok(nbr_enable, v_dir)) begin
          route_valid = 1'b1;
          route_port  = v_dir;
        end else if (ok(nbr_enable, h_det)) begin
          route_valid = 1'b1;
          route_port  = h_det;
          detour      = 1'b1;
        end else if (ok(nbr_enable, opposite(h_det))) begin
          route_valid = 1'b1;
          route_port  = opposite(h_det);
          detour      = 1'b1;
        end
      end
      // only a detour out of the second leg switches the packet to YX
      rerouted_out = detour && (cy == dy);
    end else begin
      if (cx != dx) begin
        if (ok(nbr_enable, v_dir)) begin
          route_valid = 1'b1;
          route_port  = v_dir;
        end else if (cy != dy && ok(nbr_enable, h_dir)) begin
          route_valid = 1'b1;
          route_port  = h_dir;
        end
      end else if (ok(nbr_enable, h_dir)) begin
        route_valid = 1'b1;
        route_port  = h_dir;
      end
    end
  end

endmodule
