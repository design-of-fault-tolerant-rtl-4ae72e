// tb_ft_xy_route: self-checking test of the fault-tolerant XY routing decision.
//
// Part 1 walks the worked example of a packet from node 1110 to node 0001
// with node 1001 disabled, hop by hop, against hand-derived expected ports
// (W, W-detour, N, N, N, E, core), and the fault-free XY path of the same
// packet. Part 2 compares the block with a reference model, written as an
// ordered list of candidate directions, on random addresses, flags and
// neighbour-enable patterns.
module tb_ft_xy_route;
  import noc_pkg::*;

  logic [ADDR_W-1:0] my_addr, pkt_src, pkt_dst;
  logic              rerouted_in;
  logic [3:0]        nbr_enable;
  logic              route_valid, rerouted_out, detour;
  port_e             route_port;

  int checks = 0, failures = 0;

  ft_xy_route dut (.*);

  // Reference: build the list of directions to try, take the first enabled.
  function automatic void ref_route(
      input logic [3:0] me, src, dst, input logic rr, input logic [3:0] en,
      output logic v, output port_e p, output logic rr_o, output logic det);
    int cx = me[3:2], cy = me[1:0], dx = dst[3:2], dy = dst[1:0], sy = src[1:0];
    port_e cand[$];
    bit    is_det[$];
    port_e hd = (cy > dy) ? PORT_WEST : PORT_EAST;
    port_e vd = (cx > dx) ? PORT_NORTH : PORT_SOUTH;
    v = 0; p = PORT_LOCAL; rr_o = rr; det = 0;
    if (cx == dx && cy == dy) begin v = 1; return; end
    if (!rr) begin
      if (cy != dy) begin
        port_e a = (cx > dx || (cx == dx && cx != 0)) ? PORT_NORTH : PORT_SOUTH;
        cand = '{hd, a, (a == PORT_NORTH) ? PORT_SOUTH : PORT_NORTH};
      end else begin
        port_e a = (sy < dy) ? PORT_EAST : (sy > dy) ? PORT_WEST :
                   (cy == 3) ? PORT_WEST : PORT_EAST;
        cand = '{vd, a, (a == PORT_EAST) ? PORT_WEST : PORT_EAST};
      end
      is_det = '{0, 1, 1};
    end else begin
      if (cx != dx) begin
        cand = '{vd};
        if (cy != dy) cand.push_back(hd);
      end else cand = '{hd};
      is_det = '{0, 0};
    end
    foreach (cand[i]) begin
      bit e = (cand[i] == PORT_NORTH) ? en[0] : (cand[i] == PORT_EAST) ? en[1] :
              (cand[i] == PORT_SOUTH) ? en[2] : en[3];
      if (e) begin
        v = 1; p = cand[i]; det = is_det[i];
        if (!rr) rr_o = is_det[i] && (cy == dy);
        return;
      end
    end
  endfunction

  task automatic check_hop(input logic [3:0] me, src, dst, input logic rr,
                           input logic [3:0] en, input port_e exp_p, input logic exp_rr);
    my_addr = me; pkt_src = src; pkt_dst = dst; rerouted_in = rr; nbr_enable = en;
    #1;
    checks++;
    if (!route_valid || route_port != exp_p || rerouted_out != exp_rr) begin
      failures++;
      $display("FAIL hop at %b: got v=%0b %s rr=%0b, expected %s rr=%0b",
               me, route_valid, route_port.name(), rerouted_out, exp_p.name(), exp_rr);
    end
  endtask

  initial begin
    logic  ev, err, edet;
    port_e ep;
    // worked example, node 1001 disabled.  en = {W, S, E, N}
    check_hop(4'b1110, 4'b1110, 4'b0001, 0, 4'b1011, PORT_WEST,  0);
    check_hop(4'b1101, 4'b1110, 4'b0001, 0, 4'b1010, PORT_WEST,  1);
    check_hop(4'b1100, 4'b1110, 4'b0001, 1, 4'b0011, PORT_NORTH, 1);
    check_hop(4'b1000, 4'b1110, 4'b0001, 1, 4'b0101, PORT_NORTH, 1);
    check_hop(4'b0100, 4'b1110, 4'b0001, 1, 4'b0111, PORT_NORTH, 1);
    check_hop(4'b0000, 4'b1110, 4'b0001, 1, 4'b0110, PORT_EAST,  1);
    check_hop(4'b0001, 4'b1110, 4'b0001, 1, 4'b1110, PORT_LOCAL, 1);
    // fault-free XY: at 1101 north is taken
    check_hop(4'b1101, 4'b1110, 4'b0001, 0, 4'b1011, PORT_NORTH, 0);
    check_hop(4'b1001, 4'b1110, 4'b0001, 0, 4'b1111, PORT_NORTH, 0);
    // second-leg detour in the right-most column goes west
    check_hop(4'b1011, 4'b1111, 4'b0011, 0, 4'b1100, PORT_WEST, 1);
    // first-leg detour goes south when the destination is further south
    check_hop(4'b0001, 4'b0001, 4'b1011, 0, 4'b1100, PORT_SOUTH, 0);

    for (int n = 0; n < 4000; n++) begin
      my_addr = 4'($urandom); pkt_src = 4'($urandom); pkt_dst = 4'($urandom);
      rerouted_in = 1'($urandom); nbr_enable = 4'($urandom);
      #1;
      ref_route(my_addr, pkt_src, pkt_dst, rerouted_in, nbr_enable, ev, ep, err, edet);
      checks++;
      if (route_valid != ev || (ev && (route_port != ep || rerouted_out != err || detour != edet))) begin
        failures++;
        if (failures < 10)
          $display("FAIL me=%b src=%b dst=%b rr=%b en=%b: got %0b %s %0b %0b exp %0b %s %0b %0b",
                   my_addr, pkt_src, pkt_dst, rerouted_in, nbr_enable,
                   route_valid, route_port.name(), rerouted_out, detour, ev, ep.name(), err, edet);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
