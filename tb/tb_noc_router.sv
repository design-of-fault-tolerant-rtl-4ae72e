// tb_noc_router: self-checking test of one five-port router (node 0101).
//
// 1. Latency: a lone packet from the core to node 0111 must appear on the
//    east output exactly one clock after it is accepted.
// 2. Contention: two packets for the same output in the same cycle; one is
//    granted, the other is parked in its side buffer and leaves next cycle.
// 3. Fault: with the north neighbour disabled, a packet from the south input
//    for node 0001 must leave east with the rerouted flag set.
// 4. Random traffic on all five inputs, random downstream ready, all
//    neighbours enabled: every packet must leave exactly once, on the port
//    plain XY routing gives, with its payload intact.
module tb_noc_router;
  import noc_pkg::*;

  localparam int N = NUM_PORTS;
  localparam logic [3:0] ME = 4'b0101;

  logic                  clk = 0, reset = 1;
  logic                  node_enable;
  logic [ADDR_W-1:0]     my_addr;
  logic [3:0]            nbr_enable;
  logic  [N-1:0]         in_valid, in_ready, out_valid, out_ready;
  flit_t [N-1:0]         in_flit, out_flit;
  logic  [N-1:0]         ev_deflect, ev_detour;

  int checks = 0, failures = 0;
  int deflections = 0, detours = 0;

  noc_router dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    deflections += $countones(ev_deflect);
    detours     += $countones(ev_detour);
  end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // plain XY output port for a destination, seen from this node
  function automatic int xy_port(input logic [3:0] d);
    if (d[1:0] > ME[1:0]) return int'(PORT_EAST);
    if (d[1:0] < ME[1:0]) return int'(PORT_WEST);
    if (d[3:2] < ME[3:2]) return int'(PORT_NORTH);
    if (d[3:2] > ME[3:2]) return int'(PORT_SOUTH);
    return int'(PORT_LOCAL);
  endfunction

  function automatic flit_t mk(input logic [3:0] s, d, input logic [15:0] data);
    return '{rerouted: 1'b0, pkt: '{src: s, dst: d, data: data}};
  endfunction

  initial begin
    int expected_port[int];   // keyed by payload tag
    int tag = 0, sent = 0, got = 0;

    node_enable = 1; my_addr = ME; nbr_enable = 4'b1111;
    in_valid = '0; in_flit = '0; out_ready = '1;
    repeat (2) @(posedge clk);
    reset = 0;

    // 1. latency
    @(negedge clk);
    in_valid[PORT_LOCAL] = 1; in_flit[PORT_LOCAL] = mk(ME, 4'b0111, 16'hA001);
    @(negedge clk);
    in_valid = '0;
    expect_true(out_valid == (N'(1) << PORT_EAST) && out_flit[PORT_EAST].pkt.data == 16'hA001,
                "one-cycle latency to east output");
    @(negedge clk);
    expect_true(out_valid == '0, "output empties after transfer");

    // 2. contention: north and west inputs both want east
    in_valid[PORT_NORTH] = 1; in_flit[PORT_NORTH] = mk(4'b0001, 4'b0110, 16'hB001);
    in_valid[PORT_WEST]  = 1; in_flit[PORT_WEST]  = mk(4'b0100, 4'b0111, 16'hB002);
    #1 expect_true($countones(ev_deflect) == 1, "one of two contenders deflected");
    @(negedge clk);
    in_valid = '0;
    expect_true(out_valid[PORT_EAST] && $countones(in_ready) == N - 1, "winner out, loser parked");
    @(negedge clk);
    expect_true(out_valid[PORT_EAST] && in_ready == '1, "parked packet follows one cycle later");
    @(negedge clk);

    // 3. north neighbour disabled, packet from south for 0001
    nbr_enable = 4'b1110;
    in_valid[PORT_SOUTH] = 1; in_flit[PORT_SOUTH] = mk(4'b1101, 4'b0001, 16'hC001);
    @(negedge clk);
    in_valid = '0;
    expect_true(out_valid == (N'(1) << PORT_EAST) && out_flit[PORT_EAST].rerouted &&
                out_flit[PORT_EAST].pkt.data == 16'hC001, "detour east around disabled north");
    @(negedge clk);
    nbr_enable = 4'b1111;

    // 4. random traffic
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      for (int p = 0; p < N; p++) begin
        if (in_ready[p] || !in_valid[p]) begin
          logic [3:0] d;
          in_valid[p] = ($urandom_range(0, 2) == 0) && c < 3800;
          // a packet never returns the way it came: keep destinations legal for XY
          do d = 4'($urandom); while (p != int'(PORT_LOCAL) && (
                 (p == int'(PORT_EAST)  && d[1:0] > ME[1:0]) ||
                 (p == int'(PORT_WEST)  && d[1:0] < ME[1:0]) ||
                 (p == int'(PORT_NORTH) && (d[1:0] != ME[1:0] || d[3:2] < ME[3:2])) ||
                 (p == int'(PORT_SOUTH) && (d[1:0] != ME[1:0] || d[3:2] > ME[3:2]))));
          in_flit[p] = mk(4'($urandom), d, 16'(tag));
          tag++;
        end
      end
      out_ready = N'($urandom) | N'($urandom);
      #1;
      for (int p = 0; p < N; p++)
        if (in_valid[p] && in_ready[p]) begin
          expected_port[int'(in_flit[p].pkt.data)] = xy_port(in_flit[p].pkt.dst);
          sent++;
        end
      for (int o = 0; o < N; o++)
        if (out_valid[o] && out_ready[o]) begin
          int t;
          t = int'(out_flit[o].pkt.data);
          checks++;
          if (!expected_port.exists(t) || expected_port[t] != o) begin
            failures++;
            $display("FAIL packet %0d on port %0d", t, o);
          end else begin
            expected_port.delete(t);
            got++;
          end
        end
    end
    expect_true(sent > 1000 && got == sent && expected_port.num() == 0,
                $sformatf("all packets delivered (%0d sent, %0d received)", sent, got));
    expect_true(deflections > 0 && detours > 0, "deflections and detours occurred");
    $display("router: %0d packets, %0d deflections, %0d detours", sent, deflections, detours);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
