// tb_noc_mesh_4x4: end-to-end test of the 4x4 fault-tolerant mesh.
//
// Runs the mesh as built (no parameter overrides).
//  1. Fault-free XY: a packet from node 1110 to 0001 must visit 1101, 1001,
//     0101, 0001 and reach the core of 0001 four cycles (one per hop) after
//     the source router accepts it.
//  2. Worked example: the same packet with node 1001 disabled must visit
//     1101, 1100, 1000, 0100, 0000, 0001 (second-leg detour, then Y-first)
//     and arrive after six cycles.
//  3. First-leg detour: 1000 -> 1011 with 1001 disabled must visit 0100,
//     0101, 0110, 0111, 1011.
//  4. Random traffic between enabled nodes, with one faulty node at a time
//     and random core backpressure: every packet must reach the core of its
//     destination once with its payload intact, and no packet may enter a
//     disabled node.
// Each mechanism is counted (plain XY hops, first- and second-leg detours,
// Y-first hops, side-buffer deflections, link and core backpressure); one
// that never happens counts as a failure.
module tb_noc_mesh_4x4;
  import noc_pkg::*;

  logic clk = 0, reset = 1;
  logic    [NUM_NODES-1:0]                node_enable;
  logic    [NUM_NODES-1:0]                core_in_valid, core_in_ready;
  packet_t [NUM_NODES-1:0]                core_in_pkt;
  logic    [NUM_NODES-1:0]                core_out_valid, core_out_ready;
  packet_t [NUM_NODES-1:0]                core_out_pkt;
  logic    [NUM_NODES-1:0][NUM_PORTS-1:0] ev_deflect, ev_detour;

  int checks = 0, failures = 0;
  longint cycle = 0;

  // mechanism counters
  int n_xy_hops = 0, n_yx_hops = 0, n_detour = 0, n_deflect = 0;
  int n_link_stall = 0, n_core_stall = 0, n_eject_stall = 0, n_fault_entry = 0;

  noc_mesh_4x4 dut (.*);

  always #5 clk = ~clk;

  // path recording: nodes where a packet with the traced payload arrives on a link
  logic [15:0] trace_tag = 16'hFFFF;
  int          trace_path[$];

  always @(posedge clk) begin
    cycle++;
    if (!reset) begin
      for (int n = 0; n < NUM_NODES; n++) begin
        for (int p = 1; p < NUM_PORTS; p++) begin
          if (dut.in_valid[n][p] && dut.in_ready[n][p]) begin
            if (dut.in_flit[n][p].rerouted) n_yx_hops++; else n_xy_hops++;
            if (!node_enable[n]) n_fault_entry++;
            if (dut.in_flit[n][p].pkt.data == trace_tag) trace_path.push_back(n);
          end
          if (dut.in_valid[n][p] && !dut.in_ready[n][p]) n_link_stall++;
        end
        if (core_in_valid[n] && !core_in_ready[n]) n_core_stall++;
        if (core_out_valid[n] && !core_out_ready[n]) n_eject_stall++;
        n_detour  += $countones(ev_detour[n]);
        n_deflect += $countones(ev_deflect[n]);
      end
    end
  end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // Send one packet alone through the mesh, check path and latency.
  task automatic single(input int src, input int dst, input logic [15:0] tag,
                        input int exp_path[$], input int exp_latency);
    longint t0;
    int waited = 0;
    trace_tag = tag;
    trace_path.delete();
    @(negedge clk);
    core_in_valid[src] = 1;
    core_in_pkt[src]   = '{src: 4'(src), dst: 4'(dst), data: tag};
    #1 expect_true(core_in_ready[src], "source core accepted");
    @(negedge clk);
    t0 = cycle;   // first edge seen: the source router took the packet
    core_in_valid[src] = 0;
    while (!core_out_valid[dst] && waited < 50) begin
      @(negedge clk);
      waited++;
    end
    expect_true(core_out_valid[dst] && core_out_pkt[dst].data == tag &&
                core_out_pkt[dst].src == 4'(src) && core_out_pkt[dst].dst == 4'(dst),
                $sformatf("packet %0d->%0d delivered", src, dst));
    expect_true(cycle - t0 == longint'(exp_latency),
                $sformatf("latency %0d->%0d: %0d cycles, expected %0d", src, dst, cycle - t0, exp_latency));
    expect_true(trace_path == exp_path,
                $sformatf("path %0d->%0d: %p, expected %p", src, dst, trace_path, exp_path));
    @(negedge clk);
  endtask

  // Random traffic between enabled nodes with one faulty node.
  task automatic random_traffic(input int fault, input int n_cycles);
    int          expected[int];   // tag -> destination node
    int          sent = 0, got = 0, drain = 0;
    int unsigned tag = 0;
    node_enable = '1;
    node_enable[fault] = 1'b0;
    for (int c = 0; c < n_cycles + 2000 && (c < n_cycles || expected.num() > 0); c++) begin
      @(negedge clk);
      for (int n = 0; n < NUM_NODES; n++) begin
        if (core_in_ready[n] || !core_in_valid[n]) begin
          int d;
          core_in_valid[n] = (n != fault) && c < n_cycles && ($urandom_range(0, 7) == 0);
          do d = $urandom_range(0, NUM_NODES - 1); while (d == fault);
          core_in_pkt[n] = '{src: 4'(n), dst: 4'(d), data: 16'(tag)};
          tag = (tag + 1) % 60000;
        end
        core_out_ready[n] = $urandom_range(0, 3) != 0;
      end
      #1;
      for (int n = 0; n < NUM_NODES; n++) begin
        if (core_in_valid[n] && core_in_ready[n]) begin
          expected[int'(core_in_pkt[n].data)] = int'(core_in_pkt[n].dst);
          sent++;
        end
        if (core_out_valid[n] && core_out_ready[n]) begin
          int t;
          t = int'(core_out_pkt[n].data);
          checks++;
          if (!expected.exists(t) || expected[t] != n || core_out_pkt[n].dst != 4'(n)) begin
            failures++;
            $display("FAIL packet tag %0d at node %0d", t, n);
          end else begin
            expected.delete(t);
            got++;
          end
        end
      end
      drain = c;
    end
    core_in_valid = '0;
    core_out_ready = '1;
    expect_true(sent > 100 && expected.num() == 0,
                $sformatf("fault at %0d: %0d sent, %0d delivered", fault, sent, got));
    $display("fault at node %0d: %0d packets delivered, drained after %0d cycles", fault, got, drain);
    repeat (5) @(negedge clk);
  endtask

  initial begin
    node_enable = '1; core_in_valid = '0; core_in_pkt = '0; core_out_ready = '1;
    repeat (3) @(posedge clk);
    reset = 0;

    // 1. fault-free XY
    single(14, 1, 16'hA0A0, '{13, 9, 5, 1}, 4);
    // 2. worked example: node 1001 (9) disabled
    node_enable[9] = 1'b0;
    single(14, 1, 16'hA0A1, '{13, 12, 8, 4, 0, 1}, 6);
    // 3. first-leg detour
    single(8, 11, 16'hA0A2, '{4, 5, 6, 7, 11}, 5);
    node_enable = '1;

    // 4. random traffic with a faulty node in turn
    foreach (faults_to_try[i]) random_traffic(faults_to_try[i], 1500);

    expect_true(n_xy_hops > 0,     "plain XY hops happened");
    expect_true(n_yx_hops > 0,     "Y-first hops after a detour happened");
    expect_true(n_detour > 0,      "detours happened");
    expect_true(n_deflect > 0,     "side-buffer deflections happened");
    expect_true(n_link_stall > 0,  "link backpressure happened");
    expect_true(n_core_stall > 0,  "core injection stalls happened");
    expect_true(n_eject_stall > 0, "core ejection stalls happened");
    expect_true(n_fault_entry == 0, "no packet entered a disabled node");
    $display("hops xy=%0d yx=%0d detours=%0d deflections=%0d link_stalls=%0d core_stalls=%0d eject_stalls=%0d",
             n_xy_hops, n_yx_hops, n_detour, n_deflect, n_link_stall, n_core_stall, n_eject_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int faults_to_try[4] = '{9, 6, 10, 5};

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
