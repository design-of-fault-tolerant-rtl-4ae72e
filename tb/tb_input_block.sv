// tb_input_block: self-checking test of the input block and its side buffer.
//
// Directed part, at node 1101 with its north neighbour (1001) disabled:
// a packet 1110 -> 0001 must request the west port with the rerouted flag
// set; a granted packet passes without touching the side buffer; a packet
// that is not granted is parked (deflect), blocks the input (in_ready low)
// and is presented again until granted; a disabled node requests nothing.
// Random part: packets arrive whenever in_ready allows and grants are random;
// a model of the single side buffer predicts in_ready and the packet that
// must be presented, and every packet must be granted exactly once, in order.
module tb_input_block;
  import noc_pkg::*;

  logic              clk = 0, reset = 1;
  logic              node_enable;
  logic [ADDR_W-1:0] my_addr;
  logic [3:0]        nbr_enable;
  logic              in_valid, in_ready;
  flit_t             in_flit, flit_out;
  logic [ADDR_W-1:0] packet_src, packet_dst;
  logic [DATA_W-1:0] packet_data;
  logic              req_valid;
  port_e             req_port;
  logic              clear_side_buffer, side_buffer_valid, deflect, detour;

  int checks = 0, failures = 0;

  input_block dut (.*);

  always #5 clk = ~clk;

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  function automatic flit_t mk(input logic [3:0] s, d, input logic [15:0] data);
    return '{rerouted: 1'b0, pkt: '{src: s, dst: d, data: data}};
  endfunction

  initial begin
    packet_t q[$];
    packet_t exp_p;
    int sent = 0, got = 0;

    node_enable = 1; my_addr = 4'b1101; nbr_enable = 4'b1010;
    in_valid = 0; in_flit = '0; clear_side_buffer = 0;
    repeat (2) @(posedge clk);
    reset = 0;

    // granted at once
    @(negedge clk);
    in_valid = 1; in_flit = mk(4'b1110, 4'b0001, 16'hCAFE);
    #1;
    expect_true(in_ready && req_valid && req_port == PORT_WEST && flit_out.rerouted,
                "detour request to west");
    expect_true(packet_src == 4'b1110 && packet_dst == 4'b0001 && packet_data == 16'hCAFE,
                "packet split into fields");
    clear_side_buffer = 1;
    #1 expect_true(!deflect && detour, "granted detour is reported");
    @(negedge clk);
    expect_true(!side_buffer_valid && in_ready, "granted packet leaves no buffer entry");

    // not granted: parked in the side buffer
    in_flit = mk(4'b1110, 4'b1100, 16'h1234); clear_side_buffer = 0;
    #1 expect_true(req_valid && req_port == PORT_WEST && !flit_out.rerouted && deflect,
                   "plain XY request, deflected");
    @(negedge clk);
    in_valid = 1; in_flit = mk(4'b0000, 4'b0000, 16'hFFFF);  // must be ignored
    #1 expect_true(side_buffer_valid && !in_ready && req_valid &&
                   flit_out.pkt.data == 16'h1234, "side buffer presents parked packet");
    @(negedge clk);
    expect_true(side_buffer_valid && flit_out.pkt.data == 16'h1234, "still parked");
    clear_side_buffer = 1;
    @(negedge clk);
    in_valid = 0; clear_side_buffer = 0;
    #1 expect_true(!side_buffer_valid && in_ready && !req_valid, "buffer cleared by grant");

    // disabled node
    node_enable = 0; in_valid = 1;
    #1 expect_true(!in_ready && !req_valid, "disabled node accepts nothing");
    node_enable = 1; in_valid = 0;

    // random traffic, all neighbours enabled
    nbr_enable = 4'b1111;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      if (in_ready || !in_valid) begin
        in_valid = 1'($urandom);
        in_flit  = mk(4'($urandom), 4'($urandom), 16'($urandom));
      end
      #1;
      expect_true(in_ready == !side_buffer_valid, "in_ready follows side buffer");
      if (in_valid && in_ready) begin q.push_back(in_flit.pkt); sent++; end
      expect_true(req_valid == (q.size() > 0), "request iff a packet is held");
      if (q.size() > 0) expect_true(flit_out.pkt == q[0], "presented packet is the oldest");
      clear_side_buffer = req_valid && $urandom_range(0, 2) == 0;
      if (clear_side_buffer) begin exp_p = q.pop_front(); got++; end
      @(posedge clk);
      #1 clear_side_buffer = 0;
    end
    expect_true(got > 300 && sent - got <= 1, "packets granted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
