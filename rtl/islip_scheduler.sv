// islip_scheduler: iSLIP arbitration for the five-port router.
//
// Each cycle every input block presents at most one request, for one output
// port. The scheduler runs one iSLIP iteration:
//   grant  - every output that is free picks one requesting input with its
//            programmable priority encoder, starting at its grant pointer;
//   accept - every input that received grants picks one, starting at its
//            accept pointer;
//   update - for each accepted grant only, the output's grant pointer moves
//            to one past the accepted input and the input's accept pointer
//            moves to one past the output.
// The accepted matches drive the crossbar select lines and the
// `clear_side_buffer` signals of the inputs. Because each input requests a
// single output, one iteration already yields a maximal match.
//
// The iSLIP scheduler with programmable priority encoders, the
// crossbar_select and clear_side_buffer outputs follow the source
// description; pointer reset to 0, one iteration and the `out_free` gating
// (an output register still holding a packet is not granted) are this
// design's own.
//
// Timing: matching is combinational; pointers update on the rising edge.
module islip_scheduler
  import noc_pkg::*;
(
  input  logic                            clk,
  input  logic                            reset,
  input  logic  [NUM_PORTS-1:0]           req_valid,
  input  port_e [NUM_PORTS-1:0]           req_port,
  input  logic  [NUM_PORTS-1:0]           out_free,
  output logic  [NUM_PORTS-1:0]           clear_side_buffer,  // per input: granted
  output logic  [NUM_PORTS-1:0]           crossbar_valid,     // per output
  output logic  [NUM_PORTS-1:0][PORT_W-1:0] crossbar_select   // per output: input index
);

  localparam int unsigned N = NUM_PORTS;

  logic [N-1:0][PORT_W-1:0] grant_ptr;   // per output
  logic [N-1:0][PORT_W-1:0] accept_ptr;  // per input

  logic [N-1:0][N-1:0]      req_to_out;  // [output][input]
  logic [N-1:0][N-1:0]      grant;       // [output][input]
  logic [N-1:0][N-1:0]      grant_to_in; // [input][output]
  logic [N-1:0][N-1:0]      accept;      // [input][output]
  logic [N-1:0][PORT_W-1:0] grant_idx;
  logic [N-1:0][PORT_W-1:0] accept_idx;
  logic [N-1:0]             grant_any;
  logic [N-1:0]             accept_any;

  always_comb begin
    for (int o = 0; o < N; o++)
      for (int i = 0; i < N; i++)
        req_to_out[o][i] = req_valid[i] && (req_port[i] == port_e'(o)) && out_free[o];
  end

  for (genvar o = 0; o < N; o++) begin : g_grant
    prog_priority_encoder #(.N(N), .IW(PORT_W)) u_ppe (
      .req(req_to_out[o]), .ptr(grant_ptr[o]),
      .gnt(grant[o]), .idx(grant_idx[o]), .any(grant_any[o])
    );
  end

  always_comb begin
    for (int i = 0; i < N; i++)
      for (int o = 0; o < N; o++)
        grant_to_in[i][o] = grant[o][i];
  end

  for (genvar i = 0; i < N; i++) begin : g_accept
    prog_priority_encoder #(.N(N), .IW(PORT_W)) u_ppe (
      .req(grant_to_in[i]), .ptr(accept_ptr[i]),
      .gnt(accept[i]), .idx(accept_idx[i]), .any(accept_any[i])
    );
  end

  always_comb begin
    clear_side_buffer = accept_any;
    for (int o = 0; o < N; o++) begin
      crossbar_valid[o]  = grant_any[o] && accept[grant_idx[o]][o];
      crossbar_select[o] = grant_idx[o];
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      grant_ptr  <= '0;
      accept_ptr <= '0;
    end else begin
      for (int o = 0; o < N; o++)
        if (crossbar_valid[o])
          grant_ptr[o] <= (grant_idx[o] == PORT_W'(N - 1)) ? '0 : grant_idx[o] + 1'b1;
      for (int i = 0; i < N; i++)
        if (accept_any[i])
          accept_ptr[i] <= (accept_idx[i] == PORT_W'(N - 1)) ? '0 : accept_idx[i] + 1'b1;
    end
  end

  // Every granted input is carried by exactly one crossbar output.
  a_match_is_one_to_one: assert property (@(posedge clk) disable iff (reset)
    $countones(crossbar_valid) == $countones(clear_side_buffer));

endmodule
