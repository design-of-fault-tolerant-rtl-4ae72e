// output_port: output register of one router port.
//
// Stores the packet that the crossbar delivers and presents it to the
// neighbouring router (or the core) with a valid/ready handshake. The packet
// is held until `out_ready` is seen; `free` tells the scheduler that a new
// packet may be loaded this cycle (register empty, or being emptied now).
// While the node is disabled the register neither sends nor frees.
//
// That the output port stores the packets follows the source description;
// the one-entry register and its handshake are this design's own.
//
// Timing: one cycle from crossbar to `out_valid`; one packet per cycle when
// the receiver is always ready.
module output_port
  import noc_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  node_enable,
  input  logic  load,
  input  flit_t load_flit,
  output logic  free,
  output logic  out_valid,
  output flit_t out_flit,
  input  logic  out_ready
);

  logic  full;

  assign out_valid = full && node_enable;
  assign free      = node_enable && (!full || out_ready);

  always_ff @(posedge clk) begin
    if (reset) begin
      full     <= 1'b0;
      out_flit <= '0;
    end else if (load) begin
      full     <= 1'b1;
      out_flit <= load_flit;
    end else if (out_valid && out_ready) begin
      full     <= 1'b0;
    end
  end

  a_load_only_when_free: assert property (@(posedge clk) disable iff (reset)
    load |-> free);

endmodule
