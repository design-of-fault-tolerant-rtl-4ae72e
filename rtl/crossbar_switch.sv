// crossbar_switch: 5x5 crossbar of the router.
//
// Combinational. Each output port is connected to the input selected by the
// scheduler's `crossbar_select` for that output; `out_valid` is high only
// for outputs the scheduler matched this cycle. Built as one multiplexer per
// output, which is this design's choice; the source description gives only
// the switch's function.
module crossbar_switch
  import noc_pkg::*;
(
  input  flit_t [NUM_PORTS-1:0]             in_flit,
  input  logic  [NUM_PORTS-1:0]             crossbar_valid,
  input  logic  [NUM_PORTS-1:0][PORT_W-1:0] crossbar_select,
  output flit_t [NUM_PORTS-1:0]             out_flit,
  output logic  [NUM_PORTS-1:0]             out_valid
);

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_valid[o] = crossbar_valid[o];
      out_flit[o]  = '0;
      for (int i = 0; i < NUM_PORTS; i++)
        if (crossbar_select[o] == PORT_W'(i))
          out_flit[o] = in_flit[i];
    end
  end

endmodule
