// tb_crossbar_switch: self-checking test of the 5x5 crossbar.
//
// Random flits on all inputs and random select/valid per output; every output
// must show the flit of its selected input and carry the valid bit through.
module tb_crossbar_switch;
  import noc_pkg::*;

  flit_t [NUM_PORTS-1:0]             in_flit, out_flit;
  logic  [NUM_PORTS-1:0]             crossbar_valid, out_valid;
  logic  [NUM_PORTS-1:0][PORT_W-1:0] crossbar_select;

  int checks = 0, failures = 0;

  crossbar_switch dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < NUM_PORTS; i++) begin
        in_flit[i]         = flit_t'({$urandom, $urandom});
        crossbar_select[i] = PORT_W'($urandom_range(0, NUM_PORTS - 1));
      end
      crossbar_valid = NUM_PORTS'($urandom);
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        checks++;
        if (out_valid[o] != crossbar_valid[o] ||
            out_flit[o] != in_flit[crossbar_select[o]]) begin
          failures++;
          $display("FAIL output %0d sel %0d: %h vs %h", o, crossbar_select[o],
                   out_flit[o], in_flit[crossbar_select[o]]);
        end
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
