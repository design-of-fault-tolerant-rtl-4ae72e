// tb_output_port: self-checking test of the router output register.
//
// A reference model (one-entry register with valid/ready) runs alongside
// the block under random load, ready and node-enable patterns; the block's
// free, out_valid and out_flit are compared every cycle, and every packet
// loaded must leave exactly once, in order.
module tb_output_port;
  import noc_pkg::*;

  logic  clk = 0, reset = 1;
  logic  node_enable, load, free, out_valid, out_ready;
  flit_t load_flit, out_flit;

  int checks = 0, failures = 0;
  bit    m_full;
  flit_t m_data;
  flit_t sent[$];
  int    delivered = 0;

  output_port dut (.*);

  always #5 clk = ~clk;

  initial begin
    node_enable = 1; load = 0; out_ready = 0; load_flit = '0;
    m_full = 0; m_data = '0;
    repeat (2) @(posedge clk);
    reset = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      node_enable = ($urandom_range(0, 9) != 0);
      out_ready   = 1'($urandom);
      #1;
      checks++;
      if (free != (node_enable && (!m_full || out_ready)) ||
          out_valid != (m_full && node_enable) || (m_full && out_flit != m_data)) begin
        failures++;
        $display("FAIL t=%0t free %0b valid %0b flit %h model full %0b %h",
                 $time, free, out_valid, out_flit, m_full, m_data);
      end
      load      = free && $urandom_range(0, 2) != 0;
      load_flit = flit_t'({$urandom, $urandom});
      @(posedge clk);
      // model update
      if (m_full && node_enable && out_ready) begin
        checks++;
        if (sent.size() == 0 || sent.pop_front() != m_data) begin
          failures++;
          $display("FAIL t=%0t packet out of order", $time);
        end
        delivered++;
        m_full = 0;
      end
      if (load) begin
        m_full = 1; m_data = load_flit; sent.push_back(load_flit);
      end
    end
    checks++;
    if (delivered < 500) begin
      failures++;
      $display("FAIL only %0d packets delivered", delivered);
    end
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
