// tb_islip_scheduler: self-checking test of the iSLIP scheduler.
//
// A reference model keeps its own grant and accept pointers and computes the
// expected match each cycle. Random requests and free outputs are applied for
// 3000 cycles; then all five inputs request output 0 continuously and the
// grant must rotate 0,1,2,3,4 (the round-robin fairness iSLIP provides).
module tb_islip_scheduler;
  import noc_pkg::*;

  localparam int N = NUM_PORTS;

  logic clk = 0, reset = 1;
  logic  [N-1:0]             req_valid, out_free;
  port_e [N-1:0]             req_port;
  logic  [N-1:0]             clear_side_buffer, crossbar_valid;
  logic  [N-1:0][PORT_W-1:0] crossbar_select;

  int checks = 0, failures = 0;
  int gptr[N], aptr[N];

  islip_scheduler dut (.*);

  always #5 clk = ~clk;

  task automatic check_cycle();
    int gnt_of_out[N];   // input granted by output, -1 none
    int acc_of_in[N];    // output accepted by input, -1 none
    for (int o = 0; o < N; o++) begin
      gnt_of_out[o] = -1;
      if (out_free[o])
        for (int k = 0; k < N; k++) begin
          int i = (gptr[o] + k) % N;
          if (gnt_of_out[o] < 0 && req_valid[i] && req_port[i] == port_e'(o)) gnt_of_out[o] = i;
        end
    end
    for (int i = 0; i < N; i++) begin
      acc_of_in[i] = -1;
      for (int k = 0; k < N; k++) begin
        int o = (aptr[i] + k) % N;
        if (acc_of_in[i] < 0 && gnt_of_out[o] == i) acc_of_in[i] = o;
      end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (clear_side_buffer[i] != (acc_of_in[i] >= 0)) begin
        failures++;
        $display("FAIL t=%0t input %0d grant %0b exp %0b", $time, i, clear_side_buffer[i], acc_of_in[i] >= 0);
      end
    end
    for (int o = 0; o < N; o++) begin
      bit exp_v = gnt_of_out[o] >= 0 && acc_of_in[gnt_of_out[o]] == o;
      checks++;
      if (crossbar_valid[o] != exp_v || (exp_v && crossbar_select[o] != PORT_W'(gnt_of_out[o]))) begin
        failures++;
        $display("FAIL t=%0t output %0d valid %0b sel %0d exp %0b %0d", $time, o,
                 crossbar_valid[o], crossbar_select[o], exp_v, gnt_of_out[o]);
      end
    end
    // pointer update happens at the coming edge
    for (int o = 0; o < N; o++)
      if (gnt_of_out[o] >= 0 && acc_of_in[gnt_of_out[o]] == o) begin
        gptr[o] = (gnt_of_out[o] + 1) % N;
        aptr[gnt_of_out[o]] = (o + 1) % N;
      end
  endtask

  initial begin
    int seq[$];
    req_valid = '0; out_free = '0; req_port = '{default: PORT_LOCAL};
    foreach (gptr[i]) begin gptr[i] = 0; aptr[i] = 0; end
    repeat (2) @(posedge clk);
    reset = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        req_valid[i] = 1'($urandom);
        req_port[i]  = port_e'($urandom_range(0, N - 1));
      end
      out_free = N'($urandom) | N'($urandom);
      #1 check_cycle();
    end
    // fairness: everyone wants output 0
    for (int c = 0; c < 10; c++) begin
      @(negedge clk);
      req_valid = '1; req_port = '{default: PORT_LOCAL}; out_free = '1;
      #1 check_cycle();
      seq.push_back(int'(crossbar_select[0]));
    end
    for (int c = 1; c < 10; c++) begin
      checks++;
      if (seq[c] != (seq[c-1] + 1) % N) begin
        failures++;
        $display("FAIL rotation %p", seq);
      end
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
