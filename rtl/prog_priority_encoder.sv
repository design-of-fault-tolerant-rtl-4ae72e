// prog_priority_encoder: programmable priority encoder used by the iSLIP
// scheduler.
//
// Combinational. Among the set bits of `req`, it picks the first one at or
// after position `ptr`, wrapping round from N-1 to 0, and returns it both as
// a one-hot vector and as an index. `any` is low when `req` is zero. Moving
// `ptr` from cycle to cycle changes which requester has the highest priority.
module prog_priority_encoder #(
  parameter int unsigned N  = 5,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  input  logic [IW-1:0] ptr,
  output logic [N-1:0]  gnt,
  output logic [IW-1:0] idx,
  output logic          any
);

  always_comb begin
    logic [IW:0] k;
    gnt = '0;
    idx = '0;
    any = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      // position ptr+i, wrapped into 0..N-1 (ptr is always below N)
      k = {1'b0, ptr} + (IW+1)'(i);
      if (k >= (IW+1)'(N)) k = k - (IW+1)'(N);
      if (!any && req[k[IW-1:0]]) begin
        any             = 1'b1;
        gnt[k[IW-1:0]]  = 1'b1;
        idx             = k[IW-1:0];
      end
    end
  end

endmodule
