// Round-robin arbiter for one switch output.
//
// Grants one of N requesters per cycle. The search starts at the requester
// after the one granted last, so every requester is served within N grants.
// The pointer only moves when 'advance' is high (the grant is used), so a
// grant that is not taken is offered again. Grant is combinational from req.
// The document names the arbiter; the round-robin policy is this design's
// choice. Requests that the reorder look-up table blocks never reach it.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] last;

  always_comb begin
    gnt = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned i;
      i = (int'(last) + k) % N;
      if (req[i] && gnt == '0) gnt[i] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) last <= IW'(N - 1);
    else if (advance && gnt != '0) begin
      for (int unsigned i = 0; i < N; i++)
        if (gnt[i]) last <= IW'(i);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);
endmodule
