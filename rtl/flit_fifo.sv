// Synchronous FIFO used for the switch input buffers and output buffers.
//
// A circular buffer of DEPTH words with read and write pointers and an
// occupancy counter. Both sides use a valid/ready handshake: a word is written
// when in_valid && in_ready, read when out_valid && out_ready. in_ready is
// "not full", which doubles as the on/off flow-control signal sent back over a
// link. Read data is the head word, available combinationally (no read
// latency). A write and a read may happen in the same cycle, also when full
// only the read takes effect first in the next cycle (in_ready is low).
// Reset empties the FIFO. Depths follow the switch of the document (2-flit
// input buffers, 4-flit output buffers); the handshake is this design's own.
module flit_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;

  wire do_wr = in_valid && in_ready;
  wire do_rd = out_valid && out_ready;

  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= inc(wptr);
      if (do_rd) rptr <= inc(rptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= in_data;
  end

  // Handshake rules.
  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
