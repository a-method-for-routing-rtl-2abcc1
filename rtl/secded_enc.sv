// SECDED (extended Hamming) encoder for one flit.
//
// The DATA_W data bits are placed at the code positions that are not powers
// of two (3, 5, 6, 7, 9, ...). Check bit k (k < ECC_W-1) is the XOR of the
// data bits whose position has bit k set; the last check bit is the parity of
// the data and the other check bits, so the whole code word has even parity.
// For 32 data bits this is 6 Hamming bits plus 1 overall parity bit.
// Purely combinational. The document calls for a single-error-correcting
// Hamming code on the flits of critical packets; the added overall parity bit
// (so that two-bit errors are detected and the copy can be rejected) is this
// design's choice. The check bits travel beside the data on the link.
module secded_enc #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ECC_W  = 7
) (
  input  logic [DATA_W-1:0] data,
  output logic [ECC_W-1:0]  ecc
);

  // Code position of data bit i: the (i+1)-th position from 3 upward that
  // is not a power of two (positions 1, 2, 4, 8, ... hold check bits).
  function automatic int unsigned data_pos(int unsigned i);
    int unsigned p, n;
    p = 2;
    n = 0;
    while (n <= i) begin
      p++;
      if ((p & (p - 1)) != 0) n++;
    end
    return p;
  endfunction

  // Data bits covered by Hamming check bit k: those whose position has bit k
  // set.
  function automatic logic [DATA_W-1:0] cover_mask(int unsigned k);
    logic [DATA_W-1:0] m;
    for (int unsigned i = 0; i < DATA_W; i++) m[i] = ((data_pos(i) >> k) & 1) != 0;
    return m;
  endfunction

  for (genvar k = 0; k < ECC_W - 1; k++) begin : g_chk
    localparam logic [DATA_W-1:0] MASK = cover_mask(k);
    assign ecc[k] = ^(data & MASK);
  end
  assign ecc[ECC_W-1] = ^data ^ ^ecc[ECC_W-2:0];
endmodule
