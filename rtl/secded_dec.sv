// SECDED (extended Hamming) decoder for one flit.
//
// Recomputes the Hamming check bits from the received data; the syndrome is
// their XOR with the received check bits and points at the position of a
// single flipped bit. The overall parity of data plus all check bits tells a
// single error (odd parity: correct the bit the syndrome points at, if it is
// a data bit) from a double error (even parity, non-zero syndrome: flag it,
// data left as received). Purely combinational.
// Matches secded_enc; the code choice is explained there.
module secded_dec #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ECC_W  = 7
) (
  input  logic [DATA_W-1:0] data,
  input  logic [ECC_W-1:0]  ecc,
  output logic [DATA_W-1:0] corr,
  output logic              single_err,
  output logic              double_err
);

  logic [ECC_W-2:0] syn;
  logic             par;

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
    assign syn[k] = ecc[k] ^ ^(data & MASK);
  end
  for (genvar i = 0; i < DATA_W; i++) begin : g_fix
    localparam int unsigned P = data_pos(i);
    assign corr[i] = data[i] ^ (par && syn == (ECC_W-1)'(P));
  end
  assign par        = ^data ^ ^ecc;
  assign single_err = par;
  assign double_err = !par && (syn != '0);
endmodule
