// Reference models shared by the testbenches: an extended Hamming encoder
// written independently of the RTL (it builds the code word bit by bit and
// checks parity groups over the word), and helpers to build head flits.
package tb_ref_pkg;
  import mp_pkg::*;

  // Extended Hamming check bits for a 32-bit word: build the 38-position
  // code word (check bits at 1, 2, 4, 8, 16, 32), then each check bit makes
  // its group even; bit 6 makes the whole word even.
  function automatic logic [6:0] ref_ecc(logic [31:0] d);
    logic [63:0] cw;
    logic [6:0]  e;
    int          k;
    cw = '0;
    k  = 0;
    for (int p = 1; p <= 38; p++) begin
      if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16 && p != 32) begin
        cw[p] = d[k];
        k++;
      end
    end
    e = '0;
    for (int b = 0; b < 6; b++) begin
      logic x;
      x = 1'b0;
      for (int p = 1; p <= 38; p++) if (p[b]) x ^= cw[p];
      e[b] = x;
    end
    e[6] = ^d ^ ^e[5:0];
    return e;
  endfunction

  function automatic flit_t mk_head(pktid_t id, addr_t dst, addr_t src, route_t route);
    flit_t f;
    head_t h;
    h       = '{id: id, dst: dst, src: src, route: route};
    f.ftype = FT_HEAD;
    f.data  = FLIT_W'(h);
    h.route = '0;
    f.ecc   = ref_ecc(FLIT_W'(h));
    return f;
  endfunction

  function automatic flit_t mk_body(logic [31:0] d, logic tail);
    flit_t f;
    f.ftype = tail ? FT_TAIL : FT_BODY;
    f.data  = d;
    f.ecc   = ref_ecc(d);
    return f;
  endfunction
endpackage
