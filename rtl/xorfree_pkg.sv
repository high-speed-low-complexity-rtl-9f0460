// Shared constants and elaboration-time table builders for the XOR-free
// convolutional encoder.
//
// The encoder is a feed-forward, non-systematic rate-1/2 code with
// constraint length K = 9 (eight delay cells). A generator polynomial is held
// as a K-bit word g[K-1:0] whose bit K-1 is the tap on the current input bit
// and bit K-2-i is the tap on state cell i+1 (cell 1 is the newest, cell 8
// the oldest). Read in octal, this is the usual notation: 9'o753 is
// 1 + D + D^2 + D^3 + D^5 + D^7 + D^8.
//
// The state word s[7:0] keeps the newest cell in s[7] (the MSB, where the
// input bit enters) and the oldest in s[0] (the LSB), so the tap on s[j] is
// g[j] and the tap on the input bit is g[8].
//
// A code symbol is the 2-bit word {c0, c1}, c0 from G0 in bit 1.
//
// The functions below are evaluated only while parameters are elaborated:
// they fill the constant inputs of the 32:1 multiplexer, the 8:1
// multiplexer and the reduced ROM. No XOR is built in hardware from them.
package xorfree_pkg;

  localparam int unsigned K        = 9;      // constraint length
  localparam int unsigned NSTATE   = K - 1;  // delay cells
  localparam int unsigned ISO_BITS = 5;      // cells s[7:3] select the 32:1 mux
  localparam int unsigned CT_BITS  = 2;      // cells s[1:0] form the column tag

  typedef logic [K-1:0]      poly_t;
  typedef logic [NSTATE-1:0] state_t;
  typedef logic [1:0]        sym_t;          // {c0, c1}

  // cdma2000 (3GPP2) rate-1/2, K = 9 generators.
  localparam poly_t G0_DEFAULT = 9'o753;
  localparam poly_t G1_DEFAULT = 9'o561;

  // Parity of a vector: an elaboration-time helper.
  function automatic logic parity(input logic [K-1:0] v);
    logic p;
    p = 1'b0;
    for (int i = 0; i < K; i++) p = p ^ v[i];
    return p;
  endfunction

  // Entry idx of the 32:1 multiplexer: the {c0, c1} contribution of the five
  // newest cells with the input bit taken as 0. idx[k] is cell k+1, so
  // idx[0] is the newest cell s[7] and idx[4] is s[3].
  function automatic sym_t iso_entry(input poly_t g0, input poly_t g1,
                                     input logic [ISO_BITS-1:0] idx);
    poly_t w;
    w = '0;
    for (int k = 0; k < ISO_BITS; k++) w[NSTATE-1-k] = idx[k];
    return {parity(w & g0), parity(w & g1)};
  endfunction

  // Entry of the two-row reduced ROM at address {rt, ct}: the contribution
  // of the column-tag cells (ct[1] = s[1], ct[0] = s[0]); row 1 is row 0
  // with c0 inverted.
  function automatic sym_t rom_entry(input poly_t g0, input poly_t g1,
                                     input logic [2:0] addr);
    poly_t w;
    sym_t  v;
    w = '0;
    w[1:0] = addr[1:0];
    v = {parity(w & g0), parity(w & g1)};
    return addr[2] ? {~v[1], v[0]} : v;
  endfunction

  // Restoring: the partial code word of the input bit and the isomorphic
  // state, p = {u*g0[8], u*g1[8]} combined with z, is folded onto the two
  // stored rows. Row 1 adds 10; inverting the column-tag LSB (the oldest
  // cell, tapped by both generators) adds 11. Returns {rt, flip} for the
  // 8:1 multiplexer input selected by sl = {u, z}.
  function automatic logic [1:0] restore_entry(input poly_t g0, input poly_t g1,
                                               input logic [2:0] sl);
    sym_t p;
    p = sl[1:0];
    if (sl[2]) p = {p[1] ^ g0[K-1], p[0] ^ g1[K-1]};
    return {p[1] ^ p[0], p[0]};
  endfunction

endpackage
