// enigma_ref_pkg: reference model of the byte encryptor, written from its
// definition and independent of the RTL: with rotor offsets o0, o1, o2
// (o0 the number of bytes encrypted before, modulo 256, o1 and o2 the
// higher base-256 digits of that count), the byte x becomes
//   y = x + 2*(k0 + o0) + 2*(k1 + o1) + 2*(k2 + o2)  (mod 256)
// and the result is {hi_table[y[7:4]], lo_table[y[3:0]]}.
package enigma_ref_pkg;
  function automatic logic [7:0] enc(input logic [7:0] x, input int unsigned n,
                                     input logic [7:0] k0, input logic [7:0] k1,
                                     input logic [7:0] k2, input logic [63:0] hi,
                                     input logic [63:0] lo);
    int unsigned o0, o1, o2, y;
    logic [7:0] b;
    o0 = n % 256; o1 = (n / 256) % 256; o2 = (n / 65536) % 256;
    y  = x + 2 * (k0 + o0) + 2 * (k1 + o1) + 2 * (k2 + o2);
    b  = 8'(y % 256);
    return {hi[4*b[7:4] +: 4], lo[4*b[3:0] +: 4]};
  endfunction
endpackage
