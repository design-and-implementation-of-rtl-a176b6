// cp_pkg: types and constants shared by the content processor blocks.
//
// The string matcher is a Bloomier filter: K hash functions of the L-byte
// window index a lookup table whose K words XOR to a pointer into a result
// table that holds the stored strings. This package holds the generator of
// the hash coefficients d_ij (Eq. 5 style universal hashing: one predetermined
// random number per hash function and input bit) and the encoding of the
// table-write (setup) port.
//
// The document asks only for "predetermined random numbers"; the generator
// below (a 32-bit integer mixer of the hash index, the bit index and a seed)
// is this design's choice. Host setup software must use the same generator.
package cp_pkg;

  // Which table a setup write goes to.
  typedef enum logic [0:0] {
    CFG_LUT = 1'b0,   // lookup table: address = location, data = q-bit word
    CFG_RT  = 1'b1    // result table: address = pointer, data = string + valid
  } cfg_sel_e;

  // Coefficient d_ij of hash function `func` for input bit `bit_idx`, 32 bits
  // wide; a user keeps the low log2(m) bits. Never zero in its low 16 bits.
  function automatic logic [31:0] h3_coef(input int unsigned func,
                                          input int unsigned bit_idx,
                                          input int unsigned seed);
    logic [31:0] x;
    x = (func << 20) ^ bit_idx ^ (seed * 32'h9E37_79B9);
    x = x ^ (x >> 16);
    x = x * 32'h7FEB_352D;
    x = x ^ (x >> 15);
    x = x * 32'h846C_A68B;
    x = x ^ (x >> 16);
    if (x[15:0] == 16'h0) x[15:0] = 16'h1;
    return x;
  endfunction

endpackage
