// aes_pkg: types, tables and byte-level helpers shared by the modified
// AES-256 datapath.
//
// The 128-bit state is held as one vector in the usual AES byte order: byte n
// (n = 0..15) sits in bits [127-8n -: 8] and is the element of row n%4,
// column n/4 of the 4x4 state matrix. Round keys use the same layout, so
// "row i of the key matrix" is bytes i, i+4, i+8, i+12.
//
// SBOX is the substitution table printed in the source description (row =
// high nibble, column = low nibble); it equals the GF(2^8)-inverse-plus-affine
// definition of the AES S-box. INV_SBOX is not stored as data: it is computed
// at elaboration time by inverting SBOX.
package aes_pkg;

  typedef logic [127:0] block_t;   // one state or one round key
  typedef logic [255:0] key256_t;  // cipher key
  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [3:0]   rnd_t;     // round number 0..14

  localparam int unsigned NR = 14;  // rounds of AES-256

  localparam byte_t SBOX [256] = '{
        8'h63, 8'h7c, 8'h77, 8'h7b, 8'hf2, 8'h6b, 8'h6f, 8'hc5, 8'h30, 8'h01, 8'h67, 8'h2b, 8'hfe, 8'hd7, 8'hab, 8'h76,
        8'hca, 8'h82, 8'hc9, 8'h7d, 8'hfa, 8'h59, 8'h47, 8'hf0, 8'had, 8'hd4, 8'ha2, 8'haf, 8'h9c, 8'ha4, 8'h72, 8'hc0,
        8'hb7, 8'hfd, 8'h93, 8'h26, 8'h36, 8'h3f, 8'hf7, 8'hcc, 8'h34, 8'ha5, 8'he5, 8'hf1, 8'h71, 8'hd8, 8'h31, 8'h15,
        8'h04, 8'hc7, 8'h23, 8'hc3, 8'h18, 8'h96, 8'h05, 8'h9a, 8'h07, 8'h12, 8'h80, 8'he2, 8'heb, 8'h27, 8'hb2, 8'h75,
        8'h09, 8'h83, 8'h2c, 8'h1a, 8'h1b, 8'h6e, 8'h5a, 8'ha0, 8'h52, 8'h3b, 8'hd6, 8'hb3, 8'h29, 8'he3, 8'h2f, 8'h84,
        8'h53, 8'hd1, 8'h00, 8'hed, 8'h20, 8'hfc, 8'hb1, 8'h5b, 8'h6a, 8'hcb, 8'hbe, 8'h39, 8'h4a, 8'h4c, 8'h58, 8'hcf,
        8'hd0, 8'hef, 8'haa, 8'hfb, 8'h43, 8'h4d, 8'h33, 8'h85, 8'h45, 8'hf9, 8'h02, 8'h7f, 8'h50, 8'h3c, 8'h9f, 8'ha8,
        8'h51, 8'ha3, 8'h40, 8'h8f, 8'h92, 8'h9d, 8'h38, 8'hf5, 8'hbc, 8'hb6, 8'hda, 8'h21, 8'h10, 8'hff, 8'hf3, 8'hd2,
        8'hcd, 8'h0c, 8'h13, 8'hec, 8'h5f, 8'h97, 8'h44, 8'h17, 8'hc4, 8'ha7, 8'h7e, 8'h3d, 8'h64, 8'h5d, 8'h19, 8'h73,
        8'h60, 8'h81, 8'h4f, 8'hdc, 8'h22, 8'h2a, 8'h90, 8'h88, 8'h46, 8'hee, 8'hb8, 8'h14, 8'hde, 8'h5e, 8'h0b, 8'hdb,
        8'he0, 8'h32, 8'h3a, 8'h0a, 8'h49, 8'h06, 8'h24, 8'h5c, 8'hc2, 8'hd3, 8'hac, 8'h62, 8'h91, 8'h95, 8'he4, 8'h79,
        8'he7, 8'hc8, 8'h37, 8'h6d, 8'h8d, 8'hd5, 8'h4e, 8'ha9, 8'h6c, 8'h56, 8'hf4, 8'hea, 8'h65, 8'h7a, 8'hae, 8'h08,
        8'hba, 8'h78, 8'h25, 8'h2e, 8'h1c, 8'ha6, 8'hb4, 8'hc6, 8'he8, 8'hdd, 8'h74, 8'h1f, 8'h4b, 8'hbd, 8'h8b, 8'h8a,
        8'h70, 8'h3e, 8'hb5, 8'h66, 8'h48, 8'h03, 8'hf6, 8'h0e, 8'h61, 8'h35, 8'h57, 8'hb9, 8'h86, 8'hc1, 8'h1d, 8'h9e,
        8'he1, 8'hf8, 8'h98, 8'h11, 8'h69, 8'hd9, 8'h8e, 8'h94, 8'h9b, 8'h1e, 8'h87, 8'he9, 8'hce, 8'h55, 8'h28, 8'hdf,
        8'h8c, 8'ha1, 8'h89, 8'h0d, 8'hbf, 8'he6, 8'h42, 8'h68, 8'h41, 8'h99, 8'h2d, 8'h0f, 8'hb0, 8'h54, 8'hbb, 8'h16
  };

  function automatic byte_t [255:0] invert_sbox();
    byte_t [255:0] t;
    t = '0;
    for (int i = 0; i < 256; i++) t[SBOX[i]] = byte_t'(i);
    return t;
  endfunction

  localparam byte_t [255:0] INV_SBOX = invert_sbox();

  function automatic byte_t sbox(input byte_t x);
    return SBOX[x];
  endfunction

  function automatic byte_t inv_sbox(input byte_t x);
    return INV_SBOX[x];
  endfunction

  // Byte n of a state vector.
  function automatic byte_t get_byte(input block_t s, input int n);
    return s[127-8*n -: 8];
  endfunction

  // Multiply by x in GF(2^8) with the AES polynomial x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(input byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product of b with a small constant c (c < 16).
  function automatic byte_t gmul(input byte_t b, input logic [3:0] c);
    byte_t p, a;
    p = '0;
    a = b;
    for (int k = 0; k < 4; k++) begin
      if (c[k]) p ^= a;
      a = xtime(a);
    end
    return p;
  endfunction

  // Round constant used by the key schedule: x^(i-1) in GF(2^8), i >= 1.
  function automatic byte_t rcon(input int unsigned i);
    byte_t r;
    r = 8'h01;
    for (int unsigned k = 1; k < 8; k++) if (k < i) r = xtime(r);
    return r;
  endfunction

  function automatic word_t sub_word(input word_t w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  function automatic word_t rot_word(input word_t w);
    return {w[23:0], w[31:24]};
  endfunction

  // XORK_i: XOR of the four bytes of row i of a round key.
  function automatic byte_t row_xor(input block_t k, input int i);
    return get_byte(k, i) ^ get_byte(k, i+4) ^ get_byte(k, i+8) ^ get_byte(k, i+12);
  endfunction

endpackage
