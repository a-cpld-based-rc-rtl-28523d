// rc4_ref_pkg: software reference model of RC4 for the testbenches.
//
// rc4_keystream runs the RC4 key schedule for a key of `klen` bytes and
// returns the first four keystream bytes; rc4_ksa returns the state array
// after the key schedule. The key is passed as a number whose
// most significant of its `klen` bytes is key byte 0, the byte order the
// K-array uses. The model is written straight from the RC4 definition and
// shares no code with the RTL.
package rc4_ref_pkg;

  typedef logic [7:0] kbyte_t;

  function automatic void rc4_keystream(input logic [63:0] key, input int klen,
                                        output kbyte_t ks [4]);
    kbyte_t s [256];
    kbyte_t k [256];
    kbyte_t tmp;
    int     i, j;
    for (i = 0; i < 256; i++) begin
      s[i] = kbyte_t'(i);
      k[i] = key[8*(klen - (i % klen)) - 1 -: 8];
    end
    j = 0;
    for (i = 0; i < 256; i++) begin
      j = (j + int'(s[i]) + int'(k[i])) % 256;
      tmp = s[i]; s[i] = s[j]; s[j] = tmp;
    end
    i = 0;
    j = 0;
    for (int n = 0; n < 4; n++) begin
      i = (i + 1) % 256;
      j = (j + int'(s[i])) % 256;
      tmp = s[i]; s[i] = s[j]; s[j] = tmp;
      ks[n] = s[(int'(s[i]) + int'(s[j])) % 256];
    end
  endfunction

  // State array after the key schedule alone.
  function automatic void rc4_ksa(input logic [63:0] key, input int klen,
                                  output kbyte_t s [256]);
    kbyte_t tmp;
    int     j = 0;
    for (int i = 0; i < 256; i++) s[i] = kbyte_t'(i);
    for (int i = 0; i < 256; i++) begin
      j = (j + int'(s[i]) + int'(key[8*(klen - (i % klen)) - 1 -: 8])) % 256;
      tmp = s[i]; s[i] = s[j]; s[j] = tmp;
    end
  endfunction

endpackage
