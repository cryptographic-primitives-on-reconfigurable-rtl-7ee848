// rc4_ref_pkg: procedural RC4 model for the testbenches: the first eight
// keystream bytes of a 40-bit key (key[39:32] is the first key byte), packed
// with the first byte in bits 63:56.
package rc4_ref_pkg;
  function automatic logic [63:0] rc4_ref(input logic [39:0] key);
    byte unsigned s[256];
    byte unsigned k[5];
    byte unsigned jj, tmp, ii;
    logic [63:0] out;
    for (int b = 0; b < 5; b++) k[b] = key[39-8*b -: 8];
    for (int n = 0; n < 256; n++) s[n] = byte'(n);
    jj = 0;
    for (int n = 0; n < 256; n++) begin
      jj = jj + s[n] + k[n % 5];
      tmp = s[n]; s[n] = s[jj]; s[jj] = tmp;
    end
    ii = 0; jj = 0;
    for (int b = 0; b < 8; b++) begin
      ii = ii + 1;
      jj = jj + s[ii];
      tmp = s[ii]; s[ii] = s[jj]; s[jj] = tmp;
      out[63-8*b -: 8] = s[byte'(s[ii] + s[jj])];
    end
    return out;
  endfunction
endpackage
