// oci_pkg: shared constants, types and code functions of the overloaded CDMA
// interconnect (OCI) crossbar.
//
// Spreading codes. With code length N the crossbar serves M = 2(N-1) ports.
// Code index c (0..M-1) equals the index of the receive port that owns it:
//   c <  N-1 : orthogonal Walsh-Hadamard code, row c+1 of the Sylvester
//              Hadamard matrix in 0/1 form; chip i = parity(popcount((c+1) & i)).
//              Row 0 (all zeros) is never used.
//   c >= N-1 : non-orthogonal (overloading) code k = c-(N-1)+1 in 1..N-1; it is
//              a single '1' at chip k and '0' elsewhere, so a data bit sent on
//              it only appears in the channel sum of chip k.
// The code numbering, the choice of the single-one codes and N = 8 follow
// the crossbar scheme described for the OCI router; the exact index mapping
// is this design's own.
package oci_pkg;

  // Walsh-Hadamard chip (0/1 form) of row `row`, column `col`.
  function automatic logic walsh_chip(input int unsigned row, input int unsigned col);
    int unsigned v;
    logic p;
    v = row & col;
    p = 1'b0;
    for (int b = 0; b < 32; b++) p ^= v[b];
    return p;
  endfunction

  // Chip `col` of code index `code` in a crossbar with code length `n`.
  function automatic logic code_chip(input int unsigned n, input int unsigned code,
                                     input int unsigned col);
    if (code < n - 1) return walsh_chip(code + 1, col);
    return (col == code - (n - 1) + 1);
  endfunction

  // True when code index `code` is an overloading (non-orthogonal) code.
  function automatic logic code_is_nonorth(input int unsigned n, input int unsigned code);
    return code >= n - 1;
  endfunction

  // Type of code an encoder is told to apply.
  typedef enum logic {CODE_ORTH = 1'b0, CODE_NONORTH = 1'b1} code_type_e;

endpackage
