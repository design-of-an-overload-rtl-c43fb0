// tb_oci_ref_pkg: reference model used by the OCI testbenches.
//
// Builds the codes independently of the RTL: the Walsh-Hadamard matrix by
// the Sylvester recursion H(2n) = [[H, H], [H, ~H]] (0/1 form) instead of the
// bit-parity formula, and the overloading codes as one '1' at chip k. Gives
// the channel sum of a transaction and the expected per-port outputs.
package tb_oci_ref_pkg;

  // Entry (r, c) of the n x n Sylvester Hadamard matrix, 0/1 form.
  function automatic bit had(int n, int r, int c);
    if (n == 1) return 1'b0;
    return ((r >= n/2) && (c >= n/2)) ^ had(n/2, r % (n/2), c % (n/2));
  endfunction

  // Chip i of code index c (c < n-1: Walsh row c+1, else single one at c-n+2).
  function automatic bit ref_chip(int n, int c, int i);
    if (c < n - 1) return had(n, c + 1, i);
    return (i == c - n + 2);
  endfunction

  // Contribution of one transmitter holding code c with data bit d to chip i.
  function automatic int ref_spread(int n, int c, bit d, int i);
    if (c < n - 1) return int'(d ^ ref_chip(n, c, i));
    return int'(d & ref_chip(n, c, i));
  endfunction

endpackage
