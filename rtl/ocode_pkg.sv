// Shared constants and helpers for the bi-orthogonal code link.
//
// A k-bit data word selects one of 2**k codes of length n = 2**(k-1). The low
// k-1 data bits pick a row of the Sylvester Walsh-Hadamard matrix (bit j of
// row i is the parity of i & j, column 0 sent first); the top data bit, when
// set, inverts the row to give its antipodal code. With k = 5 this yields the
// 16 orthogonal and 16 antipodal codes of a 16-bit bi-orthogonal set, and the
// data word 00001 maps to 0101010101010101 as in the reference examples of
// the scheme. The row ordering and the use of the top bit for inversion are
// this design's own choice; the scheme itself fixes only that example.
package ocode_pkg;

  // Default data width k and code length n = 2**(k-1).
  localparam int unsigned K_DEF = 5;

  // Code bit j (0 = first bit on the line, stored as the MSB) of the code for
  // data word d, for a code of length n = 2**(k-1).
  function automatic logic code_bit(int unsigned k, int unsigned d, int unsigned j);
    logic [31:0] row;
    logic [31:0] col;
    row = 32'(d) & ((32'd1 << (k - 1)) - 32'd1);
    col = 32'(j);
    return (^(row & col)) ^ ((32'(d) >> (k - 1)) != 32'd0);
  endfunction

endpackage
