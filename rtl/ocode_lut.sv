// Lookup table of the bi-orthogonal code set.
//
// Combinational ROM: `addr` is a K-bit data word, `code` its N = 2**(K-1)
// bit code, first line bit in the MSB. Rows are Walsh-Hadamard rows in
// Sylvester order (bit j = parity of row & j), and the top address bit
// selects the antipodal (inverted) copy, so 5'b00001 gives
// 16'b0101_0101_0101_0101. The table contents are built at elaboration from
// that formula; the row order is this design's choice (see ocode_pkg).
// No clock: `code` follows `addr` in the same cycle.
module ocode_lut #(
  parameter int unsigned K = ocode_pkg::K_DEF,
  parameter int unsigned N = 2 ** (K - 1)
) (
  input  logic [K-1:0] addr,
  output logic [N-1:0] code
);

  logic [N-1:0] rom [2**K];

  always_comb begin
    for (int unsigned d = 0; d < 2 ** K; d++) begin
      for (int unsigned j = 0; j < N; j++) begin
        rom[d][N-1-j] = ocode_pkg::code_bit(K, d, j);
      end
    end
  end

  assign code = rom[addr];

endmodule
