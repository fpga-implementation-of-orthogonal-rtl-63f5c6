// Reference model for the testbenches of the bi-orthogonal code link.
//
// Builds the 16-bit code table by the recursive Sylvester construction
// (H2n = [Hn Hn; Hn ~Hn]), independently of the parity formula the RTL
// uses, and decodes by brute-force minimum Hamming distance. Fixed at
// k = 5, n = 16, the default configuration.
package ocode_ref_pkg;

  localparam int K = 5;
  localparam int N = 16;
  localparam int M = 32;

  // Row `r` of the n x n Walsh-Hadamard matrix, first column in bit n-1.
  function automatic logic [N-1:0] hrow(int n, int r);
    logic [N-1:0] h;
    logic [N-1:0] half;
    if (n == 1) return '0;
    half = hrow(n / 2, r % (n / 2));
    h = '0;
    for (int j = 0; j < n / 2; j++) begin
      h[n - 1 - j]       = half[n / 2 - 1 - j];
      h[n / 2 - 1 - j]   = half[n / 2 - 1 - j] ^ (r >= n / 2);
    end
    return h;
  endfunction

  function automatic logic [N-1:0] ref_code(int d);
    logic [N-1:0] c;
    c = hrow(N, d % N);
    if (d >= N) c = ~c;
    return c;
  endfunction

  function automatic int popcnt(logic [N-1:0] v);
    int c = 0;
    for (int i = 0; i < N; i++) c += int'(v[i]);
    return c;
  endfunction

  typedef struct {
    int idx;    // lowest index with minimum distance
    int dmin;   // minimum distance
    bit tie;    // minimum shared by several codes
  } dec_t;

  function automatic dec_t ref_decode(logic [N-1:0] w);
    dec_t r;
    int dd;
    r.idx = 0; r.dmin = N + 1; r.tie = 0;
    for (int d = 0; d < M; d++) begin
      dd = popcnt(w ^ ref_code(d));
      if (dd < r.dmin) begin r.dmin = dd; r.idx = d; r.tie = 0; end
      else if (dd == r.dmin) r.tie = 1;
    end
    return r;
  endfunction

endpackage
