// Minimum-distance decoder for the bi-orthogonal code.
//
// The received N-bit word is XORed with every one of the 2**K codes of the
// lookup table, and one ones counter per code counts the differing bits
// (the Hamming distance) in parallel. A minimum search then picks the code
// with the smallest count: that code is the corrected word (`p_data`) and
// its table address is the decoded data (`data_out`). `cnt` is the minimum
// count; a non-zero value means the received word was corrupted (`err`).
// `req` goes high when the minimum count is shared by more than one code,
// that is when the closest code cannot be told; `data_out` then holds the
// lowest-numbered of the tied codes. `parity_err` is the parity of the
// received word itself: every code has even parity, so an odd number of
// flipped bits shows there without a parity bit ever being sent. Up to N/4 - 1 = 3 wrong bits are
// corrected for N = 16.
//
// Timing: `data_rdy` with `data_in` in cycle t; the counts register at
// t+1 and the search result registers at t+2, when `data_out_rdy` pulses.
// A new word may be accepted every clock. Synchronous active-high `reset`
// clears all outputs to zero.
// The XOR, count, minimum search, tie flag and receive-side parity follow
// the design description; running all 2**K comparisons in parallel, the two-stage pipeline, and the
// lowest-index choice on a tie are this design's own choices.
module ocode_decoder #(
  parameter int unsigned K  = ocode_pkg::K_DEF,
  parameter int unsigned N  = 2 ** (K - 1),
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          data_rdy,
  input  logic [N-1:0]  data_in,
  output logic [K-1:0]  data_out,
  output logic [N-1:0]  p_data,
  output logic [CW-1:0] cnt,
  output logic          err,
  output logic          req,
  output logic          parity_err,
  output logic          data_out_rdy
);

  localparam int unsigned M = 2 ** K;

  logic [N-1:0]  codes  [M];
  logic [CW-1:0] counts [M];
  logic [M-1:0]  cnt_rdy;

  for (genvar i = 0; i < M; i++) begin : g_lane
    ocode_lut #(.K(K), .N(N)) u_lut (
      .addr (K'(i)),
      .code (codes[i])
    );
    ones_counter #(.N(N), .CW(CW)) u_cnt (
      .clk      (clk),
      .reset    (reset),
      .data_rdy (data_rdy),
      .data_in  (data_in ^ codes[i]),
      .cnt_out  (counts[i]),
      .cnt_rdy  (cnt_rdy[i])
    );
  end

  // Parity of the received word, delayed to line up with the counts.
  logic par1;

  always_ff @(posedge clk) begin
    if (reset)         par1 <= 1'b0;
    else if (data_rdy) par1 <= ^data_in;
  end

  // All lanes count the same word in step.
  a_lanes_in_step: assert property (@(posedge clk) disable iff (reset)
                                    (cnt_rdy == '0) || (cnt_rdy == '1));

  // Minimum search over the registered counts.
  logic [CW-1:0] min_cnt;
  logic [K-1:0]  min_idx;
  logic          tie;

  always_comb begin
    min_cnt = counts[0];
    min_idx = '0;
    tie     = 1'b0;
    for (int unsigned i = 1; i < M; i++) begin
      if (counts[i] < min_cnt) begin
        min_cnt = counts[i];
        min_idx = K'(i);
        tie     = 1'b0;
      end else if (counts[i] == min_cnt) begin
        tie = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      data_out     <= '0;
      p_data       <= '0;
      cnt          <= '0;
      err          <= 1'b0;
      req          <= 1'b0;
      parity_err   <= 1'b0;
      data_out_rdy <= 1'b0;
    end else begin
      data_out_rdy <= &cnt_rdy;
      if (&cnt_rdy) begin
        data_out <= min_idx;
        p_data   <= codes[min_idx];
        cnt      <= min_cnt;
        err      <= (min_cnt != '0);
        req      <= tie;
        parity_err <= par1;
      end
    end
  end

endmodule
