// Orthogonal code receiver: serial-to-parallel converter followed by the
// minimum-distance decoder.
//
// Valid line bits (`data_in` with `data_rdy`) are gathered N at a time into
// `p_data1`, which pulses `p_data1_rdy` one clock after its last bit. The
// decoder then compares it with every table code and, two clocks later,
// presents the decoded K-bit word on `data_out` with `data_out_rdy`, the
// corrected code on `p_data`, the minimum mismatch count on `cnt`, `err`
// when that count is non-zero, `req` when several codes share it and
// `parity_err` when the received word has odd parity.
// Latency from the last bit to `data_out_rdy`: 3 clocks. Synchronous
// active-high `reset` clears everything, including the bit count that
// frames the words.
module ocode_receiver #(
  parameter int unsigned K  = ocode_pkg::K_DEF,
  parameter int unsigned N  = 2 ** (K - 1),
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          data_rdy,
  input  logic          data_in,
  output logic [N-1:0]  p_data1,
  output logic          p_data1_rdy,
  output logic [K-1:0]  data_out,
  output logic [N-1:0]  p_data,
  output logic [CW-1:0] cnt,
  output logic          err,
  output logic          req,
  output logic          parity_err,
  output logic          data_out_rdy
);

  s2p_shift_reg #(.N(N)) u_s2p (
    .clk          (clk),
    .reset        (reset),
    .data_rdy     (data_rdy),
    .data_in      (data_in),
    .data_out     (p_data1),
    .data_out_rdy (p_data1_rdy)
  );

  ocode_decoder #(.K(K), .N(N), .CW(CW)) u_dec (
    .clk          (clk),
    .reset        (reset),
    .data_rdy     (p_data1_rdy),
    .data_in      (p_data1),
    .data_out     (data_out),
    .p_data       (p_data),
    .cnt          (cnt),
    .err          (err),
    .req          (req),
    .parity_err   (parity_err),
    .data_out_rdy (data_out_rdy)
  );

endmodule
