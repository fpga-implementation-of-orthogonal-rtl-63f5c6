// Orthogonal code link: transmitter and receiver joined by a one-bit serial
// line.
//
// A K-bit word offered on `data` with `data_rdy` while `ready` is high is
// encoded into its N-bit bi-orthogonal code, sent serially, received,
// corrected by minimum-distance search against the code table and decoded
// back on `data_out` with `data_out_rdy`. Between the two ends the line bit
// is XORed with `chan_flip`, sampled on each valid bit, which stands for
// the channel and lets a test corrupt chosen bits of a code. The
// intermediate signals named in the design description are brought out:
// the transmitted code `p_data_tx`, the serial line `line_bit` /
// `line_rdy`, the received code `p_data1`, the minimum count `cnt`, the
// corrected code `p_data`, `err` (count non-zero), `parity_err` (received
// word has odd parity) and `req` (tie between codes, not correctable).
// Timing: `data_out_rdy` is high N + 5 clocks after the cycle in which a
// word is offered and taken; a new word can be taken every N + 1 clocks.
// The channel-error input is this design's own test hook.
module ocode_top #(
  parameter int unsigned K  = ocode_pkg::K_DEF,
  parameter int unsigned N  = 2 ** (K - 1),
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          data_rdy,
  input  logic [K-1:0]  data,
  output logic          ready,
  input  logic          chan_flip,
  output logic [N-1:0]  p_data_tx,
  output logic          p_data_tx_rdy,
  output logic          line_bit,
  output logic          line_rdy,
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

  logic tx_bit;

  ocode_transmitter #(.K(K), .N(N)) u_tx (
    .clk          (clk),
    .reset        (reset),
    .data_rdy     (data_rdy),
    .data_in      (data),
    .ready        (ready),
    .p_data       (p_data_tx),
    .p_data_rdy   (p_data_tx_rdy),
    .data_out     (tx_bit),
    .data_out_rdy (line_rdy)
  );

  assign line_bit = tx_bit ^ (chan_flip & line_rdy);

  ocode_receiver #(.K(K), .N(N), .CW(CW)) u_rx (
    .clk          (clk),
    .reset        (reset),
    .data_rdy     (line_rdy),
    .data_in      (line_bit),
    .p_data1      (p_data1),
    .p_data1_rdy  (p_data1_rdy),
    .data_out     (data_out),
    .p_data       (p_data),
    .cnt          (cnt),
    .err          (err),
    .req          (req),
    .parity_err   (parity_err),
    .data_out_rdy (data_out_rdy)
  );

endmodule
