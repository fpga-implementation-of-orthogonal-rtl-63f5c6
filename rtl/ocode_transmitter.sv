// Orthogonal code transmitter: encoder followed by a parallel-to-serial
// shift register.
//
// A K-bit word offered with `data_rdy` while `ready` is high is encoded to
// its N-bit orthogonal code (`p_data`, valid with `p_data_rdy`, one clock
// later) and the code is then sent one bit per clock on `data_out`, first
// code bit first, with `data_out_rdy` marking each valid bit. The first
// bit appears two clocks after the word is taken and the last N+1 clocks
// after that. `ready` is low while a code is waiting in the encoder or more
// than one bit is left to send; a source that offers a word whenever
// `ready` is high gets a code every N+1 clocks. Synchronous active-high
// `reset` clears everything. The `ready` handshake is this design's own
// addition; the encoder-then-shift-register structure follows the design
// description.
module ocode_transmitter #(
  parameter int unsigned K = ocode_pkg::K_DEF,
  parameter int unsigned N = 2 ** (K - 1)
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         data_rdy,
  input  logic [K-1:0] data_in,
  output logic         ready,
  output logic [N-1:0] p_data,
  output logic         p_data_rdy,
  output logic         data_out,
  output logic         data_out_rdy
);

  logic sr_ready;

  ocode_encoder #(.K(K), .N(N)) u_enc (
    .clk          (clk),
    .reset        (reset),
    .data_rdy     (data_rdy && ready),
    .data_in      (data_in),
    .data_out     (p_data),
    .data_out_rdy (p_data_rdy)
  );

  p2s_shift_reg #(.N(N)) u_p2s (
    .clk          (clk),
    .reset        (reset),
    .data_rdy     (p_data_rdy),
    .data_in      (p_data),
    .ready        (sr_ready),
    .data_out     (data_out),
    .data_out_rdy (data_out_rdy)
  );

  assign ready = sr_ready && !p_data_rdy;

  // An encoded word is never offered to a busy shift register, so no code
  // is lost between the two stages.
  a_no_drop: assert property (@(posedge clk) disable iff (reset)
                              p_data_rdy |-> sr_ready);

endmodule
