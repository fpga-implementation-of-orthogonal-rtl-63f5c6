// Orthogonal code encoder.
//
// Registers the code of a K-bit data word: on a rising clock edge with
// `data_rdy` high, `data_out` takes the N-bit code of `data_in` from the
// lookup table and `data_out_rdy` goes high for one cycle (latency one
// clock, one word per clock). `reset` (synchronous, active high) clears
// `data_out` to all zeros and `data_out_rdy` to low, as described for the
// encoder. `data_out` holds its last value while no new word arrives.
// The one-cycle pulse on `data_out_rdy` and the synchronous reset are this
// design's own choices.
module ocode_encoder #(
  parameter int unsigned K = ocode_pkg::K_DEF,
  parameter int unsigned N = 2 ** (K - 1)
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         data_rdy,
  input  logic [K-1:0] data_in,
  output logic [N-1:0] data_out,
  output logic         data_out_rdy
);

  logic [N-1:0] code;

  ocode_lut #(.K(K), .N(N)) u_lut (.addr(data_in), .code(code));

  always_ff @(posedge clk) begin
    if (reset) begin
      data_out     <= '0;
      data_out_rdy <= 1'b0;
    end else begin
      data_out_rdy <= data_rdy;
      if (data_rdy) data_out <= code;
    end
  end

endmodule
