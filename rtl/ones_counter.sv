// Ones counter.
//
// Counts the 1 bits of an N-bit word. On a rising clock edge with
// `data_rdy` high, `cnt_out` takes the population count of `data_in` and
// `cnt_rdy` goes high for one cycle (latency one clock, one word per
// clock). `cnt_out` is $clog2(N+1) bits wide: 5 bits for N = 16, matching
// the 5-bit count values of the design. Synchronous active-high `reset`
// clears `cnt_out` to zero. The count is formed as a plain adder chain.
module ones_counter #(
  parameter int unsigned N  = 2 ** (ocode_pkg::K_DEF - 1),
  parameter int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          data_rdy,
  input  logic [N-1:0]  data_in,
  output logic [CW-1:0] cnt_out,
  output logic          cnt_rdy
);

  logic [CW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int unsigned i = 0; i < N; i++) ones += CW'(data_in[i]);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      cnt_out <= '0;
      cnt_rdy <= 1'b0;
    end else begin
      cnt_rdy <= data_rdy;
      if (data_rdy) cnt_out <= ones;
    end
  end

endmodule
