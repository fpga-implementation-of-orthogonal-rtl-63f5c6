// Parallel-to-serial shift register of the transmitter.
//
// When `data_rdy` is high and the register can accept (`ready`), the N-bit
// word on `data_in` is loaded into `shft_reg`. On each of the next N rising
// clock edges one bit leaves on `data_out`, MSB first, with `data_out_rdy`
// high to mark it valid; `data_out_rdy` is low between words. `ready` is
// high when idle and also during the last bit, so a word loaded then
// follows the previous one with no gap: a steady stream runs at one bit per
// clock. A load attempted while `ready` is low is ignored.
// Synchronous active-high `reset` clears the register and outputs.
// The bit order, the `ready` output and gapless reloading are this design's
// own choices.
module p2s_shift_reg #(
  parameter int unsigned N = 2 ** (ocode_pkg::K_DEF - 1)
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         data_rdy,
  input  logic [N-1:0] data_in,
  output logic         ready,
  output logic         data_out,
  output logic         data_out_rdy
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]  shft_reg;
  logic [CW-1:0] left;      // bits still to send

  assign ready = (left <= CW'(1));

  always_ff @(posedge clk) begin
    if (reset) begin
      shft_reg     <= '0;
      left         <= '0;
      data_out     <= 1'b0;
      data_out_rdy <= 1'b0;
    end else begin
      data_out_rdy <= (left != '0);
      if (left != '0) data_out <= shft_reg[N-1];
      if (data_rdy && ready) begin
        shft_reg <= data_in;
        left     <= CW'(N);
      end else if (left != '0) begin
        shft_reg <= {shft_reg[N-2:0], 1'b0};
        left     <= left - CW'(1);
      end
    end
  end

endmodule
