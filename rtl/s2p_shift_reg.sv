// Serial-to-parallel shift register of the receiver.
//
// On each rising clock edge with `data_rdy` high the bit on `data_in` is
// shifted into `shft_reg` (first bit ends up in the MSB) and the bit count
// `cnt` advances. On the edge that takes the N-th bit, the whole word is
// copied to `data_out`, `data_out_rdy` goes high for one cycle and the count
// restarts, so words are framed purely by counting valid bits from reset.
// Latency: `data_out_rdy` is high in the cycle after the last bit is
// presented. Synchronous active-high `reset` clears the register, the count
// and the outputs. The count here wraps at N rather than running past it;
// the framing-by-count and the one-cycle pulse are this design's choices.
module s2p_shift_reg #(
  parameter int unsigned N = 2 ** (ocode_pkg::K_DEF - 1)
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         data_rdy,
  input  logic         data_in,
  output logic [N-1:0] data_out,
  output logic         data_out_rdy
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [N-2:0]  shft_reg;   // the N-1 bits received so far
  logic [CW-1:0] cnt;
  logic [N-1:0]  next_reg;

  assign next_reg = {shft_reg[N-2:0], data_in};

  always_ff @(posedge clk) begin
    if (reset) begin
      shft_reg     <= '0;
      cnt          <= '0;
      data_out     <= '0;
      data_out_rdy <= 1'b0;
    end else begin
      data_out_rdy <= 1'b0;
      if (data_rdy) begin
        shft_reg <= next_reg[N-2:0];
        if (cnt == CW'(N - 1)) begin
          cnt          <= '0;
          data_out     <= next_reg;
          data_out_rdy <= 1'b1;
        end else begin
          cnt <= cnt + CW'(1);
        end
      end
    end
  end

endmodule
