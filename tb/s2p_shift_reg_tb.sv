// Testbench for s2p_shift_reg: words sent serially, MSB first, with random
// idle gaps between valid bits; checks the assembled word, the single
// data_out_rdy pulse one clock after the N-th bit, and reset.
module s2p_shift_reg_tb;
  localparam int N = 16;

  logic clk = 0, reset = 1, data_rdy = 0, data_in = 0;
  logic [N-1:0] data_out;
  logic data_out_rdy;
  int checks = 0, failures = 0;

  s2p_shift_reg dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic recv(logic [N-1:0] w, bit gaps);
    for (int i = N - 1; i >= 0; i--) begin
      if (gaps) begin
        int g = $urandom_range(0, 2);
        repeat (g) begin
          @(negedge clk); data_rdy = 0; data_in = $urandom;
          check(!data_out_rdy, "no output during the word");
        end
      end
      @(negedge clk);
      check(!data_out_rdy, "no output before the last bit");
      data_rdy = 1; data_in = w[i];
    end
    @(negedge clk); data_rdy = 0;
    check(data_out_rdy, "data_out_rdy after the last bit");
    check(data_out == w, $sformatf("word %h got %h", w, data_out));
    @(negedge clk);
    check(!data_out_rdy && data_out == w, "pulse then hold");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(data_out == '0 && !data_out_rdy, "reset value");
    reset = 0;
    recv(16'h5555, 0);
    recv(16'h5D55, 0);
    for (int k = 0; k < 50; k++) recv(N'($urandom), k[0]);
    // partial word then reset restarts the framing
    for (int i = 0; i < 5; i++) begin @(negedge clk); data_rdy = 1; data_in = 1; end
    @(negedge clk); data_rdy = 0; reset = 1;
    @(negedge clk); reset = 0;
    recv(16'h1234, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
