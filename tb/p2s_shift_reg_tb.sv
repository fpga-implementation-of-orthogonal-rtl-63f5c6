// Testbench for p2s_shift_reg: bit order (MSB first), one bit per clock
// with data_out_rdy, the N-clock frame, loads ignored while busy, a gapless
// reload during the last bit, and reset.
module p2s_shift_reg_tb;
  localparam int N = 16;

  logic clk = 0, reset = 1, data_rdy = 0;
  logic [N-1:0] data_in = '0;
  logic ready, data_out, data_out_rdy;
  int checks = 0, failures = 0;

  p2s_shift_reg dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Load w at the next edge, then expect its N bits on the following N
  // edges; if `next` is set, a second word is offered during the last bit.
  task automatic send(logic [N-1:0] w, bit next, logic [N-1:0] w2);
    @(negedge clk);
    check(ready, "ready before load");
    data_in = w; data_rdy = 1;
    @(negedge clk);
    data_rdy = 1; data_in = ~w;   // must be ignored: busy
    check(!data_out_rdy, "no output in the load cycle");
    for (int i = N - 1; i >= 0; i--) begin
      if (i == 0 && next) begin data_in = w2; data_rdy = 1; end
      else if (i == N - 1) data_rdy = 1;
      else data_rdy = 0;
      @(negedge clk);
      check(data_out_rdy, $sformatf("bit %0d valid", i));
      check(data_out == w[i], $sformatf("bit %0d of %h", i, w));
      check(ready == ((i <= 1) && !(i == 0 && next)), $sformatf("ready at bit %0d", i));
    end
    data_rdy = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(!data_out_rdy && !data_out, "reset value");
    reset = 0;
    send(16'h5555, 0, '0);
    @(negedge clk);
    check(!data_out_rdy, "idle after frame");
    for (int k = 0; k < 20; k++) send(N'($urandom), 0, '0);
    // gapless pair: second word loaded in the cycle of the first's last bit
    send(16'hA5C3, 1, 16'h0F1E);
    for (int i = N - 1; i >= 0; i--) begin
      @(negedge clk);
      check(data_out_rdy && data_out == ((16'h0F1E >> i) & 1), $sformatf("gapless bit %0d", i));
    end
    @(negedge clk);
    check(!data_out_rdy, "idle after gapless pair");
    data_in = 16'hFFFF; data_rdy = 1;
    @(negedge clk); data_rdy = 0; reset = 1;
    @(negedge clk); reset = 0;
    check(!data_out_rdy && ready, "reset aborts frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
