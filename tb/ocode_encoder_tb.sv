// Testbench for ocode_encoder: all 32 words, one clock latency, the
// data_out_rdy pulse, holding of data_out, back-to-back words and reset.
module ocode_encoder_tb;
  import ocode_ref_pkg::*;

  logic clk = 0, reset = 1, data_rdy = 0;
  logic [K-1:0] data_in = '0;
  logic [N-1:0] data_out;
  logic data_out_rdy;
  int checks = 0, failures = 0;

  ocode_encoder dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(data_out == '0 && !data_out_rdy, "reset value");
    reset = 0;
    for (int d = 0; d < M; d++) begin
      @(negedge clk); data_in = K'(d); data_rdy = 1;
      @(negedge clk); data_rdy = 0; data_in = K'(d + 7);
      check(data_out_rdy, "data_out_rdy after one clock");
      check(data_out == ref_code(d), $sformatf("code of %0d: %b", d, data_out));
      @(negedge clk);
      check(!data_out_rdy && data_out == ref_code(d), "pulse and hold");
    end
    // back to back, one word per clock
    @(negedge clk); data_in = 5'd1; data_rdy = 1;
    @(negedge clk); data_in = 5'd17;
    check(data_out_rdy && data_out == 16'b0101010101010101, "example 00001");
    @(negedge clk); data_rdy = 0;
    check(data_out_rdy && data_out == 16'b1010101010101010, "antipodal of 00001");
    reset = 1; @(negedge clk); reset = 0;
    check(data_out == '0 && !data_out_rdy, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
