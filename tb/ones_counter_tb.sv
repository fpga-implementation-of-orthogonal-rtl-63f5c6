// Testbench for ones_counter: counts of edge patterns and random words,
// one-cycle latency of cnt_rdy, hold while data_rdy is low, and reset.
module ones_counter_tb;
  import ocode_ref_pkg::*;

  logic clk = 0, reset = 1, data_rdy = 0;
  logic [N-1:0] data_in = '0;
  logic [4:0] cnt_out;
  logic cnt_rdy;
  int checks = 0, failures = 0;

  ones_counter dut (.*);

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

  task automatic one(logic [N-1:0] v);
    @(negedge clk); data_in = v; data_rdy = 1;
    @(negedge clk); data_rdy = 0;
    check(cnt_rdy == 1, "cnt_rdy one cycle after data_rdy");
    check(cnt_out == 5'(popcnt(v)), $sformatf("count of %b = %0d", v, cnt_out));
    @(negedge clk);
    check(cnt_rdy == 0, "cnt_rdy is a single pulse");
    check(cnt_out == 5'(popcnt(v)), "count held");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); reset = 0;
    check(cnt_out == 0 && cnt_rdy == 0, "reset value");
    one('0); one('1); one(16'h0001); one(16'h8000); one(16'h5555);
    for (int i = 0; i < 200; i++) one(N'($urandom));
    // back-to-back words
    @(negedge clk); data_in = 16'h00FF; data_rdy = 1;
    @(negedge clk); data_in = 16'h0F0F; 
    check(cnt_out == 8 && cnt_rdy, "stream word 1");
    @(negedge clk); data_in = 16'h7FFF;
    check(cnt_out == 8 && cnt_rdy, "stream word 2");
    @(negedge clk); data_rdy = 0;
    check(cnt_out == 15 && cnt_rdy, "stream word 3");
    reset = 1; @(negedge clk); reset = 0;
    check(cnt_out == 0 && cnt_rdy == 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
