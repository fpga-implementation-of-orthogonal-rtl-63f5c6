// Testbench for ocode_transmitter: every data word is offered as soon as
// `ready` allows; the serial stream is reassembled and compared with the
// reference code, and the word period (N+1 clocks) and the latency from
// acceptance to first bit (2 clocks) are checked.
module ocode_transmitter_tb;
  import ocode_ref_pkg::*;

  logic clk = 0, reset = 1, data_rdy = 0;
  logic [K-1:0] data_in = '0;
  logic ready, p_data_rdy, data_out, data_out_rdy;
  logic [N-1:0] p_data;
  int checks = 0, failures = 0;
  int cyc = 0;

  ocode_transmitter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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

  int acc_cyc[$];
  int acc_dat[$];

  // Source: offer words 0..M-1, then 00001 again, whenever ready. All
  // sampling is done at the falling edge; `cyc` then equals the number of
  // rising edges so far.
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); reset = 0;
    for (int d = 0; d <= M; d++) begin
      while (!ready) @(negedge clk);
      data_in = K'(d == M ? 1 : d); data_rdy = 1;
      acc_cyc.push_back(cyc + 1); acc_dat.push_back(d == M ? 1 : d);
      @(negedge clk);
      data_rdy = 0;
      if (d[1]) repeat (d % 3) @(negedge clk);   // some idle time
    end
  end

  // Sink: collect bits and compare.
  initial begin
    logic [N-1:0] w;
    int first;
    int prev_first = -1;
    int ac, ad;
    int b2b = 0;
    for (int n = 0; n <= M; n++) begin
      for (int i = N - 1; i >= 0; i--) begin
        @(negedge clk);
        while (!data_out_rdy) @(negedge clk);
        if (i == N - 1) first = cyc;
        w[i] = data_out;
      end
      ac = acc_cyc.pop_front(); ad = acc_dat.pop_front();
      check(w == ref_code(ad), $sformatf("word %0d sent as %b", ad, w));
      check(first - ac == 2, $sformatf("latency %0d", first - ac));
      if (n > 0 && ac - prev_first == N - 1) begin
        b2b++;
        check(first - prev_first == N + 1, $sformatf("back-to-back period %0d", first - prev_first));
      end
      prev_first = first;
    end
    check(w == 16'b0101010101010101, "example 00001");
    check(b2b > 0, "back-to-back words seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
