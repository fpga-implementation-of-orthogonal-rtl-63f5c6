// Testbench for ocode_receiver: codes of random data words, with 0 to 4
// random bit errors, are sent serially with random idle gaps. Each result
// is compared with a brute-force minimum-distance reference, and the
// latency from the cycle of the last bit to data_out_rdy (3 clocks) is
// checked. Also checks the assembled received word on p_data1.
module ocode_receiver_tb;
  import ocode_ref_pkg::*;

  logic clk = 0, reset = 1, data_rdy = 0, data_in = 0;
  logic [N-1:0] p_data1, p_data;
  logic p_data1_rdy, err, req, parity_err, data_out_rdy;
  logic [K-1:0] data_out;
  logic [4:0] cnt;
  int checks = 0, failures = 0;
  int cyc = 0;

  ocode_receiver dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int WORDS = 600;
  logic [N-1:0] q_word[$];
  int           q_cyc[$];
  int nerr_seen[5] = '{0, 0, 0, 0, 0};

  function automatic logic [N-1:0] err_mask(int nerr);
    logic [N-1:0] m = '0;
    while ($countones(m) < nerr) m[$urandom_range(0, N - 1)] = 1'b1;
    return m;
  endfunction

  initial begin
    logic [N-1:0] w;
    int nerr;
    repeat (3) @(posedge clk);
    @(negedge clk); reset = 0;
    for (int n = 0; n < WORDS; n++) begin
      nerr = n % 5;
      nerr_seen[nerr]++;
      w = ref_code($urandom_range(0, M - 1)) ^ err_mask(nerr);
      for (int i = N - 1; i >= 0; i--) begin
        if (n % 3 == 1) repeat ($urandom_range(0, 1)) begin
          data_rdy = 0; data_in = $urandom; @(negedge clk);
        end
        data_rdy = 1; data_in = w[i];
        if (i == 0) begin q_word.push_back(w); q_cyc.push_back(cyc); end
        @(negedge clk);
      end
      data_rdy = 0;
      if (n % 4 == 0) @(negedge clk);
    end
  end

  initial begin
    logic [N-1:0] w;
    int c, got = 0;
    dec_t r;
    while (got < WORDS) begin
      @(negedge clk);
      if (p_data1_rdy) check(p_data1 == q_word[0], "assembled word");
      if (data_out_rdy) begin
        w = q_word.pop_front(); c = q_cyc.pop_front();
        r = ref_decode(w);
        checks++;
        if (cyc - c != 3 || data_out != K'(r.idx) || cnt != 5'(r.dmin) ||
            p_data != ref_code(r.idx) || err != (r.dmin != 0) || req != r.tie ||
            parity_err != ^w) begin
          failures++;
          $display("FAIL: word %b: out %0d cnt %0d req %b lat %0d; exp %0d %0d %b",
                   w, data_out, cnt, req, cyc - c, r.idx, r.dmin, r.tie);
        end
        got++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
