// Testbench for ocode_decoder: all 65,536 possible 16-bit received words
// are streamed in, one per clock, and every output is compared with a
// brute-force minimum-distance reference: decoded word (lowest index on a
// tie), corrected code, minimum count, err, req and parity_err. Checks the two-clock
// latency, and tallies the words whose errors go undetected (those equal to
// a code: 32 of 65,536, a detection rate of 99.95 %), that every word within
// 3 bits of a code decodes to it, and the worked examples 0101010101010101,
// 0101010101011101, 0101010100011101, 0101010100011111 (data 00001 with
// counts 0..3) and 0101011100011111 (a tie).
module ocode_decoder_tb;
  import ocode_ref_pkg::*;

  logic clk = 0, reset = 1, data_rdy = 0;
  logic [N-1:0] data_in = '0;
  logic [K-1:0] data_out;
  logic [N-1:0] p_data;
  logic [4:0] cnt;
  logic err, req, parity_err, data_out_rdy;
  int checks = 0, failures = 0;
  int cyc = 0;

  ocode_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] q_word[$];
  int           q_cyc[$];
  int undetected = 0, corrected = 0, ties = 0, received = 0;

  // Words sent: the worked examples, then every 16-bit value.
  logic [N-1:0] examples [5] = '{16'b0101010101010101, 16'b0101010101011101,
                                 16'b0101010100011101, 16'b0101010100011111,
                                 16'b0101011100011111};

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); reset = 0;
    for (int i = 0; i < 5 + 65536; i++) begin
      data_in  = (i < 5) ? examples[i] : N'(i - 5);
      data_rdy = 1;
      q_word.push_back(data_in); q_cyc.push_back(cyc);
      @(negedge clk);
      if (i == 3) begin data_rdy = 0; @(negedge clk); end   // one gap
    end
    data_rdy = 0;
  end

  initial begin
    logic [N-1:0] w;
    int c;
    dec_t r;
    while (received < 5 + 65536) begin
      @(negedge clk);
      if (data_out_rdy) begin
        w = q_word.pop_front(); c = q_cyc.pop_front();
        r = ref_decode(w);
        checks++;
        if (cyc - c != 2 || data_out != K'(r.idx) || cnt != 5'(r.dmin) ||
            p_data != ref_code(r.idx) || err != (r.dmin != 0) || req != r.tie ||
            parity_err != ^w) begin
          failures++;
          $display("FAIL: word %b: out %0d cnt %0d req %b err %b lat %0d; exp %0d %0d %b",
                   w, data_out, cnt, req, err, cyc - c, r.idx, r.dmin, r.tie);
        end
        if (received < 4) check(data_out == 5'd1 && cnt == 5'(received) && !req,
                                $sformatf("example %0d", received));
        if (received == 4) check(req && cnt == 4, "tie example");
        if (received >= 5) begin
          if (r.dmin == 0) undetected++;
          if (r.dmin >= 1 && r.dmin <= 3) begin
            corrected++;
            check(!req, "at most 3 errors is never a tie");
          end
          if (r.tie) ties++;
        end
        received++;
      end
    end
    check(undetected == M, $sformatf("undetected words %0d", undetected));
    // each code has 1+16+120+560 words within distance 3, none shared
    check(corrected == M * (16 + 120 + 560), $sformatf("corrected words %0d", corrected));
    check(ties > 0, "ties seen");
    $display("undetected %0d of 65536 (detection %0.2f %%), correctable %0d, ambiguous %0d",
             undetected, 100.0 * (65536 - undetected) / 65536.0, corrected, ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
