// End-to-end testbench for ocode_top at its default size (k = 5, n = 16).
//
// Sends every data word as soon as the link is ready, corrupting chosen
// line bits through chan_flip, and checks every decoded result against a
// brute-force minimum-distance reference and, where at most 3 bits were
// flipped, against the word that was sent. It replays the five worked cases
// of data 00001: received 0101010101010101 (count 0), 0101010101011101
// (count 1), 0101010100011101 (count 2), 0101010100011111 (count 3) and
// 0101011100011111 (tie, req). Mechanisms counted, each required at least
// once: clean decode, correction of 1, 2 and 3 errors, ambiguous minimum
// (req), back-to-back words at the N+1 clock period, an odd error count
// flagged by the receive-side parity and an even one that parity misses but
// the count reveals. Also checks the
// transmitted code p_data_tx, the end-to-end latency of N+5 clocks from
// offering a word to data_out_rdy, and that reset mid-word restarts the
// link cleanly.
module ocode_top_tb;
  import ocode_ref_pkg::*;

  logic clk = 0, reset = 1, data_rdy = 0, chan_flip = 0;
  logic [K-1:0] data = '0;
  logic ready, p_data_tx_rdy, line_bit, line_rdy, p_data1_rdy;
  logic err, req, parity_err, data_out_rdy;
  logic [N-1:0] p_data_tx, p_data1, p_data;
  logic [K-1:0] data_out;
  logic [4:0] cnt;
  int checks = 0, failures = 0;
  int cyc = 0;

  ocode_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int           d;      // data word sent
    logic [N-1:0] mask;   // line bits to flip
    int           c;      // cycle the word was offered and taken
  } job_t;

  job_t jobs[$];      // to send
  job_t flight[$];    // sent, awaiting line bits
  job_t pending[$];   // awaiting result

  int n_clean = 0, n_corr[4] = '{0, 0, 0, 0}, n_tie = 0, n_b2b = 0;
  int n_par = 0, n_even_err = 0;
  int last_offer = -100;

  function automatic logic [N-1:0] rand_mask(int nerr);
    logic [N-1:0] m = '0;
    while ($countones(m) < nerr) m[$urandom_range(0, N - 1)] = 1'b1;
    return m;
  endfunction

  // Source: offers each job as soon as `ready` is high (falling-edge
  // sampling: `cyc` is the number of rising edges so far).
  task automatic run_jobs();
    job_t j;
    while (jobs.size() > 0) begin
      @(negedge clk);
      if (ready) begin
        j = jobs.pop_front();
        j.c = cyc;
        data = K'(j.d); data_rdy = 1;
        flight.push_back(j);
        if (cyc - last_offer == N + 1) n_b2b++;
        last_offer = cyc;
        @(negedge clk);
        data_rdy = 0;
        check(p_data_tx_rdy && p_data_tx == ref_code(j.d), $sformatf("tx code of %0d", j.d));
      end
    end
  endtask

  // Channel: flip the masked bits of the word now on the line.
  int bit_idx = N - 1;
  always @(negedge clk) begin
    chan_flip = (flight.size() > 0) ? flight[0].mask[bit_idx] : 1'b0;
  end
  always @(posedge clk) begin
    if (!reset && line_rdy) begin
      if (bit_idx == 0) begin
        bit_idx <= N - 1;
        pending.push_back(flight.pop_front());
      end else bit_idx <= bit_idx - 1;
    end
  end

  // Sink: check every result.
  always @(negedge clk) begin
    if (!reset && data_out_rdy) begin
      job_t j;
      logic [N-1:0] rx;
      dec_t r;
      int e;
      j  = pending.pop_front();
      rx = ref_code(j.d) ^ j.mask;
      r  = ref_decode(rx);
      e  = $countones(j.mask);
      check(p_data1 == rx, $sformatf("received word %b exp %b", p_data1, rx));
      check(cyc - j.c == N + 5, $sformatf("latency %0d", cyc - j.c));
      check(data_out == K'(r.idx) && cnt == 5'(r.dmin) && req == r.tie &&
            err == (r.dmin != 0) && p_data == ref_code(r.idx),
            $sformatf("decode of %b: %0d cnt %0d req %b", rx, data_out, cnt, req));
      if (e <= 3) begin
        check(data_out == K'(j.d) && cnt == 5'(e) && !req && p_data == ref_code(j.d),
              $sformatf("data %0d with %0d errors not recovered", j.d, e));
        if (e == 0) n_clean++; else n_corr[e]++;
      end
      check(parity_err == (e % 2 == 1), $sformatf("parity_err with %0d errors", e));
      if (parity_err) n_par++;
      if (err && !parity_err) n_even_err++;
      if (req) n_tie++;
    end
  end

  initial begin
    logic [N-1:0] c1;
    c1 = ref_code(1);
    repeat (3) @(posedge clk);
    @(negedge clk); reset = 0;

    // The five worked cases, data 00001.
    jobs.push_back('{1, c1 ^ 16'b0101010101010101, 0});
    jobs.push_back('{1, c1 ^ 16'b0101010101011101, 0});
    jobs.push_back('{1, c1 ^ 16'b0101010100011101, 0});
    jobs.push_back('{1, c1 ^ 16'b0101010100011111, 0});
    jobs.push_back('{1, c1 ^ 16'b0101011100011111, 0});
    run_jobs();
    wait (pending.size() == 0 && flight.size() == 0);
    repeat (4) @(negedge clk);
    check(n_clean == 1 && n_corr[1] == 1 && n_corr[2] == 1 && n_corr[3] == 1 && n_tie == 1,
          "worked cases");

    // Every data word with 0..4 random errors.
    for (int e = 0; e <= 4; e++)
      for (int d = 0; d < M; d++) jobs.push_back('{d, rand_mask(e), 0});
    run_jobs();

    // Reset in the middle of a word, then the link must work again.
    wait (flight.size() > 0 && bit_idx < 8);
    @(negedge clk); reset = 1;
    flight.delete(); pending.delete();
    @(negedge clk); reset = 0;
    bit_idx = N - 1;
    for (int d = 0; d < M; d++) jobs.push_back('{d, rand_mask(d % 4), 0});
    run_jobs();
    wait (pending.size() == 0 && flight.size() == 0);
    repeat (5) @(negedge clk);

    $display("clean %0d, corrected 1/2/3-bit %0d/%0d/%0d, ambiguous %0d, back-to-back %0d, parity %0d, even-error %0d",
             n_clean, n_corr[1], n_corr[2], n_corr[3], n_tie, n_b2b, n_par, n_even_err);
    check(n_clean > 0, "clean decode seen");
    check(n_corr[1] > 0 && n_corr[2] > 0 && n_corr[3] > 0, "1, 2 and 3 bit corrections seen");
    check(n_tie > 0, "ambiguous minimum (req) seen");
    check(n_par > 0, "odd error count caught by receive-side parity");
    check(n_even_err > 0, "even error count missed by parity, caught by the count");
    check(n_b2b > 0, "back-to-back words seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
