// Testbench for ocode_lut: every address against the reference table, the
// worked example 00001 -> 0101010101010101, zero parity of every code, and
// the distance structure (antipodal pairs at n, all other pairs at n/2).
module ocode_lut_tb;
  import ocode_ref_pkg::*;

  logic [K-1:0] addr;
  logic [N-1:0] code;
  logic [N-1:0] tbl [M];
  int checks = 0, failures = 0;

  ocode_lut dut (.addr(addr), .code(code));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < M; d++) begin
      addr = K'(d);
      #1;
      tbl[d] = code;
      check(code == ref_code(d), $sformatf("addr %0d code %b exp %b", d, code, ref_code(d)));
      check(^code == 1'b0, $sformatf("addr %0d parity not zero", d));
    end
    check(tbl[1] == 16'b0101_0101_0101_0101, "example 00001");
    for (int a = 0; a < M; a++)
      for (int b = a + 1; b < M; b++)
        check(popcnt(tbl[a] ^ tbl[b]) == ((b == a + N) ? N : N / 2),
              $sformatf("distance %0d-%0d", a, b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
