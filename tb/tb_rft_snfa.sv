// tb_rft_snfa: exhaustive self-checking test of the SNFA full adder.
//
// For all eight (a, b, cin) patterns: sum and cout are compared with the
// integer sum a+b+cin, garbage[0] with a^b (the propagate line the carry-skip
// adder relies on), the XOR of all outputs with a^b^cin (parity
// preservation), and all eight output vectors must differ (the circuit keeps
// enough garbage to stay reversible). The quantum cost parameter must be 11.
module tb_rft_snfa;
  logic       a, b, cin, sum, cout;
  logic [2:0] garbage;
  int checks = 0, failures = 0;

  rft_snfa dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .garbage(garbage));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL a=%0b b=%0b cin=%0b: %s", a, b, cin, what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [31:0] seen;
    seen = '0;
    check(dut.QUANTUM_COST == 11, "quantum cost is not 11");
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      check({cout, sum} == 2'(int'(a) + int'(b) + int'(cin)), "sum/carry wrong");
      check(garbage[0] == (a ^ b), "garbage[0] is not a^b");
      check((a ^ b ^ cin) == (^{sum, cout, garbage}), "parity not preserved");
      check(!seen[{sum, cout, garbage}], "output vector repeated");
      seen[{sum, cout, garbage}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
