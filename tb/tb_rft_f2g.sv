// tb_rft_f2g: exhaustive self-checking test of the Feynman double gate (P=A, Q=A^B, R=A^C).
//
// All eight input patterns are applied. Each output is compared with the
// gate's truth table written out by hand below, and two properties that make
// the gate usable in a fault-tolerant reversible circuit are checked: the
// mapping is a bijection (no two inputs give the same output) and it
// preserves parity (a^b^c == p^q^r).
module tb_rft_f2g;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  // expected {p,q,r} for {a,b,c} = 0..7
  localparam logic [2:0] EXPECTED [8] = '{3'b000, 3'b001, 3'b010, 3'b011, 3'b111, 3'b110, 3'b101, 3'b100};

  rft_f2g dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [7:0] seen;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== EXPECTED[v]) begin
        failures++;
        $display("FAIL abc=%03b: pqr=%03b expected %03b", 3'(v), {p, q, r}, EXPECTED[v]);
      end
      checks++;
      if ((a ^ b ^ c) != (p ^ q ^ r)) begin
        failures++;
        $display("FAIL abc=%03b: parity not preserved", 3'(v));
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL abc=%03b: output %03b already produced", 3'(v), {p, q, r});
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
