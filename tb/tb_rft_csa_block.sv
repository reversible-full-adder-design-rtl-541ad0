// tb_rft_csa_block: exhaustive self-checking test of the carry-skip block.
//
// The 4-bit block (the published size) gets all 512 (a, b, cin) patterns; a
// 2-bit and a 1-bit instance get all of theirs, to exercise the parameter.
// Checked against integer addition: sum and carry out. Also checked: parity
// preservation over all lines, that the skip multiplexer's pass-through line
// (garbage[4N-2]) equals the block propagate worked out here from a^b, the
// garbage count 4N+1 and the quantum cost 16N+2 (66 at N=4). Counts how often
// the skip path decided the carry out (all bits propagating).
module tb_rft_csa_block;
  int checks = 0, failures = 0, skips = 0;

  logic [3:0] a4, b4, s4;  logic c4, co4;  logic [16:0] g4;
  logic [1:0] a2, b2, s2;  logic c2, co2;  logic [8:0]  g2;
  logic [0:0] a1, b1, s1;  logic c1, co1;  logic [4:0]  g1;

  rft_csa_block #(.N(4)) dut4 (.a(a4), .b(b4), .cin(c4), .sum(s4), .cout(co4), .garbage(g4));
  rft_csa_block #(.N(2)) dut2 (.a(a2), .b(b2), .cin(c2), .sum(s2), .cout(co2), .garbage(g2));
  rft_csa_block #(.N(1)) dut1 (.a(a1), .b(b1), .cin(c1), .sum(s1), .cout(co1), .garbage(g1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    check(dut4.QUANTUM_COST == 66, "N=4 quantum cost is not 66");
    check(dut4.GARBAGE == 17 && dut2.GARBAGE == 9, "garbage count");
    for (int v = 0; v < 512; v++) begin
      {a4, b4, c4} = 9'(v);
      #1;
      check({co4, s4} == 5'(int'(a4) + int'(b4) + int'(c4)),
            $sformatf("N=4 %h+%h+%0b gave %0b_%h", a4, b4, c4, co4, s4));
      check((^{a4, b4, c4}) == (^{s4, co4, g4}), "N=4 parity");
      check(g4[14] == ((a4 ^ b4) == 4'hf), "N=4 block propagate line");
      if ((a4 ^ b4) == 4'hf) skips++;
    end
    for (int v = 0; v < 32; v++) begin
      {a2, b2, c2} = 5'(v);
      #1;
      check({co2, s2} == 3'(int'(a2) + int'(b2) + int'(c2)), "N=2 sum");
      check((^{a2, b2, c2}) == (^{s2, co2, g2}), "N=2 parity");
    end
    for (int v = 0; v < 8; v++) begin
      {a1, b1, c1} = 3'(v);
      #1;
      check({co1, s1} == 2'(int'(a1) + int'(b1) + int'(c1)), "N=1 sum");
      check((^{a1, b1, c1}) == (^{s1, co1, g1}), "N=1 parity");
    end
    check(skips == 32, $sformatf("expected 32 skip patterns, saw %0d", skips));
    $display("skip path taken in %0d of 512 patterns", skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
