// tb_rft_cla_block: exhaustive self-checking test of the SNFA chain adder.
//
// The 4-bit block (the published size) and a 3-bit instance get every
// (a, b, cin) pattern. Checked against integer addition: sum and carry out;
// also parity preservation over all lines, that garbage[3i] carries a_i^b_i,
// the garbage count 3N and the quantum cost 11N (44 at N=4).
module tb_rft_cla_block;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4, s4;  logic c4, co4;  logic [11:0] g4;
  logic [2:0] a3, b3, s3;  logic c3, co3;  logic [8:0]  g3;

  rft_cla_block #(.N(4)) dut4 (.a(a4), .b(b4), .cin(c4), .sum(s4), .cout(co4), .garbage(g4));
  rft_cla_block #(.N(3)) dut3 (.a(a3), .b(b3), .cin(c3), .sum(s3), .cout(co3), .garbage(g3));

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
    check(dut4.QUANTUM_COST == 44, "N=4 quantum cost is not 44");
    for (int v = 0; v < 512; v++) begin
      {a4, b4, c4} = 9'(v);
      #1;
      check({co4, s4} == 5'(int'(a4) + int'(b4) + int'(c4)),
            $sformatf("N=4 %h+%h+%0b gave %0b_%h", a4, b4, c4, co4, s4));
      check((^{a4, b4, c4}) == (^{s4, co4, g4}), "N=4 parity");
      check({g4[9], g4[6], g4[3], g4[0]} == (a4 ^ b4), "N=4 propagate lines");
    end
    for (int v = 0; v < 128; v++) begin
      {a3, b3, c3} = 7'(v);
      #1;
      check({co3, s3} == 4'(int'(a3) + int'(b3) + int'(c3)), "N=3 sum");
      check((^{a3, b3, c3}) == (^{s3, co3, g3}), "N=3 parity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
