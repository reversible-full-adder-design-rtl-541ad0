// tb_rft_cla16: self-checking test of the 16-bit CLA-style adder.
//
// Applies the operand pairs shown in the published simulation waveforms
// (seven operand pairs of the CLA waveform), a set of carry-chain corner cases (carry rippling through all 16
// bits, all-ones operands, zero), and 20000 random operand pairs. Each result
// is compared with integer addition; the XOR of all output lines (sum, carry
// out, garbage) must equal the XOR of a, b and cin, which is what lets a
// parity checker detect a single faulty line. The quantum cost must be 176.
module tb_rft_cla16;
  logic [15:0] a, b, sum;
  logic        cin, cout;
  logic [47:0] garbage;
  int checks = 0, failures = 0;

  typedef struct packed {
    logic [15:0] a;
    logic [15:0] b;
    logic        cin;
    logic [15:0] sum;
    logic        cout;
  } vec_t;

  rft_cla16 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .garbage(garbage));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic apply(input logic [15:0] va, input logic [15:0] vb, input logic vc);
    logic [16:0] expect_v;
    a = va; b = vb; cin = vc;
    #1;
    expect_v = 17'(va) + 17'(vb) + 17'(vc);
    check({cout, sum} == expect_v,
          $sformatf("%h+%h+%0b gave %0b_%h expected %0b_%h", va, vb, vc, cout, sum,
                     expect_v[16], expect_v[15:0]));
    check((^{va, vb, vc}) == (^{sum, cout, garbage}), "parity not preserved");
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    vec_t fig [$];
    fig = '{{16'hB500, 16'h4200, 1'b0, 16'hF700, 1'b0}, {16'hB580, 16'h5200, 1'b0, 16'h0780, 1'b1}, {16'hB5A0, 16'h52A0, 1'b0, 16'h0840, 1'b1}, {16'hAD62, 16'h5AA0, 1'b0, 16'h0802, 1'b1}, {16'hA962, 16'h3AA0, 1'b0, 16'hE402, 1'b0}, {16'h3172, 16'h7AA0, 1'b1, 16'hAC13, 1'b0}, {16'h7972, 16'h7AA0, 1'b1, 16'hF413, 1'b0}};
    check(dut.QUANTUM_COST == 176, "quantum cost");
    // waveform vectors: the printed sum must match, as well as the arithmetic
    foreach (fig[i]) begin
      apply(fig[i].a, fig[i].b, fig[i].cin);
      check({cout, sum} == {fig[i].cout, fig[i].sum},
            $sformatf("waveform vector %0d: %h+%h gave %h", i, fig[i].a, fig[i].b, sum));
    end
    apply(16'hffff, 16'h0000, 1'b1);
    apply(16'h0000, 16'hffff, 1'b1);
    apply(16'hffff, 16'hffff, 1'b1);
    apply(16'hffff, 16'hffff, 1'b0);
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'h8000, 16'h8000, 1'b0);
    apply(16'h0fff, 16'h0001, 1'b0);
    for (int i = 0; i < 16; i++) apply(16'hffff >> i, 16'h0001, 1'b0);
    for (int i = 0; i < 20000; i++) apply(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
