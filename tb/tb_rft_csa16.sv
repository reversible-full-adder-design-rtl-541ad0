// tb_rft_csa16: self-checking test of the 16-bit carry-skip adder.
//
// Applies the operand pairs shown in the published simulation waveforms
// (six operand pairs of the carry-skip waveform), a set of carry-chain corner cases (carry rippling through all 16
// bits, all-ones operands, zero), and 20000 random operand pairs. Each result
// is compared with integer addition; the XOR of all output lines (sum, carry
// out, garbage) must equal the XOR of a, b and cin, which is what lets a
// parity checker detect a single faulty line. The quantum cost must be 264.
module tb_rft_csa16;
  logic [15:0] a, b, sum;
  logic        cin, cout;
  logic [67:0] garbage;
  int checks = 0, failures = 0;

  typedef struct packed {
    logic [15:0] a;
    logic [15:0] b;
    logic        cin;
    logic [15:0] sum;
    logic        cout;
  } vec_t;

  rft_csa16 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .garbage(garbage));

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
    fig = '{{16'hB80A, 16'h14C8, 1'b0, 16'hCCD2, 1'b0}, {16'h6C8A, 16'h37EC, 1'b0, 16'hA476, 1'b0}, {16'h444A, 16'h17EC, 1'b0, 16'h5C36, 1'b0}, {16'h36EA, 16'h3FEC, 1'b1, 16'h76D7, 1'b0}, {16'h1EEA, 16'h37FC, 1'b1, 16'h56E7, 1'b0}, {16'h1ECA, 16'h27FC, 1'b1, 16'h46C7, 1'b0}};
    check(dut.QUANTUM_COST == 264, "quantum cost");
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
