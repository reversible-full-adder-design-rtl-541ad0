// tb_rft_adder_top: end-to-end test of both 16-bit adders at full size.
//
// Phase 1 replays the operand pairs of the published waveforms: the CLA pairs
// on the CLA-style adder and the carry-skip pairs on the carry-skip adder,
// checking the printed sums. Phase 2 drives both adders with the same random
// and directed operands and checks each against integer addition and against
// the other. On every vector a parity checker compares the XOR of each
// adder's inputs with the XOR of all its output lines; a copy of the output
// with one line flipped must then be flagged, which is the single-fault
// detection that parity preservation buys.
//
// Mechanisms counted (each must occur at least once): carry out of the
// CLA-style adder, a carry rippling through all 16 of its bits, the skip
// path of each of the four carry-skip blocks deciding a carry that is 1, the
// carry skipping all four blocks, carry out of the carry-skip adder, and a
// parity fault being detected on each adder.
module tb_rft_adder_top;
  logic [15:0] cla_a, cla_b, cla_sum, csa_a, csa_b, csa_sum;
  logic        cla_cin, cla_cout, csa_cin, csa_cout;
  logic [47:0] cla_garbage;
  logic [67:0] csa_garbage;
  int checks = 0, failures = 0;

  int n_cla_cout = 0, n_cla_ripple16 = 0, n_csa_cout = 0, n_csa_skip_all = 0;
  int n_cla_fault_seen = 0, n_csa_fault_seen = 0;
  int n_csa_skip [4] = '{default: 0};

  rft_adder_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Drive both adders, check them, count mechanisms.
  task automatic apply(input logic [15:0] la, input logic [15:0] lb, input logic lc,
                       input logic [15:0] sa, input logic [15:0] sb, input logic sc);
    logic [16:0] cla_exp, csa_exp;
    logic [15:0] sp;
    logic [4:0]  carry_in_blk;
    logic [47:0] cla_bad;
    logic [67:0] csa_bad;
    int          flip;
    cla_a = la; cla_b = lb; cla_cin = lc;
    csa_a = sa; csa_b = sb; csa_cin = sc;
    #1;
    cla_exp = 17'(la) + 17'(lb) + 17'(lc);
    csa_exp = 17'(sa) + 17'(sb) + 17'(sc);
    check({cla_cout, cla_sum} == cla_exp, $sformatf("CLA %h+%h+%0b gave %0b_%h", la, lb, lc, cla_cout, cla_sum));
    check({csa_cout, csa_sum} == csa_exp, $sformatf("CSA %h+%h+%0b gave %0b_%h", sa, sb, sc, csa_cout, csa_sum));
    // parity checkers
    check((^{la, lb, lc}) == (^{cla_sum, cla_cout, cla_garbage}), "CLA parity");
    check((^{sa, sb, sc}) == (^{csa_sum, csa_cout, csa_garbage}), "CSA parity");
    flip = int'($urandom_range(47, 0));
    cla_bad = cla_garbage ^ (48'd1 << flip);
    if ((^{la, lb, lc}) != (^{cla_sum, cla_cout, cla_bad})) n_cla_fault_seen++;
    flip = int'($urandom_range(67, 0));
    csa_bad = csa_garbage ^ (68'd1 << flip);
    if ((^{sa, sb, sc}) != (^{csa_sum, csa_cout, csa_bad})) n_csa_fault_seen++;
    // mechanisms
    if (cla_cout) n_cla_cout++;
    if (((la ^ lb) == 16'hffff) && lc) n_cla_ripple16++;
    if (csa_cout) n_csa_cout++;
    sp = sa ^ sb;
    carry_in_blk[0] = sc;
    for (int k = 0; k < 4; k++) begin
      carry_in_blk[k+1] = 1'((int'(sa[4*k +: 4]) + int'(sb[4*k +: 4]) + int'(carry_in_blk[k])) >> 4);
      if (sp[4*k +: 4] == 4'hf && carry_in_blk[k]) n_csa_skip[k]++;
    end
    if (sp == 16'hffff && sc) n_csa_skip_all++;
  endtask

  // waveform operand pairs {a, b, cin, printed sum}
  localparam logic [48:0] CLA_FIG [7] = '{
    {16'hB500, 16'h4200, 1'b0, 16'hF700}, {16'hB580, 16'h5200, 1'b0, 16'h0780},
    {16'hB5A0, 16'h52A0, 1'b0, 16'h0840}, {16'hAD62, 16'h5AA0, 1'b0, 16'h0802},
    {16'hA962, 16'h3AA0, 1'b0, 16'hE402}, {16'h3172, 16'h7AA0, 1'b1, 16'hAC13},
    {16'h7972, 16'h7AA0, 1'b1, 16'hF413}};
  localparam logic [48:0] CSA_FIG [6] = '{
    {16'hB80A, 16'h14C8, 1'b0, 16'hCCD2}, {16'h6C8A, 16'h37EC, 1'b0, 16'hA476},
    {16'h444A, 16'h17EC, 1'b0, 16'h5C36}, {16'h36EA, 16'h3FEC, 1'b1, 16'h76D7},
    {16'h1EEA, 16'h37FC, 1'b1, 16'h56E7}, {16'h1ECA, 16'h27FC, 1'b1, 16'h46C7}};

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    // Phase 1: the waveform operand pairs
    for (int i = 0; i < 7; i++) begin
      automatic int j = i % 6;
      apply(CLA_FIG[i][48:33], CLA_FIG[i][32:17], CLA_FIG[i][16],
            CSA_FIG[j][48:33], CSA_FIG[j][32:17], CSA_FIG[j][16]);
      check(cla_sum == CLA_FIG[i][15:0], $sformatf("CLA waveform vector %0d", i));
      check(csa_sum == CSA_FIG[j][15:0], $sformatf("CSA waveform vector %0d", j));
    end
    // Phase 2: both adders on the same operands
    for (int i = 0; i < 30000; i++) begin
      automatic logic [15:0] ra = 16'($urandom);
      automatic logic        rc = 1'($urandom);
      automatic logic [15:0] rb;
      // every fourth vector makes some 4-bit groups all-propagate
      rb = (i % 4 == 0) ? (~ra ^ (16'($urandom) & 16'($urandom) & 16'($urandom))) : 16'($urandom);
      apply(ra, rb, rc, ra, rb, rc);
      check({cla_cout, cla_sum} == {csa_cout, csa_sum}, "CLA and CSA disagree");
    end
    apply(16'hffff, 16'h0000, 1'b1, 16'hffff, 16'h0000, 1'b1);
    apply(16'h5555, 16'haaaa, 1'b1, 16'h5555, 16'haaaa, 1'b1);

    check(n_cla_cout > 0, "CLA carry out never set");
    check(n_cla_ripple16 > 0, "CLA 16-bit ripple never happened");
    check(n_csa_cout > 0, "CSA carry out never set");
    for (int k = 0; k < 4; k++) check(n_csa_skip[k] > 0, $sformatf("CSA block %0d never skipped a carry", k));
    check(n_csa_skip_all > 0, "CSA carry never skipped all four blocks");
    check(n_cla_fault_seen > 0 && n_csa_fault_seen > 0, "parity checker never flagged a fault");
    $display("CLA: carry out %0d, 16-bit ripple %0d, faults flagged %0d",
             n_cla_cout, n_cla_ripple16, n_cla_fault_seen);
    $display("CSA: carry out %0d, skips per block %0d %0d %0d %0d, skip all %0d, faults flagged %0d",
             n_csa_cout, n_csa_skip[0], n_csa_skip[1], n_csa_skip[2], n_csa_skip[3],
             n_csa_skip_all, n_csa_fault_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
