// rft_adder_top: the two 16-bit reversible fault-tolerant adders side by side.
//
// The CLA-style adder (rft_cla16, quantum cost 176, 48 garbage lines) and the
// carry-skip adder (rft_csa16, quantum cost 264, 68 garbage lines) are
// alternatives built from the same SNFA full adder. They share nothing, so
// each has its own operands, carry in, sum, carry out and garbage lines; the
// garbage lines are brought out so a checker can compare input and output
// parity. Combinational, no clock or reset; both run at their 16-bit sizes.
module rft_adder_top (
  input  logic [15:0] cla_a,
  input  logic [15:0] cla_b,
  input  logic        cla_cin,
  output logic [15:0] cla_sum,
  output logic        cla_cout,
  output logic [47:0] cla_garbage,
  input  logic [15:0] csa_a,
  input  logic [15:0] csa_b,
  input  logic        csa_cin,
  output logic [15:0] csa_sum,
  output logic        csa_cout,
  output logic [67:0] csa_garbage
);
  rft_cla16 u_cla (
    .a(cla_a), .b(cla_b), .cin(cla_cin),
    .sum(cla_sum), .cout(cla_cout), .garbage(cla_garbage)
  );

  rft_csa16 u_csa (
    .a(csa_a), .b(csa_b), .cin(csa_cin),
    .sum(csa_sum), .cout(csa_cout), .garbage(csa_garbage)
  );
endmodule
