// rapcla_adder: N-bit reconfigurable approximate carry look-ahead adder.
//
// Each bit forms generate G = A & B and propagate P = A ^ B (the split full
// adder of a carry look-ahead adder); rapcla_carry turns them into carries,
// exact or approximate according to `approx`, and the sum bit is P ^ C.
// The carry-out is C(N). In exact mode the result equals A + B + Cin.
// In approximate mode every carry sees only the W bits below it and the
// carry-in is ignored.
//
// Interface: a, b (N bits), cin, approx in; sum (N bits), cout out.
// APX_BITS limits the reconfigurable carries to C(1) .. C(APX_BITS); the
// carries above are always exact (partitioned adder).
// Purely combinational. N = 16 follows the 16-bit operands of the
// processor; W = 4 is this design's choice.
module rapcla_adder #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 4,
  parameter int unsigned APX_BITS = N   // reconfigurable low-order carries
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  input  logic         approx,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N-1:0] g, p;
  logic [N:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  rapcla_carry #(.N(N), .W(W), .APX_BITS(APX_BITS)) u_carry (
    .g(g), .p(p), .cin(cin), .approx(approx),
    .c(c), .c_apx(), .c_aug()
  );

  assign sum  = p ^ c[N-1:0];
  assign cout = c[N];

endmodule
