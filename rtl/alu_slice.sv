// alu_slice: one 4-bit slice of the bit-slice ALU.
//
// A slice handles a 4-bit field of both operands. It inverts B when
// `b_invert` is set (subtraction), forms per-bit generate G = A & B' and
// propagate P = A ^ B' for the shared look-ahead carry unit, and forms the
// bit-wise XOR, OR, AND and NAND of the field. The result bit is picked by
// the slice function `fn`, which all slices receive in parallel: the sum bit
// P ^ C using the carries handed back by the carry unit, or one of the
// logic functions. NAND is the inverse of AND and is produced by setting
// `invert_out` together with SF_AND.
//
// Interface: a, b, c (carries into each of the four bits) in; g, p, y out.
// The control inputs b_invert, fn and invert_out are common to all slices.
// Purely combinational. The slice width and the split of the carry logic
// into a shared unit follow the usual bit-slice arrangement; the encoding of
// the controls is this design's own.
module alu_slice
  import rapcla_pkg::*;
#(
  parameter int unsigned W = SLICE_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,          // carry into each bit
  input  logic         b_invert,
  input  slice_fn_e    fn,
  input  logic         invert_out,
  output logic [W-1:0] g,
  output logic [W-1:0] p,
  output logic [W-1:0] y
);

  logic [W-1:0] bx;
  logic [W-1:0] f;

  assign bx = b_invert ? ~b : b;
  assign g  = a & bx;
  assign p  = a ^ bx;

  always_comb begin
    unique case (fn)
      SF_SUM: f = p ^ c;
      SF_XOR: f = a ^ bx;
      SF_AND: f = a & bx;
      SF_OR:  f = a | bx;
    endcase
    y = invert_out ? ~f : f;
  end

endmodule
