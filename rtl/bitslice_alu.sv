// bitslice_alu: 16-bit ALU of the bit-slice processor.
//
// The word is cut into SLICES identical 4-bit alu_slice modules whose
// control lines (B inversion, slice function, output inversion) are wired in
// parallel. The slices hand their per-bit generate and propagate signals to
// one shared RAP-CLA carry unit (rapcla_carry), which returns the carry into
// every bit, exact or approximate according to `approx`. Add and subtract
// use that path (subtract inverts B and sets the carry-in); the logic
// functions come straight from the slices; the product comes from a
// rapcla_multiplier that uses the same adder mode.
//
// The 3-bit select `sel` picks one of eight results P1..P8 onto the 32-bit
// output `alu_out`: add (000) and XOR (011) are the documented codes, the
// rest is this design's assignment (see rapcla_pkg). Add gives the 17-bit
// sum zero-extended, subtract gives A - B sign-extended, logic results are
// zero-extended, code 111 gives zero.
//
// Interface: a, b (WIDTH bits), sel, approx in; alu_out (2*WIDTH bits),
// cout (carry-out of the adder path) out. Purely combinational.
module bitslice_alu
  import rapcla_pkg::*;
#(
  parameter int unsigned SLICES = 4,
  parameter int unsigned W      = 4,               // RAP-CLA window
  parameter int unsigned APX_BITS = SLICES * SLICE_W, // reconfigurable carries
  localparam int unsigned WIDTH = SLICES * SLICE_W
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  alu_op_e            sel,
  input  logic               approx,
  output logic [2*WIDTH-1:0] alu_out,
  output logic               cout
);

  // Control lines shared by all slices.
  logic      b_invert;
  slice_fn_e fn;
  logic      invert_out;

  always_comb begin
    b_invert   = 1'b0;
    fn         = SF_SUM;
    invert_out = 1'b0;
    unique case (sel)
      OP_ADD:  fn = SF_SUM;
      OP_SUB:  begin fn = SF_SUM; b_invert = 1'b1; end
      OP_XOR:  fn = SF_XOR;
      OP_AND:  fn = SF_AND;
      OP_OR:   fn = SF_OR;
      OP_NAND: begin fn = SF_AND; invert_out = 1'b1; end
      default: fn = SF_SUM;
    endcase
  end

  logic [WIDTH-1:0] g, p, y;
  logic [WIDTH:0]   c;

  for (genvar s = 0; s < SLICES; s++) begin : g_slice
    alu_slice #(.W(SLICE_W)) u_slice (
      .a         (a[s*SLICE_W +: SLICE_W]),
      .b         (b[s*SLICE_W +: SLICE_W]),
      .c         (c[s*SLICE_W +: SLICE_W]),
      .b_invert  (b_invert),
      .fn        (fn),
      .invert_out(invert_out),
      .g         (g[s*SLICE_W +: SLICE_W]),
      .p         (p[s*SLICE_W +: SLICE_W]),
      .y         (y[s*SLICE_W +: SLICE_W])
    );
  end

  rapcla_carry #(.N(WIDTH), .W(W), .APX_BITS(APX_BITS)) u_carry (
    .g(g), .p(p), .cin(b_invert), .approx(approx),
    .c(c), .c_apx(), .c_aug()
  );

  logic [2*WIDTH-1:0] prod;

  rapcla_multiplier #(.N(WIDTH), .W(W), .APX_BITS(APX_BITS)) u_mul (
    .a(a), .b(b), .approx(approx), .prod(prod)
  );

  assign cout = c[WIDTH];

  always_comb begin
    unique case (sel)
      OP_ADD:  alu_out = {{(WIDTH-1){1'b0}}, c[WIDTH], y};
      OP_SUB:  alu_out = {{WIDTH{~c[WIDTH]}}, y};
      OP_MUL:  alu_out = prod;
      OP_XOR, OP_AND, OP_OR, OP_NAND:
               alu_out = {{WIDTH{1'b0}}, y};
      default: alu_out = '0;
    endcase
  end

endmodule
