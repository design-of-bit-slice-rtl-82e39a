// rapcla_pkg: shared types and constants of the RAP-CLA bit-slice processor.
//
// The ALU select code is three bits wide, giving eight result sources P1..P8.
// Code 000 is addition and code 011 is exclusive-OR; the other codes
// (subtraction, multiplication, AND, OR, NAND, and an unused eighth code) are
// this design's assignment, chosen to match the eight ALU result taps and the
// four logic functions (XOR, OR, AND, NAND) that the ALU slices form.
// A micro-instruction of the control ROM holds one ALU operation, the adder
// mode (exact or approximate), the source of operand A and an end-of-program
// flag; that format is this design's own.
package rapcla_pkg;

  // Width of one ALU slice: four bits, as in classic bit-slice parts.
  localparam int unsigned SLICE_W = 4;

  typedef enum logic [2:0] {
    OP_ADD  = 3'b000,  // P1: A + B (17-bit result, zero-extended)
    OP_SUB  = 3'b001,  // P2: A - B (two's complement, sign-extended)
    OP_MUL  = 3'b010,  // P3: A * B (32-bit product)
    OP_XOR  = 3'b011,  // P4: A ^ B
    OP_AND  = 3'b100,  // P5: A & B
    OP_OR   = 3'b101,  // P6: A | B
    OP_NAND = 3'b110,  // P7: ~(A & B)
    OP_NONE = 3'b111   // P8: unused, result is zero
  } alu_op_e;

  // Slice-level function, shared in parallel by all slices.
  typedef enum logic [1:0] {
    SF_SUM  = 2'b00,   // sum bit p ^ c (add and subtract)
    SF_XOR  = 2'b01,
    SF_AND  = 2'b10,
    SF_OR   = 2'b11
  } slice_fn_e;

  // One micro-instruction of the control ROM.
  typedef struct packed {
    logic    last;     // final micro-instruction of the program
    logic    approx;   // 1: adder in approximate mode, 0: exact mode
    logic    src_acc;  // 1: operand A is the accumulator's low half
    alu_op_e op;       // ALU operation
  } uinstr_t;

endpackage
