// bitslice_processor: RAP-CLA based bit-slice processor (top level).
//
// A 16-bit ALU built from four 4-bit slices and a shared reconfigurable
// approximate carry look-ahead unit (bitslice_alu) is controlled by a
// micro-sequencer that reads micro-instructions from a control ROM. Each
// micro-instruction selects the ALU operation, the adder mode (exact or
// approximate) and whether operand A is the external operand or the low half
// of the 32-bit accumulator; the ALU result is written to the accumulator
// every step, so a micro-program can chain operations (for example multiply
// then add).
//
// Operation: with the processor idle, pulse `start` with the operands on
// `a`, `b` and the program's first ROM address on `instr`. The operands are
// latched at that edge. A K-word program raises `done` for one cycle after
// K further edges, with the final value on `result`. With the default ROM
// contents, `instr` = {approx, sel} runs the single operation `sel` in the
// chosen mode, with `done` one edge after `start`.
// `prog_we`, `prog_addr`, `prog_data` write the control ROM.
//
// Operands and result widths (16 and 32 bits) and the four-slice
// organisation follow the source; the register set, the accumulator feedback
// and the start/done handshake are this design's choices.
module bitslice_processor
  import rapcla_pkg::*;
#(
  parameter int unsigned SLICES    = 4,
  parameter int unsigned W         = 4,
  parameter int unsigned APX_BITS  = SLICES * SLICE_W,
  parameter int unsigned ROM_DEPTH = 16,
  localparam int unsigned WIDTH    = SLICES * SLICE_W,
  localparam int unsigned AW       = $clog2(ROM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [AW-1:0]      instr,
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] result,
  output logic               busy,
  output logic               done,
  input  logic               prog_we,
  input  logic [AW-1:0]      prog_addr,
  input  uinstr_t            prog_data
);

  logic [WIDTH-1:0]   a_reg, b_reg;
  logic [2*WIDTH-1:0] acc;
  logic [AW-1:0]      rom_addr;
  uinstr_t            rom_data, ctrl;
  logic               exec;
  logic [WIDTH-1:0]   alu_a;
  logic [2*WIDTH-1:0] alu_out;

  control_rom #(.DEPTH(ROM_DEPTH)) u_rom (
    .clk(clk), .rst_n(rst_n),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data),
    .raddr(rom_addr), .rdata(rom_data)
  );

  micro_sequencer #(.AW(AW)) u_seq (
    .clk(clk), .rst_n(rst_n),
    .start(start), .start_addr(instr),
    .rom_addr(rom_addr), .rom_data(rom_data),
    .ctrl(ctrl), .exec(exec), .busy(busy), .done(done)
  );

  assign alu_a = ctrl.src_acc ? acc[WIDTH-1:0] : a_reg;

  bitslice_alu #(.SLICES(SLICES), .W(W), .APX_BITS(APX_BITS)) u_alu (
    .a(alu_a), .b(b_reg), .sel(ctrl.op), .approx(ctrl.approx),
    .alu_out(alu_out), .cout()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_reg <= '0;
      b_reg <= '0;
      acc   <= '0;
    end else begin
      if (start && !busy) begin
        a_reg <= a;
        b_reg <= b;
      end
      if (exec) acc <= alu_out;
    end
  end

  assign result = acc;

endmodule
