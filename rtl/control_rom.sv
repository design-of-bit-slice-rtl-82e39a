// control_rom: control store of the micro-sequenced bit-slice processor.
//
// DEPTH words of one micro-instruction each (rapcla_pkg::uinstr_t). Reads
// are asynchronous. On reset the store takes its default program: word k
// (k < 8) is the single-step program "operation k, exact mode", word k + 8
// is "operation k, approximate mode", so the address of a one-step
// instruction is {mode, select}. A write port lets the host load longer
// micro-programs after reset. The store's size, the default contents and
// the write port are this design's choices; the source names a control ROM
// or micro-sequencer as the source of the slices' control signals.
//
// Interface: clk, rst_n, we, waddr, wdata in; raddr in, rdata out.
// Writes take effect at the rising clock edge.
module control_rom
  import rapcla_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  uinstr_t       wdata,
  input  logic [AW-1:0] raddr,
  output uinstr_t       rdata
);

  uinstr_t mem [DEPTH];

  function automatic uinstr_t default_word(int unsigned k);
    uinstr_t w;
    w.last    = 1'b1;
    w.approx  = ((k / 8) % 2) == 1;
    w.src_acc = 1'b0;
    w.op      = alu_op_e'(k % 8);
    return w;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < DEPTH; k++) mem[k] <= default_word(k);
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];

endmodule
