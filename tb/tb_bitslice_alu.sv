// tb_bitslice_alu: checks the 16-bit bit-slice ALU (four slices, shared
// RAP-CLA carry unit, multiplier) for every select code in both adder modes.
// Expected values: the operand pairs and results of the two published ALU
// waveforms (A = 93FF, B = 198F: difference 7A70, product 0EC69271, NAND
// EE70; A = 29C5, B = 81A5: XOR A860, product 152730F9), plain SystemVerilog
// operators in exact mode, and the scanning reference in approximate mode.
// A second instance with two slices (8-bit word) checks that the slice count
// scales the word: exact-mode results against plain operators.
module tb_bitslice_alu;
  import rapcla_pkg::*;
  import rapcla_ref_pkg::*;

  localparam int N = 16, W = 4;
  int checks = 0, failures = 0;

  logic [N-1:0]   a, b;
  alu_op_e        sel;
  logic           approx, cout;
  logic [2*N-1:0] alu_out;

  bitslice_alu dut (.a(a), .b(b), .sel(sel), .approx(approx), .alu_out(alu_out), .cout(cout));

  logic [7:0]  a8, b8;
  logic [15:0] out8;
  logic        cout8;
  bitslice_alu #(.SLICES(2)) dut8 (.a(a8), .b(b8), .sel(sel), .approx(1'b0), .alu_out(out8),
                                   .cout(cout8));

  function automatic logic [15:0] expect8(logic [7:0] x, logic [7:0] y, alu_op_e s);
    case (s)
      OP_ADD:  return 16'(x) + 16'(y);
      OP_SUB:  return 16'(x) - 16'(y);
      OP_MUL:  return 16'(x) * 16'(y);
      OP_XOR:  return 16'(x ^ y);
      OP_AND:  return 16'(x & y);
      OP_OR:   return 16'(x | y);
      OP_NAND: return 16'(8'(~(x & y)));
      default: return '0;
    endcase
  endfunction

  function automatic logic [2*N-1:0] expect_out(logic [N-1:0] x, logic [N-1:0] y,
                                               alu_op_e s, logic m);
    logic [64:0]  r;
    logic [127:0] q;
    case (s)
      OP_ADD:  begin r = ref_add(64'(x), 64'(y), 1'b0, m, N, W); return 32'(r[N:0]); end
      OP_SUB:  begin
        r = ref_add(64'(x), 64'(~y), 1'b1, m, N, W);
        return {{N{~r[N]}}, r[N-1:0]};
      end
      OP_MUL:  begin q = ref_mul(64'(x), 64'(y), m, N, W); return q[2*N-1:0]; end
      OP_XOR:  return 32'(x ^ y);
      OP_AND:  return 32'(x & y);
      OP_OR:   return 32'(x | y);
      OP_NAND: return 32'(N'(~(x & y)));
      default: return '0;
    endcase
  endfunction

  task automatic apply(logic [N-1:0] x, logic [N-1:0] y, alu_op_e s, logic m);
    logic [2*N-1:0] e;
    a = x; b = y; sel = s; approx = m;
    #1;
    e = expect_out(x, y, s, m);
    checks++;
    if (alu_out !== e) begin
      failures++;
      $display("FAIL a=%h b=%h sel=%0d approx=%b got %h exp %h", x, y, s, m, alu_out, e);
    end
  endtask

  task automatic expect_value(logic [2*N-1:0] v);
    checks++;
    if (alu_out !== v) begin
      failures++;
      $display("FAIL figure value: got %h exp %h", alu_out, v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exact_sub = 0;
    apply(16'h93FF, 16'h198F, OP_ADD, 1'b0);  expect_value(32'h0000AD8E);
    apply(16'h93FF, 16'h198F, OP_SUB, 1'b0);  expect_value(32'h00007A70);
    apply(16'h93FF, 16'h198F, OP_MUL, 1'b0);  expect_value(32'h0EC69271);
    apply(16'h93FF, 16'h198F, OP_NAND, 1'b0); expect_value(32'h0000EE70);
    apply(16'h29C5, 16'h81A5, OP_XOR, 1'b0);  expect_value(32'h0000A860);
    apply(16'h29C5, 16'h81A5, OP_MUL, 1'b0);  expect_value(32'h152730F9);
    apply(16'h29C5, 16'h81A5, OP_OR, 1'b0);   expect_value(32'h0000A9E5);
    apply(16'h29C5, 16'h81A5, OP_AND, 1'b0);  expect_value(32'h00000185);
    apply(16'h29C5, 16'h81A5, OP_SUB, 1'b0);  expect_value(32'hFFFFA820);
    apply(16'h29C5, 16'h81A5, OP_NONE, 1'b0); expect_value(32'h0);
    for (int t = 0; t < 20000; t++) begin
      apply(16'($urandom), 16'($urandom), alu_op_e'($urandom_range(0, 7)), 1'($urandom));
      if (!approx && sel == OP_SUB) begin
        exact_sub++;
        checks++;
        if (alu_out !== 32'(a) - 32'(b)) failures++;
      end
    end
    for (int t = 0; t < 5000; t++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); sel = alu_op_e'($urandom_range(0, 7));
      #1;
      checks++;
      if (out8 !== expect8(a8, b8, sel)) begin
        failures++;
        $display("FAIL 8-bit a=%h b=%h sel=%0d got %h exp %h", a8, b8, sel, out8, expect8(a8, b8, sel));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
