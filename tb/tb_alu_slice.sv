// tb_alu_slice: exhaustive check of one 4-bit ALU slice over all operands,
// carry patterns and controls, against bit-wise expressions.
module tb_alu_slice;
  import rapcla_pkg::*;

  int checks = 0, failures = 0;
  logic [3:0] a, b, c, g, p, y;
  logic       b_invert, invert_out;
  slice_fn_e  fn;

  alu_slice dut (.a(a), .b(b), .c(c), .b_invert(b_invert), .fn(fn),
                 .invert_out(invert_out), .g(g), .p(p), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] bb, f, e;
    for (int x = 0; x < 16; x++)
      for (int z = 0; z < 16; z++)
        for (int cc = 0; cc < 16; cc++)
          for (int ctl = 0; ctl < 16; ctl++) begin
            a = 4'(x); b = 4'(z); c = 4'(cc);
            b_invert = ctl[0]; invert_out = ctl[1]; fn = slice_fn_e'(ctl[3:2]);
            #1;
            bb = b_invert ? ~b : b;
            case (ctl[3:2])
              0: f = (a ^ bb) ^ c;
              1: f = a ^ bb;
              2: f = a & bb;
              default: f = a | bb;
            endcase
            e = invert_out ? ~f : f;
            checks++;
            if (y !== e || g !== (a & bb) || p !== (a ^ bb)) begin
              failures++;
              $display("FAIL a=%h b=%h c=%h ctl=%h y=%h exp %h", a, b, c, ctl, y, e);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
