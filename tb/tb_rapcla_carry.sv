// tb_rapcla_carry: checks the RAP-CLA carry generator exhaustively at
// N = 8 (the adder size of the error analysis) with W = 3, and with random
// vectors at the default size. Each carry is compared with a scanning
// reference; in exact mode the carries must be those of A + B + Cin, the
// augmenting part must be zero in approximate mode, and the carry mux must
// equal approximate | augmenting in exact mode.
module tb_rapcla_carry;
  import rapcla_ref_pkg::*;

  localparam int N8 = 8, W8 = 3;
  localparam int N16 = 16, W16 = 4;

  int checks = 0, failures = 0;

  logic [N8-1:0]  a8, b8;
  logic           cin8, ap8;
  logic [N8:0]    c8, apx8, aug8;
  logic [N16-1:0] a16, b16;
  logic           cin16, ap16;
  logic [N16:0]   c16, apx16, aug16;

  rapcla_carry #(.N(N8), .W(W8)) dut8 (
    .g(a8 & b8), .p(a8 ^ b8), .cin(cin8), .approx(ap8), .c(c8), .c_apx(apx8), .c_aug(aug8));
  rapcla_carry dut16 (
    .g(a16 & b16), .p(a16 ^ b16), .cin(cin16), .approx(ap16), .c(c16), .c_apx(apx16), .c_aug(aug16));

  task automatic check8();
    for (int i = 1; i <= N8; i++) begin
      checks++;
      if (c8[i] !== ref_carry(64'(a8), 64'(b8), cin8, ap8, i, W8)) begin
        failures++;
        $display("FAIL N8 a=%h b=%h cin=%b ap=%b c[%0d]=%b", a8, b8, cin8, ap8, i, c8[i]);
      end
    end
    checks++;
    if (ap8 ? (aug8[N8:1] != 0) : (c8[N8:1] != (apx8[N8:1] | aug8[N8:1]))) failures++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int ci = 0; ci < 2; ci++)
        for (int x = 0; x < 256; x++)
          for (int y = 0; y < 256; y++) begin
            a8 = 8'(x); b8 = 8'(y); cin8 = 1'(ci); ap8 = 1'(m);
            #1;
            check8();
            if (m == 0) begin
              checks++;
              if (c8[N8] !== ((x + y + ci) >= 256)) failures++;
            end
          end
    for (int t = 0; t < 20000; t++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); cin16 = 1'($urandom); ap16 = 1'($urandom);
      #1;
      for (int i = 1; i <= N16; i++) begin
        checks++;
        if (c16[i] !== ref_carry(64'(a16), 64'(b16), cin16, ap16, i, W16)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
