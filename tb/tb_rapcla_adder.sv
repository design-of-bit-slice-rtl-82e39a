// tb_rapcla_adder: checks the RAP-CLA adder at its default size (16 bits,
// window 4) with random and corner vectors in both modes against the
// scanning reference, checks that exact mode equals A + B + Cin, and checks
// that approximate mode does produce wrong sums on some inputs (long carry
// chains) and never when no carry chain is longer than the window.
// A second, partitioned instance (only the low 8 carries reconfigurable)
// is checked against the reference and must err less often.
module tb_rapcla_adder;
  import rapcla_ref_pkg::*;

  localparam int N = 16, W = 4;
  int checks = 0, failures = 0;

  logic [N-1:0] a, b, sum;
  logic         cin, approx, cout;

  rapcla_adder dut (.a(a), .b(b), .cin(cin), .approx(approx), .sum(sum), .cout(cout));

  localparam int PB = 8;
  logic [N-1:0] sum_p;
  logic         cout_p;
  rapcla_adder #(.APX_BITS(PB)) dut_part (.a(a), .b(b), .cin(cin), .approx(approx),
                                          .sum(sum_p), .cout(cout_p));

  task automatic apply(logic [N-1:0] x, logic [N-1:0] y, logic ci, logic m);
    logic [64:0] r;
    a = x; b = y; cin = ci; approx = m;
    #1;
    r = ref_add(64'(x), 64'(y), ci, m, N, W);
    checks++;
    if ({cout, sum} !== r[N:0]) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b approx=%b got %h exp %h", x, y, ci, m, {cout, sum}, r[N:0]);
    end
    if (!m) begin
      checks++;
      if ({cout, sum} !== (17'(x) + 17'(y) + 17'(ci))) failures++;
    end
    r = ref_add(64'(x), 64'(y), ci, m, N, W, PB);
    checks++;
    if ({cout_p, sum_p} !== r[N:0]) begin
      failures++;
      $display("FAIL partitioned a=%h b=%h cin=%b approx=%b got %h exp %h", x, y, ci, m,
               {cout_p, sum_p}, r[N:0]);
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
    int errs = 0, errs_p = 0;
    // long carry chain: wrong in approximate mode, right in exact mode
    apply(16'hFFFF, 16'h0001, 1'b0, 1'b1);
    checks++; if ({cout, sum} == 17'h10000) failures++;
    apply(16'hFFFF, 16'h0001, 1'b0, 1'b0);
    // a chain of exactly W bits (generate at bit 0, propagate 1..3) is still right
    apply(16'h000F, 16'h0001, 1'b0, 1'b1);
    checks++; if ({cout, sum} != 17'h10) failures++;
    // Figure example operands
    apply(16'h93FF, 16'h198F, 1'b0, 1'b0);
    checks++; if (sum != 16'hAD8E) failures++;
    for (int t = 0; t < 50000; t++) begin
      apply(16'($urandom), 16'($urandom), 1'($urandom), 1'($urandom));
      if (approx && ({cout, sum} != 17'(a) + 17'(b) + 17'(cin))) errs++;
      if (approx && ({cout_p, sum_p} != 17'(a) + 17'(b) + 17'(cin))) errs_p++;
    end
    checks++;
    if (errs == 0) failures++;
    checks++;
    if (errs_p == 0 || errs_p >= errs) failures++;
    $display("partitioned adder (low %0d carries approximate): %0d differ", PB, errs_p);
    $display("approximate-mode sums that differ from exact: %0d", errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
