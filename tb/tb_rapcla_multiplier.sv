// tb_rapcla_multiplier: checks the 16 x 16 multiplier. Exact mode must give
// A * B (including the two operand pairs of the ALU waveforms); approximate
// mode must match a row-by-row reference built on the scanning approximate
// adder model, and must differ from the exact product on some inputs.
module tb_rapcla_multiplier;
  import rapcla_ref_pkg::*;

  localparam int N = 16, W = 4;
  int checks = 0, failures = 0;
  logic [N-1:0]   a, b;
  logic           approx;
  logic [2*N-1:0] prod;

  rapcla_multiplier dut (.a(a), .b(b), .approx(approx), .prod(prod));

  task automatic apply(logic [N-1:0] x, logic [N-1:0] y, logic m);
    logic [127:0] r;
    a = x; b = y; approx = m;
    #1;
    r = ref_mul(64'(x), 64'(y), m, N, W);
    checks++;
    if (prod !== r[2*N-1:0]) begin
      failures++;
      $display("FAIL a=%h b=%h approx=%b got %h exp %h", x, y, m, prod, r[2*N-1:0]);
    end
    if (!m) begin
      checks++;
      if (prod !== 32'(x) * 32'(y)) failures++;
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
    int errs = 0;
    apply(16'h93FF, 16'h198F, 1'b0);
    checks++; if (prod != 32'h0EC69271) failures++;
    apply(16'h29C5, 16'h81A5, 1'b0);
    checks++; if (prod != 32'h152730F9) failures++;
    apply(16'hFFFF, 16'hFFFF, 1'b0);
    for (int t = 0; t < 20000; t++) begin
      apply(16'($urandom), 16'($urandom), 1'($urandom));
      if (approx && prod != 32'(a) * 32'(b)) errs++;
    end
    checks++;
    if (errs == 0) failures++;
    $display("approximate products that differ from exact: %0d", errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
