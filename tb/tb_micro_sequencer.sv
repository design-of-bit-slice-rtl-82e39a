// tb_micro_sequencer: runs the micro-sequencer against a small test-bench
// program store and checks the address sequence, that each word is
// presented with exec high for exactly one cycle, that done pulses exactly
// K edges after start for a K-word program, and that start is ignored while
// a program runs.
module tb_micro_sequencer;
  import rapcla_pkg::*;

  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0, start = 0;
  logic [3:0] start_addr = '0, rom_addr;
  uinstr_t    rom_data, ctrl;
  logic       exec, busy, done;
  uinstr_t    prog [16];

  assign rom_data = prog[rom_addr];

  micro_sequencer dut (.clk(clk), .rst_n(rst_n), .start(start), .start_addr(start_addr),
                       .rom_addr(rom_addr), .rom_data(rom_data), .ctrl(ctrl),
                       .exec(exec), .busy(busy), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run a program starting at sa, expect K words at sa, sa+1, ...
  task automatic run(int sa, int k);
    int cyc;
    @(negedge clk);
    start = 1; start_addr = 4'(sa);
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done && cyc < 40) begin
      if (exec) begin
        checks++;
        if (rom_addr !== 4'(sa + cyc) || ctrl !== prog[4'(sa + cyc)]) begin
          failures++;
          $display("FAIL step %0d addr %0d", cyc, rom_addr);
        end
        // a second start while busy must be ignored
        if (cyc == 1) start = 1;
        cyc++;
      end
      @(negedge clk);
      start = 0;
    end
    checks++;
    if (cyc !== k) begin
      failures++;
      $display("FAIL program at %0d ran %0d words, expected %0d", sa, cyc, k);
    end
    checks++;
    if (busy || exec) failures++;
    @(negedge clk);
    checks++;
    if (done) failures++;  // single-cycle pulse
  endtask

  initial begin
    for (int k = 0; k < 16; k++)
      prog[k] = '{last: (k == 0 || k == 3 || k == 9 || k == 15), approx: k[0], src_acc: k[1],
                  op: alu_op_e'(k % 8)};
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 1);
    run(1, 3);
    run(4, 6);
    run(10, 6);
    run(15, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
