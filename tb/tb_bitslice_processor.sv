// tb_bitslice_processor: end-to-end test of the bit-slice processor at its
// default size (four 4-bit slices, window 4, 16-word control ROM).
//
// It runs every operation as a one-step instruction in exact and in
// approximate mode (default ROM contents), the two published ALU waveform
// cases, then loads multi-word micro-programs that chain operations through
// the accumulator and switch the adder mode between steps. Each result is
// compared with a reference model of the program built on the scanning
// adder model; the cycle count from start to done must equal the program
// length. It counts how often each mechanism occurred (exact and
// approximate additions, an approximate result that differs from the exact
// one, accumulator feedback, a mode switch inside a program, a start
// ignored while busy, a ROM write) and fails if any never did.
module tb_bitslice_processor;
  import rapcla_pkg::*;
  import rapcla_ref_pkg::*;

  localparam int W = 4;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0, start = 0, prog_we = 0;
  logic [3:0]  instr = '0, prog_addr = '0;
  logic [15:0] a = '0, b = '0;
  uinstr_t     prog_data = '0;
  logic [31:0] result;
  logic        busy, done;

  bitslice_processor dut (.clk(clk), .rst_n(rst_n), .start(start), .instr(instr),
                          .a(a), .b(b), .result(result), .busy(busy), .done(done),
                          .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data));

  always #5 clk = ~clk;

  // shadow copy of the control ROM
  uinstr_t shadow [16];

  int n_exact = 0, n_approx = 0, n_approx_err = 0, n_feedback = 0;
  int n_mode_switch = 0, n_start_ignored = 0, n_rom_write = 0, n_ops[8];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_rom(int addr, uinstr_t w);
    @(negedge clk);
    prog_we = 1; prog_addr = 4'(addr); prog_data = w;
    @(negedge clk);
    prog_we = 0;
    shadow[addr] = w;
    n_rom_write++;
  endtask

  // Execute the program at sa on the reference; returns result and length.
  task automatic ref_run(int sa, logic [15:0] x, logic [15:0] y, logic [31:0] acc_in,
                         output logic [31:0] res, output int len);
    logic [31:0] acc, ex;
    logic        prev_mode;
    int          pc;
    acc = acc_in; pc = sa; len = 0;
    prev_mode = shadow[sa].approx;
    forever begin
      uinstr_t u;
      logic [15:0] opa;
      u   = shadow[pc];
      opa = u.src_acc ? acc[15:0] : x;
      if (u.src_acc) n_feedback++;
      if (u.approx != prev_mode) n_mode_switch++;
      prev_mode = u.approx;
      if (u.op inside {OP_ADD, OP_SUB, OP_MUL}) begin
        if (u.approx) n_approx++; else n_exact++;
        ex = ref_alu(opa, y, 3'(u.op), 1'b0, W);
        acc = ref_alu(opa, y, 3'(u.op), u.approx, W);
        if (u.approx && acc != ex) n_approx_err++;
      end else begin
        acc = ref_alu(opa, y, 3'(u.op), u.approx, W);
      end
      n_ops[u.op]++;
      len++;
      if (u.last || len > 16) break;
      pc = (pc + 1) % 16;
    end
    res = acc;
  endtask

  task automatic run(int sa, logic [15:0] x, logic [15:0] y, bit poke_start = 0);
    logic [31:0] exp_res;
    int          len, cyc;
    ref_run(sa, x, y, result, exp_res, len);
    @(negedge clk);
    start = 1; instr = 4'(sa); a = x; b = y;
    @(negedge clk);
    start = 0; a = ~x; b = ~y;           // operands must have been latched
    cyc = 1;
    if (poke_start) begin
      start = 1; instr = 4'(sa ^ 1);      // ignored: processor busy
      n_start_ignored++;
    end
    while (!done && cyc < 40) begin
      @(negedge clk);
      start = 0;
      if (!done) cyc++;
    end
    checks++;
    if (result !== exp_res) begin
      failures++;
      $display("FAIL program %0d a=%h b=%h: result %h exp %h", sa, x, y, result, exp_res);
    end
    checks++;
    if (cyc !== len) begin
      failures++;
      $display("FAIL program %0d took %0d cycles, expected %0d", sa, cyc, len);
    end
  endtask

  initial begin
    for (int k = 0; k < 16; k++)
      shadow[k] = '{last: 1'b1, approx: (k >= 8), src_acc: 1'b0, op: alu_op_e'(k % 8)};
    repeat (3) @(posedge clk);
    rst_n = 1;

    // published waveform cases: addition, XOR, and the taps seen there
    run(0, 16'h93FF, 16'h198F);
    checks++; if (result !== 32'h0000AD8E) failures++;
    run(1, 16'h93FF, 16'h198F);
    checks++; if (result !== 32'h00007A70) failures++;
    run(2, 16'h93FF, 16'h198F);
    checks++; if (result !== 32'h0EC69271) failures++;
    run(6, 16'h93FF, 16'h198F);
    checks++; if (result !== 32'h0000EE70) failures++;
    run(3, 16'h29C5, 16'h81A5);
    checks++; if (result !== 32'h0000A860) failures++;
    run(2, 16'h29C5, 16'h81A5);
    checks++; if (result !== 32'h152730F9) failures++;
    // long carry chain, approximate mode
    run(8, 16'hFFFF, 16'h0001);
    checks++; if (result !== 32'h0000FFE0) failures++;  // carry lost beyond bit 4

    // single-step instructions, both modes, random operands
    for (int t = 0; t < 200; t++)
      run($urandom_range(0, 15), 16'($urandom), 16'($urandom), (t % 17) == 0);

    // micro-program at 4: (a * b) exact, then acc + b approximate,
    // then acc - b exact, then acc XOR b.
    write_rom(4, '{last: 1'b0, approx: 1'b0, src_acc: 1'b0, op: OP_MUL});
    write_rom(5, '{last: 1'b0, approx: 1'b1, src_acc: 1'b1, op: OP_ADD});
    write_rom(6, '{last: 1'b0, approx: 1'b0, src_acc: 1'b1, op: OP_SUB});
    write_rom(7, '{last: 1'b1, approx: 1'b0, src_acc: 1'b1, op: OP_XOR});
    for (int t = 0; t < 50; t++) run(4, 16'($urandom), 16'($urandom), t == 3);
    // micro-program at 10: six accumulating approximate/exact additions
    for (int k = 10; k < 16; k++)
      write_rom(k, '{last: (k == 15), approx: k[0], src_acc: (k != 10), op: OP_ADD});
    for (int t = 0; t < 50; t++) run(10, 16'($urandom), 16'($urandom));

    // reset restores the default ROM
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 16; k++)
      shadow[k] = '{last: 1'b1, approx: (k >= 8), src_acc: 1'b0, op: alu_op_e'(k % 8)};
    run(5, 16'h1234, 16'h0F0F);
    checks++; if (result !== 32'h00001F3F) failures++;

    $display("mechanisms: exact=%0d approx=%0d approx_error=%0d feedback=%0d mode_switch=%0d start_ignored=%0d rom_write=%0d",
             n_exact, n_approx, n_approx_err, n_feedback, n_mode_switch, n_start_ignored, n_rom_write);
    foreach (n_ops[i]) begin
      checks++;
      if (n_ops[i] == 0) begin failures++; $display("FAIL operation %0d never ran", i); end
    end
    checks += 7;
    if (n_exact == 0)         begin failures++; $display("FAIL no exact-mode arithmetic"); end
    if (n_approx == 0)        begin failures++; $display("FAIL no approximate-mode arithmetic"); end
    if (n_approx_err == 0)    begin failures++; $display("FAIL no approximate error seen"); end
    if (n_feedback == 0)      begin failures++; $display("FAIL no accumulator feedback"); end
    if (n_mode_switch == 0)   begin failures++; $display("FAIL no mode switch in a program"); end
    if (n_start_ignored == 0) begin failures++; $display("FAIL no start while busy"); end
    if (n_rom_write == 0)     begin failures++; $display("FAIL no ROM write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
