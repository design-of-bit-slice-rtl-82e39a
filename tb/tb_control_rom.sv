// tb_control_rom: checks the control store's reset contents (word k is a
// single-step program of operation k mod 8, approximate for k >= 8), that a
// write changes exactly one word at the clock edge, and that reset restores
// the default program.
module tb_control_rom;
  import rapcla_pkg::*;

  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0, we = 0;
  logic [3:0] waddr = '0, raddr = '0;
  uinstr_t    wdata, rdata;

  control_rom dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
                   .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_default(int k);
    raddr = 4'(k);
    #1;
    checks++;
    if (rdata.last !== 1'b1 || rdata.src_acc !== 1'b0 || rdata.approx !== (k >= 8) ||
        rdata.op !== alu_op_e'(k % 8)) begin
      failures++;
      $display("FAIL default word %0d = %h", k, rdata);
    end
  endtask

  initial begin
    wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 16; k++) check_default(k);
    // write word 5
    wdata = '{last: 1'b0, approx: 1'b1, src_acc: 1'b1, op: OP_MUL};
    waddr = 4'd5; we = 1;
    raddr = 4'd5;
    #1;
    checks++;
    if (rdata.op !== OP_OR) failures++;      // not written before the edge
    @(posedge clk); #1; we = 0;
    checks++;
    if (rdata !== wdata) begin failures++; $display("FAIL write: %h", rdata); end
    for (int k = 0; k < 16; k++) if (k != 5) check_default(k);
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 16; k++) check_default(k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
