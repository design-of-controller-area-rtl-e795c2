// tb_can_param_regs: reset values, write and read back of every parameter
// register, and the decoded code, mask, SJW and timing fields.
`timescale 1ns/1ps
module tb_can_param_regs;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [4:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [10:0] acc_code, acc_mask;
  logic [1:0] sjw; logic [5:0] brp; logic [3:0] tseg1; logic [2:0] tseg2;
  int checks = 0, failures = 0;
  can_param_regs dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: %h vs %h", w, g, e); end
  endtask
  task automatic w(logic [4:0] a, logic [7:0] d);
    @(negedge clk) begin wr = 1; addr = a; wdata = d; end
    @(negedge clk) wr = 0;
  endtask
  task automatic r(logic [4:0] a, logic [7:0] e);
    @(negedge clk) addr = a; #1 check($sformatf("read %0d", a), 32'(rdata), 32'(e));
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    check("reset mask", 32'(acc_mask), 32'h7FF);
    check("reset brp", 32'(brp), 4); check("reset tseg1", 32'(tseg1), 5); check("reset tseg2", 32'(tseg2), 2);
    w(2, 8'hEE); w(3, 8'hE0); w(4, 8'h1F); w(5, 8'hE0); w(6, 8'h83); w(7, 8'h4C);
    check("code", 32'(acc_code), 32'h777);
    check("mask", 32'(acc_mask), 32'h0FF);
    check("sjw", 32'(sjw), 2); check("brp", 32'(brp), 3);
    check("tseg1", 32'(tseg1), 12); check("tseg2", 32'(tseg2), 4);
    r(2, 8'hEE); r(3, 8'hE0); r(4, 8'h1F); r(5, 8'hE0); r(6, 8'h83); r(7, 8'h4C); r(9, 8'h00);
    w(8, 8'hFF);
    check("unmapped write ignored", 32'(acc_code), 32'h777);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
