// tb_can_tx_buffer: the ten-byte transmit buffer is written and read back
// through its address window, presents all bytes in parallel, ignores
// addresses outside the window and ignores writes while locked.
`timescale 1ns/1ps
module tb_can_tx_buffer;
  import can_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0, lock = 0;
  logic [4:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  byte_t buf_q [BUF_BYTES];
  byte_t ref_q [BUF_BYTES];
  int checks = 0, failures = 0;
  can_tx_buffer dut (.*);
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

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // the example message: EE F1 33 38 30 28 00 00 00 00
    ref_q = '{8'hEE, 8'hF1, 8'h33, 8'h38, 8'h30, 8'h28, 8'h00, 8'h00, 8'h00, 8'h00};
    for (int i = 0; i < 10; i++) w(5'(10 + i), ref_q[i]);
    w(5'd9, 8'h99); w(5'd20, 8'h99);
    for (int i = 0; i < 10; i++) check($sformatf("byte %0d", i), 32'(buf_q[i]), 32'(ref_q[i]));
    for (int i = 0; i < 10; i++) begin
      @(negedge clk) addr = 5'(10 + i); #1 check($sformatf("read %0d", i), 32'(rdata), 32'(ref_q[i]));
    end
    @(negedge clk) addr = 5'd20; #1 check("read outside", 32'(rdata), 0);
    lock = 1;
    w(5'd12, 8'hAB);
    check("locked write ignored", 32'(buf_q[2]), 32'h33);
    lock = 0;
    w(5'd12, 8'hAB);
    check("unlocked write", 32'(buf_q[2]), 32'hAB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
