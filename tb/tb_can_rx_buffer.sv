// tb_can_rx_buffer: two messages are stored and read back in order through
// the ten-byte window, a third one while both buffers are full sets
// overrun and is lost, release frees a buffer, and a store and a release
// in the same cycle keep the count.
`timescale 1ns/1ps
module tb_can_rx_buffer;
  import can_pkg::*;
  logic clk = 0, rst_n = 0, store = 0, release_buf = 0, clr_overrun = 0;
  byte_t msg [BUF_BYTES];
  logic [4:0] addr = 0;
  logic [7:0] rdata;
  logic msg_avail, overrun;
  logic [1:0] count;
  int checks = 0, failures = 0;
  can_rx_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: %h vs %h", w, g, e); end
  endtask
  task automatic put(byte_t base);
    @(negedge clk);
    for (int i = 0; i < BUF_BYTES; i++) msg[i] = base + 8'(i);
    store = 1;
    @(negedge clk) store = 0;
  endtask
  task automatic expect_msg(byte_t base);
    for (int i = 0; i < BUF_BYTES; i++) begin
      @(negedge clk) addr = 5'(20 + i);
      #1 check($sformatf("byte %0d of %h", i, base), 32'(rdata), 32'(base + 8'(i)));
    end
    @(negedge clk) release_buf = 1;
    @(negedge clk) release_buf = 0;
  endtask

  initial begin
    foreach (msg[i]) msg[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    check("empty", 32'(msg_avail), 0);
    put(8'h10); put(8'h40);
    check("two held", 32'(count), 2);
    put(8'h70);
    check("overrun", 32'(overrun), 1);
    check("still two", 32'(count), 2);
    expect_msg(8'h10);
    check("one left", 32'(count), 1);
    put(8'h90);
    expect_msg(8'h40);
    // store and release together
    @(negedge clk);
    for (int i = 0; i < BUF_BYTES; i++) msg[i] = 8'hA0 + 8'(i);
    store = 1; release_buf = 1;
    @(negedge clk) begin store = 0; release_buf = 0; end
    check("count after store+release", 32'(count), 1);
    expect_msg(8'hA0);
    check("empty again", 32'(msg_avail), 0);
    @(negedge clk) clr_overrun = 1;
    @(negedge clk) clr_overrun = 0;
    check("overrun cleared", 32'(overrun), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
