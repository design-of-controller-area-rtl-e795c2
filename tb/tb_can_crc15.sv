// tb_can_crc15: checks the serial CRC-15 against the example frame of the
// design (SOF..DLC of remote frame ID 0x777, DLC 1: CRC 101001101000101)
// and against a long-division reference on 200 random bit strings.
`timescale 1ns/1ps
module tb_can_crc15;
  import can_ref_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, bit_in = 0;
  logic [14:0] crc;
  int checks = 0, failures = 0;
  can_crc15 dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(bitq_t q, bit [14:0] exp, string what);
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    foreach (q[i]) begin en = 1; bit_in = q[i]; @(negedge clk); end
    en = 0;
    checks++;
    if (crc !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, crc, exp); end
  endtask

  bit [7:0] d [8];
  bitq_t q;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    d = '{default: 8'h00};
    run(ref_frame(11'h777, 1'b1, 4'd1, d), 15'b101001101000101, "example frame");
    for (int t = 0; t < 200; t++) begin
      q.delete();
      for (int i = 0, n = 1 + $urandom_range(0, 82); i < n; i++) q.push_back(1'($urandom));
      run(q, ref_crc(q), $sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
