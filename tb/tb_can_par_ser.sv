// tb_can_par_ser: the serializer together with the transmit CRC generator
// (connected as in the controller) must emit the reference frame followed
// by its CRC, one bit per advance, with in_data/last/done at the right bits
// and no movement without an advance.
`timescale 1ns/1ps
module tb_can_par_ser;
  import can_pkg::*;
  import can_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, adv = 0;
  logic [MAX_FRM-1:0] frame;
  logic [6:0] frm_len;
  logic [14:0] crc;
  logic bit_out, in_data, last, done;
  int checks = 0, failures = 0;
  can_par_ser dut (.*);
  can_crc15 u_crc (.clk, .rst_n, .clr(load), .en(adv && in_data), .bit_in(bit_out), .crc);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(bit [10:0] id, bit rtr, bit [3:0] dlc, bit [7:0] d [8]);
    bitq_t f, q;
    int errs = 0;
    f = ref_frame(id, rtr, dlc, d);
    q = with_crc(f);
    frame = '0;
    foreach (f[i]) frame[i] = f[i];
    frm_len = 7'(f.size());
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    foreach (q[i]) begin
      if (bit_out !== q[i]) errs++;
      if (in_data !== (i < f.size())) errs++;
      if (last !== (i == q.size() - 1)) errs++;
      if (done) errs++;
      adv = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      while (!adv) begin
        if (bit_out !== q[i]) errs++;   // held while stalled
        adv = ($urandom_range(0, 3) != 0);
        @(negedge clk);
      end
      adv = 0;
    end
    checks++;
    if (errs != 0 || !done) begin failures++; $display("FAIL frame id %h: %0d errors", id, errs); end
  endtask

  bit [7:0] d [8];
  initial begin
    adv = 0; frame = '0; frm_len = 7'd19;
    repeat (2) @(negedge clk); rst_n = 1;
    d = '{default: 8'h00};
    run(11'h777, 1'b1, 4'd1, d);
    for (int t = 0; t < 100; t++) begin
      foreach (d[i]) d[i] = 8'($urandom);
      run(11'($urandom), 1'($urandom_range(0, 3) == 0), 4'($urandom), d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
