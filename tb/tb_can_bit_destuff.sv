// tb_can_bit_destuff: reference stuffed frames are fed one bit per sample.
// The unit must drop exactly the stuff bits, recover ID, RTR, DLC, data
// and CRC, flag the arbitration and CRC-computation bits, and raise
// region_end on the last bit of the stuffed region. A frame with a sixth
// equal bit must give a stuff error.
`timescale 1ns/1ps
module tb_can_bit_destuff;
  import can_pkg::*;
  import can_ref_pkg::*;
  logic clk = 0, rst_n = 0, sample = 0, bit_in = 1, start = 0, en = 0;
  logic d_valid, d_crc_calc, d_arb, is_stuff, stuff_err, region_end;
  logic [6:0] d_idx, bit_cnt;
  logic [10:0] rx_id; logic rx_rtr, rx_ide; logic [3:0] rx_dlc;
  byte_t rx_data [MAX_BYTES];
  logic [14:0] rx_crc;
  int checks = 0, failures = 0;
  can_bit_destuff dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: %h vs %h", w, g, e); end
  endtask

  task automatic run(bit [10:0] id, bit rtr, bit [3:0] dlc, bit [7:0] d [8]);
    bitq_t f, s;
    int ns, nvalid = 0, ncrc = 0, narb = 0, end_at = -1, nb;
    f = with_crc(ref_frame(id, rtr, dlc, d));
    s = ref_stuff(f, ns);
    foreach (s[i]) begin
      @(negedge clk);
      bit_in = s[i]; sample = 1; start = (i == 0); en = (i != 0);
      #1;
      if (d_valid) nvalid++;
      if (d_crc_calc) ncrc++;
      if (d_arb) narb++;
      if (region_end) end_at = i;
      if (stuff_err) check("no stuff error", 1, 0);
      @(negedge clk); sample = 0; start = 0;
    end
    en = 0;
    nb = rtr ? 0 : (dlc > 8 ? 8 : int'(dlc));
    check("frame bits kept", 32'(nvalid), 32'(f.size()));
    check("CRC-computed bits", 32'(ncrc), 32'(f.size() - 15));
    check("arbitration bits", 32'(narb), 12);
    check("region end on last bit", 32'(end_at), 32'(s.size() - 1));
    check("id", 32'(rx_id), 32'(id));
    check("rtr", 32'(rx_rtr), 32'(rtr));
    check("dlc", 32'(rx_dlc), 32'(dlc));
    check("crc", 32'(rx_crc), 32'(ref_crc(ref_frame(id, rtr, dlc, d))));
    for (int i = 0; i < nb; i++) check($sformatf("data %0d", i), 32'(rx_data[i]), 32'(d[i]));
  endtask

  bit [7:0] d [8];
  int serr;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    d = '{8'h33, 8'h38, 8'h30, 8'h28, 8'h00, 8'h00, 8'h00, 8'h00};
    run(11'h777, 1'b1, 4'd1, d);
    for (int t = 0; t < 100; t++) begin
      foreach (d[i]) d[i] = ($urandom_range(0, 1)) ? 8'hFF : 8'($urandom);
      run(11'($urandom), 1'($urandom_range(0, 3) == 0), 4'($urandom), d);
    end
    // stuff error: SOF then six dominant bits
    serr = 0;
    for (int i = 0; i < 7; i++) begin
      @(negedge clk); bit_in = 0; sample = 1; start = (i == 0); en = (i != 0);
      #1 if (stuff_err) serr++;
      @(negedge clk); sample = 0; start = 0;
    end
    en = 0;
    check("stuff error on sixth equal bit", 32'(serr), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
