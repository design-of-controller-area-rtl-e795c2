// tb_can_btl: bit timing with the reset settings (5 clocks per quantum,
// 1 + 6 + 3 quanta, SJW 2 quanta). Checks the bit period (50 clocks between
// samples on an idle bus), the position of the first sample after hard
// synchronization (70 % into the bit, within one quantum plus the input
// synchronizer delay), and that stuffed random frames sent by a transmitter
// whose bit time is 1.5 % longer or shorter are sampled without error,
// which needs resynchronization.
`timescale 1ns/1ps
module tb_can_btl;
  import can_ref_pkg::*;
  logic clk = 0, rst_n = 0, can_rx = 1, hard_sync_en = 1, tx_dom = 0;
  logic [5:0] brp = 6'd4; logic [3:0] tseg1 = 4'd5; logic [2:0] tseg2 = 3'd2; logic [1:0] sjw = 2'd1;
  logic sample, rx_bit, tx_pt, resync;
  int checks = 0, failures = 0;
  can_btl dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: %0d vs %0d", w, g, e); end
  endtask

  bit sampq [$];
  bit collecting = 0;
  realtime t_first = 0;
  int nresync = 0;
  always @(posedge clk) begin
    if (resync) nresync++;
    if (sample && collecting) begin
      if (sampq.size() == 0 && rx_bit == 0) begin t_first = $realtime; hard_sync_en <= 0; end
      if (sampq.size() > 0 || rx_bit == 0) sampq.push_back(rx_bit);
    end
  end

  task automatic frame(realtime tbit, int nbits, string w);
    bitq_t raw, s;
    int ns, errs = 0;
    realtime t0;
    raw.push_back(1'b0);
    for (int i = 1; i < nbits; i++) raw.push_back(1'($urandom));
    s = ref_stuff(raw, ns);
    for (int i = 0; i < 10; i++) s.push_back(1'b1);
    sampq.delete(); hard_sync_en = 1; collecting = 1;
    #(tbit * 3.3);
    t0 = $realtime;
    foreach (s[i]) begin can_rx = s[i]; #(tbit); end
    collecting = 0;
    for (int i = 0; i < s.size() && i < sampq.size(); i++) if (sampq[i] != s[i]) errs++;
    check({w, ": sampled bits"}, 32'(sampq.size() >= s.size() - 1), 1);
    check({w, ": bit errors"}, 32'(errs), 0);
    if (tbit == 500.0) begin
      // first sample 7 quanta after the quantum that follows the edge
      checks++;
      if (t_first - t0 < 350.0 || t_first - t0 > 350.0 + 50.0 + 30.0) begin
        failures++; $display("FAIL first sample at %0t after edge", t_first - t0);
      end
    end
  endtask

  int gaps [$];
  int last_s, cyc;
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // idle bus: period of the sample strobe
    cyc = 0; last_s = -1;
    while (gaps.size() < 6) begin
      @(posedge clk); cyc++;
      if (sample) begin if (last_s >= 0) gaps.push_back(cyc - last_s); last_s = cyc; end
    end
    foreach (gaps[i]) check("bit period in clocks", 32'(gaps[i]), 50);
    frame(500.0, 200, "nominal");
    check("no resync needed at nominal rate", 32'(nresync <= 2), 1);
    nresync = 0;
    frame(507.5, 300, "slow transmitter");
    check("resync on slow", 32'(nresync > 0), 1);
    nresync = 0;
    frame(492.5, 300, "fast transmitter");
    check("resync on fast", 32'(nresync > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
