// tb_can_err_frame_gen: an active error flag is six dominant bits and the
// frame ends on the eighth recessive delimiter bit, also when another
// node's flag extends the dominant part; an overload flag looks the same.
// Then 16 transmit errors make the node error passive (passive flag is
// recessive), 32 make it bus-off, and 128 x 11 recessive bits recover it.
// Successful transfers decrement the counters.
`timescale 1ns/1ps
module tb_can_err_frame_gen;
  logic clk = 0, rst_n = 0, sample = 0, rx_bit = 1;
  logic start_err = 0, start_ovl = 0, tx_err = 0, rx_err = 0, tx_ok = 0, rx_ok = 0;
  logic active, tx_bit, done, err_passive, bus_off;
  logic [8:0] tec; logic [7:0] rec;
  int checks = 0, failures = 0;
  can_err_frame_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: %0d vs %0d", w, g, e); end
  endtask

  // one bus bit: the bus is our tx bit ANDed with `other`
  logic seen_done;
  task automatic bitp(logic other, logic se = 0, logic so = 0, logic te = 0, logic re = 0,
                      logic tok = 0, logic rok = 0);
    @(negedge clk);
    rx_bit = tx_bit & other; sample = 1; start_err = se; start_ovl = so;
    tx_err = te; rx_err = re; tx_ok = tok; rx_ok = rok;
    #1 seen_done = done;
    @(negedge clk);
    {sample, start_err, start_ovl, tx_err, rx_err, tx_ok, rx_ok} = '0;
  endtask

  // run a flag: returns number of dominant flag bits sent and bits to done
  task automatic flag(logic ovl, int extra_dom, output int ndom, output int nbits);
    ndom = 0; nbits = 0;
    bitp(1'b1, !ovl, ovl, !ovl, 1'b0);   // error detected at this sample
    for (int i = 0; i < 40; i++) begin
      if (!tx_bit) ndom++;
      bitp(!(i >= 6 && i < 6 + extra_dom));
      nbits++;
      if (seen_done) break;
    end
  endtask

  int nd, nb;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    flag(1'b0, 0, nd, nb);
    check("active flag dominant bits", 32'(nd), 6);
    check("error frame length", 32'(nb), 14);
    check("TEC after one tx error", 32'(tec), 8);
    flag(1'b0, 5, nd, nb);
    check("overlapped flags frame length", 32'(nb), 19);
    flag(1'b1, 0, nd, nb);
    check("overload dominant bits", 32'(nd), 6);
    check("overload frame length", 32'(nb), 14);
    check("TEC unchanged by overload", 32'(tec), 16);
    bitp(1'b1, 0, 0, 0, 0, 1, 0);
    check("TEC after tx ok", 32'(tec), 15);
    bitp(1'b1, 1, 0, 0, 1);
    check("REC after rx error", 32'(rec), 1);
    bitp(1'b1, 0, 0, 0, 0, 0, 1);
    check("REC after rx ok", 32'(rec), 0);
    // drive to error passive: TEC 15 + 8*15 = 135
    for (int i = 0; i < 15; i++) bitp(1'b1, 1, 0, 1, 0);
    check("error passive", 32'(err_passive), 1);
    flag(1'b0, 0, nd, nb);
    check("passive flag is recessive", 32'(nd), 0);
    for (int i = 0; i < 20 && !bus_off; i++) bitp(1'b1, 1, 0, 1, 0);
    check("bus-off", 32'(bus_off), 1);
    for (int i = 0; i < 128 * 11 - 1; i++) bitp(1'b1);
    check("still bus-off one bit early", 32'(bus_off), 1);
    bitp(1'b1);
    check("recovered", 32'(bus_off), 0);
    check("TEC cleared", 32'(tec), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
