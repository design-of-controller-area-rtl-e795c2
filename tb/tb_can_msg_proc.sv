// tb_can_msg_proc: the message processor is driven bit by bit with the
// flags its neighbours would give. Checked: bus integration after exactly
// 11 recessive bits; a transmission (load, SOF, frame, ACK slot without
// own ACK, tx_ok on the 7th EOF bit, 3 intermission bits); a reception
// (ACK driven after a good CRC, rx_ok on the 6th EOF bit); lost
// arbitration followed by automatic retransmission straight after the
// intermission; an error frame with the error counted against the
// transmitter and retransmission; an overload frame; SOF in the third
// intermission bit; abort; bus-off and return to integration.
`timescale 1ns/1ps
module tb_can_msg_proc;
  import can_pkg::*;
  logic clk = 0, rst_n = 0, sample = 0, rx_bit = 1, tx_req = 0, abort = 0;
  logic ds_region_end = 0, crc_ok = 1, any_err = 0, arb_lost = 0, ovl_cond = 0;
  logic ef_done = 0, bus_off = 0, stuff_done = 0;
  mp_state_e state;
  logic [3:0] cnt;
  logic tx_pending, tx_active, tx_load, ds_start, ds_en, stuff_adv, ack_drive;
  logic start_err, start_ovl, tx_err, rx_err, tx_ok, rx_ok, hard_sync_en, receiving, tx_complete;
  int checks = 0, failures = 0;
  can_msg_proc dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: %0d vs %0d", w, g, e); end
  endtask

  // pulse counters over one bit
  int c_load, c_start, c_txok, c_rxok, c_err, c_ovl, c_adv, c_txerr;
  always @(posedge clk) begin
    if (tx_load) c_load++;
    if (ds_start) c_start++;
    if (tx_ok) c_txok++;
    if (rx_ok) c_rxok++;
    if (start_err) c_err++;
    if (tx_err) c_txerr++;
    if (start_ovl) c_ovl++;
    if (stuff_adv) c_adv++;
  end

  // one sampled bit with the given bus level and neighbour flags
  task automatic bitp(logic rx, logic rend = 0, logic err = 0, logic arb = 0, logic ovl = 0,
                      logic efd = 0);
    @(negedge clk);
    rx_bit = rx; ds_region_end = rend; any_err = err; arb_lost = arb; ovl_cond = ovl;
    ef_done = efd; sample = 1;
    @(negedge clk);
    {sample, ds_region_end, any_err, arb_lost, ovl_cond, ef_done} = '0;
    repeat (2) @(negedge clk);
  endtask

  task automatic req;
    @(negedge clk) tx_req = 1;
    @(negedge clk) tx_req = 0;
  endtask

  // frame body after SOF: n bits then region end; then delimiters and EOF
  task automatic body(int n, logic ack_bus);
    for (int i = 0; i < n - 1; i++) bitp(1'($urandom));
    bitp(1'b1, 1'b1);
    check("CRC delimiter state", 32'(state), 32'(ST_CRC_DELIM));
    bitp(1'b1);                 // CRC delimiter
    check("ACK slot state", 32'(state), 32'(ST_ACK_SLOT));
  endtask

  task automatic tail_eof(output int txok_at, output int rxok_at);
    txok_at = -1; rxok_at = -1;
    bitp(1'b1);                 // ACK delimiter
    for (int i = 0; i < 7; i++) begin
      int a = c_txok, b = c_rxok;
      bitp(1'b1);
      if (c_txok != a) txok_at = i;
      if (c_rxok != b) rxok_at = i;
    end
    check("intermission", 32'(state), 32'(ST_INTERM));
  endtask

  int ta, ra;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    check("reset state", 32'(state), 32'(ST_INTEG));
    for (int i = 0; i < 10; i++) bitp(1'b1);
    check("not idle after 10", 32'(state), 32'(ST_INTEG));
    bitp(1'b1);
    check("idle after 11", 32'(state), 32'(ST_IDLE));

    // transmission
    req();
    check("pending", 32'(tx_pending), 1);
    c_load = 0; bitp(1'b1);
    check("load on idle bit", 32'(c_load), 1);
    check("transmitter", 32'(tx_active), 1);
    c_start = 0; c_adv = 0; bitp(1'b0);
    check("own SOF starts frame", 32'(c_start), 1);
    check("SOF advanced stuffing", 32'(c_adv), 1);
    check("frame state", 32'(state), 32'(ST_FRAME));
    body(30, 1'b0);
    check("transmitter does not ACK", 32'(ack_drive), 0);
    bitp(1'b0);                 // ACK slot, acknowledged
    tail_eof(ta, ra);
    check("tx_ok on 7th EOF bit", 32'(ta), 6);
    check("no rx_ok for own frame", 32'(ra), -1);
    check("request cleared", 32'(tx_pending), 0);
    check("tx complete", 32'(tx_complete), 1);
    for (int i = 0; i < 3; i++) bitp(1'b1);
    check("idle after intermission", 32'(state), 32'(ST_IDLE));

    // reception
    bitp(1'b0);
    check("receiving", 32'(receiving), 1);
    body(40, 1'b0);
    check("receiver ACKs good CRC", 32'(ack_drive), 1);
    bitp(1'b0);
    check("ACK released", 32'(ack_drive), 0);
    tail_eof(ta, ra);
    check("rx_ok on 6th EOF bit", 32'(ra), 5);
    check("no tx_ok", 32'(ta), -1);
    for (int i = 0; i < 3; i++) bitp(1'b1);

    // lost arbitration, retransmission after the intermission
    req();
    bitp(1'b1); bitp(1'b0);
    bitp(1'b0); bitp(1'b0, 0, 0, 1);
    check("arbitration lost", 32'(tx_active), 0);
    check("still pending", 32'(tx_pending), 1);
    body(25, 1'b0);
    bitp(1'b0);
    tail_eof(ta, ra);
    check("rx_ok as loser", 32'(ra), 5);
    c_load = 0;
    bitp(1'b1); bitp(1'b1);
    check("no load before end of intermission", 32'(c_load), 0);
    bitp(1'b1);
    check("reload at end of intermission", 32'(c_load), 1);

    // error during the retransmitted frame
    bitp(1'b0);
    for (int i = 0; i < 10; i++) bitp(1'($urandom));
    c_err = 0; c_txerr = 0;
    bitp(1'b1, 0, 1);
    check("error frame", 32'(state), 32'(ST_ERROR));
    check("counted as tx error", 32'(c_txerr), 1);
    check("pending kept", 32'(tx_pending), 1);
    for (int i = 0; i < 13; i++) bitp(i < 6 ? 1'b0 : 1'b1);
    bitp(1'b1, 0, 0, 0, 0, 1);
    check("intermission after error", 32'(state), 32'(ST_INTERM));
    // overload in first intermission bit
    c_ovl = 0;
    bitp(1'b0, 0, 0, 0, 1);
    check("overload", 32'(c_ovl), 1);
    check("overload state", 32'(state), 32'(ST_OVERLOAD));
    for (int i = 0; i < 13; i++) bitp(i < 6 ? 1'b0 : 1'b1);
    bitp(1'b1, 0, 0, 0, 0, 1);
    c_load = 0;
    bitp(1'b1); bitp(1'b1); bitp(1'b1);
    check("retransmission load", 32'(c_load), 1);
    bitp(1'b0);
    body(20, 1'b0); bitp(1'b0); tail_eof(ta, ra);
    check("retransmission ok", 32'(ta), 6);

    // SOF in the third intermission bit
    bitp(1'b1); bitp(1'b1);
    c_start = 0; bitp(1'b0);
    check("SOF in 3rd intermission bit", 32'(c_start), 1);
    check("frame after SOF", 32'(state), 32'(ST_FRAME));
    body(20, 1'b0); bitp(1'b0); tail_eof(ta, ra);
    for (int i = 0; i < 3; i++) bitp(1'b1);

    // abort
    @(negedge clk) tx_req = 1; @(negedge clk) begin tx_req = 0; abort = 1; end
    @(negedge clk) abort = 0;
    check("aborted", 32'(tx_pending), 0);

    // bus-off
    @(negedge clk) bus_off = 1;
    bitp(1'b1);
    check("bus-off state", 32'(state), 32'(ST_BUSOFF));
    @(negedge clk) bus_off = 0;
    bitp(1'b1);
    check("integration after bus-off", 32'(state), 32'(ST_INTEG));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
