// tb_can_serial_tx: the tx line changes only at transmit points and
// follows the priority bus-off > error/overload frame > ACK > frame bit >
// recessive.
`timescale 1ns/1ps
module tb_can_serial_tx;
  import can_pkg::*;
  logic clk = 0, rst_n = 0, tx_pt = 0;
  mp_state_e state;
  logic bus_off, ef_active, ef_bit, ack_drive, tx_active, stuff_done, stuff_bit, can_tx;
  int checks = 0, failures = 0;
  can_serial_tx dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic t(string w, mp_state_e s, logic bo, logic efa, logic efb, logic ack,
                   logic txa, logic sd, logic sb, logic exp);
    logic prev_tx;
    @(negedge clk);
    state = s; bus_off = bo; ef_active = efa; ef_bit = efb; ack_drive = ack;
    tx_active = txa; stuff_done = sd; stuff_bit = sb;
    prev_tx = can_tx;
    @(negedge clk);
    checks++;
    if (can_tx !== prev_tx) begin failures++; $display("FAIL %s: changed without tx_pt", w); end
    tx_pt = 1; @(negedge clk); tx_pt = 0;
    checks++;
    if (can_tx !== exp) begin failures++; $display("FAIL %s: %b", w, can_tx); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    //  name             state        bo efa efb ack txa sd sb  exp
    t("idle",           ST_IDLE,      0, 0, 1, 0, 0, 1, 0, 1'b1);
    t("SOF",            ST_IDLE,      0, 0, 1, 0, 1, 0, 0, 1'b0);
    t("frame bit 1",    ST_FRAME,     0, 0, 1, 0, 1, 0, 1, 1'b1);
    t("frame bit 0",    ST_FRAME,     0, 0, 1, 0, 1, 0, 0, 1'b0);
    t("receiver",       ST_FRAME,     0, 0, 1, 0, 0, 0, 0, 1'b1);
    t("stuffing done",  ST_FRAME,     0, 0, 1, 0, 1, 1, 0, 1'b1);
    t("crc delim",      ST_CRC_DELIM, 0, 0, 1, 0, 1, 1, 0, 1'b1);
    t("ack",            ST_ACK_SLOT,  0, 0, 1, 1, 0, 1, 1, 1'b0);
    t("no ack",         ST_ACK_SLOT,  0, 0, 1, 0, 1, 1, 1, 1'b1);
    t("error flag",     ST_ERROR,     0, 1, 0, 0, 1, 0, 1, 1'b0);
    t("passive flag",   ST_ERROR,     0, 1, 1, 0, 1, 0, 0, 1'b1);
    t("bus-off",        ST_BUSOFF,    1, 1, 0, 1, 1, 0, 0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
