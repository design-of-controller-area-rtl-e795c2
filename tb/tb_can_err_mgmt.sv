// tb_can_err_mgmt: directed cases for each checker (bit, stuff, CRC, form,
// ACK errors, arbitration loss, overload condition), each compared with
// the expected set of flags, and cases that must not flag anything.
`timescale 1ns/1ps
module tb_can_err_mgmt;
  import can_pkg::*;
  logic sample, rx_bit, sent_bit, tx_active, ack_drive, ds_stuff_err, ds_arb;
  mp_state_e state;
  logic [2:0] cnt;
  logic [14:0] crc_calc, crc_rcvd;
  logic crc_ok, bit_err, stuff_err, crc_err, form_err, ack_err, arb_lost, ovl_cond, any_err;
  int checks = 0, failures = 0;
  can_err_mgmt dut (.*);

  initial begin
    #100000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected flags: {bit, stuff, crc, form, ack, arb, ovl}
  task automatic t(string w, mp_state_e s, logic [2:0] c, logic tx, logic sent, logic rx,
                   logic ackd, logic serr, logic arb, logic crcgood, logic [6:0] exp);
    logic [6:0] got;
    sample = 1; state = s; cnt = c; tx_active = tx; sent_bit = sent; rx_bit = rx;
    ack_drive = ackd; ds_stuff_err = serr; ds_arb = arb;
    crc_rcvd = 15'h1234; crc_calc = crcgood ? 15'h1234 : 15'h1235;
    #1;
    got = {bit_err, stuff_err, crc_err, form_err, ack_err, arb_lost, ovl_cond};
    checks++;
    if (got !== exp || any_err !== |exp[6:2]) begin
      failures++; $display("FAIL %s: flags %b expected %b", w, got, exp);
    end
    sample = 0; #1;
    checks++;
    if ({bit_err, stuff_err, crc_err, form_err, ack_err, arb_lost, ovl_cond} != 0) begin
      failures++; $display("FAIL %s: flags without sample", w);
    end
  endtask

  initial begin
    //  name                  state        cnt tx sent rx ackd serr arb crc   bit stf crc frm ack arb ovl
    t("clean tx bit",        ST_FRAME,     0, 1, 0, 0, 0, 0, 0, 1, 7'b0000000);
    t("bit error",           ST_FRAME,     0, 1, 0, 1, 0, 0, 0, 1, 7'b1000000);
    t("bit error not arb",   ST_FRAME,     0, 1, 1, 0, 0, 0, 0, 1, 7'b1000000);
    t("arbitration lost",    ST_FRAME,     0, 1, 1, 0, 0, 0, 1, 1, 7'b0000010);
    t("receiver no check",   ST_FRAME,     0, 0, 1, 0, 0, 0, 1, 1, 7'b0000000);
    t("stuff error",         ST_FRAME,     0, 0, 1, 0, 0, 1, 0, 1, 7'b0100000);
    t("stuff flag outside",  ST_EOF,       0, 0, 1, 1, 0, 1, 0, 1, 7'b0000000);
    t("form crc delim",      ST_CRC_DELIM, 0, 0, 1, 0, 0, 0, 0, 1, 7'b0001000);
    t("form ack delim",      ST_ACK_DELIM, 0, 0, 1, 0, 0, 0, 0, 1, 7'b0001000);
    t("form eof",            ST_EOF,       3, 0, 1, 0, 0, 0, 0, 1, 7'b0001000);
    t("last eof overload",   ST_EOF,       6, 0, 1, 0, 0, 0, 0, 1, 7'b0000001);
    t("tx last eof error",   ST_EOF,       6, 1, 1, 0, 0, 0, 0, 1, 7'b1001000);
    t("ack ok",              ST_ACK_SLOT,  0, 1, 1, 0, 0, 0, 0, 1, 7'b0000000);
    t("ack error",           ST_ACK_SLOT,  0, 1, 1, 1, 0, 0, 0, 1, 7'b0000100);
    t("ack driven",          ST_ACK_SLOT,  0, 0, 0, 0, 1, 0, 0, 1, 7'b0000000);
    t("ack readback error",  ST_ACK_SLOT,  0, 0, 0, 1, 1, 0, 0, 1, 7'b1000000);
    t("crc error",           ST_ACK_DELIM, 0, 0, 1, 1, 0, 0, 0, 0, 7'b0010000);
    t("crc tx ignored",      ST_ACK_DELIM, 0, 1, 1, 1, 0, 0, 0, 0, 7'b0000000);
    t("crc good",            ST_ACK_DELIM, 0, 0, 1, 1, 0, 0, 0, 1, 7'b0000000);
    t("overload int0",       ST_INTERM,    0, 0, 1, 0, 0, 0, 0, 1, 7'b0000001);
    t("overload int1",       ST_INTERM,    1, 0, 1, 0, 0, 0, 0, 1, 7'b0000001);
    t("SOF in int2",         ST_INTERM,    2, 0, 1, 0, 0, 0, 0, 1, 7'b0000000);
    t("idle dominant",       ST_IDLE,      0, 0, 1, 0, 0, 0, 0, 1, 7'b0000000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
