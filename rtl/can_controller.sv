// can_controller: CAN 2.0A (11-bit identifier) controller for a sensor node.
//
// A host writes a message into the ten-byte transmit buffer and sets the
// transmission request; the controller builds the frame, appends the CRC,
// stuffs it and sends it on `can_tx`, arbitrating, checking the ACK and
// retransmitting after errors on its own. Frames seen on `can_rx` are
// de-stuffed, CRC-checked, acknowledged, filtered by identifier and kept
// in a double receive buffer for the host.
//
// Host register bus (synchronous write, combinational read, 8-bit data):
//   0  W  command: bit0 transmission request, bit1 abort request,
//                  bit2 release receive buffer, bit3 clear data overrun
//   1  R  status:  bit0 receive buffer holds a message, bit1 data overrun,
//                  bit2 transmit buffer free, bit3 last transmission done,
//                  bit4 receiving, bit5 transmitting, bit6 error passive,
//                  bit7 bus-off
//   2..7  parameter registers (acceptance code/mask, SJW, bit timing)
//   8  R  transmit error counter (saturated to 255), 9 R receive error counter
//   10..19 transmit buffer, 20..29 receive buffer window
// `can_tx`/`can_rx` connect to a CAN transceiver (1 = recessive). All logic
// runs on `clk`; the bus bit rate is set by the bit-timing registers.
// The block split follows the controller's block diagram; the register map
// and the bit numbering of the command/status registers are this design's.
module can_controller
  import can_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // host bus
  input  logic       cs,
  input  logic       we,
  input  logic [4:0] addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  // CAN bus
  input  logic       can_rx,
  output logic       can_tx,
  // status for the application
  output logic       rx_msg_avail,
  output logic       tx_busy,
  output logic       bus_off
);
  // host side
  logic       wr;
  logic       cmd_tr, cmd_at, cmd_rrb, cmd_cdo;
  logic [7:0] prm_rdata, txb_rdata, rxb_rdata, status;

  // parameters
  logic [ID_W-1:0] acc_code, acc_mask;
  logic [1:0]      sjw;
  logic [5:0]      brp;
  logic [3:0]      tseg1;
  logic [2:0]      tseg2;

  // bit timing
  logic sample, rx_bit, tx_pt, resync, hard_sync_en;

  // transmit chain
  byte_t              tx_buf [BUF_BYTES];
  logic [MAX_FRM-1:0] frame;
  logic [6:0]         frm_len;
  logic [ID_W-1:0]    tx_id;
  logic               tx_rtr;
  logic [3:0]         tx_dlc;
  logic [14:0]        tx_crc;
  logic               ps_bit, ps_in_data, ps_last, ps_done, ps_adv;
  logic               st_bit, st_is_stuff, st_done;

  // receive chain
  logic            ds_start, ds_en, d_valid, d_crc_calc, d_arb, ds_is_stuff;
  logic            ds_stuff_err, ds_region_end;
  logic [6:0]      d_idx, bit_cnt;
  logic [ID_W-1:0] rx_id;
  logic            rx_rtr, rx_ide;
  logic [3:0]      rx_dlc;
  byte_t           rx_data [MAX_BYTES];
  logic [14:0]     rx_crc, rx_crc_calc;
  logic            accept;
  byte_t           rx_msg [BUF_BYTES];
  logic            rx_overrun;
  logic [1:0]      rx_count;

  // control and errors
  mp_state_e  state;
  logic [3:0] mp_cnt;
  logic tx_pending, tx_active, tx_load, stuff_adv, ack_drive;
  logic start_err, start_ovl, tx_err, rx_err, tx_ok, rx_ok, receiving, tx_complete;
  logic crc_ok, bit_err, stuff_err, crc_err, form_err, ack_err, arb_lost, ovl_cond, any_err;
  logic ef_active, ef_bit, ef_done, err_passive;
  logic [8:0] tec;
  logic [7:0] rec;

  // ---------------------------------------------------------------- host
  always_comb begin
    wr      = cs && we;
    cmd_tr  = wr && addr == 5'd0 && wdata[0] && !tx_pending;
    cmd_at  = wr && addr == 5'd0 && wdata[1];
    cmd_rrb = wr && addr == 5'd0 && wdata[2];
    cmd_cdo = wr && addr == 5'd0 && wdata[3];
    status  = {bus_off, err_passive, tx_active, receiving,
               tx_complete, !tx_pending, rx_overrun, rx_msg_avail};
    unique case (addr)
      5'd1:    rdata = status;
      5'd8:    rdata = (tec > 9'd255) ? 8'hFF : tec[7:0];
      5'd9:    rdata = rec;
      default: rdata = prm_rdata | txb_rdata | rxb_rdata;
    endcase
    if (!cs) rdata = 8'h00;
    tx_busy = tx_pending;
  end

  can_param_regs u_prm (
    .clk, .rst_n, .wr, .addr, .wdata, .rdata(prm_rdata),
    .acc_code, .acc_mask, .sjw, .brp, .tseg1, .tseg2
  );

  can_tx_buffer u_txb (
    .clk, .rst_n, .wr, .lock(tx_pending), .addr, .wdata,
    .rdata(txb_rdata), .buf_q(tx_buf)
  );

  // ---------------------------------------------------------- bit timing
  can_btl u_btl (
    .clk, .rst_n, .can_rx, .brp, .tseg1, .tseg2, .sjw, .hard_sync_en, .tx_dom(!can_tx),
    .sample, .rx_bit, .tx_pt, .resync
  );

  // ------------------------------------------------------ transmit chain
  can_frame_gen u_fgen (
    .tx_buf, .frame, .frm_len, .tx_id, .tx_rtr, .tx_dlc
  );

  can_par_ser u_ps (
    .clk, .rst_n, .load(tx_load), .frame, .frm_len, .crc(tx_crc),
    .adv(ps_adv), .bit_out(ps_bit), .in_data(ps_in_data), .last(ps_last), .done(ps_done)
  );

  can_crc15 u_tx_crc (
    .clk, .rst_n, .clr(tx_load), .en(ps_adv && ps_in_data), .bit_in(ps_bit), .crc(tx_crc)
  );

  can_bit_stuff u_stuff (
    .clk, .rst_n, .load(tx_load), .adv(stuff_adv), .ps_bit, .ps_last,
    .bit_out(st_bit), .is_stuff(st_is_stuff), .ps_adv, .done(st_done)
  );

  can_serial_tx u_stx (
    .clk, .rst_n, .tx_pt, .state, .bus_off, .ef_active, .ef_bit, .ack_drive,
    .tx_active, .stuff_done(st_done), .stuff_bit(st_bit), .can_tx
  );

  // ------------------------------------------------------- receive chain
  can_bit_destuff u_dstf (
    .clk, .rst_n, .sample, .bit_in(rx_bit), .start(ds_start), .en(ds_en),
    .d_valid, .d_idx, .d_crc_calc, .d_arb, .is_stuff(ds_is_stuff),
    .stuff_err(ds_stuff_err), .region_end(ds_region_end),
    .rx_id, .rx_rtr, .rx_ide, .rx_dlc, .rx_data, .rx_crc, .bit_cnt
  );

  can_crc15 u_rx_crc (
    .clk, .rst_n, .clr(ds_start), .en(d_crc_calc && !ds_start), .bit_in(rx_bit), .crc(rx_crc_calc)
  );

  can_acc_filter u_acf (
    .rx_id, .acc_code, .acc_mask, .accept
  );

  always_comb begin
    rx_msg[0] = rx_id[10:3];
    rx_msg[1] = {rx_id[2:0], rx_rtr, rx_dlc};
    for (int i = 0; i < MAX_BYTES; i++) rx_msg[2+i] = rx_data[i];
  end

  can_rx_buffer u_rxb (
    .clk, .rst_n, .store(rx_ok && accept), .msg(rx_msg), .release_buf(cmd_rrb),
    .clr_overrun(cmd_cdo), .addr, .rdata(rxb_rdata), .msg_avail(rx_msg_avail),
    .overrun(rx_overrun), .count(rx_count)
  );

  // ---------------------------------------------------- control / errors
  can_err_mgmt u_emgmt (
    .sample, .rx_bit, .sent_bit(can_tx), .state, .cnt(mp_cnt[2:0]), .tx_active,
    .ack_drive, .ds_stuff_err, .ds_arb(d_arb), .crc_calc(rx_crc_calc), .crc_rcvd(rx_crc),
    .crc_ok, .bit_err, .stuff_err, .crc_err, .form_err, .ack_err, .arb_lost, .ovl_cond, .any_err
  );

  can_err_frame_gen u_efg (
    .clk, .rst_n, .sample, .rx_bit, .start_err, .start_ovl, .tx_err, .rx_err,
    .tx_ok, .rx_ok, .active(ef_active), .tx_bit(ef_bit), .done(ef_done),
    .tec, .rec, .err_passive, .bus_off
  );

  can_msg_proc u_mp (
    .clk, .rst_n, .sample, .rx_bit, .tx_req(cmd_tr), .abort(cmd_at),
    .ds_region_end, .crc_ok, .any_err, .arb_lost, .ovl_cond, .ef_done, .bus_off,
    .stuff_done(st_done), .state, .cnt(mp_cnt), .tx_pending, .tx_active, .tx_load,
    .ds_start, .ds_en, .stuff_adv, .ack_drive, .start_err, .start_ovl, .tx_err, .rx_err,
    .tx_ok, .rx_ok, .hard_sync_en, .receiving, .tx_complete
  );
endmodule
