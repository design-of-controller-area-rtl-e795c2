// can_err_mgmt: error management logic.
//
// Checks every sampled bus bit against what the frame phase allows and
// reports, for that sample only (combinational, qualified by `sample`):
//   bit_err   a transmitting node read back a level other than the one it
//             sent (outside the ACK slot and outside lost arbitration);
//             also a receiver whose dominant ACK bit read back recessive
//   stuff_err six equal bits inside the stuffed region (from de-stuffing)
//   crc_err   the received CRC differs from the computed one; as in the
//             CAN standard it is flagged after the ACK delimiter
//   form_err  a dominant CRC delimiter, ACK delimiter or EOF bit (the last
//             EOF bit of a receiver is an overload condition instead)
//   ack_err   a transmitter read a recessive ACK slot
//   arb_lost  a transmitter sent recessive in the arbitration field and
//             read dominant: it turns receiver, which is not an error
//   ovl_cond  overload condition: dominant in the first two intermission
//             bits or in a receiver's last EOF bit
// `crc_ok` is the comparison itself and is also used for the ACK decision.
module can_err_mgmt
  import can_pkg::*;
(
  input  logic        sample,
  input  logic        rx_bit,
  input  logic        sent_bit,
  input  mp_state_e   state,
  input  logic [2:0]  cnt,        // bit number within EOF / intermission
  input  logic        tx_active,
  input  logic        ack_drive,
  input  logic        ds_stuff_err,
  input  logic        ds_arb,
  input  logic [14:0] crc_calc,
  input  logic [14:0] crc_rcvd,
  output logic        crc_ok,
  output logic        bit_err,
  output logic        stuff_err,
  output logic        crc_err,
  output logic        form_err,
  output logic        ack_err,
  output logic        arb_lost,
  output logic        ovl_cond,
  output logic        any_err
);
  logic rx_last_eof;
  logic tx_check;

  always_comb begin
    crc_ok      = (crc_calc == crc_rcvd);
    rx_last_eof = (state == ST_EOF) && (cnt == 3'(EOF_BITS - 1)) && !tx_active;
    tx_check    = (state == ST_FRAME) || (state == ST_CRC_DELIM) ||
                  (state == ST_ACK_DELIM) || (state == ST_EOF);

    arb_lost  = sample && tx_active && state == ST_FRAME && ds_arb && sent_bit && !rx_bit;
    bit_err   = sample && ((tx_active && tx_check && sent_bit != rx_bit && !arb_lost) ||
                           (state == ST_ACK_SLOT && ack_drive && rx_bit));
    stuff_err = sample && state == ST_FRAME && ds_stuff_err;
    crc_err   = sample && state == ST_ACK_DELIM && !tx_active && !crc_ok;
    form_err  = sample && !rx_bit &&
                ((state == ST_CRC_DELIM) || (state == ST_ACK_DELIM) ||
                 (state == ST_EOF && !rx_last_eof));
    ack_err   = sample && state == ST_ACK_SLOT && tx_active && rx_bit;
    ovl_cond  = sample && !rx_bit &&
                ((state == ST_INTERM && cnt < 3'd2) || rx_last_eof);
    any_err   = bit_err || stuff_err || crc_err || form_err || ack_err;
  end
endmodule
