// can_frame_gen: data / remote frame generator.
//
// Turns the ten bytes of the transmit buffer into the unstuffed CAN base
// frame from SOF to the end of the data field:
//   SOF(0) | ID[10:0] | RTR | IDE(0) | r0(0) | DLC[3:0] | data bytes
// A frame with RTR set is a remote frame and carries no data field
// whatever its DLC. A DLC above 8 is sent as coded but carries 8 bytes.
// frame[i] is frame bit i in transmission order (frame[0] is SOF) and
// frm_len is the number of bits, 19 + 8 * bytes; the CRC sequence is
// appended later by the serializer. Purely combinational.
module can_frame_gen
  import can_pkg::*;
(
  input  byte_t            tx_buf [BUF_BYTES],
  output logic [MAX_FRM-1:0] frame,
  output logic [6:0]       frm_len,
  output logic [ID_W-1:0]  tx_id,
  output logic             tx_rtr,
  output logic [3:0]       tx_dlc
);
  logic [3:0] nbytes;

  always_comb begin
    tx_id  = {tx_buf[0], tx_buf[1][7:5]};
    tx_rtr = tx_buf[1][4];
    tx_dlc = tx_buf[1][3:0];
    nbytes = data_bytes(tx_rtr, tx_dlc);
    frm_len = 7'(HDR_BITS) + 7'({nbytes, 3'b000});

    frame = '0;
    frame[0] = 1'b0;                                  // SOF, dominant
    for (int i = 0; i < ID_W; i++) frame[1 + i] = tx_id[ID_W-1-i];
    frame[12] = tx_rtr;
    frame[13] = 1'b0;                                 // IDE: base format
    frame[14] = 1'b0;                                 // r0
    for (int i = 0; i < DLC_W; i++) frame[15 + i] = tx_dlc[DLC_W-1-i];
    for (int b = 0; b < MAX_BYTES; b++)
      for (int i = 0; i < 8; i++)
        if (4'(b) < nbytes) frame[HDR_BITS + 8*b + i] = tx_buf[2+b][7-i];
  end
endmodule
