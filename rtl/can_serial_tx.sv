// can_serial_tx: serialized frame transmitter.
//
// Drives the CAN tx line (1 = recessive, 0 = dominant). At each transmit
// point (start of the bit's Sync_Seg) it registers, in order of priority:
//   recessive while bus-off,
//   the error or overload frame bit while that frame is active,
//   a dominant bit in the ACK slot when this node acknowledges,
//   the stuffed data/remote frame bit while this node transmits SOF..CRC,
//   recessive otherwise (delimiters, EOF, idle, receiving).
// The line therefore holds one value for a whole bit time.
module can_serial_tx
  import can_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      tx_pt,
  input  mp_state_e state,
  input  logic      bus_off,
  input  logic      ef_active,
  input  logic      ef_bit,
  input  logic      ack_drive,
  input  logic      tx_active,
  input  logic      stuff_done,
  input  logic      stuff_bit,
  output logic      can_tx
);
  logic nxt;

  always_comb begin
    if (bus_off)                                   nxt = 1'b1;
    else if (ef_active)                            nxt = ef_bit;
    else if (state == ST_ACK_SLOT && ack_drive)    nxt = 1'b0;
    else if (tx_active && !stuff_done &&
             (state == ST_IDLE || state == ST_FRAME)) nxt = stuff_bit;
    else                                           nxt = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     can_tx <= 1'b1;
    else if (tx_pt) can_tx <= nxt;
  end
endmodule
