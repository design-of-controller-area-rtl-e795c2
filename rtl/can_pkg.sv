// can_pkg: constants and types shared by the CAN 2.0A controller.
//
// Field sizes follow the CAN base frame: 11-bit identifier, RTR, IDE and
// r0 bits, 4-bit DLC, 0..8 data bytes, 15-bit CRC, 7-bit EOF and 3-bit
// intermission. The unstuffed frame is numbered from SOF = bit 0, so the
// data field starts at bit 19 and the CRC sequence follows the data.
// The message-processor state encoding is this design's own choice.
package can_pkg;

  localparam int unsigned ID_W        = 11;
  localparam int unsigned DLC_W       = 4;
  localparam int unsigned CRC_W       = 15;
  localparam logic [14:0] CRC_POLY    = 15'h4599;  // x^15+x^14+x^10+x^8+x^7+x^4+x^3+1
  localparam int unsigned MAX_BYTES   = 8;
  localparam int unsigned BUF_BYTES   = 10;        // ID/RTR/DLC header (2) + 8 data bytes
  localparam int unsigned HDR_BITS    = 19;        // SOF + ID + RTR + IDE + r0 + DLC
  localparam int unsigned MAX_FRM     = HDR_BITS + 8*MAX_BYTES;  // 83 unstuffed bits before CRC
  localparam int unsigned STUFF_RUN   = 5;
  localparam int unsigned EOF_BITS    = 7;
  localparam int unsigned INT_BITS    = 3;
  localparam int unsigned FLAG_BITS   = 6;
  localparam int unsigned DELIM_BITS  = 8;
  localparam int unsigned IDLE_BITS   = 11;        // recessive bits for bus integration

  typedef logic [7:0] byte_t;
  typedef byte_t msg_buf_t [BUF_BYTES];

  // Message-processor phase of the bus.
  typedef enum logic [3:0] {
    ST_INTEG     = 4'd0,  // waiting for 11 recessive bits
    ST_IDLE      = 4'd1,
    ST_FRAME     = 4'd2,  // SOF .. CRC sequence (stuffed region)
    ST_CRC_DELIM = 4'd3,
    ST_ACK_SLOT  = 4'd4,
    ST_ACK_DELIM = 4'd5,
    ST_EOF       = 4'd6,
    ST_INTERM    = 4'd7,
    ST_ERROR     = 4'd8,  // error flag + delimiter
    ST_OVERLOAD  = 4'd9,  // overload flag + delimiter
    ST_BUSOFF    = 4'd10
  } mp_state_e;

  // Length of the data field in bytes for a DLC/RTR pair (DLC 9..15 mean 8).
  function automatic logic [3:0] data_bytes(input logic rtr, input logic [3:0] dlc);
    if (rtr) return 4'd0;
    return (dlc > 4'd8) ? 4'd8 : dlc;
  endfunction

  // One step of the serial CAN CRC-15.
  function automatic logic [14:0] crc15_step(input logic [14:0] crc, input logic b);
    logic fb;
    fb = b ^ crc[14];
    return fb ? ({crc[13:0], 1'b0} ^ CRC_POLY) : {crc[13:0], 1'b0};
  endfunction

endpackage
