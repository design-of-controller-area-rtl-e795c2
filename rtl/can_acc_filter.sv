// can_acc_filter: acceptance filter for received identifiers.
//
// A received 11-bit identifier is accepted when it equals the acceptance
// code in every bit position the acceptance mask does not exclude. A mask
// bit of 1 means "don't care" (the convention of common stand-alone CAN
// controllers; the polarity is this design's choice). Purely combinational:
// `accept` is valid in the same cycle as its inputs.
module can_acc_filter
  import can_pkg::*;
(
  input  logic [ID_W-1:0] rx_id,
  input  logic [ID_W-1:0] acc_code,
  input  logic [ID_W-1:0] acc_mask,
  output logic            accept
);
  always_comb accept = (((rx_id ^ acc_code) & ~acc_mask) == '0);
endmodule
