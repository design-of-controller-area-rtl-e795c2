// can_crc15: serial 15-bit CAN CRC register.
//
// Each bit of the unstuffed frame from SOF to the end of the data field is
// shifted in MSB-first with `en`; the polynomial is the CAN one,
// x^15+x^14+x^10+x^8+x^7+x^4+x^3+1. `clr` presets the register to zero
// before a frame (clr wins over en). `crc` is the remainder after the last
// bit, which a transmitter appends and a receiver compares with the
// received CRC sequence. One bit per clock at most; the result is valid the
// clock after the last `en`.
module can_crc15
  import can_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        en,
  input  logic        bit_in,
  output logic [14:0] crc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   crc <= '0;
    else if (clr) crc <= '0;
    else if (en)  crc <= crc15_step(crc, bit_in);
  end
endmodule
