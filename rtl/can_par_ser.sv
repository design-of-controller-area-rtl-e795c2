// can_par_ser: parallel-to-serial converter of the transmit path.
//
// `load` captures the unstuffed frame from the frame generator and restarts
// at bit 0 (SOF). `bit_out` is the current bit: a frame bit while
// idx < frm_len (`in_data` high, which is when the CRC generator must
// absorb it), then the 15 CRC bits MSB first taken from `crc`, which is
// frozen by then. `adv` moves to the next bit; `last` marks the final CRC
// bit and `done` means every bit has been sent. The stall for a stuff bit is
// simply the absence of `adv`.
module can_par_ser
  import can_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [MAX_FRM-1:0] frame,
  input  logic [6:0]         frm_len,
  input  logic [14:0]        crc,
  input  logic               adv,
  output logic               bit_out,
  output logic               in_data,
  output logic               last,
  output logic               done
);
  logic [MAX_FRM-1:0] frm_q;
  logic [6:0]         len_q;
  logic [6:0]         idx;
  logic [6:0]         cidx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frm_q <= '0;
      len_q <= 7'(HDR_BITS);
      idx   <= 7'd127;          // idle: nothing to send
    end else if (load) begin
      frm_q <= frame;
      len_q <= frm_len;
      idx   <= '0;
    end else if (adv && !done) begin
      idx   <= idx + 7'd1;
    end
  end

  always_comb begin
    cidx    = idx - len_q;                       // position inside the CRC
    in_data = (idx < len_q);
    done    = (idx > len_q + 7'd14);
    last    = (idx == len_q + 7'd14);
    if (in_data)    bit_out = frm_q[idx];
    else if (!done) bit_out = crc[4'd14 - cidx[3:0]];
    else            bit_out = 1'b1;
  end
endmodule
