// can_bit_destuff: bit de-stuffing unit and field extractor of the receive path.
//
// Works on the bus bits taken at the sample point. `start` marks the SOF
// bit (it clears the unit and counts as frame bit 0); `en` is high for
// every later bit of the stuffed region. After five equal bits the next
// bit is a stuff bit: it is dropped (`d_valid` low) and, if it has the
// same polarity as the run, `stuff_err` is raised. Every other bit is a
// frame bit: `d_valid` is high, `d_idx` is its number counted from SOF,
// `d_crc_calc` says whether it belongs to the CRC computation (SOF up to
// the end of the data field) and `d_arb` whether it is in the arbitration
// field (ID and RTR). The unit stores the identifier, RTR, IDE, DLC, data
// bytes and received CRC as they pass, and computes the frame length
// from DLC and RTR. `region_end` is high on the last bit of the stuffed
// region: the last CRC bit, or the stuff bit that follows it.
// All flags are combinational on the current sample and state.
module can_bit_destuff
  import can_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sample,
  input  logic            bit_in,
  input  logic            start,
  input  logic            en,
  output logic            d_valid,
  output logic [6:0]      d_idx,
  output logic            d_crc_calc,
  output logic            d_arb,
  output logic            is_stuff,
  output logic            stuff_err,
  output logic            region_end,
  output logic [ID_W-1:0] rx_id,
  output logic            rx_rtr,
  output logic            rx_ide,
  output logic [3:0]      rx_dlc,
  output byte_t           rx_data [MAX_BYTES],
  output logic [14:0]     rx_crc,
  output logic [6:0]      bit_cnt
);
  logic [2:0] run;
  logic       last_bit;
  logic       tail;
  logic [6:0] idx;
  logic [2:0] new_run;
  logic [6:0] crc_start;
  logic [6:0] last_idx;
  logic [6:0] dpos;
  logic       act;

  always_comb begin
    act        = sample && (start || en);
    is_stuff   = !start && (run == 3'(STUFF_RUN));
    d_valid    = act && !is_stuff;
    d_idx      = start ? 7'd0 : idx;
    stuff_err  = act && is_stuff && (bit_in == last_bit);
    new_run    = (!start && bit_in == last_bit) ? run + 3'd1 : 3'd1;
    crc_start  = 7'(HDR_BITS) + 7'({data_bytes(rx_rtr, rx_dlc), 3'b000});
    last_idx   = crc_start + 7'd14;
    d_crc_calc = d_valid && ((d_idx < 7'(HDR_BITS)) || (d_idx < crc_start));
    d_arb      = d_valid && (d_idx >= 7'd1) && (d_idx <= 7'd12);
    region_end = act && !start &&
                 ((d_valid && idx >= 7'(HDR_BITS) && idx == last_idx && new_run != 3'(STUFF_RUN)) ||
                  (is_stuff && tail));
    dpos       = idx - 7'(HDR_BITS);
    bit_cnt    = idx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= '0; last_bit <= 1'b1; tail <= 1'b0; idx <= '0;
      rx_id <= '0; rx_rtr <= 1'b0; rx_ide <= 1'b0; rx_dlc <= '0; rx_crc <= '0;
      for (int i = 0; i < MAX_BYTES; i++) rx_data[i] <= '0;
    end else if (act) begin
      if (start) begin
        run <= 3'd1; last_bit <= bit_in; tail <= 1'b0; idx <= 7'd1;
        rx_id <= '0; rx_rtr <= 1'b0; rx_ide <= 1'b0; rx_dlc <= '0; rx_crc <= '0;
        for (int i = 0; i < MAX_BYTES; i++) rx_data[i] <= '0;
      end else if (is_stuff) begin
        run <= 3'd1; last_bit <= bit_in;
      end else begin
        run <= new_run; last_bit <= bit_in; idx <= idx + 7'd1;
        if (idx >= 7'(HDR_BITS) && idx == last_idx && new_run == 3'(STUFF_RUN)) tail <= 1'b1;
        if (idx >= 7'd1 && idx <= 7'd11)       rx_id  <= {rx_id[ID_W-2:0], bit_in};
        else if (idx == 7'd12)                 rx_rtr <= bit_in;
        else if (idx == 7'd13)                 rx_ide <= bit_in;
        else if (idx >= 7'd15 && idx <= 7'd18) rx_dlc <= {rx_dlc[2:0], bit_in};
        else if (idx >= 7'(HDR_BITS) && idx < crc_start)
          rx_data[dpos[5:3]][3'd7 - dpos[2:0]] <= bit_in;
        else if (idx >= crc_start && idx <= last_idx)
          rx_crc <= {rx_crc[13:0], bit_in};
      end
    end
  end
endmodule
