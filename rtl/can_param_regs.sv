// can_param_regs: parameter registers of the CAN controller.
//
// Holds the acceptance code, the acceptance mask, the synchronization jump
// width and the bit-timing settings. The host writes them one byte at a time
// over the controller's register bus and can read them back.
// Register map (byte addresses):
//   2  code[10:3]         3  {code[2:0], 5'b0}
//   4  mask[10:3]         5  {mask[2:0], 5'b0}
//   6  {SJW-1[1:0], BRP-1[5:0]}     7  {1'b0, TSEG2-1[2:0], TSEG1-1[3:0]}
// One time quantum is BRP clock cycles, TSEG1 (Prop_Seg + Phase_Seg1) and
// TSEG2 (Phase_Seg2) are counted in time quanta. The byte layout of the
// timing registers and the reset values are this design's choices; the
// reset values give a 10-quantum bit of 50 clock cycles (1 Mbit/s from a
// 50 MHz clock) sampled after 7 quanta, at 70 %.
// Writes take effect on the next clock; rdata is combinational.
module can_param_regs
  import can_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr,
  input  logic [4:0]      addr,
  input  logic [7:0]      wdata,
  output logic [7:0]      rdata,
  output logic [ID_W-1:0] acc_code,
  output logic [ID_W-1:0] acc_mask,
  output logic [1:0]      sjw,     // jump width - 1
  output logic [5:0]      brp,     // prescaler - 1
  output logic [3:0]      tseg1,   // Prop_Seg + Phase_Seg1 - 1
  output logic [2:0]      tseg2    // Phase_Seg2 - 1
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_code <= '0;
      acc_mask <= '1;       // accept everything after reset
      sjw      <= 2'd0;
      brp      <= 6'd4;
      tseg1    <= 4'd5;
      tseg2    <= 3'd2;
    end else if (wr) begin
      unique case (addr)
        5'd2: acc_code[10:3] <= wdata;
        5'd3: acc_code[2:0]  <= wdata[7:5];
        5'd4: acc_mask[10:3] <= wdata;
        5'd5: acc_mask[2:0]  <= wdata[7:5];
        5'd6: {sjw, brp}     <= wdata;
        5'd7: {tseg2, tseg1} <= wdata[6:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (addr)
      5'd2:    rdata = acc_code[10:3];
      5'd3:    rdata = {acc_code[2:0], 5'b0};
      5'd4:    rdata = acc_mask[10:3];
      5'd5:    rdata = {acc_mask[2:0], 5'b0};
      5'd6:    rdata = {sjw, brp};
      5'd7:    rdata = {1'b0, tseg2, tseg1};
      default: rdata = 8'h00;
    endcase
  end
endmodule
