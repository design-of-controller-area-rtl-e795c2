// can_tx_buffer: ten-byte transmit buffer.
//
// The host writes the message to send at addresses BASE..BASE+9:
//   byte 0  ID[10:3]
//   byte 1  {ID[2:0], RTR, DLC[3:0]}
//   byte 2..9  data bytes 1..8
// (this header packing matches the example message loaded in the design's
// simulation: bytes EE, F1 give ID 0x777, RTR 1, DLC 1).
// The frame generator reads the whole buffer in parallel. While `lock` is
// high (a transmission is pending) host writes are ignored so the message
// cannot change under the serializer. Reads are combinational.
module can_tx_buffer
  import can_pkg::*;
#(
  parameter int unsigned BYTES = BUF_BYTES,
  parameter int unsigned BASE  = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic       lock,
  input  logic [4:0] addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output byte_t      buf_q [BYTES]
);
  localparam int unsigned IW = $clog2(BYTES);
  logic [4:0] idx;
  logic       hit;

  always_comb begin
    idx = addr - 5'(BASE);
    hit = (addr >= 5'(BASE)) && (addr < 5'(BASE + BYTES));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < BYTES; i++) buf_q[i] <= '0;
    end else if (wr && hit && !lock) begin
      buf_q[idx[IW-1:0]] <= wdata;
    end
  end

  always_comb rdata = hit ? buf_q[idx[IW-1:0]] : 8'h00;
endmodule
