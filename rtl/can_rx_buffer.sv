// can_rx_buffer: double receive buffer.
//
// Two ten-byte message buffers used as a two-entry FIFO, so the host can
// read one message while the next one is being received. `store` writes
// an accepted message (same byte layout as the transmit buffer: ID[10:3],
// {ID[2:0], RTR, DLC}, data 1..8) into the free buffer. The host reads the
// oldest message through a ten-byte window at BASE..BASE+9 and frees it
// with `release`. A message that arrives when both buffers are full is
// dropped and sets `overrun` until `clr_overrun`. Reads are combinational.
module can_rx_buffer
  import can_pkg::*;
#(
  parameter int unsigned NBUF  = 2,
  parameter int unsigned BYTES = BUF_BYTES,
  parameter int unsigned BASE  = 20
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       store,
  input  byte_t      msg [BYTES],
  input  logic       release_buf,
  input  logic       clr_overrun,
  input  logic [4:0] addr,
  output logic [7:0] rdata,
  output logic       msg_avail,
  output logic       overrun,
  output logic [$clog2(NBUF+1)-1:0] count
);
  localparam int unsigned PW = (NBUF > 1) ? $clog2(NBUF) : 1;
  localparam int unsigned IW = $clog2(BYTES);

  byte_t          mem [NBUF][BYTES];
  logic [PW-1:0]  wr_ptr, rd_ptr;
  logic [4:0]     idx;
  logic           hit;
  logic           do_store, do_rel;

  always_comb begin
    msg_avail = (count != '0);
    do_store  = store && (count != ($clog2(NBUF+1))'(NBUF));
    do_rel    = release_buf && msg_avail;
    idx       = addr - 5'(BASE);
    hit       = (addr >= 5'(BASE)) && (addr < 5'(BASE + BYTES));
    rdata     = (hit && msg_avail) ? mem[rd_ptr][idx[IW-1:0]] : 8'h00;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0; rd_ptr <= '0; count <= '0; overrun <= 1'b0;
      for (int b = 0; b < NBUF; b++)
        for (int i = 0; i < BYTES; i++) mem[b][i] <= '0;
    end else begin
      if (do_store) begin
        for (int i = 0; i < BYTES; i++) mem[wr_ptr][i] <= msg[i];
        wr_ptr <= (wr_ptr == PW'(NBUF - 1)) ? '0 : wr_ptr + PW'(1);
      end
      if (do_rel) rd_ptr <= (rd_ptr == PW'(NBUF - 1)) ? '0 : rd_ptr + PW'(1);
      if (do_store && !do_rel)      count <= count + 1'b1;
      else if (!do_store && do_rel) count <= count - 1'b1;
      if (store && !do_store)       overrun <= 1'b1;
      else if (clr_overrun)         overrun <= 1'b0;
    end
  end
endmodule
