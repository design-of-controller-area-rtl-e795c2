// can_msg_proc: message processor, the controller's central state machine.
//
// It follows the bus one bit at a time, on the sample-point strobe, through
// the phases of mp_state_e: bus integration (11 recessive bits after reset
// or bus-off), idle, the stuffed frame (SOF to CRC, tracked by the
// de-stuffing unit), CRC delimiter, ACK slot, ACK delimiter, 7 EOF bits,
// 3 intermission bits, and error or overload frames.
// Transmission: a host request sets `tx_pending`. When the bus is idle, or
// at the end of the intermission, the node loads the transmit chain and
// becomes transmitter (`tx_active`); the SOF goes out on the next bit. A
// node that loses arbitration, or whose frame is hit by an error, drops
// `tx_active` but keeps `tx_pending`, so the frame is sent again as soon
// as the bus is free (automatic retransmission). The request is cleared by
// `tx_ok` after the last EOF bit, or by `abort` while not transmitting.
// Reception: every node, transmitter included, de-stuffs the bus; a
// receiver acknowledges a frame with a correct CRC and reports `rx_ok` at
// the sixth EOF bit.
// Errors end the frame: an error flag starts on the next bit, counted as a
// transmit or receive error for fault confinement. A dominant bit in the
// first two intermission bits starts an overload frame; one in the third
// is taken as SOF. Hard synchronization is enabled while the bus is idle.
// Not modelled: the suspend-transmission delay of error-passive nodes, a
// pending node joining a frame started by another node one bit earlier.
module can_msg_proc
  import can_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sample,
  input  logic       rx_bit,
  input  logic       tx_req,
  input  logic       abort,
  input  logic       ds_region_end,
  input  logic       crc_ok,
  input  logic       any_err,
  input  logic       arb_lost,
  input  logic       ovl_cond,
  input  logic       ef_done,
  input  logic       bus_off,
  input  logic       stuff_done,
  output mp_state_e  state,
  output logic [3:0] cnt,
  output logic       tx_pending,
  output logic       tx_active,
  output logic       tx_load,
  output logic       ds_start,
  output logic       ds_en,
  output logic       stuff_adv,
  output logic       ack_drive,
  output logic       start_err,
  output logic       start_ovl,
  output logic       tx_err,
  output logic       rx_err,
  output logic       tx_ok,
  output logic       rx_ok,
  output logic       hard_sync_en,
  output logic       receiving,
  output logic       tx_complete
);
  logic start_tx;
  logic in_frame;

  always_comb begin
    in_frame  = (state == ST_FRAME) || (state == ST_CRC_DELIM) || (state == ST_ACK_SLOT) ||
                (state == ST_ACK_DELIM) || (state == ST_EOF);
    ds_start  = sample && !rx_bit && !bus_off &&
                ((state == ST_IDLE) || (state == ST_INTERM && cnt == 4'(INT_BITS - 1)));
    ds_en     = (state == ST_FRAME);
    stuff_adv = sample && tx_active && !stuff_done && (ds_start || state == ST_FRAME);
    start_err = sample && !bus_off && in_frame && any_err;
    start_ovl = sample && !bus_off && !start_err && ovl_cond;
    tx_err    = start_err && tx_active;
    rx_err    = start_err && !tx_active;
    tx_ok     = sample && !start_err && tx_active && state == ST_EOF && cnt == 4'(EOF_BITS - 1);
    rx_ok     = sample && !start_err && !tx_active && state == ST_EOF && cnt == 4'(EOF_BITS - 2);
    // start transmitting after an idle bit or the last intermission bit
    start_tx  = sample && rx_bit && tx_pending && !tx_active && !bus_off &&
                ((state == ST_IDLE) || (state == ST_INTERM && cnt == 4'(INT_BITS - 1)));
    tx_load   = start_tx;
    hard_sync_en = (state == ST_IDLE) || (state == ST_INTERM && cnt == 4'(INT_BITS - 1));
    receiving = in_frame && !tx_active;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_INTEG;
      cnt         <= '0;
      tx_pending  <= 1'b0;
      tx_active   <= 1'b0;
      ack_drive   <= 1'b0;
      tx_complete <= 1'b0;
    end else begin
      if (tx_req) begin
        tx_pending  <= 1'b1;
        tx_complete <= 1'b0;
      end else if (abort && !tx_active) begin
        tx_pending  <= 1'b0;
      end

      if (sample) begin
        if (bus_off) begin
          state     <= ST_BUSOFF;
          tx_active <= 1'b0;
          ack_drive <= 1'b0;
        end else if (start_err) begin
          state     <= ST_ERROR;
          tx_active <= 1'b0;
          ack_drive <= 1'b0;
        end else if (start_ovl) begin
          state     <= ST_OVERLOAD;
        end else begin
          if (start_tx) tx_active <= 1'b1;
          unique case (state)
            ST_INTEG: begin
              if (!rx_bit) cnt <= '0;
              else if (cnt == 4'(IDLE_BITS - 1)) begin state <= ST_IDLE; cnt <= '0; end
              else cnt <= cnt + 4'd1;
            end
            ST_IDLE: if (ds_start) state <= ST_FRAME;
            ST_FRAME: begin
              if (arb_lost) tx_active <= 1'b0;
              if (ds_region_end) state <= ST_CRC_DELIM;
            end
            ST_CRC_DELIM: begin
              ack_drive <= !tx_active && crc_ok;
              state     <= ST_ACK_SLOT;
            end
            ST_ACK_SLOT: begin
              ack_drive <= 1'b0;
              state     <= ST_ACK_DELIM;
            end
            ST_ACK_DELIM: begin
              state <= ST_EOF;
              cnt   <= '0;
            end
            ST_EOF: begin
              if (cnt == 4'(EOF_BITS - 1)) begin
                state <= ST_INTERM;
                cnt   <= '0;
                if (tx_active) begin
                  tx_active   <= 1'b0;
                  tx_pending  <= 1'b0;
                  tx_complete <= 1'b1;
                end
              end else cnt <= cnt + 4'd1;
            end
            ST_INTERM: begin
              if (cnt == 4'(INT_BITS - 1)) begin
                state <= ds_start ? ST_FRAME : ST_IDLE;
                cnt   <= '0;
              end else cnt <= cnt + 4'd1;
            end
            ST_ERROR, ST_OVERLOAD: if (ef_done) begin state <= ST_INTERM; cnt <= '0; end
            ST_BUSOFF: begin state <= ST_INTEG; cnt <= '0; end
            default: state <= ST_INTEG;
          endcase
        end
      end
    end
  end
endmodule
