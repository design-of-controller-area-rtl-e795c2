// can_err_frame_gen: error / overload frame generator and fault confinement.
//
// Frame generation. `start_err` or `start_ovl` (at a sample point) starts a
// flag on the next bit: six dominant bits for an overload flag or for an
// error-active node's error flag, six recessive bits for an error-passive
// node. The node then sends recessive and waits until it samples a
// recessive bus bit, which is the first of the eight delimiter bits (this
// lets flags of other nodes overlap). `done` pulses on the sample of the
// eighth recessive delimiter bit. `active` and `tx_bit` feed the frame
// transmitter.
// Fault confinement keeps the transmit and receive error counters:
// a transmitter error adds 8 to TEC, a receiver error adds 1 to REC, a
// successful transmission subtracts 1 from TEC and a successful reception
// 1 from REC (a REC above 127 drops to 127). The node is error passive
// when either counter exceeds 127 and goes bus-off when TEC exceeds 255.
// A bus-off node recovers after 128 sequences of 11 recessive bits, which
// clears both counters. The special cases of the standard's counting rules
// (exceptions for passive ACK errors, +8 for dominant bits after a flag)
// are not modelled.
module can_err_frame_gen
  import can_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sample,
  input  logic       rx_bit,
  input  logic       start_err,
  input  logic       start_ovl,
  input  logic       tx_err,      // error while transmitting (with start_err)
  input  logic       rx_err,      // error while receiving   (with start_err)
  input  logic       tx_ok,
  input  logic       rx_ok,
  output logic       active,
  output logic       tx_bit,
  output logic       done,
  output logic [8:0] tec,
  output logic [7:0] rec,
  output logic       err_passive,
  output logic       bus_off
);
  typedef enum logic [1:0] {EF_IDLE, EF_FLAG, EF_WAIT, EF_DELIM} ef_state_e;

  ef_state_e  st;
  logic       dom_flag;    // flag is dominant
  logic [2:0] flag_cnt;
  logic [2:0] delim_cnt;
  logic [3:0] rec_run;     // recessive bits in a row while bus-off
  logic [6:0] rec_seq;     // completed 11-bit recessive sequences

  always_comb begin
    active      = (st != EF_IDLE);
    tx_bit      = !(st == EF_FLAG && dom_flag);
    done        = sample && st == EF_DELIM && rx_bit && delim_cnt == 3'(DELIM_BITS - 1);
    err_passive = (tec > 9'd127) || (rec > 8'd127);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= EF_IDLE; dom_flag <= 1'b0; flag_cnt <= '0; delim_cnt <= '0;
    end else if (sample) begin
      if (start_err || start_ovl) begin
        st       <= EF_FLAG;
        flag_cnt <= '0;
        dom_flag <= start_ovl || !err_passive;
      end else begin
        unique case (st)
          EF_FLAG: begin
            if (flag_cnt == 3'(FLAG_BITS - 1)) st <= EF_WAIT;
            flag_cnt <= flag_cnt + 3'd1;
          end
          EF_WAIT: if (rx_bit) begin st <= EF_DELIM; delim_cnt <= 3'd1; end
          EF_DELIM: begin
            if (!rx_bit)                                  delim_cnt <= 3'd0;  // flag still on bus
            else if (delim_cnt == 3'(DELIM_BITS - 1))     st <= EF_IDLE;
            else                                          delim_cnt <= delim_cnt + 3'd1;
            if (!rx_bit) st <= EF_WAIT;
          end
          default: ;
        endcase
      end
    end
  end

  // Fault confinement counters.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tec <= '0; rec <= '0; bus_off <= 1'b0; rec_run <= '0; rec_seq <= '0;
    end else if (sample) begin
      if (bus_off) begin
        if (!rx_bit) rec_run <= '0;
        else if (rec_run == 4'(IDLE_BITS - 1)) begin
          rec_run <= '0;
          rec_seq <= rec_seq + 7'd1;
          if (rec_seq == 7'd127) begin
            bus_off <= 1'b0; tec <= '0; rec <= '0;
          end
        end else rec_run <= rec_run + 4'd1;
      end else begin
        if (start_err && tx_err) begin
          if (tec + 9'd8 > 9'd255) begin
            bus_off <= 1'b1; tec <= 9'd256; rec_run <= '0; rec_seq <= '0;
          end else tec <= tec + 9'd8;
        end else if (tx_ok && tec != '0) tec <= tec - 9'd1;
        if (start_err && rx_err) begin
          if (rec != 8'hFF) rec <= rec + 8'd1;
        end else if (rx_ok) begin
          if (rec > 8'd127)     rec <= 8'd127;
          else if (rec != '0)   rec <= rec - 8'd1;
        end
      end
    end
  end
endmodule
