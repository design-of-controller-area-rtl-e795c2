// can_btl: bit timing logic and bus synchronizer.
//
// The CAN rx line is first passed through two flip-flops. A prescaler
// divides the clock into time quanta of BRP+1 cycles. Each bit time is
// Sync_Seg (1 quantum), then TSEG1+1 quanta (Prop_Seg + Phase_Seg1), then
// TSEG2+1 quanta (Phase_Seg2). The bus is sampled once at the end of
// TSEG1: `sample` pulses for one clock with the bit on `rx_bit`. `tx_pt`
// pulses at the start of Sync_Seg, when the transmitter may change the tx
// line.
// Synchronization uses recessive-to-dominant edges only:
//  * hard sync (`hard_sync_en`, bus idle): the bit restarts, the quantum in
//    which the edge fell becomes Sync_Seg;
//  * resynchronization (otherwise, and only if the last sampled bit was
//    recessive): an edge inside TSEG1 lengthens TSEG1 by the phase error,
//    an edge inside Phase_Seg2 shortens it, both limited to SJW+1 quanta.
//    A node that is itself sending dominant ignores late edges, which are
//    its own edges seen through the loop delay.
// Edges are acted on at the next quantum boundary. `resync` pulses when a
// phase correction was applied (for status and test). Single sampling;
// the triple-sampling option is not built.
module can_btl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       can_rx,
  input  logic [5:0] brp,
  input  logic [3:0] tseg1,
  input  logic [2:0] tseg2,
  input  logic [1:0] sjw,
  input  logic       hard_sync_en,
  input  logic       tx_dom,       // this node drives the bus dominant
  output logic       sample,
  output logic       rx_bit,
  output logic       tx_pt,
  output logic       resync
);
  typedef enum logic [1:0] {PH_SYNC, PH_SEG1, PH_SEG2} phase_e;

  logic       rx_s1, rx_s2, rx_d;
  logic [5:0] pre_cnt;
  logic       tq;
  phase_e     phase;
  logic [4:0] cnt;        // quanta elapsed in the current segment
  logic [4:0] seg1_len;   // TSEG1 length in quanta, after lengthening
  logic [4:0] seg2_len;   // Phase_Seg2 length in quanta
  logic       edge_pend;
  logic       edge_now;   // edge seen since the last quantum boundary
  logic [4:0] sjw_q, err, rem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_s1 <= 1'b1; rx_s2 <= 1'b1; rx_d <= 1'b1;
    end else begin
      rx_s1 <= can_rx; rx_s2 <= rx_s1; rx_d <= rx_s2;
    end
  end

  always_comb begin
    tq    = (pre_cnt == brp);
    sjw_q = 5'(sjw) + 5'd1;
    err   = (cnt + 5'd1 < sjw_q) ? cnt + 5'd1 : sjw_q;   // late edge: lengthen
    rem   = seg2_len - cnt;                              // quanta left in Phase_Seg2
    edge_now = edge_pend || (rx_d && !rx_s2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_cnt   <= '0;
      phase     <= PH_SYNC;
      cnt       <= '0;
      seg1_len  <= 5'd6;
      seg2_len  <= 5'd3;
      edge_pend <= 1'b0;
      sample    <= 1'b0;
      tx_pt     <= 1'b0;
      resync    <= 1'b0;
      rx_bit    <= 1'b1;
    end else begin
      sample <= 1'b0;
      tx_pt  <= 1'b0;
      resync <= 1'b0;
      pre_cnt <= tq ? '0 : pre_cnt + 6'd1;
      if (rx_d && !rx_s2 && !tq) edge_pend <= 1'b1;

      if (tq) begin
        edge_pend <= 1'b0;
        if (edge_now && hard_sync_en) begin
          // this quantum was Sync_Seg: continue in TSEG1
          phase    <= PH_SEG1;
          cnt      <= '0;
          seg1_len <= 5'(tseg1) + 5'd1;
          seg2_len <= 5'(tseg2) + 5'd1;
        end else if (edge_now && rx_bit && phase == PH_SEG2) begin
          resync <= 1'b1;
          if (rem <= sjw_q) begin
            // early edge: end the bit now, this quantum becomes Sync_Seg
            phase    <= PH_SEG1;
            cnt      <= '0;
            seg1_len <= 5'(tseg1) + 5'd1;
            seg2_len <= 5'(tseg2) + 5'd1;
            tx_pt    <= 1'b1;
          end else begin
            seg2_len <= seg2_len - sjw_q;
            cnt      <= cnt + 5'd1;
          end
        end else begin
          if (edge_now && rx_bit && !tx_dom && phase == PH_SEG1) begin
            seg1_len <= seg1_len + err;
            resync   <= 1'b1;
          end
          unique case (phase)
            PH_SYNC: begin
              phase <= PH_SEG1;
              cnt   <= '0;
            end
            PH_SEG1: begin
              if (cnt + 5'd1 >= seg1_len && !(edge_now && rx_bit && !tx_dom)) begin
                phase  <= PH_SEG2;
                cnt    <= '0;
                sample <= 1'b1;
                rx_bit <= rx_s2;
              end else begin
                cnt <= cnt + 5'd1;
              end
            end
            PH_SEG2: begin
              if (cnt + 5'd1 >= seg2_len) begin
                phase    <= PH_SYNC;
                cnt      <= '0;
                seg1_len <= 5'(tseg1) + 5'd1;
                seg2_len <= 5'(tseg2) + 5'd1;
                tx_pt    <= 1'b1;
              end else begin
                cnt <= cnt + 5'd1;
              end
            end
            default: phase <= PH_SYNC;
          endcase
        end
      end
    end
  end
endmodule
