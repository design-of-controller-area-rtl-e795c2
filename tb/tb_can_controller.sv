// tb_can_controller: end-to-end test of three CAN controllers on one bus.
//
// Nodes A, B and C run from clocks 1 % apart (10.0, 10.1 and 9.9 ns), so
// the receivers must resynchronize. The bus is the wired AND of the three
// tx lines and of a disturbance line `inj`; node C also has a private
// disturbance `inj_c` on its rx input. The test walks through:
//   1 the example remote frame (ID 0x777, DLC 1), compared bit by bit on
//     the bus with a reference frame and its CRC with the value 0x5345
//   2 a data frame with 8 bytes, rejected by C's acceptance filter
//   3 arbitration between A (0x710) and B (0x70F), both buffered by C,
//     and a third frame that overruns C's double buffer
//   4 a global disturbance: error frames and automatic retransmission
//   5 a CRC error seen only by C
//   6 an overload frame forced in the intermission
//   7 a lone node: ACK errors, error passive, bus-off and recovery
// Every mechanism is counted; a mechanism that never happened is a failure.
`timescale 1ns/1ps
module tb_can_controller;
  import can_ref_pkg::*;
  import can_pkg::*;

  logic clk [3];
  logic rst_n [3];
  logic cs [3], we [3];
  logic [4:0] addr [3];
  logic [7:0] wdata [3];
  logic [7:0] rdata [3];
  logic can_tx [3];
  logic rx_avail [3], tx_busy [3], boff [3];
  logic inj, inj_c, bus;

  int checks = 0, failures = 0;

  initial begin clk[0] = 0; forever #5.00 clk[0] = ~clk[0]; end
  initial begin clk[1] = 0; forever #5.05 clk[1] = ~clk[1]; end
  initial begin clk[2] = 0; forever #4.95 clk[2] = ~clk[2]; end

  assign bus = can_tx[0] & can_tx[1] & can_tx[2] & inj;

  can_controller nA (.clk(clk[0]), .rst_n(rst_n[0]), .cs(cs[0]), .we(we[0]), .addr(addr[0]),
    .wdata(wdata[0]), .rdata(rdata[0]), .can_rx(bus), .can_tx(can_tx[0]),
    .rx_msg_avail(rx_avail[0]), .tx_busy(tx_busy[0]), .bus_off(boff[0]));
  can_controller nB (.clk(clk[1]), .rst_n(rst_n[1]), .cs(cs[1]), .we(we[1]), .addr(addr[1]),
    .wdata(wdata[1]), .rdata(rdata[1]), .can_rx(bus), .can_tx(can_tx[1]),
    .rx_msg_avail(rx_avail[1]), .tx_busy(tx_busy[1]), .bus_off(boff[1]));
  can_controller nC (.clk(clk[2]), .rst_n(rst_n[2]), .cs(cs[2]), .we(we[2]), .addr(addr[2]),
    .wdata(wdata[2]), .rdata(rdata[2]), .can_rx(bus & inj_c), .can_tx(can_tx[2]),
    .rx_msg_avail(rx_avail[2]), .tx_busy(tx_busy[2]), .bus_off(boff[2]));

  // ------------------------------------------------------------ helpers
  task automatic tick(int n, int k = 1);
    repeat (k) begin
      case (n)
        0: @(posedge clk[0]);
        1: @(posedge clk[1]);
        default: @(posedge clk[2]);
      endcase
    end
    #1;
  endtask

  task automatic hw(int n, logic [4:0] a, logic [7:0] d);
    tick(n);
    cs[n] = 1; we[n] = 1; addr[n] = a; wdata[n] = d;
    tick(n);
    cs[n] = 0; we[n] = 0;
  endtask

  task automatic hr(int n, logic [4:0] a, output logic [7:0] d);
    tick(n);
    cs[n] = 1; we[n] = 0; addr[n] = a;
    #1 d = rdata[n];
    tick(n);
    cs[n] = 0;
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic load_msg(int n, bit [10:0] id, bit rtr, bit [3:0] dlc, bit [7:0] d [8]);
    hw(n, 5'd10, id[10:3]);
    hw(n, 5'd11, {id[2:0], rtr, dlc});
    for (int i = 0; i < 8; i++) hw(n, 5'(12 + i), d[i]);
  endtask

  task automatic send(int n);
    hw(n, 5'd0, 8'h01);
  endtask

  task automatic wait_tx_done(int n, int max_bits = 2000);
    logic [7:0] st;
    for (int i = 0; i < max_bits; i++) begin
      tick(n, 50);
      if (!tx_busy[n]) break;
    end
    hr(n, 5'd1, st);
    check($sformatf("node %0d tx complete", n), 32'(st[3]), 1);
  endtask

  task automatic wait_bits(int k);
    tick(0, 50 * k);
  endtask

  // read and release the oldest message of node n, compare header and data
  task automatic expect_rx(int n, bit [10:0] id, bit rtr, bit [3:0] dlc, bit [7:0] d [8]);
    logic [7:0] v;
    int nb;
    check($sformatf("node %0d has message", n), 32'(rx_avail[n]), 1);
    hr(n, 5'd20, v); check($sformatf("node %0d rx byte0", n), 32'(v), 32'(id[10:3]));
    hr(n, 5'd21, v); check($sformatf("node %0d rx byte1", n), 32'(v), 32'({id[2:0], rtr, dlc}));
    nb = rtr ? 0 : (dlc > 8 ? 8 : int'(dlc));
    for (int i = 0; i < nb; i++) begin
      hr(n, 5'(22 + i), v);
      check($sformatf("node %0d rx data %0d", n, i), 32'(v), 32'(d[i]));
    end
    hw(n, 5'd0, 8'h04);  // release
  endtask

  // ------------------------------------------------- mechanism counters
  int n_stuff, n_destuff, n_ack_sent, n_arb_lost, n_filter_rej, n_double_buf, n_overrun;
  int n_bit_err, n_stuff_err, n_crc_err, n_form_err, n_ack_err, n_err_frame, n_ovl_frame;
  int n_retx, n_passive, n_busoff, n_recover, n_resync, n_hard_sync, n_remote, n_data;
  int n_load [3], n_req [3];

  `define MON(N, IDX) \
    always @(posedge clk[IDX]) begin \
      if (N.u_stuff.is_stuff && N.stuff_adv) n_stuff++; \
      if (N.sample && N.ds_en && N.ds_is_stuff) n_destuff++; \
      if (N.tx_pt && N.u_stx.nxt == 1'b0 && N.state == ST_ACK_SLOT && N.ack_drive) n_ack_sent++; \
      if (N.arb_lost) n_arb_lost++; \
      if (N.rx_ok && !N.accept) n_filter_rej++; \
      if (N.u_rxb.count == 2'd1 && N.u_rxb.do_store) n_double_buf++; \
      if (N.u_rxb.store && !N.u_rxb.do_store) n_overrun++; \
      if (N.bit_err) n_bit_err++; \
      if (N.stuff_err) n_stuff_err++; \
      if (N.crc_err) n_crc_err++; \
      if (N.form_err) n_form_err++; \
      if (N.ack_err) n_ack_err++; \
      if (N.start_err) n_err_frame++; \
      if (N.start_ovl) n_ovl_frame++; \
      if (N.tx_load) n_load[IDX]++; \
      if (N.cmd_tr) n_req[IDX]++; \
      if (N.tx_ok && N.tx_rtr) n_remote++; \
      if (N.tx_ok && !N.tx_rtr) n_data++; \
      if (N.u_btl.resync) n_resync++; \
      if (N.u_btl.tq && N.u_btl.edge_now && N.hard_sync_en) n_hard_sync++; \
    end

  `MON(nA, 0)
  `MON(nB, 1)
  `MON(nC, 2)
  always @(posedge clk[1]) if (dbg && nB.sample) $display("%t B st=%0d cnt=%0d rx=%b tx=%b idx=%0d err=%b%b%b%b%b arb=%b", $time, nB.state, nB.mp_cnt, nB.rx_bit, nB.can_tx, nB.u_dstf.idx, nB.bit_err, nB.stuff_err, nB.crc_err, nB.form_err, nB.ack_err, nB.arb_lost);
  bit dbg = 0;  // set to trace node B

  logic pA_q = 0, bA_q = 0;
  always @(posedge clk[0]) begin
    pA_q <= nA.err_passive;
    bA_q <= nA.bus_off;
    if (nA.err_passive && !pA_q) n_passive++;
    if (nA.bus_off && !bA_q) n_busoff++;
    if (!nA.bus_off && bA_q) n_recover++;
  end

  // bus bits as sampled by node C from SOF to the end of EOF
  bit capture = 0;
  bit capq [$];
  always @(posedge clk[2]) begin
    if (capture && nC.sample && (nC.ds_start || (nC.state != ST_INTERM && nC.state != ST_IDLE))) begin
      if (nC.ds_start) capq.delete();
      if (nC.ds_start || capq.size() > 0) capq.push_back(nC.rx_bit);
    end
  end

  // ----------------------------------------------------------- watchdog
  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- stimulus
  bit [7:0] d0 [8], d1 [8], d2 [8], dz [8];
  logic [7:0] v;
  bitq_t expf;
  int ns;

  initial begin
    inj = 1; inj_c = 1;
    for (int i = 0; i < 3; i++) begin
      rst_n[i] = 0; cs[i] = 0; we[i] = 0; addr[i] = 0; wdata[i] = 0;
    end
    d0 = '{8'h33, 8'h38, 8'h30, 8'h28, 8'h00, 8'h00, 8'h00, 8'h00};
    d1 = '{8'h55, 8'hAA, 8'h00, 8'hFF, 8'h12, 8'h34, 8'h56, 8'h78};
    d2 = '{8'h55, 8'h0F, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
    dz = '{default: 8'h00};
    #50;
    for (int i = 0; i < 3; i++) rst_n[i] = 1;
    for (int i = 0; i < 3; i++) hw(i, 5'd6, 8'h44);           // SJW = 2 quanta, 5 clocks per quantum
    hw(2, 5'd2, 8'hE0); hw(2, 5'd3, 8'h00);                     // C: code 0x700
    hw(2, 5'd4, 8'h1F); hw(2, 5'd5, 8'hE0);                     // C: mask 0x0FF
    hr(2, 5'd4, v); check("C mask readback", 32'(v), 32'h1F);
    wait_bits(14);

    // 1: example remote frame, ID 0x777 RTR DLC 1
    check("reference CRC of example frame", 32'(ref_crc(ref_frame(11'h777, 1, 4'd1, d0))),
          32'b101001101000101);
    capture = 1;
    load_msg(0, 11'h777, 1'b1, 4'd1, d0);
    send(0);
    wait_tx_done(0);
    capture = 0;
    check("A tx CRC register", 32'(nA.tx_crc), 32'b101001101000101);
    expf = ref_bus_frame(11'h777, 1'b1, 4'd1, d0, ns);
    check("bus frame length", 32'(capq.size()), 32'(expf.size()));
    for (int i = 0; i < expf.size() && i < capq.size(); i++)
      if (capq[i] != expf[i]) begin check($sformatf("bus bit %0d", i), 32'(capq[i]), 32'(expf[i])); break; end
    checks++;
    wait_bits(4);
    expect_rx(1, 11'h777, 1'b1, 4'd1, dz);
    expect_rx(2, 11'h777, 1'b1, 4'd1, dz);
    check("A stored nothing of its own frame", 32'(rx_avail[0]), 0);

    // 2: data frame 0x123 from B, filtered out by C
    load_msg(1, 11'h123, 1'b0, 4'd8, d1);
    send(1);
    wait_tx_done(1);
    wait_bits(4);
    expect_rx(0, 11'h123, 1'b0, 4'd8, d1);
    check("C rejected 0x123", 32'(rx_avail[2]), 0);

    // 3: arbitration A 0x710 vs B 0x70F, requested while C transmits
    load_msg(2, 11'h001, 1'b0, 4'd1, d2);
    load_msg(0, 11'h710, 1'b0, 4'd2, d1);
    load_msg(1, 11'h70F, 1'b0, 4'd2, d2);
    send(2);
    wait_bits(5);
    send(0); send(1);
    wait_tx_done(2);
    wait_tx_done(1);
    wait_tx_done(0);
    check("A lost arbitration once", 32'(n_arb_lost > 0), 1);
    check("C holds two messages", 32'(nC.u_rxb.count), 2);
    load_msg(1, 11'h7AA, 1'b0, 4'd1, d2);                      // overruns C
    send(1);
    wait_tx_done(1);
    wait_bits(4);
    hr(2, 5'd1, v); check("C overrun status", 32'(v[1]), 1);
    expect_rx(2, 11'h70F, 1'b0, 4'd2, d2);
    expect_rx(2, 11'h710, 1'b0, 4'd2, d1);
    check("C buffers empty", 32'(rx_avail[2]), 0);
    hw(2, 5'd0, 8'h08);
    hr(2, 5'd1, v); check("C overrun cleared", 32'(v[1]), 0);
    // drain A and B
    while (rx_avail[0]) hw(0, 5'd0, 8'h04);
    while (rx_avail[1]) hw(1, 5'd0, 8'h04);

    // 4: disturbance during A's data field -> error frame, retransmission
    load_msg(0, 11'h055, 1'b0, 4'd4, d1);
    send(0);
    wait (nA.state == ST_FRAME && nA.u_dstf.idx == 7'd28);
    inj = 0; tick(0, 350); inj = 1;
    wait_tx_done(0);
    wait_bits(4);
    hr(0, 5'd8, v); check("A TEC after one error and one success", 32'(v), 7);
    hr(1, 5'd9, v); check("B REC after one error and one success", 32'(v), 0);
    expect_rx(1, 11'h055, 1'b0, 4'd4, d1);
    check("A retransmitted", 32'(n_load[0] > n_req[0]), 1);

    // 5: CRC error seen by C only
    load_msg(0, 11'h7A5, 1'b0, 4'd1, d2);
    send(0);
    wait (nC.sample && nC.state == ST_FRAME && nC.d_valid && nC.d_idx == 7'd19);
    wait (nC.tx_pt);
    tick(2, 2); inj_c = 0; tick(2, 45); inj_c = 1;
    wait_tx_done(0);
    wait_bits(4);
    check("C signalled a CRC error", 32'(n_crc_err > 0), 1);
    expect_rx(2, 11'h7A5, 1'b0, 4'd1, d2);
    while (rx_avail[1]) hw(1, 5'd0, 8'h04);
    hr(0, 5'd8, v); check("A TEC after second error", 32'(v), 14);

    // 6: overload frame in the intermission after B's frame
    load_msg(1, 11'h300, 1'b0, 4'd0, dz);
    send(1);
    wait (nB.state == ST_INTERM);
    wait (nB.tx_pt);
    tick(1, 2); inj = 0; tick(1, 45); inj = 1;
    wait_bits(40);
    check("overload frame seen", 32'(n_ovl_frame > 0), 1);
    expect_rx(0, 11'h300, 1'b0, 4'd0, dz);

    // 7: A alone: ACK errors, error passive, bus-off, recovery
    rst_n[1] = 0; rst_n[2] = 0;
    load_msg(0, 11'h321, 1'b0, 4'd1, d2);
    send(0);
    wait (boff[0]);
    hr(0, 5'd1, v); check("A status bus-off", 32'(v[7]), 1);
    rst_n[1] = 1; rst_n[2] = 1;
    wait (!boff[0]);
    wait_tx_done(0);
    wait_bits(4);
    expect_rx(1, 11'h321, 1'b0, 4'd1, d2);

    // every mechanism must have happened
    check("stuff bits inserted", 32'(n_stuff > 0), 1);
    check("stuff bits removed", 32'(n_destuff > 0), 1);
    check("ACK sent", 32'(n_ack_sent > 0), 1);
    check("arbitration lost", 32'(n_arb_lost > 0), 1);
    check("filter rejected", 32'(n_filter_rej > 0), 1);
    check("double buffer filled", 32'(n_double_buf > 0), 1);
    check("overrun", 32'(n_overrun > 0), 1);
    check("bit or stuff error", 32'(n_bit_err > 0 && n_stuff_err > 0), 1);
    check("form error", 32'(n_form_err > 0), 1);
    check("ACK error", 32'(n_ack_err > 0), 1);
    check("error frames", 32'(n_err_frame > 0), 1);
    check("error passive", 32'(n_passive > 0), 1);
    check("bus-off", 32'(n_busoff > 0), 1);
    check("bus-off recovery", 32'(n_recover > 0), 1);
    check("resynchronization", 32'(n_resync > 0), 1);
    check("hard synchronization", 32'(n_hard_sync > 0), 1);
    check("remote frame sent", 32'(n_remote > 0), 1);
    check("data frame sent", 32'(n_data > 0), 1);
    $display("mechanisms: stuff=%0d destuff=%0d ack=%0d arb_lost=%0d filt_rej=%0d dbuf=%0d ovr=%0d",
             n_stuff, n_destuff, n_ack_sent, n_arb_lost, n_filter_rej, n_double_buf, n_overrun);
    $display("  bit=%0d stuff=%0d crc=%0d form=%0d ack=%0d errfrm=%0d ovlfrm=%0d passive=%0d busoff=%0d recover=%0d resync=%0d hsync=%0d remote=%0d data=%0d",
             n_bit_err, n_stuff_err, n_crc_err, n_form_err, n_ack_err, n_err_frame, n_ovl_frame,
             n_passive, n_busoff, n_recover, n_resync, n_hard_sync, n_remote, n_data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
