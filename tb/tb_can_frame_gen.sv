// tb_can_frame_gen: frames built from the transmit buffer, for the example
// remote frame and random data/remote frames (DLC 0..15), against the
// reference frame builder.
`timescale 1ns/1ps
module tb_can_frame_gen;
  import can_pkg::*;
  import can_ref_pkg::*;
  byte_t tx_buf [BUF_BYTES];
  logic [MAX_FRM-1:0] frame;
  logic [6:0] frm_len;
  logic [10:0] tx_id; logic tx_rtr; logic [3:0] tx_dlc;
  int checks = 0, failures = 0;
  can_frame_gen dut (.*);

  initial begin
    #1000000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(bit [10:0] id, bit rtr, bit [3:0] dlc, bit [7:0] d [8]);
    bitq_t q;
    bit ok = 1;
    tx_buf[0] = id[10:3]; tx_buf[1] = {id[2:0], rtr, dlc};
    for (int i = 0; i < 8; i++) tx_buf[2+i] = d[i];
    #1;
    q = ref_frame(id, rtr, dlc, d);
    checks++;
    if (frm_len != 7'(q.size())) begin failures++; $display("FAIL len %0d vs %0d", frm_len, q.size()); end
    foreach (q[i]) if (frame[i] != q[i]) ok = 0;
    checks++;
    if (!ok) begin failures++; $display("FAIL bits id %h rtr %b dlc %0d", id, rtr, dlc); end
    checks++;
    if ({tx_id, tx_rtr, tx_dlc} != {id, rtr, dlc}) begin failures++; $display("FAIL header"); end
  endtask

  bit [7:0] d [8];
  initial begin
    d = '{8'h33, 8'h38, 8'h30, 8'h28, 8'h00, 8'h00, 8'h00, 8'h00};
    run(11'h777, 1'b1, 4'd1, d);
    checks++;
    if (frm_len != 7'd19) begin failures++; $display("FAIL remote frame length"); end
    for (int t = 0; t < 300; t++) begin
      foreach (d[i]) d[i] = 8'($urandom);
      run(11'($urandom), 1'($urandom_range(0, 3) == 0), 4'($urandom), d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
