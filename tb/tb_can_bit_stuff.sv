// tb_can_bit_stuff: a queue stands in for the serializer. The bits the
// stuffing unit emits, one per advance, must equal the reference stuffed
// frame (frames with long runs included), with done after the last one
// (including a stuff bit owed after the last CRC bit).
`timescale 1ns/1ps
module tb_can_bit_stuff;
  import can_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, adv = 0, ps_bit, ps_last;
  logic bit_out, is_stuff, ps_adv, done;
  int checks = 0, failures = 0, nstuff_total = 0;
  can_bit_stuff dut (.*);
  always #5 clk = ~clk;

  bitq_t src;
  int sidx;
  always_comb begin
    ps_bit  = (sidx < src.size()) ? src[sidx] : 1'b1;
    ps_last = (sidx == src.size() - 1);
  end
  always @(posedge clk) if (load) sidx <= 0; else if (ps_adv) sidx <= sidx + 1;

  initial begin
    #5000000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(bitq_t q);
    bitq_t exp, got;
    int ns, guard = 0;
    src = q;
    exp = ref_stuff(q, ns);
    nstuff_total += ns;
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    while (!done && guard < 400) begin
      got.push_back(bit_out);
      adv = 1; @(negedge clk); adv = 0; @(negedge clk);
      guard++;
    end
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL stuffed stream: got %0d bits, expected %0d", got.size(), exp.size());
    end
  endtask

  bitq_t q;
  bit [7:0] d [8];
  initial begin
    sidx = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    d = '{default: 8'h00};
    run(with_crc(ref_frame(11'h777, 1'b1, 4'd1, d)));   // one stuff bit after IDE, r0, DLC
    q.delete(); repeat (10) q.push_back(1'b1); run(q);  // ends with five ones: stuff bit owed
    q.delete(); repeat (20) q.push_back(1'b0); run(q);
    for (int t = 0; t < 200; t++) begin
      foreach (d[i]) d[i] = ($urandom_range(0, 1)) ? 8'h00 : 8'($urandom);
      run(with_crc(ref_frame(11'($urandom), 1'($urandom_range(0, 3) == 0), 4'($urandom), d)));
    end
    checks++;
    if (nstuff_total == 0) begin failures++; $display("FAIL no stuff bits exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
