// tb_can_acc_filter: random identifiers, codes and masks against a
// bit-by-bit reference, plus directed cases (exact match, don't-care mask).
`timescale 1ns/1ps
module tb_can_acc_filter;
  logic [10:0] rx_id, acc_code, acc_mask;
  logic accept;
  int checks = 0, failures = 0;
  can_acc_filter dut (.*);

  initial begin
    #1000000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(logic [10:0] i, logic [10:0] c, logic [10:0] m);
    bit exp = 1;
    rx_id = i; acc_code = c; acc_mask = m; #1;
    for (int b = 0; b < 11; b++) if (!m[b] && i[b] != c[b]) exp = 0;
    checks++;
    if (accept !== exp) begin failures++; $display("FAIL id %h code %h mask %h: %b", i, c, m, accept); end
  endtask

  initial begin
    chk(11'h777, 11'h777, 11'h000);
    chk(11'h776, 11'h777, 11'h000);
    chk(11'h123, 11'h700, 11'h0FF);
    chk(11'h7AA, 11'h700, 11'h0FF);
    chk(11'h000, 11'h7FF, 11'h7FF);
    for (int t = 0; t < 2000; t++) begin
      logic [10:0] c;
      c = 11'($urandom);
      chk((t % 2) ? c ^ (11'(1) << (t % 11)) : 11'($urandom), c, 11'($urandom) & 11'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
