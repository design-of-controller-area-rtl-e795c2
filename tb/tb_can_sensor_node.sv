// tb_can_sensor_node: a temperature sensor node on the CAN bus.
//
// Node S is the sensor node: a host model reads an LM35-type sensor
// (10 mV per degree C) through an 8-bit converter with a 2.56 V reference,
// i.e. one code per degree C, and sends each reading as a one-byte data
// frame with identifier 0x777. Node M is the monitor: its host model polls
// the receive buffer and collects the readings. The sensor, converter and
// hosts are behavioural models in this file.
// Checks: all readings arrive in order and unchanged, and each frame takes
// exactly its stuffed length plus delimiters, ACK and EOF in bit times
// (50 clocks each with the reset timing) from SOF to the end of EOF, within
// two time quanta: the ACK edge driven by the monitor, whose clock differs,
// may shift the sensor node's bit timing by a quantum.
`timescale 1ns/1ps
module tb_can_sensor_node;
  import can_ref_pkg::*;
  import can_pkg::*;

  localparam int N_READINGS = 20;

  logic clk_s = 0, clk_m = 0, rst_n = 0;
  logic cs_s = 0, we_s = 0, cs_m = 0, we_m = 0;
  logic [4:0] addr_s = 0, addr_m = 0;
  logic [7:0] wdata_s = 0, wdata_m = 0, rdata_s, rdata_m;
  logic tx_s, tx_m, bus;
  logic av_s, av_m, busy_s, busy_m, bo_s, bo_m;
  int checks = 0, failures = 0;

  always #10.0 clk_s = ~clk_s;     // 50 MHz
  always #10.1 clk_m = ~clk_m;     // 0.5 % slower
  assign bus = tx_s & tx_m;

  can_controller u_sensor (.clk(clk_s), .rst_n, .cs(cs_s), .we(we_s), .addr(addr_s), .wdata(wdata_s),
    .rdata(rdata_s), .can_rx(bus), .can_tx(tx_s), .rx_msg_avail(av_s), .tx_busy(busy_s), .bus_off(bo_s));
  can_controller u_monitor (.clk(clk_m), .rst_n, .cs(cs_m), .we(we_m), .addr(addr_m), .wdata(wdata_m),
    .rdata(rdata_m), .can_rx(bus), .can_tx(tx_m), .rx_msg_avail(av_m), .tx_busy(busy_m), .bus_off(bo_m));

  initial begin
    #20_000_000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: %0d vs %0d", w, g, e); end
  endtask

  // LM35 and converter model: temperature in tenths of a degree -> code
  function automatic logic [7:0] adc_read(int t_tenths);
    real v_mv = 10.0 * t_tenths / 10.0;         // 10 mV per degree
    int code = int'($floor(v_mv / 2560.0 * 256.0));
    return (code > 255) ? 8'hFF : 8'(code);
  endfunction

  task automatic s_wr(logic [4:0] a, logic [7:0] d);
    @(posedge clk_s) #1 begin cs_s = 1; we_s = 1; addr_s = a; wdata_s = d; end
    @(posedge clk_s) #1 begin cs_s = 0; we_s = 0; end
  endtask
  task automatic m_rd(logic [4:0] a, output logic [7:0] d);
    @(posedge clk_m) #1 begin cs_m = 1; addr_m = a; end
    #1 d = rdata_m;
    @(posedge clk_m) #1 cs_m = 0;
  endtask
  task automatic m_wr(logic [4:0] a, logic [7:0] d);
    @(posedge clk_m) #1 begin cs_m = 1; we_m = 1; addr_m = a; wdata_m = d; end
    @(posedge clk_m) #1 begin cs_m = 0; we_m = 0; end
  endtask

  // frame duration measured at the sensor node: SOF sample to tx_ok
  int cyc, t_sof, dur [$];
  always @(posedge clk_s) begin
    cyc++;
    if (u_sensor.ds_start && u_sensor.tx_active) t_sof = cyc;
    if (u_sensor.tx_ok) dur.push_back(cyc - t_sof);
  end

  logic [7:0] sent [$], got [$];
  // monitor host: poll and collect
  initial begin
    logic [7:0] v;
    wait (rst_n);
    forever begin
      repeat (200) @(posedge clk_m);
      m_rd(5'd1, v);
      if (v[0]) begin
        logic [7:0] b0, b1, d;
        m_rd(5'd20, b0); m_rd(5'd21, b1); m_rd(5'd22, d);
        check("monitor: identifier", 32'({b0, b1[7:5]}), 32'h777);
        check("monitor: DLC", 32'(b1[3:0]), 1);
        got.push_back(d);
        m_wr(5'd0, 8'h04);
      end
    end
  end

  bit [7:0] dd [8];
  bitq_t f;
  int ns;
  initial begin
    #100 rst_n = 1;
    repeat (700) @(posedge clk_s);             // bus integration
    for (int k = 0; k < N_READINGS; k++) begin
      automatic int t = 200 + 13 * k;          // 20.0 .. 44.7 degrees C
      automatic logic [7:0] code = adc_read(t);
      s_wr(5'd10, 8'hEE);                      // ID 0x777
      s_wr(5'd11, 8'hE1);                      // RTR 0, DLC 1
      s_wr(5'd12, code);
      s_wr(5'd0, 8'h01);
      sent.push_back(code);
      while (busy_s) @(posedge clk_s);
      dd = '{default: 8'h00}; dd[0] = code;
      f = ref_bus_frame(11'h777, 1'b0, 4'd1, dd, ns);
      // SOF sample .. last EOF sample spans (length - 1) bits
      checks++;
      if (dur[k] < (f.size() - 1) * 50 - 10 || dur[k] > (f.size() - 1) * 50 + 10) begin
        failures++;
        $display("FAIL frame %0d duration %0d clocks, expected %0d", k, dur[k], (f.size() - 1) * 50);
      end
    end
    repeat (2000) @(posedge clk_s);
    check("readings received", 32'(got.size()), N_READINGS);
    for (int k = 0; k < N_READINGS && k < got.size(); k++)
      check($sformatf("reading %0d", k), 32'(got[k]), 32'(sent[k]));
    check("first reading is 20 C", 32'(sent[0]), 20);
    check("last reading is 44 C", 32'(sent[N_READINGS-1]), 44);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
