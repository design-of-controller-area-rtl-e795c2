// can_bit_stuff: bit stuffing unit of the transmit path.
//
// Sits between the serializer and the frame transmitter. It remembers the
// polarity and length of the current run of equal bits already put on the
// bus. After five equal bits the next bit out is a stuff bit of opposite
// polarity; the serializer is then not advanced. This covers SOF up to and
// including the CRC sequence, and a stuff bit that falls right after the
// last CRC bit is still sent. `load` clears the run at the start of a
// frame. `adv` (one pulse per bus bit, at the sample point) says the bit
// shown on `bit_out` went out; `ps_adv` is then the serializer's advance.
// `done` rises once the stuffed region is complete.
module can_bit_stuff
  import can_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic adv,
  input  logic ps_bit,
  input  logic ps_last,
  output logic bit_out,
  output logic is_stuff,
  output logic ps_adv,
  output logic done
);
  logic [2:0] run;
  logic       last_bit;
  logic       tail;        // last CRC bit sent, one stuff bit still owed
  logic [2:0] new_run;

  always_comb begin
    is_stuff = (run == 3'(STUFF_RUN));
    bit_out  = is_stuff ? ~last_bit : ps_bit;
    ps_adv   = adv && !done && !is_stuff;
    new_run  = (run != 3'd0 && bit_out == last_bit) ? run + 3'd1 : 3'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= '0; last_bit <= 1'b1; tail <= 1'b0; done <= 1'b1;
    end else if (load) begin
      run <= '0; last_bit <= 1'b1; tail <= 1'b0; done <= 1'b0;
    end else if (adv && !done) begin
      run      <= is_stuff ? 3'd1 : new_run;
      last_bit <= bit_out;
      if (is_stuff) begin
        if (tail) done <= 1'b1;
      end else if (ps_last) begin
        if (new_run == 3'(STUFF_RUN)) tail <= 1'b1;
        else                          done <= 1'b1;
      end
    end
  end
endmodule
