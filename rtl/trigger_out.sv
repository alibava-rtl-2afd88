// trigger_out: laser trigger generation and programmable delay control.
//
// While `enable` is high the block fires once every PERIOD clocks (40 000
// clocks of 25 ns = the 1 kHz laser rate). Each firing raises trig_out, the
// signal that goes through the external programmable delay line and the
// 50 ohm driver to the laser pulser, for PULSE_W clocks, and gives the
// Beetle fast control a one-clock internal trigger trig_l on the same clock
// edge. The first firing happens on the clock after enable rises.
// The delay line takes an 8-bit parallel code (0..255 ns in 1 ns steps):
// a `load` strobe copies `code` to dly_code and pulses the latch enable
// dly_le for one clock, one clock after the code is stable, so the laser can
// be moved along the Beetle front-end pulse in 1 ns steps. Pulse width and
// latch timing are this design's choices; rate, code width and step size
// follow the system description.
module trigger_out
  import alibava_pkg::*;
#(
  parameter int unsigned PERIOD  = CLK_HZ / TRIG_OUT_HZ,
  parameter int unsigned PULSE_W = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               enable,
  input  logic               load,
  input  logic [DELAY_W-1:0] code,
  output logic               trig_out,
  output logic               trig_l,
  output logic [DELAY_W-1:0] dly_code,
  output logic               dly_le
);
  localparam int unsigned CW = $clog2(PERIOD + 1);

  logic [CW-1:0] cnt;
  logic          load_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      trig_out <= 1'b0;
      trig_l   <= 1'b0;
    end else if (!enable) begin
      cnt      <= '0;
      trig_out <= 1'b0;
      trig_l   <= 1'b0;
    end else begin
      cnt      <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + 1'b1;
      trig_l   <= (cnt == '0);
      trig_out <= (cnt < CW'(PULSE_W));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dly_code <= '0;
      load_d   <= 1'b0;
      dly_le   <= 1'b0;
    end else begin
      if (load) dly_code <= code;
      load_d <= load;
      dly_le <= load_d;
    end
  end
endmodule
