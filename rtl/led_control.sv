// led_control: drives the red and green front-panel LEDs from a state code.
//
// The board has one red and one green LED that tell the user what the
// system is doing; which LED is lit depends on a code supplied by the
// central state machine. The code values (off, green = ready, red = busy,
// both = error) are this design's choice. The outputs are registered so the
// pads see glitch-free levels; they follow the code one clock later.
module led_control
  import alibava_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  led_code_e code,
  output logic      led_red,
  output logic      led_green
);
  always_ff @(posedge clk) begin
    if (rst) begin
      led_red   <= 1'b0;
      led_green <= 1'b0;
    end else begin
      led_red   <= (code == LED_RED)   || (code == LED_BOTH);
      led_green <= (code == LED_GREEN) || (code == LED_BOTH);
    end
  end
endmodule
