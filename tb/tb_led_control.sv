// tb_led_control: checks the LED decoding for every code, one clock after
// the code changes, and the reset state.
module tb_led_control;
  import alibava_pkg::*;
  logic clk = 0, rst = 1;
  led_code_e code = LED_BOTH;
  logic led_red, led_green;
  int checks = 0, failures = 0;

  led_control dut (.*);
  always #5 clk = !clk;

  initial begin
    @(posedge clk); #1;
    checks++; if (led_red || led_green) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int i = 0; i < 40; i++) begin
      code = led_code_e'($urandom_range(0, 3));
      @(posedge clk); #1;
      checks++;
      if (led_red !== (code == LED_RED || code == LED_BOTH) ||
          led_green !== (code == LED_GREEN || code == LED_BOTH)) begin
        failures++;
        $display("FAIL code %0d red %b green %b", code, led_red, led_green);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
