// tb_trigger_out: checks the laser trigger period and pulse width at the
// full 1 kHz rate (40 000 clocks), that TRIG_L coincides with the rise of
// TRIG OUT, that nothing fires while disabled, and the delay-code loading.
module tb_trigger_out;
  import alibava_pkg::*;
  logic clk = 0, rst = 1, enable = 0, load = 0;
  logic [7:0] code = '0, dly_code;
  logic trig_out, trig_l, dly_le;
  int checks = 0, failures = 0;

  trigger_out dut (.*);
  always #12.5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    longint last_rise = -1, cyc = 0;
    int rises = 0, width = 0, n_l = 0;
    logic prev = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(posedge clk);
    // delay code
    #1 code = 8'd173; load = 1;
    @(posedge clk); #1 load = 0;
    check(dly_code == 8'd173, "code loaded");
    check(!dly_le, "latch enable one clock after code");
    @(posedge clk); #1 check(dly_le, "latch enable pulse");
    @(posedge clk); #1 check(!dly_le, "latch enable one clock");
    // disabled: nothing
    repeat (100) begin @(posedge clk); #1 check(!trig_out && !trig_l, "idle while disabled"); end
    enable = 1;
    for (int c = 0; c < 4 * 40000 + 10; c++) begin
      @(posedge clk); #1; cyc++;
      if (trig_out && !prev) begin
        rises++;
        check(trig_l, "TRIG_L with TRIG OUT rise");
        if (last_rise >= 0) check(cyc - last_rise == 40000, $sformatf("period %0d", cyc - last_rise));
        last_rise = cyc;
        width = 0;
      end
      if (trig_l) n_l++;
      if (trig_out) width++;
      if (!trig_out && prev) check(width == 4, $sformatf("width %0d", width));
      prev = trig_out;
    end
    check(rises == 5 && n_l == 5, $sformatf("%0d rises %0d TRIG_L in 4 ms", rises, n_l));
    enable = 0;
    repeat (50000) begin @(posedge clk); #1; if (trig_out) rises++; end
    check(rises == 5, "stops when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
