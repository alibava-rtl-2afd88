// tb_beetle_fast_control: checks that each trigger source gives TRIGGER
// exactly 128 + sync_delay clocks later, that TESTPULSE comes only with the
// calibration source, that triggers during a pending trigger or readout are
// dropped (single-readout mode), that an unselected source is ignored, and
// the RESET pulse width.
module tb_beetle_fast_control;
  logic clk = 0, rst = 1;
  logic [1:0] src_sel = 0;
  logic trig_l = 0, trig_r = 0, calib = 0, rst_req = 0;
  logic [7:0] sync_delay = 0;
  logic beetle_clk, beetle_reset, beetle_trigger, beetle_testpulse, accepted, dropped;
  int checks = 0, failures = 0;
  longint cyc = 0, trig_cycles[$];
  int n_drop = 0, n_tp = 0;

  beetle_fast_control dut (.*);
  always #12.5 clk = !clk;

  always @(posedge clk) begin
    cyc++;
    if (beetle_trigger) trig_cycles.push_back(cyc);
    if (dropped) n_drop++;
    if (beetle_testpulse) n_tp++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one-clock pulse on the selected source; returns the cycle it was high in
  task automatic pulse(input int which, output longint at);
    @(posedge clk); #1;
    case (which)
      1: trig_l = 1;
      2: trig_r = 1;
      default: calib = 1;
    endcase
    at = cyc + 1;
    @(posedge clk); #1;
    trig_l = 0; trig_r = 0; calib = 0;
  endtask

  initial begin
    longint at;
    int d;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int s = 1; s <= 3; s++) begin
      for (int k = 0; k < 3; k++) begin
        d = (k == 0) ? 0 : $urandom_range(1, 255);
        sync_delay = 8'(d);
        src_sel = 2'(s);
        trig_cycles.delete();
        n_tp = 0;
        pulse(s, at);
        repeat (400 + d) @(posedge clk);
        check(trig_cycles.size() == 1, $sformatf("src %0d: %0d triggers", s, trig_cycles.size()));
        if (trig_cycles.size() == 1)
          check(trig_cycles[0] - at == 128 + d,
                $sformatf("src %0d delay %0d: latency %0d", s, d, trig_cycles[0] - at));
        check(n_tp == ((s == 3) ? 1 : 0), $sformatf("testpulse count %0d", n_tp));
      end
    end
    // unselected source ignored
    src_sel = 1; sync_delay = 0; trig_cycles.delete();
    pulse(2, at);
    repeat (300) @(posedge clk);
    check(trig_cycles.size() == 0, "unselected source ignored");
    // a second trigger while pending and one during the readout are dropped
    n_drop = 0;
    pulse(1, at);
    repeat (50) @(posedge clk);
    pulse(1, at);
    repeat (100) @(posedge clk);
    pulse(1, at);
    repeat (600) @(posedge clk);
    check(trig_cycles.size() == 1, $sformatf("single readout: %0d triggers", trig_cycles.size()));
    check(n_drop == 2, $sformatf("dropped %0d", n_drop));
    // Beetle reset pulse
    @(posedge clk); #1 rst_req = 1;
    @(posedge clk); #1 rst_req = 0;
    d = 0;
    repeat (20) begin if (beetle_reset) d++; @(posedge clk); #1; end
    check(d == 4, $sformatf("reset width %0d", d));
    check(beetle_clk == clk, "CLK forwarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
