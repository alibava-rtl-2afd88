// tb_trigger_in: checks the external trigger for every scheme and input
// combination against an independent truth table, and that the internal
// trigger is a single clock pulse three clocks after a rising input.
module tb_trigger_in;
  logic clk = 0, rst = 1;
  logic [4:0] scheme = '0;
  logic sin1 = 0, sin2 = 0, ppos = 0, pneg = 0;
  logic trig, trig_in;
  int checks = 0, failures = 0;

  trigger_in dut (.*);
  always #5 clk = !clk;

  function automatic bit expect_trig(input logic [4:0] s, input logic [3:0] in);
    bit pmt;
    // in = {pneg, ppos, sin2, sin1}
    if (s[2]) pmt = s[0] & s[1] & in[0] & in[1];
    else      pmt = (s[0] & in[0]) | (s[1] & in[1]);
    return pmt | (s[3] & in[2]) | (s[4] & in[3]);
  endfunction

  initial begin
    int pulses, delay;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int s = 0; s < 32; s++) begin
      for (int i = 0; i < 16; i++) begin
        scheme = 5'(s);
        {pneg, ppos, sin2, sin1} = 4'(i);
        #1;
        checks++;
        if (trig !== expect_trig(5'(s), 4'(i))) begin
          failures++;
          $display("FAIL scheme %b inputs %b trig %b", s[4:0], i[3:0], trig);
        end
      end
    end
    // synchronised pulse: coincidence scheme, raise both inputs for 6 clocks
    {pneg, ppos, sin2, sin1} = '0;
    scheme = 5'b00111;
    repeat (5) @(posedge clk);
    #2 sin1 = 1; sin2 = 1;
    pulses = 0; delay = -1;
    for (int c = 1; c <= 12; c++) begin
      @(posedge clk); #1;
      if (c == 6) begin sin1 = 0; sin2 = 0; end
      if (trig_in) begin pulses++; if (delay < 0) delay = c; end
    end
    checks++;
    if (pulses != 1 || delay != 2) begin
      failures++;
      $display("FAIL trig_in pulses %0d first at %0d", pulses, delay);
    end
    // only one input in coincidence mode: no trigger
    sin1 = 1;
    pulses = 0;
    repeat (6) begin @(posedge clk); #1; if (trig_in) pulses++; end
    checks++;
    if (pulses != 0) begin failures++; $display("FAIL coincidence"); end
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
