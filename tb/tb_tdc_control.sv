// tb_tdc_control: checks the 100 ns START period, that an enabled trigger
// gives one TRIG_R on the next clock and a 32-bit value equal to the TDC
// model's measurement, that a disabled trigger does nothing, and the
// timeout when the TDC never answers.
module tb_tdc_control;
  logic clk = 0, rst = 1, enable = 0, trig_in = 0, stop = 0, no_tdc = 0;
  logic trig_r, tdc_start, tdc_ready, m_ready, tdc_addr, tdc_rd_n, valid, busy;
  logic [15:0] tdc_data;
  logic [31:0] value, last;
  int checks = 0, failures = 0, n_trig_r = 0;

  tdc_model tdc (.start(tdc_start), .stop(stop), .addr(tdc_addr), .rd_n(tdc_rd_n),
                 .ready(m_ready), .data(tdc_data), .last(last));
  assign tdc_ready = m_ready && !no_tdc;
  tdc_control dut (.*);
  always #12.5 clk = !clk;
  always @(posedge clk) if (trig_r) n_trig_r++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    realtime r1, r2;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge tdc_start); r1 = $realtime;
    @(posedge tdc_start); r2 = $realtime;
    check(r2 - r1 == 100.0, $sformatf("START period %f ns", r2 - r1));
    enable = 1;
    for (int i = 0; i < 8; i++) begin
      int n_prev;
      n_prev = n_trig_r;
      // asynchronous stop edge somewhere in the window
      #(real'($urandom_range(1, 9000)) / 100.0);
      stop = 1;
      @(posedge clk); #1 trig_in = 1;
      @(posedge clk); #1 trig_in = 0;
      check(trig_r && n_trig_r == n_prev, "TRIG_R one clock after trigger");
      stop = 0;
      while (!valid) @(posedge clk);
      #1 check(value == last && value[15:0] < 16'd167, $sformatf("TDC %0d exp %0d", value, last));
      repeat (5) @(posedge clk);
    end
    enable = 0;
    @(posedge clk); #1 trig_in = 1;
    @(posedge clk); #1 trig_in = 0;
    repeat (20) @(posedge clk);
    check(n_trig_r == 8 && !busy, "disabled trigger ignored");
    enable = 1; no_tdc = 1;
    @(posedge clk); #1 trig_in = 1;
    @(posedge clk); #1 trig_in = 0;
    while (!valid) @(posedge clk);
    #1 check(value == 32'hFFFF_FFFF, "timeout value");
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
