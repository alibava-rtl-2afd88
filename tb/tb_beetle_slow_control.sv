// tb_beetle_slow_control: two I2C slave models (the two Beetle chips, at
// different addresses) share the bus; register writes to each must land in
// the right model, a write to an absent address must report ack_error, and
// the SCL frequency must be 100 kHz (400 clocks of 25 ns per bit).
module tb_beetle_slow_control;
  logic clk = 0, rst = 1, start = 0;
  logic [6:0] dev_addr;
  logic [7:0] reg_addr, reg_data;
  logic busy, done, ack_error, scl_oe, sda_oe, p0, p1;
  wire  scl = !scl_oe;
  wire  sda = !(sda_oe || p0 || p1);
  logic sda_i;
  int checks = 0, failures = 0;
  realtime last_rise = 0, period = 0;

  assign sda_i = sda;
  i2c_slave_model #(.ADDR(7'h20)) chip0 (.scl(scl), .sda(sda), .sda_pull(p0));
  i2c_slave_model #(.ADDR(7'h21)) chip1 (.scl(scl), .sda(sda), .sda_pull(p1));
  beetle_slow_control dut (.*);
  always #12.5 clk = !clk;
  always @(posedge scl) begin
    if (last_rise > 0 && busy) period = $realtime - last_rise;
    last_rise = $realtime;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write(input logic [6:0] a, input logic [7:0] r, input logic [7:0] d);
    dev_addr = a; reg_addr = r; reg_data = d;
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
    while (!done) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 6; i++) begin
      logic [7:0] r, d;
      logic [6:0] a;
      r = 8'($urandom);
      d = 8'($urandom);
      a = (i % 2 == 0) ? 7'h20 : 7'h21;
      write(a, r, d);
      check(!ack_error, "acknowledged");
      if (a == 7'h20) check(chip0.regs[r] == d, $sformatf("chip0 reg %h = %h exp %h", r, chip0.regs[r], d));
      else            check(chip1.regs[r] == d, $sformatf("chip1 reg %h = %h exp %h", r, chip1.regs[r], d));
      check(period == 10000.0, $sformatf("SCL period %f ns", period));
    end
    check(chip0.writes == 3 && chip1.writes == 3, "one register per transfer");
    check(chip0.stops == 6 && chip0.starts == 6, "START/STOP seen");
    write(7'h33, 8'h01, 8'h02);
    check(ack_error, "absent address not acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
