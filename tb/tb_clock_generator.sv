// tb_clock_generator: checks that the reset output is held for RST_HOLD
// clocks after lock and after an external reset is released, and that the
// clocks are forwarded.
module tb_clock_generator;
  localparam int HOLD = 16;
  logic clk_in = 0, ext_rst_n = 0, locked = 0;
  logic clk_sys, clk_sdram, rst_out;
  int checks = 0, failures = 0;

  clock_generator #(.RST_HOLD(HOLD)) dut (.*);
  always #5 clk_in = !clk_in;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // count clocks from the release edge to the fall of rst_out
  task automatic measure(output int n);
    n = 0;
    while (rst_out) begin @(posedge clk_in); #1; n++; end
  endtask

  initial begin
    int n;
    repeat (4) @(posedge clk_in);
    #1 check(rst_out, "reset during ext reset");
    ext_rst_n = 1;
    repeat (10) @(posedge clk_in);
    #1 check(rst_out, "reset held while not locked");
    locked = 1;
    measure(n);
    // 2 synchroniser clocks + HOLD counting clocks + 1 output register
    check(n == HOLD + 3, $sformatf("release after lock took %0d", n));
    check(clk_sys == clk_in && clk_sdram == clk_in, "clock forwarded");
    repeat (5) @(posedge clk_in);
    #1 check(!rst_out, "reset low");
    #2 ext_rst_n = 0;
    #1 check(1, "");
    @(posedge clk_in); @(posedge clk_in); #1;
    check(rst_out, "external reset asserts reset");
    #2 ext_rst_n = 1;
    measure(n);
    check(n >= HOLD + 1 && n <= HOLD + 3, $sformatf("release after ext reset took %0d", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk_in);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
