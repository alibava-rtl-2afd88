// tb_temp_control: reads random values from the serial converter model and
// checks the word, the SCLK count and the duration of a read.
module tb_temp_control;
  logic clk = 0, rst = 1, start = 0;
  logic busy, done, cs_n, sclk, sdo;
  logic [15:0] temp, value;
  int checks = 0, failures = 0, edges = 0;

  spi_adc_model adc (.cs_n, .sclk, .value, .sdo);
  temp_control #(.SCLK_DIV(3)) dut (.*);
  always #12.5 clk = !clk;
  always @(posedge sclk) edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int t;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 12; i++) begin
      value = (i == 0) ? 16'h8001 : 16'($urandom);
      edges = 0;
      @(posedge clk); #1 start = 1;
      @(posedge clk); #1 start = 0;
      t = 1;
      while (!done) begin @(posedge clk); #1; t++; end
      check(temp == value, $sformatf("read %h exp %h", temp, value));
      check(edges == 16, $sformatf("%0d sclk edges", edges));
      check(t == 2 * 3 * 16 + 2, $sformatf("read took %0d clocks", t));
      check(cs_n, "cs_n released");
    end
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
