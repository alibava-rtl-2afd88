// tb_dac_control: a model of a quad DAC with input registers and a common
// load strobe captures the writes; the four outputs must equal the four
// requested thresholds after each update, and change only on LDAC.
module tb_dac_control;
  logic clk = 0, rst = 1, start = 0;
  logic [3:0][11:0] thresholds;
  logic busy, done, dac_cs_n, dac_wr_n, dac_ldac_n;
  logic [11:0] dac_data;
  logic [1:0] dac_addr;
  logic [11:0] inreg [4], outv [4];
  int checks = 0, failures = 0, n_wr = 0, n_ldac = 0;

  dac_control dut (.*);
  always #12.5 clk = !clk;

  initial for (int i = 0; i < 4; i++) begin inreg[i] = '0; outv[i] = '0; end
  always @(posedge dac_wr_n) begin inreg[dac_addr] = dac_data; n_wr++; end
  always @(negedge dac_ldac_n) begin
    for (int i = 0; i < 4; i++) outv[i] = inreg[i];
    n_ldac++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int t;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int r = 0; r < 10; r++) begin
      logic [11:0] prev_out [4];
      for (int i = 0; i < 4; i++) thresholds[i] = 12'($urandom);
      for (int i = 0; i < 4; i++) prev_out[i] = outv[i];
      n_wr = 0;
      n_ldac = 0;
      @(posedge clk); #1 start = 1;
      @(posedge clk); #1 start = 0;
      t = 1;
      while (!done) begin
        @(posedge clk); #1; t++;
        if (n_ldac == 0) for (int i = 0; i < 4; i++)
          if (outv[i] != prev_out[i]) begin failures++; $display("FAIL output changed prev_out LDAC"); end
      end
      check(n_wr == 4 && n_ldac == 1, $sformatf("%0d writes", n_wr));
      for (int i = 0; i < 4; i++)
        check(outv[i] == thresholds[i], $sformatf("threshold %0d = %h exp %h", i, outv[i], thresholds[i]));
      check(t == 4 * (2 + 2) + 3, $sformatf("update took %0d", t));
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
