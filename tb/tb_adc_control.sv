// tb_adc_control: drives the block with the Beetle/ADC model, triggers
// several readouts, and checks that exactly the 128 channel samples of each
// frame (no header) arrive in the FIFO in order, that frame_done follows
// the last sample, and that an overfull FIFO reports overflow.
module tb_adc_control;
  logic clk = 0, rst = 1;
  logic trigger = 0, datavalid;
  logic [11:0] adc;
  logic rd_en = 0, empty, frame_done, overflow;
  logic [15:0] rd_data;
  int checks = 0, failures = 0, n_ovf = 0;

  beetle_model #(.CHIP(1)) bm (.clk(clk), .trigger(trigger), .testpulse(1'b0),
                               .reset(1'b0), .datavalid(datavalid), .adc(adc));
  adc_control dut (.clk, .rst, .datavalid, .adc_data(adc), .rd_en, .rd_data,
                   .empty, .frame_done, .overflow);
  always #12.5 clk = !clk;
  always @(posedge clk) if (overflow && !rst) n_ovf++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int frames;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 4; n++) begin
      @(posedge clk); #1 trigger = 1;
      @(posedge clk); #1 trigger = 0;
      frames = 0;
      while (!frame_done) @(posedge clk);
      #1;
      for (int k = 0; k < 128; k++) begin
        check(!empty, "sample present");
        check(rd_data == 16'(bm.sample(1, n, k)),
              $sformatf("frame %0d ch %0d: %h exp %h", n, k, rd_data, bm.sample(1, n, k)));
        rd_en = 1;
        @(posedge clk); #1;
        rd_en = 0;
      end
      check(empty, "exactly 128 samples");
      repeat (20) @(posedge clk);
    end
    // three frames without reading: 384 > 256 words -> overflow
    for (int n = 0; n < 3; n++) begin
      @(posedge clk); #1 trigger = 1;
      @(posedge clk); #1 trigger = 0;
      repeat (170) @(posedge clk);
    end
    check(n_ovf == 128, $sformatf("overflow count %0d", n_ovf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
