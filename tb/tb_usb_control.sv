// tb_usb_control: the USB chip model sends random bytes to the FPGA and
// the FPGA sends random bytes to the chip (the chip is occasionally busy);
// both streams must arrive complete and in order, also when the receive
// FIFO is full for a while.
module tb_usb_control;
  logic clk = 0, rst = 1;
  logic [7:0] d_to_fpga, usb_d_o, rx_byte, tx_byte;
  logic usb_d_oe, rxf_n, txe_n, rd_n, wr, rx_push, rx_full = 0, tx_empty, tx_pop;
  logic [7:0] tx_q[$], exp_rx[$], exp_tx[$];
  int checks = 0, failures = 0, full_for = 0;
  localparam int RD_LOW_CLOCKS = 3;
  always @(posedge clk) full_for <= rx_full ? full_for + 1 : 0;

  usb_host_model host (.clk, .d_to_fpga, .d_from_fpga(usb_d_o), .d_oe(usb_d_oe),
                       .rxf_n, .txe_n, .rd_n, .wr);
  usb_control dut (.clk, .rst, .usb_d_i(d_to_fpga), .usb_d_o, .usb_d_oe, .rxf_n, .txe_n,
                   .rd_n, .wr, .rx_push, .rx_byte, .rx_full, .tx_byte, .tx_empty, .tx_pop);
  always #12.5 clk = !clk;

  assign tx_empty = (tx_q.size() == 0);
  assign tx_byte  = tx_empty ? 8'h00 : tx_q[0];
  always @(posedge clk) if (tx_pop) void'(tx_q.pop_front());

  always @(posedge clk) if (rx_push && !rst) begin
    checks++;
    if (exp_rx.size() == 0 || rx_byte != exp_rx[0]) begin
      failures++;
      $display("FAIL rx byte %h", rx_byte);
    end
    if (exp_rx.size() != 0) void'(exp_rx.pop_front());
    // a read already started when the FIFO became full may still finish
    if (full_for > RD_LOW_CLOCKS + 1) begin failures++; $display("FAIL push while full"); end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    host.clear();
    rst = 0;
    for (int i = 0; i < 60; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      host.send(b); exp_rx.push_back(b);
      b = 8'($urandom);
      tx_q.push_back(b); exp_tx.push_back(b);
    end
    repeat (300) @(posedge clk);
    rx_full = 1;
    repeat (200) @(posedge clk);
    rx_full = 0;
    repeat (3000) @(posedge clk);
    check(exp_rx.size() == 0, $sformatf("%0d bytes not received", exp_rx.size()));
    check(host.n_got() == 60, $sformatf("%0d bytes sent", host.n_got()));
    while (host.n_got() > 0 && exp_tx.size() > 0) begin
      logic [7:0] g;
      g = host.take();
      check(g == exp_tx[0], $sformatf("tx byte %h exp %h", g, exp_tx[0]));
      void'(exp_tx.pop_front());
    end
    check(host.bus_errors == 0, $sformatf("bus protocol errors %0d", host.bus_errors));
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
