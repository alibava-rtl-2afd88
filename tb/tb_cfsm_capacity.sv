// tb_cfsm_capacity: fills the event memory with the largest acquisition.
// The central state machine runs at its default event limit (64776) and is
// asked for 65535 radioactive-source events; fast responders stand in for
// the trigger, ADC, TDC and temperature blocks and for the memory. The test
// checks that exactly 64776 events of 259 words are written to consecutive
// addresses starting at 0, that the last word lands at 64776*259-1 =
// 16,776,983 inside the 2^24-word SDRAM, that the first and last events
// hold the right words, and that a following read announces 64776 events
// and starts with the first event's words.
module tb_cfsm_capacity;
  import alibava_pkg::*;
  localparam int unsigned EV    = MAX_EVENTS;
  localparam int unsigned WORDS = RS_EVENT_WORDS;

  logic clk = 0, rst = 1;
  always #12.5 clk = !clk;

  cfsm_state_e state;
  led_code_e led_code;
  logic [7:0] rx_byte, tx_byte;
  logic rx_empty, rx_pop, tx_push;
  logic sc_start, sc_done = 0, sc_ack_error = 0;
  logic [6:0] sc_dev;
  logic [7:0] sc_reg, sc_data;
  logic [1:0] fc_src_sel;
  logic [7:0] fc_sync_delay;
  logic fc_rst_req, fc_calib, fc_accepted = 0;
  logic to_enable, to_load;
  logic [7:0] to_code;
  logic [4:0] ti_scheme;
  logic dac_start, dac_done = 0;
  logic [3:0][11:0] dac_thresholds;
  logic tdc_enable, tdc_valid = 0;
  logic [31:0] tdc_value = '0;
  word_t adc0_data, adc1_data, temp_value = '0, mem_req_wdata, mem_rd_data = '0;
  logic adc0_empty, adc1_empty, adc0_frame_done = 0, adc1_frame_done = 0, adc0_pop, adc1_pop;
  logic temp_start, temp_done = 0;
  logic mem_req_valid, mem_req_we, mem_rd_valid = 0;
  logic mem_req_ready = 1, mem_init_done = 1, tx_full = 0;
  sdram_addr_t mem_req_addr;

  cfsm dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // host byte queues
  // host bytes: ring buffer written on the falling edge, read pointer
  // advanced with a nonblocking assignment so the design samples cleanly
  logic [7:0] rxbuf [1024];
  int rx_wp = 0, rx_rp = 0;
  logic [7:0] txq[$];
  assign rx_empty = (rx_rp == rx_wp);
  assign rx_byte  = rxbuf[rx_rp % 1024];
  always @(posedge clk) begin
    if (tx_push && !rst) txq.push_back(tx_byte);
  end

  // ADC frame FIFOs: sample k of chip c in event e = (e*3 + c*128 + k) mod 2^16
  function automatic word_t sample(input int e, input int c, input int k);
    return 16'(e * 3 + c * 128 + k);
  endfunction
  // ADC FIFOs: ring buffers, filled ahead of the write pointer, which then
  // moves with a nonblocking assignment; the read pointers move the same way
  word_t r0 [1024], r1 [1024];
  int w0 = 0, w1 = 0, rp0 = 0, rp1 = 0;
  always @(posedge clk) begin
    if (rx_pop) rx_rp <= rx_rp + 1;
    if (adc0_pop) rp0 <= rp0 + 1;
    if (adc1_pop) rp1 <= rp1 + 1;
  end
  assign adc0_empty = (rp0 == w0);
  assign adc1_empty = (rp1 == w1);
  assign adc0_data  = r0[rp0 % 1024];
  assign adc1_data  = r1[rp1 % 1024];

  // expected stored word w of event e
  function automatic word_t expect_word(input int e, input int w);
    if (w == 0) return 16'hC0DE;
    if (w == 1) return 16'(e);
    if (w == 2) return 16'h4000 + 16'(e);
    if (w < 3 + 128) return sample(e, 0, w - 3);
    return sample(e, 1, w - 3 - 128);
  endfunction

  int n_accept = 0, n_writes = 0, bad_addr = 0, bad_data = 0, max_addr = -1;
  always @(posedge clk) begin
    mem_rd_valid <= 0;
    fc_accepted <= 0;
    tdc_valid   <= 0;
    temp_done   <= 0;
    adc0_frame_done <= 0;
    adc1_frame_done <= 0;
    if (!rst && fc_src_sel == 2'd2 && !fc_accepted) begin
      // accept at once; the TDC, the temperature and both frames follow
      fc_accepted <= 1;
      tdc_value   <= {16'hC0DE, 16'(n_accept)};
      tdc_valid   <= 1;
      for (int k = 0; k < 128; k++) begin
        r0[(w0 + k) % 1024] = sample(n_accept, 0, k);
        r1[(w1 + k) % 1024] = sample(n_accept, 1, k);
      end
      w0 <= w0 + 128;
      w1 <= w1 + 128;
      adc0_frame_done <= 1;
      adc1_frame_done <= 1;
      n_accept++;
    end
    if (temp_start) begin
      temp_value <= 16'h4000 + 16'(n_accept - 1);
      temp_done  <= 1;
    end
    if (mem_req_valid && mem_req_ready && !rst) begin
      if (mem_req_we) begin
        automatic int a = int'(mem_req_addr);
        automatic int e = a / int'(WORDS);
        if (a != n_writes) bad_addr++;
        if ((e < 2 || e == int'(EV) - 1) && mem_req_wdata != expect_word(e, a % int'(WORDS))) bad_data++;
        if (a > max_addr) max_addr = a;
        n_writes++;
      end else begin
        automatic int a = int'(mem_req_addr);
        mem_rd_data <= expect_word(a / int'(WORDS), a % int'(WORDS));
        mem_rd_valid <= 1;
      end
    end
  end

  task automatic send(input logic [7:0] b);
    @(negedge clk);
    rxbuf[rx_wp % 1024] = b;
    rx_wp++;
  endtask

  task automatic get(output logic [7:0] b);
    int t = 0;
    while (txq.size() == 0 && t < 30_000_000) begin @(posedge clk); t++; end
    if (txq.size() == 0) begin failures++; $display("FAIL no reply"); b = 0; end
    else b = txq.pop_front();
  endtask

  initial begin
    logic [7:0] a, s, h, l;
    int errs;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (20) @(posedge clk);
    check(state == ST_WAITING, "waiting after reset");
    send(CMD_RS_ACQ); send(8'hFF); send(8'hFF);
    get(a); get(s);
    check(a == ACK_BYTE && s == 8'h00, "acquisition acknowledged");
    check(n_accept == int'(EV), $sformatf("%0d events taken, expected %0d", n_accept, EV));
    check(n_writes == int'(EV * WORDS), $sformatf("%0d words written", n_writes));
    check(max_addr == int'(EV * WORDS) - 1, $sformatf("last address %0d", max_addr));
    check(max_addr < (1 << SDRAM_AW), "acquisition fits in the SDRAM");
    check(bad_addr == 0, $sformatf("%0d non-consecutive addresses", bad_addr));
    check(bad_data == 0, $sformatf("%0d wrong words in first/last events", bad_data));
    send(CMD_RS_READ);
    get(a); get(s);
    check(a == ACK_BYTE && s == 8'h00, "read acknowledged");
    get(h); get(l);
    check({h, l} == 16'(EV), $sformatf("read announces %0d events", {h, l}));
    errs = 0;
    for (int w = 0; w < 2 * int'(WORDS); w++) begin
      get(h); get(l);
      if ({h, l} != expect_word(w / int'(WORDS), w % int'(WORDS))) errs++;
    end
    check(errs == 0, $sformatf("%0d wrong words read back", errs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
