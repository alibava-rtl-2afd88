// tb_cfsm: unit test of the central state machine. Every block around it
// is replaced by a small responder written here (fixed delays, a word array
// as memory, queues as ADC FIFOs). The test sends commands and checks the
// main state visited, the outputs to each block, the exact SDRAM image of
// laser and radioactive-source events, and every byte of the replies,
// including an acquisition clamped to the event limit.
module tb_cfsm;
  import alibava_pkg::*;
  localparam int MAXEV = 3;

  logic clk = 0, rst = 1;
  always #12.5 clk = !clk;

  cfsm_state_e state;
  led_code_e led_code;
  logic [7:0] rx_byte, tx_byte;
  logic rx_empty, rx_pop, tx_push, tx_full = 0;
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
  logic mem_req_valid, mem_req_we, mem_req_ready, mem_rd_valid = 0, mem_init_done = 0;
  sdram_addr_t mem_req_addr;

  cfsm #(.MAX_EV(MAXEV)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------ responders
  // host bytes: ring buffer written on the falling edge, read pointer
  // advanced with a nonblocking assignment so the design samples cleanly
  logic [7:0] rxbuf [1024];
  int rx_wp = 0, rx_rp = 0;
  logic [7:0] txq[$];
  assign rx_empty = (rx_rp == rx_wp);
  assign rx_byte  = rxbuf[rx_rp % 1024];
  always @(posedge clk) begin
    if (tx_push && !rst) txq.push_back(tx_byte);
    tx_full <= ($urandom_range(0, 3) == 0);
  end

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

  word_t mem [int];
  int    n_accept = 0, n_testpulse = 0, n_beetle_rst = 0;
  int    rd_delay = -1;
  logic  rnd_ready = 0;
  assign mem_req_ready = rnd_ready && mem_init_done;

  always @(posedge clk) begin
    rnd_ready <= $urandom_range(0, 1);
    mem_rd_valid <= 0;
    if (mem_req_valid && mem_req_ready) begin
      if (mem_req_we) mem[int'(mem_req_addr)] = mem_req_wdata;
      else begin
        mem_rd_data <= mem.exists(int'(mem_req_addr)) ? mem[int'(mem_req_addr)] : 16'hBAD0;
        rd_delay = 3;
      end
    end
    if (rd_delay == 0) mem_rd_valid <= 1;
    if (rd_delay >= 0) rd_delay--;
    if (fc_rst_req && !rst) n_beetle_rst++;
    if (fc_calib && !rst) n_testpulse++;
  end

  // slow control, DAC, temperature, trigger acceptance, frames, TDC
  initial begin
    repeat (10) @(posedge clk);
    mem_init_done <= 1;
  end
  always @(posedge clk) if (sc_start) begin
    repeat (20) @(posedge clk);
    sc_ack_error <= (sc_dev != 7'h20);
    sc_done <= 1;
    @(posedge clk) sc_done <= 0;
  end
  always @(posedge clk) if (dac_start) begin
    repeat (7) @(posedge clk);
    dac_done <= 1;
    @(posedge clk) dac_done <= 0;
  end
  always @(posedge clk) if (temp_start) begin
    repeat (30) @(posedge clk);
    temp_value <= 16'h7700 + 16'(n_accept);
    temp_done  <= 1;
    @(posedge clk) temp_done <= 0;
  end
  always @(posedge clk) if (fc_src_sel != 0 && !fc_accepted && !rst) begin
    int ev;
    repeat (4) @(posedge clk);
    fc_accepted <= 1;
    @(posedge clk) fc_accepted <= 0;
    ev = n_accept;
    n_accept++;
    fork
      begin
        repeat (6) @(posedge clk);
        tdc_value <= 32'hA5A0_0000 + 32'(ev);
        tdc_valid <= 1;
        @(posedge clk) tdc_valid <= 0;
      end
      begin
        repeat (40) @(posedge clk);
        for (int k = 0; k < 128; k++) begin
          r0[(w0 + k) % 1024] = 16'(ev * 256 + k);
          r1[(w1 + k) % 1024] = 16'(ev * 256 + 128 + k);
        end
        w0 <= w0 + 128; w1 <= w1 + 128;
        adc0_frame_done <= 1; adc1_frame_done <= 1;
        @(posedge clk) begin adc0_frame_done <= 0; adc1_frame_done <= 0; end
      end
    join
    repeat (3) @(posedge clk);
  end

  // ------------------------------------------------------------ host side
  cfsm_state_e seen[$];
  always @(posedge clk) if (seen.size() == 0 || seen[$] != state) seen.push_back(state);

  task automatic send(input logic [7:0] b);
    @(negedge clk);
    rxbuf[rx_wp % 1024] = b;
    rx_wp++;
  endtask

  task automatic get(output logic [7:0] b);
    int t = 0;
    while (txq.size() == 0 && t < 200000) begin @(posedge clk); t++; end
    if (txq.size() == 0) begin failures++; $display("FAIL no reply"); b = 0; end
    else b = txq.pop_front();
  endtask

  task automatic reply(input logic [7:0] st, input string what);
    logic [7:0] a, s;
    get(a); get(s);
    check(a == ACK_BYTE && s == st, $sformatf("%s: %h %h", what, a, s));
  endtask

  task automatic visited(input cfsm_state_e s, input string what);
    bit found = 0;
    foreach (seen[i]) if (seen[i] == s) found = 1;
    check(found && state == ST_WAITING, what);
    seen.delete();
  endtask

  // expected word w of event e (laser layout or RS layout)
  function automatic word_t expect_word(input bit rs, input int e, input int w);
    int hdr = rs ? 3 : 1;
    if (rs && w == 0) return 16'hA5A0;
    if (rs && w == 1) return 16'(e);
    if (w == hdr - 1) return 16'h7700 + 16'(e + 1);
    return 16'(e * 256 + (w - hdr));
  endfunction

  task automatic read_back(input bit rs, input int n, input int ev0);
    logic [7:0] h, l;
    int errs = 0, words = rs ? 259 : 257;
    send(rs ? CMD_RS_READ : CMD_LASER_READ);
    reply(8'h00, "read");
    get(h); get(l);
    check({h, l} == 16'(n), $sformatf("count %0d", {h, l}));
    for (int e = 0; e < n; e++)
      for (int w = 0; w < words; w++) begin
        get(h); get(l);
        if ({h, l} != expect_word(rs, ev0 + e, w)) begin
          errs++;
          if (errs < 4) $display("FAIL ev %0d word %0d: %h exp %h", e, w, {h, l}, expect_word(rs, ev0 + e, w));
        end
        if (mem[e * words + w] != expect_word(rs, ev0 + e, w)) errs++;
      end
    check(errs == 0, $sformatf("%0d wrong words", errs));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (30) @(posedge clk);
    check(state == ST_WAITING && led_code == LED_GREEN, "RESET then WAITING");
    check(n_beetle_rst == 1, "Beetle reset in RESET state");
    seen.delete();

    send(CMD_BEETLE_CFG); send(8'h20); send(8'h11); send(8'h22);
    @(posedge sc_start);
    check(sc_dev == 7'h20 && sc_reg == 8'h11 && sc_data == 8'h22, "slow control arguments");
    check(led_code == LED_RED, "red LED while busy");
    reply(8'h00, "BEETLE CFG");
    visited(ST_BEETLE_CFG, "BEETLE CONFIGURATION state");
    send(CMD_BEETLE_CFG); send(8'h25); send(8'h11); send(8'h22);
    reply(8'h02, "BEETLE CFG nack");

    send(CMD_TRIGIN_CFG);
    send(8'h0F); send(8'hFF); send(8'h00); send(8'h01); send(8'h08); send(8'h00);
    send(8'h05); send(8'h55); send(8'h1B);
    reply(8'h00, "TRIGGER IN CFG");
    check(dac_thresholds[0] == 12'hFFF && dac_thresholds[1] == 12'h001 &&
          dac_thresholds[2] == 12'h800 && dac_thresholds[3] == 12'h555 && ti_scheme == 5'h1B,
          "thresholds and scheme");
    visited(ST_TRIGIN_CFG, "TRIGGER IN CONFIGURATION state");

    send(CMD_LASER_SYNC); send(8'd200); send(8'd17);
    reply(8'h00, "LASER SYNC");
    check(to_code == 8'd200 && fc_sync_delay == 8'd17, "laser sync values");
    visited(ST_LASER_SYNC, "LASER SYNCHRONISATION state");

    send(CMD_CALIBRATION); send(8'h00); send(8'h01);
    reply(8'h00, "CALIBRATION");
    check(n_testpulse == 1, $sformatf("one test pulse request (%0d)", n_testpulse));
    visited(ST_CALIBRATION, "CALIBRATION state");
    read_back(0, 1, 0);
    visited(ST_LASER_READ, "LASER READING state");

    send(CMD_LASER_ACQ); send(8'h00); send(8'h02);
    repeat (8) @(posedge clk);
    check(to_enable, "laser enabled during acquisition");
    reply(8'h00, "LASER ACQ");
    check(!to_enable, "laser disabled after acquisition");
    visited(ST_LASER_ACQ, "LASER ACQUISITION state");
    read_back(0, 2, 1);

    send(CMD_RS_ACQ); send(8'h00); send(8'h02);
    reply(8'h00, "RS ACQ");
    visited(ST_RS_ACQ, "RS ACQUISITION state");
    send(CMD_LASER_READ);
    reply(8'h01, "wrong read");
    read_back(1, 2, 3);
    visited(ST_RS_READ, "RS READING state");

    send(CMD_LASER_ACQ); send(8'h01); send(8'h00);
    reply(8'h00, "clamped LASER ACQ");
    read_back(0, MAXEV, 5);

    send(8'hC3);
    reply(8'hEE, "unknown opcode");
    send(CMD_RESET);
    reply(8'h00, "RESET command");
    check(n_beetle_rst == 2, "Beetle reset by command");
    visited(ST_RESET, "RESET state by command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
