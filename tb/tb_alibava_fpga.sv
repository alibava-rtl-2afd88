// tb_alibava_fpga: end-to-end test of the mother-board FPGA logic.
//
// The FPGA is surrounded by behavioural models of everything on the boards:
// the USB chip with the PC behind it, the SDRAM, two Beetle chips with their
// ADC channels, the two chips' I2C ports, the thermistor converter, the TDC,
// the threshold DAC and the trigger comparators. The PC side sends the
// commands of a measurement campaign and checks every reply byte:
//   RESET state on power-up, WAITING, unknown opcode
//   BEETLE CONFIGURATION (acknowledged write, and a missing chip)
//   TRIGGER IN CONFIGURATION (DAC outputs, coincidence scheme)
//   LASER SYNCHRONISATION (delay code, TRIGGER latency 128 + sync clocks)
//   CALIBRATION, LASER ACQUISITION and LASER READING (every stored word)
//   RS ACQUISITION with single and coincident photomultiplier pulses and
//   RS READING (TDC words, temperature, every sample)
//   reading the wrong kind of acquisition, the event limit, RESET command.
// Each mechanism is counted; one that never happened is a failure.
// Parameters are reduced to keep the run short: laser period 3000 clocks,
// 200-clock SDRAM power-up wait, 4x faster I2C, 10x faster SPI, at most 4
// events per acquisition.
module tb_alibava_fpga;
  import alibava_pkg::*;

  localparam int PERIOD = 3000;
  localparam int MAXEV  = 4;
  localparam int SYNC   = 5;

  logic clk = 0, ext_rst_n = 0;
  always #12.5 clk = !clk;

  // ---------------------------------------------------------------- pins
  logic [7:0] usb_d_i, usb_d_o;
  logic usb_d_oe, usb_rxf_n, usb_txe_n, usb_rd_n, usb_wr;
  logic beetle_clk, beetle_reset, beetle_trigger, beetle_testpulse, datavalid1, datavalid2;
  logic scl_oe, sda_oe, p0, p1;
  logic [11:0] adc0_data, adc1_data;
  logic temp_cs_n, temp_sclk, temp_sdo;
  logic [11:0] dac_data;
  logic [1:0] dac_addr;
  logic dac_cs_n, dac_wr_n, dac_ldac_n;
  logic sin1 = 0, sin2 = 0, ppos = 0, pneg = 0, trig;
  logic tdc_start, tdc_ready, tdc_addr, tdc_rd_n;
  logic [15:0] tdc_data;
  logic [31:0] tdc_last;
  logic trig_out, dly_le, sdram_clk;
  logic [7:0] dly_code;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [1:0] sd_ba, sd_dqm;
  logic [12:0] sd_a;
  word_t sd_dq_o, sd_dq_i;
  logic led_red, led_green, trig_dropped, adc_overflow;
  cfsm_state_e cfsm_state;
  logic [15:0] temp_value = 16'h0000;

  // The board models ignore the FPGA's outputs until the FPGA has been
  // through reset (a configured FPGA drives defined levels from the start).
  wire on = ext_rst_n;
  wire scl = !scl_oe;
  wire sda = !(sda_oe || p0 || p1);

  alibava_fpga #(
    .TRIG_PERIOD(PERIOD), .SDRAM_INIT_WAIT(200), .I2C_QUARTER(25),
    .TEMP_SCLK_DIV(2), .MAX_EV(MAXEV)
  ) dut (
    .clk_in(clk), .ext_rst_n(ext_rst_n), .clk_locked(1'b1), .sdram_clk(sdram_clk),
    .usb_d_i, .usb_d_o, .usb_d_oe, .usb_rxf_n, .usb_txe_n, .usb_rd_n, .usb_wr,
    .beetle_clk, .beetle_reset, .beetle_trigger, .beetle_testpulse, .datavalid1, .datavalid2,
    .scl_oe, .sda_oe, .sda_i(sda), .adc0_data, .adc1_data,
    .temp_cs_n, .temp_sclk, .temp_sdo,
    .dac_data, .dac_addr, .dac_cs_n, .dac_wr_n, .dac_ldac_n,
    .sin1, .sin2, .ppos, .pneg, .trig,
    .tdc_start, .tdc_ready, .tdc_data, .tdc_addr, .tdc_rd_n,
    .trig_out, .dly_code, .dly_le,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a, .sd_dqm,
    .sd_dq_o, .sd_dq_oe, .sd_dq_i,
    .led_red, .led_green, .cfsm_state, .trig_dropped, .adc_overflow
  );

  // -------------------------------------------------------------- models
  usb_host_model host (.clk, .d_to_fpga(usb_d_i), .d_from_fpga(usb_d_o), .d_oe(usb_d_oe),
                       .rxf_n(usb_rxf_n), .txe_n(usb_txe_n), .rd_n(usb_rd_n), .wr(usb_wr));
  sdram_model sdram (.clk(sdram_clk), .cke(sd_cke && on), .cs_n(sd_cs_n || !on), .ras_n(sd_ras_n),
                     .cas_n(sd_cas_n), .we_n(sd_we_n), .ba(sd_ba), .a(sd_a),
                     .dq_in(sd_dq_o), .dq_out(sd_dq_i));
  beetle_model #(.CHIP(0)) beetle0 (.clk(beetle_clk), .trigger(beetle_trigger && on),
    .testpulse(beetle_testpulse && on), .reset(beetle_reset && on), .datavalid(datavalid1), .adc(adc0_data));
  beetle_model #(.CHIP(1)) beetle1 (.clk(beetle_clk), .trigger(beetle_trigger && on),
    .testpulse(beetle_testpulse && on), .reset(beetle_reset && on), .datavalid(datavalid2), .adc(adc1_data));
  i2c_slave_model #(.ADDR(7'h20)) i2c0 (.scl(scl), .sda(sda), .sda_pull(p0));
  i2c_slave_model #(.ADDR(7'h21)) i2c1 (.scl(scl), .sda(sda), .sda_pull(p1));
  spi_adc_model thermo (.cs_n(temp_cs_n), .sclk(temp_sclk), .value(temp_value), .sdo(temp_sdo));
  tdc_model tdc (.start(tdc_start), .stop(trig), .addr(tdc_addr), .rd_n(tdc_rd_n),
                 .ready(tdc_ready), .data(tdc_data), .last(tdc_last));

  // quad DAC with input registers and common load
  logic [11:0] dac_in [4], dac_out [4];
  initial for (int i = 0; i < 4; i++) begin dac_in[i] = '0; dac_out[i] = '0; end
  always @(posedge dac_wr_n) dac_in[dac_addr] = dac_data;
  always @(negedge dac_ldac_n) for (int i = 0; i < 4; i++) dac_out[i] = dac_in[i];

  // ------------------------------------------------------------ checking
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // mechanism counters
  int n_laser_fire = 0, n_testpulse = 0, n_trig = 0, n_pm_single = 0, n_tdc = 0;
  int n_i2c_nack = 0, n_clamp = 0, n_wrong_read = 0, n_unknown = 0, n_refresh = 0;
  int n_usb_busy = 0, n_beetle_reset = 0, n_latency_ok = 0;
  longint cyc = 0, last_fire = -1;

  always @(posedge clk) begin
    cyc++;
    if (!usb_txe_n) ; else n_usb_busy++;
    if (beetle_trigger) begin
      n_trig++;
      if (last_fire >= 0 && cyc - last_fire == longint'(128 + SYNC)) n_latency_ok++;
      last_fire = -1;
    end
  end
  logic trig_out_q = 0;
  always @(posedge clk) begin
    trig_out_q <= trig_out;
    if (trig_out && !trig_out_q) begin n_laser_fire++; last_fire = cyc; end
  end

  // ------------------------------------------------------------ host side
  task automatic send(input logic [7:0] b);
    host.send(b);
  endtask

  task automatic get(output logic [7:0] b);
    int t = 0;
    while (host.n_got() == 0 && t < 2_000_000) begin @(posedge clk); t++; end
    if (host.n_got() == 0) begin
      failures++;
      $display("FAIL no reply byte");
      b = 8'h00;
    end else begin
      b = host.take();
    end
  endtask

  task automatic reply(input logic [7:0] exp_status, input string what);
    logic [7:0] a, s;
    get(a);
    get(s);
    check(a == ACK_BYTE && s == exp_status,
          $sformatf("%s: reply %h %h, expected %h %h", what, a, s, ACK_BYTE, exp_status));
  endtask

  task automatic get_word(output logic [15:0] w);
    logic [7:0] h, l;
    get(h);
    get(l);
    w = {h, l};
  endtask

  task automatic wait_state(input cfsm_state_e s);
    int t = 0;
    while (cfsm_state != s && t < 1_000_000) begin @(posedge clk); t++; end
  endtask

  // read back an acquisition of n events; first_readout is the Beetle
  // readout index of its first event; temps/tdcs hold the expected values
  task automatic read_back(input bit rs, input int n, input int first_readout,
                           input logic [15:0] temps[$], input logic [31:0] tdcs[$]);
    logic [15:0] w, cnt;
    int errs = 0;
    send(rs ? CMD_RS_READ : CMD_LASER_READ);
    reply(8'h00, rs ? "RS READING" : "LASER READING");
    get_word(cnt);
    check(cnt == 16'(n), $sformatf("event count %0d exp %0d", cnt, n));
    for (int e = 0; e < n; e++) begin
      if (rs) begin
        get_word(w); if (w != tdcs[e][31:16]) errs++;
        get_word(w); if (w != tdcs[e][15:0]) begin
          errs++; $display("FAIL event %0d TDC low %h exp %h", e, w, tdcs[e][15:0]);
        end
      end
      get_word(w);
      if (w != temps[e]) begin errs++; $display("FAIL event %0d temp %h exp %h", e, w, temps[e]); end
      for (int c = 0; c < 2; c++)
        for (int k = 0; k < 128; k++) begin
          get_word(w);
          if (w != 16'(beetle0.sample(c, first_readout + e, k))) begin
            errs++;
            if (errs < 5) $display("FAIL event %0d chip %0d ch %0d: %h exp %h", e, c, k, w,
                                   beetle0.sample(c, first_readout + e, k));
          end
        end
    end
    check(errs == 0, $sformatf("%0d wrong words in %0d events", errs, n));
  endtask

  // ------------------------------------------------------------ campaign
  initial begin
    logic [7:0] b;
    logic [15:0] temps[$];
    logic [31:0] tdcs[$];
    int readout, resets_at_start;

    repeat (5) @(posedge clk);
    #1 ext_rst_n = 1;
    wait_state(ST_WAITING);
    check(cfsm_state == ST_WAITING, "reaches WAITING after reset");
    repeat (2) @(posedge clk);
    check(led_green && !led_red, "green LED when waiting");
    check(beetle0.resets >= 1, "Beetle RESET pulse at power-up");
    resets_at_start = beetle0.resets;
    host.clear();

    // unknown opcode
    send(8'h55);
    reply(8'hEE, "unknown opcode");
    n_unknown++;

    // Beetle configuration: chip 0 and chip 1, then an absent chip
    send(CMD_BEETLE_CFG); send(8'h20); send(8'h05); send(8'h77);
    reply(8'h00, "BEETLE CFG chip 0");
    send(CMD_BEETLE_CFG); send(8'h21); send(8'h09); send(8'h3C);
    reply(8'h00, "BEETLE CFG chip 1");
    check(i2c0.regs[5] == 8'h77 && i2c1.regs[9] == 8'h3C, "Beetle registers written");
    send(CMD_BEETLE_CFG); send(8'h30); send(8'h01); send(8'h02);
    reply(8'h02, "BEETLE CFG absent chip");
    n_i2c_nack++;

    // trigger in configuration: thresholds 0x123, 0x456, 0x789, 0xABC, coincidence
    send(CMD_TRIGIN_CFG);
    send(8'h01); send(8'h23); send(8'h04); send(8'h56);
    send(8'h07); send(8'h89); send(8'h0A); send(8'hBC);
    send(8'b0000_0111);
    reply(8'h00, "TRIGGER IN CFG");
    check(dac_out[0] == 12'h123 && dac_out[1] == 12'h456 && dac_out[2] == 12'h789 &&
          dac_out[3] == 12'hABC, "four thresholds in the DAC");

    // laser synchronisation
    send(CMD_LASER_SYNC); send(8'd42); send(8'(SYNC));
    reply(8'h00, "LASER SYNC");
    check(dly_code == 8'd42, "delay line code");

    // calibration: 2 events with test pulses
    temp_value = 16'h0C11;
    send(CMD_CALIBRATION); send(8'h00); send(8'h02);
    reply(8'h00, "CALIBRATION");
    n_testpulse = beetle0.testpulses;
    check(n_testpulse == 2, $sformatf("%0d test pulses", n_testpulse));
    temps = {16'h0C11, 16'h0C11};
    read_back(0, 2, 0, temps, tdcs);
    readout = 2;

    // laser acquisition: 3 events
    temp_value = 16'h0D22;
    send(CMD_LASER_ACQ); send(8'h00); send(8'h03);
    reply(8'h00, "LASER ACQUISITION");
    temps = {16'h0D22, 16'h0D22, 16'h0D22};
    read_back(0, 3, readout, temps, tdcs);
    readout += 3;
    check(n_latency_ok >= 3, $sformatf("TRIGGER 128+%0d clocks after TRIG OUT: %0d", SYNC, n_latency_ok));

    // wrong kind of read
    send(CMD_RS_READ);
    reply(8'h01, "RS READING after a laser acquisition");
    n_wrong_read++;

    // radioactive source: 2 events, single photomultiplier pulses must not trigger
    temp_value = 16'h0E33;
    send(CMD_RS_ACQ); send(8'h00); send(8'h02);
    tdcs.delete();
    for (int e = 0; e < 2; e++) begin
      int trigs_before;
      repeat (2500) @(posedge clk);
      trigs_before = n_trig;
      #(3.3 + 7.1 * e) sin1 = 1;
      repeat (3) @(posedge clk);
      sin1 = 0;
      repeat (400) @(posedge clk);
      check(n_trig == trigs_before, "single photomultiplier ignored in coincidence mode");
      n_pm_single++;
      #(11.7 * (e + 1)) sin1 = 1; sin2 = 1;
      #2 tdcs.push_back(tdc_last);
      repeat (3) @(posedge clk);
      sin1 = 0; sin2 = 0;
    end
    reply(8'h00, "RS ACQUISITION");
    n_tdc = tdc.measurements;
    temps = {16'h0E33, 16'h0E33};
    read_back(1, 2, readout, temps, tdcs);
    readout += 2;

    send(CMD_LASER_READ);
    reply(8'h01, "LASER READING after an RS acquisition");

    // event limit: ask for 65535 events, MAX_EV are taken
    temp_value = 16'h0F44;
    send(CMD_LASER_ACQ); send(8'hFF); send(8'hFF);
    reply(8'h00, "LASER ACQUISITION beyond the limit");
    temps = {16'h0F44, 16'h0F44, 16'h0F44, 16'h0F44};
    read_back(0, MAXEV, readout, temps, tdcs);
    n_clamp++;

    // reset command
    send(CMD_RESET);
    reply(8'h00, "RESET");
    n_beetle_reset = beetle0.resets - resets_at_start;
    check(n_beetle_reset == 1, "Beetle RESET by command");

    n_refresh = sdram.refreshes;
    check(sdram.errors == 0, $sformatf("%0d SDRAM protocol errors", sdram.errors));
    check(host.bus_errors == 0, "USB bus protocol");
    check(beetle0.violations == 0 && beetle1.violations == 0, "single-readout operation");
    check(!adc_overflow, "no ADC FIFO overflow");

    // every mechanism must have happened
    check(n_laser_fire > 0, "laser fired");
    check(n_testpulse > 0, "test pulse");
    check(n_trig > 0, "Beetle triggers");
    check(n_pm_single > 0, "coincidence rejection");
    check(n_tdc > 0, "TDC measurement");
    check(n_i2c_nack > 0, "I2C missing acknowledge");
    check(n_clamp > 0, "event limit");
    check(n_wrong_read > 0, "wrong read");
    check(n_unknown > 0, "unknown opcode");
    check(n_refresh > 0, "SDRAM refresh");
    check(n_usb_busy > 0, "USB chip busy");
    check(n_beetle_reset > 0, "Beetle reset");
    $display("mechanisms: laser %0d testpulse %0d trigger %0d single-PM %0d tdc %0d nack %0d clamp %0d wrong-read %0d unknown %0d refresh %0d usb-busy %0d reset %0d latency-ok %0d",
             n_laser_fire, n_testpulse, n_trig, n_pm_single, n_tdc, n_i2c_nack, n_clamp,
             n_wrong_read, n_unknown, n_refresh, n_usb_busy, n_beetle_reset, n_latency_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired in state %s step %0d trig %0d tdc %0d got %b%b%b%b", cfsm_state.name(),
             dut.u_cfsm.step, n_trig, tdc.measurements, dut.u_cfsm.got0, dut.u_cfsm.got1,
             dut.u_cfsm.got_tdc, dut.u_cfsm.got_temp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
