// alibava_fpga: mother-board FPGA logic of the ALiBaVa readout system.
//
// The system reads two Beetle analogue pipelined readout chips that sit on
// a daughter board next to a silicon microstrip sensor, triggered either by
// a pulsed laser (the FPGA fires the laser) or by a radioactive source (a
// scintillator/photomultiplier trigger fires the FPGA). This module holds
// every FPGA block of the mother board, connected in a star around the
// central state machine (cfsm), which alone talks to the others:
//   usb_control + two FIFO links  - byte streams to and from the PC
//   beetle_slow_control           - I2C writes of Beetle registers
//   beetle_fast_control           - Beetle CLK, RESET, TRIGGER, TESTPULSE
//   trigger_out                   - 1 kHz laser trigger and delay-line code
//   trigger_in                    - photomultiplier / pulse trigger logic
//   dac_control                   - the four discriminator thresholds
//   tdc_control                   - START generation, TDC readout, TRIG_R
//   adc_control x2                - one readout frame per chip into FIFOs
//   temp_control                  - thermistor reading per event
//   sdram_control                 - 256 Mbit event buffer
//   led_control, clock_generator  - status LEDs, clocks and reset
// All logic runs on the 40 MHz crystal clock, which is also the Beetle CLK
// and the SDRAM clock. Bidirectional pins (USB data, SDRAM data, I2C) are
// brought out as separate in / out / output-enable signals for the pad
// buffers. The parameters only exist to shorten simulations; their defaults
// are the real system's values.
module alibava_fpga
  import alibava_pkg::*;
#(
  parameter int unsigned TRIG_PERIOD     = CLK_HZ / TRIG_OUT_HZ, // laser period in clocks
  parameter int unsigned SDRAM_INIT_WAIT = 4000,                 // 100 us power-up wait
  parameter int unsigned I2C_QUARTER     = 100,                  // 100 kHz I2C
  parameter int unsigned TEMP_SCLK_DIV   = 20,                   // 1 MHz SPI clock
  parameter int unsigned ADC_W           = 12,
  parameter int unsigned MAX_EV          = MAX_EVENTS
) (
  input  logic             clk_in,
  input  logic             ext_rst_n,
  input  logic             clk_locked,
  output logic             sdram_clk,
  // USB FIFO chip
  input  logic [7:0]       usb_d_i,
  output logic [7:0]       usb_d_o,
  output logic             usb_d_oe,
  input  logic             usb_rxf_n,
  input  logic             usb_txe_n,
  output logic             usb_rd_n,
  output logic             usb_wr,
  // Beetle fast control (LVDS through repeaters)
  output logic             beetle_clk,
  output logic             beetle_reset,
  output logic             beetle_trigger,
  output logic             beetle_testpulse,
  input  logic             datavalid1,
  input  logic             datavalid2,
  // Beetle slow control (I2C, open drain)
  output logic             scl_oe,
  output logic             sda_oe,
  input  logic             sda_i,
  // ADCs of the two analogue channels
  input  logic [ADC_W-1:0] adc0_data,
  input  logic [ADC_W-1:0] adc1_data,
  // thermistor converter (SPI)
  output logic             temp_cs_n,
  output logic             temp_sclk,
  input  logic             temp_sdo,
  // threshold DAC
  output logic [DAC_W-1:0] dac_data,
  output logic [1:0]       dac_addr,
  output logic             dac_cs_n,
  output logic             dac_wr_n,
  output logic             dac_ldac_n,
  // trigger conditioning comparators, trigger to the TDC
  input  logic             sin1,
  input  logic             sin2,
  input  logic             ppos,
  input  logic             pneg,
  output logic             trig,
  // TDC chip
  output logic             tdc_start,
  input  logic             tdc_ready,
  input  logic [15:0]      tdc_data,
  output logic             tdc_addr,
  output logic             tdc_rd_n,
  // laser trigger and programmable delay line
  output logic             trig_out,
  output logic [DELAY_W-1:0] dly_code,
  output logic             dly_le,
  // SDRAM
  output logic             sd_cke,
  output logic             sd_cs_n,
  output logic             sd_ras_n,
  output logic             sd_cas_n,
  output logic             sd_we_n,
  output logic [1:0]       sd_ba,
  output logic [12:0]      sd_a,
  output logic [1:0]       sd_dqm,
  output word_t            sd_dq_o,
  output logic             sd_dq_oe,
  input  word_t            sd_dq_i,
  // status
  output logic             led_red,
  output logic             led_green,
  output cfsm_state_e      cfsm_state,
  output logic             trig_dropped,   // a trigger arrived during a readout
  output logic             adc_overflow    // a frame sample was lost
);
  logic clk, rst;

  clock_generator u_clkgen (
    .clk_in (clk_in), .ext_rst_n (ext_rst_n), .locked (clk_locked),
    .clk_sys (clk), .clk_sdram (sdram_clk), .rst_out (rst)
  );

  // ------------------------------------------------------------- USB
  logic [7:0] rx_in_byte, rx_byte, tx_byte, tx_out_byte;
  logic       rx_push, rx_full, rx_empty, rx_pop;
  logic       tx_push, tx_full, tx_empty, tx_pop;
  logic [4:0] rx_count, tx_count;

  usb_control u_usb (
    .clk (clk), .rst (rst),
    .usb_d_i (usb_d_i), .usb_d_o (usb_d_o), .usb_d_oe (usb_d_oe),
    .rxf_n (usb_rxf_n), .txe_n (usb_txe_n), .rd_n (usb_rd_n), .wr (usb_wr),
    .rx_push (rx_push), .rx_byte (rx_in_byte), .rx_full (rx_full),
    .tx_byte (tx_out_byte), .tx_empty (tx_empty), .tx_pop (tx_pop)
  );

  sync_fifo #(.WIDTH(8), .DEPTH(16)) u_rx_link (
    .clk (clk), .rst (rst), .wr_en (rx_push), .wr_data (rx_in_byte),
    .rd_en (rx_pop), .rd_data (rx_byte), .full (rx_full), .empty (rx_empty),
    .count (rx_count)
  );

  sync_fifo #(.WIDTH(8), .DEPTH(16)) u_tx_link (
    .clk (clk), .rst (rst), .wr_en (tx_push), .wr_data (tx_byte),
    .rd_en (tx_pop), .rd_data (tx_out_byte), .full (tx_full), .empty (tx_empty),
    .count (tx_count)
  );

  // ------------------------------------------------------- Beetle control
  logic       sc_start, sc_done, sc_ack_error, sc_busy;
  logic [6:0] sc_dev;
  logic [7:0] sc_reg, sc_data;

  beetle_slow_control #(.QUARTER(I2C_QUARTER)) u_slow (
    .clk (clk), .rst (rst), .start (sc_start), .dev_addr (sc_dev),
    .reg_addr (sc_reg), .reg_data (sc_data), .busy (sc_busy), .done (sc_done),
    .ack_error (sc_ack_error), .scl_oe (scl_oe), .sda_oe (sda_oe), .sda_i (sda_i)
  );

  logic [1:0] fc_src_sel;
  logic [7:0] fc_sync_delay;
  logic       fc_rst_req, fc_calib, fc_accepted;
  logic       trig_l, trig_r;

  beetle_fast_control u_fast (
    .clk (clk), .rst (rst), .src_sel (fc_src_sel), .trig_l (trig_l),
    .trig_r (trig_r), .calib (fc_calib), .sync_delay (fc_sync_delay),
    .rst_req (fc_rst_req), .beetle_clk (beetle_clk), .beetle_reset (beetle_reset),
    .beetle_trigger (beetle_trigger), .beetle_testpulse (beetle_testpulse),
    .accepted (fc_accepted), .dropped (trig_dropped)
  );

  // ------------------------------------------------------ laser trigger
  logic               to_enable, to_load;
  logic [DELAY_W-1:0] to_code;

  trigger_out #(.PERIOD(TRIG_PERIOD)) u_trig_out (
    .clk (clk), .rst (rst), .enable (to_enable), .load (to_load), .code (to_code),
    .trig_out (trig_out), .trig_l (trig_l), .dly_code (dly_code), .dly_le (dly_le)
  );

  // -------------------------------------------- radioactive source trigger
  logic [4:0] ti_scheme;
  logic       trig_in;

  trigger_in u_trig_in (
    .clk (clk), .rst (rst), .scheme (ti_scheme), .sin1 (sin1), .sin2 (sin2),
    .ppos (ppos), .pneg (pneg), .trig (trig), .trig_in (trig_in)
  );

  logic                  dac_start, dac_done, dac_busy;
  logic [3:0][DAC_W-1:0] dac_thresholds;

  dac_control u_dac (
    .clk (clk), .rst (rst), .start (dac_start), .thresholds (dac_thresholds),
    .busy (dac_busy), .done (dac_done), .dac_data (dac_data), .dac_addr (dac_addr),
    .dac_cs_n (dac_cs_n), .dac_wr_n (dac_wr_n), .dac_ldac_n (dac_ldac_n)
  );

  logic        tdc_enable, tdc_valid, tdc_busy;
  logic [31:0] tdc_value;

  tdc_control u_tdc (
    .clk (clk), .rst (rst), .enable (tdc_enable), .trig_in (trig_in),
    .trig_r (trig_r), .tdc_start (tdc_start), .tdc_ready (tdc_ready),
    .tdc_data (tdc_data), .tdc_addr (tdc_addr), .tdc_rd_n (tdc_rd_n),
    .value (tdc_value), .valid (tdc_valid), .busy (tdc_busy)
  );

  // -------------------------------------------------------------- ADCs
  word_t adc0_word, adc1_word;
  logic  adc0_empty, adc1_empty, adc0_done, adc1_done, adc0_pop, adc1_pop;
  logic  adc0_ovf, adc1_ovf;

  adc_control #(.ADC_W(ADC_W)) u_adc0 (
    .clk (clk), .rst (rst), .datavalid (datavalid1), .adc_data (adc0_data),
    .rd_en (adc0_pop), .rd_data (adc0_word), .empty (adc0_empty),
    .frame_done (adc0_done), .overflow (adc0_ovf)
  );

  adc_control #(.ADC_W(ADC_W)) u_adc1 (
    .clk (clk), .rst (rst), .datavalid (datavalid2), .adc_data (adc1_data),
    .rd_en (adc1_pop), .rd_data (adc1_word), .empty (adc1_empty),
    .frame_done (adc1_done), .overflow (adc1_ovf)
  );

  assign adc_overflow = adc0_ovf || adc1_ovf;

  // ------------------------------------------------------- temperature
  logic  temp_start, temp_done, temp_busy;
  word_t temp_value;

  temp_control #(.SCLK_DIV(TEMP_SCLK_DIV)) u_temp (
    .clk (clk), .rst (rst), .start (temp_start), .busy (temp_busy),
    .done (temp_done), .temp (temp_value), .cs_n (temp_cs_n), .sclk (temp_sclk),
    .sdo (temp_sdo)
  );

  // ------------------------------------------------------------ SDRAM
  logic        mem_req_valid, mem_req_we, mem_req_ready, mem_rd_valid, mem_init_done;
  sdram_addr_t mem_req_addr;
  word_t       mem_req_wdata, mem_rd_data;

  sdram_control #(.INIT_WAIT(SDRAM_INIT_WAIT)) u_sdram (
    .clk (clk), .rst (rst),
    .req_valid (mem_req_valid), .req_we (mem_req_we), .req_addr (mem_req_addr),
    .req_wdata (mem_req_wdata), .req_ready (mem_req_ready),
    .rd_data (mem_rd_data), .rd_valid (mem_rd_valid), .init_done (mem_init_done),
    .sd_cke (sd_cke), .sd_cs_n (sd_cs_n), .sd_ras_n (sd_ras_n), .sd_cas_n (sd_cas_n),
    .sd_we_n (sd_we_n), .sd_ba (sd_ba), .sd_a (sd_a), .sd_dqm (sd_dqm),
    .sd_dq_o (sd_dq_o), .sd_dq_oe (sd_dq_oe), .sd_dq_i (sd_dq_i)
  );

  // -------------------------------------------------------------- CFSM
  led_code_e led_code;

  cfsm #(.MAX_EV(MAX_EV)) u_cfsm (
    .clk (clk), .rst (rst), .state (cfsm_state), .led_code (led_code),
    .rx_byte (rx_byte), .rx_empty (rx_empty), .rx_pop (rx_pop),
    .tx_byte (tx_byte), .tx_push (tx_push), .tx_full (tx_full),
    .sc_start (sc_start), .sc_dev (sc_dev), .sc_reg (sc_reg), .sc_data (sc_data),
    .sc_done (sc_done), .sc_ack_error (sc_ack_error),
    .fc_src_sel (fc_src_sel), .fc_sync_delay (fc_sync_delay),
    .fc_rst_req (fc_rst_req), .fc_calib (fc_calib), .fc_accepted (fc_accepted),
    .to_enable (to_enable), .to_load (to_load), .to_code (to_code),
    .ti_scheme (ti_scheme), .dac_start (dac_start), .dac_thresholds (dac_thresholds),
    .dac_done (dac_done),
    .tdc_enable (tdc_enable), .tdc_value (tdc_value), .tdc_valid (tdc_valid),
    .adc0_data (adc0_word), .adc0_empty (adc0_empty), .adc0_frame_done (adc0_done),
    .adc0_pop (adc0_pop),
    .adc1_data (adc1_word), .adc1_empty (adc1_empty), .adc1_frame_done (adc1_done),
    .adc1_pop (adc1_pop),
    .temp_start (temp_start), .temp_value (temp_value), .temp_done (temp_done),
    .mem_req_valid (mem_req_valid), .mem_req_we (mem_req_we),
    .mem_req_addr (mem_req_addr), .mem_req_wdata (mem_req_wdata),
    .mem_req_ready (mem_req_ready), .mem_rd_data (mem_rd_data),
    .mem_rd_valid (mem_rd_valid), .mem_init_done (mem_init_done)
  );

  led_control u_led (
    .clk (clk), .rst (rst), .code (led_code), .led_red (led_red), .led_green (led_green)
  );
endmodule
