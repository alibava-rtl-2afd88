// cfsm: central finite state machine of the mother-board FPGA.
//
// The CFSM interprets commands from the PC and is the only block that talks
// to the others: every other block is connected to it alone. Its main
// states are RESET, WAITING and, reached from WAITING and returning to it,
// BEETLE CONFIGURATION, CALIBRATION, TRIGGER IN CONFIGURATION, LASER
// SYNCHRONISATION, LASER ACQUISITION, LASER READING, RS ACQUISITION and
// RS READING. Power-up, an external reset and the RESET command pass
// through RESET, which pulses the Beetle RESET line and waits for the SDRAM
// to be initialised.
//
// Host protocol (this design's choice): a command is an opcode byte followed
// by a fixed number of argument bytes (alibava_pkg::cmd_e). Every command is
// answered with ACK_BYTE and a status byte (0 = ok, 1 = no matching
// acquisition to read, 2 = I2C slave did not acknowledge, 8'hEE = unknown
// opcode). A read command then sends the number of stored events (2 bytes)
// and every stored 16-bit word, most significant byte first.
//
// Acquisition (CALIBRATION, LASER ACQUISITION, RS ACQUISITION): up to
// MAX_EVENTS events are taken. For each event the CFSM arms one trigger
// source in the fast control (the internal test pulse, the laser trigger
// TRIG_L, or the source trigger TRIG_R from the TDC block, whose TDC is
// enabled only while armed); once the fast control accepts a trigger it
// disarms, starts a temperature reading, waits for both Beetle frames to be in the ADC FIFOs (and, for the source,
// for the TDC result), then writes the event to consecutive SDRAM words:
// [TDC high, TDC low (source only)], temperature, 128 samples of chip 0,
// 128 samples of chip 1. Triggers that arrive while the source is disarmed
// are not turned into Beetle triggers. While a laser acquisition runs, the
// laser keeps firing at its fixed 1 kHz rate.
// Reading returns the last acquisition from SDRAM; LASER READING reads a
// laser or calibration acquisition, RS READING a source acquisition.
//
// The state set, the stored event contents, the event limit and the trigger
// sources follow the system description; the command encoding, replies,
// event word order and the arm/disarm handshake are this design's choices.
module cfsm
  import alibava_pkg::*;
#(
  parameter int unsigned MAX_EV = MAX_EVENTS
) (
  input  logic        clk,
  input  logic        rst,
  output cfsm_state_e state,
  output led_code_e   led_code,
  // host byte streams (FIFO links)
  input  logic [7:0]  rx_byte,
  input  logic        rx_empty,
  output logic        rx_pop,
  output logic [7:0]  tx_byte,
  output logic        tx_push,
  input  logic        tx_full,
  // Beetle slow control
  output logic        sc_start,
  output logic [6:0]  sc_dev,
  output logic [7:0]  sc_reg,
  output logic [7:0]  sc_data,
  input  logic        sc_done,
  input  logic        sc_ack_error,
  // Beetle fast control
  output logic [1:0]  fc_src_sel,
  output logic [7:0]  fc_sync_delay,
  output logic        fc_rst_req,
  output logic        fc_calib,
  input  logic        fc_accepted,
  // trigger out (laser)
  output logic        to_enable,
  output logic        to_load,
  output logic [DELAY_W-1:0] to_code,
  // trigger in and thresholds
  output logic [4:0]  ti_scheme,
  output logic        dac_start,
  output logic [3:0][DAC_W-1:0] dac_thresholds,
  input  logic        dac_done,
  // TDC
  output logic        tdc_enable,
  input  logic [31:0] tdc_value,
  input  logic        tdc_valid,
  // ADC frame FIFOs
  input  word_t       adc0_data,
  input  logic        adc0_empty,
  input  logic        adc0_frame_done,
  output logic        adc0_pop,
  input  word_t       adc1_data,
  input  logic        adc1_empty,
  input  logic        adc1_frame_done,
  output logic        adc1_pop,
  // temperature
  output logic        temp_start,
  input  word_t       temp_value,
  input  logic        temp_done,
  // SDRAM
  output logic        mem_req_valid,
  output logic        mem_req_we,
  output sdram_addr_t mem_req_addr,
  output word_t       mem_req_wdata,
  input  logic        mem_req_ready,
  input  word_t       mem_rd_data,
  input  logic        mem_rd_valid,
  input  logic        mem_init_done
);
  typedef enum logic [4:0] {
    P_ENTRY, P_OPCODE, P_ARGS, P_EXEC, P_WAIT_BLOCK,
    P_ARM, P_WAIT_TRIG, P_WAIT_DATA, P_WRITE,
    P_READ_HDR, P_RD_REQ, P_RD_WAIT, P_RD_HI, P_RD_LO,
    P_ACK, P_STATUS, P_CNT_HI, P_CNT_LO
  } step_e;

  typedef enum logic [1:0] {ACQ_NONE, ACQ_LASER, ACQ_RS} acq_kind_e;

  step_e        step;
  logic [7:0]   opcode;
  logic [7:0]   args [9];
  logic [3:0]   nargs, argi;
  logic [7:0]   status;
  logic         from_cmd;        // RESET entered by a command: reply when done
  logic [15:0]  n_events, ev_cnt;
  logic [8:0]   w;               // word index inside an event
  sdram_addr_t  addr;
  logic [24:0]  words_left;
  word_t        rd_word;
  logic         got0, got1, got_tdc, got_temp;
  logic [31:0]  tdc_q;
  word_t        temp_q;
  acq_kind_e    last_kind;
  logic [15:0]  last_events;

  wire is_rs    = (state == ST_RS_ACQ);
  wire [8:0] hdr_words   = is_rs ? 9'd3 : 9'd1;
  wire [8:0] event_words = hdr_words + 9'(N_CHIPS * N_CHANNELS);

  // argument count of each opcode
  function automatic logic [3:0] arg_count(input logic [7:0] op);
    unique case (op)
      CMD_BEETLE_CFG:                            return 4'd3;
      CMD_CALIBRATION, CMD_LASER_ACQ, CMD_RS_ACQ: return 4'd2;
      CMD_TRIGIN_CFG:                            return 4'd9;
      CMD_LASER_SYNC:                            return 4'd2;
      default:                                   return 4'd0;
    endcase
  endfunction

  // word written for index w of the current event
  word_t wr_word;
  logic  wr_from0, wr_from1;
  always_comb begin
    wr_from0 = 1'b0;
    wr_from1 = 1'b0;
    if (w < hdr_words) begin
      if (is_rs) begin
        unique case (w[1:0])
          2'd0:    wr_word = tdc_q[31:16];
          2'd1:    wr_word = tdc_q[15:0];
          default: wr_word = temp_q;
        endcase
      end else begin
        wr_word = temp_q;
      end
    end else if (w < hdr_words + 9'(N_CHANNELS)) begin
      wr_word  = adc0_data;
      wr_from0 = 1'b1;
    end else begin
      wr_word  = adc1_data;
      wr_from1 = 1'b1;
    end
  end

  // a frame word is only written once it is in its ADC FIFO
  wire wr_avail = !(wr_from0 && adc0_empty) && !(wr_from1 && adc1_empty);

  assign mem_req_valid = ((step == P_WRITE) && wr_avail) || (step == P_RD_REQ);
  assign mem_req_we    = (step == P_WRITE);
  assign mem_req_addr  = addr;
  assign mem_req_wdata = wr_word;
  assign adc0_pop      = (step == P_WRITE) && wr_avail && mem_req_ready && wr_from0;
  assign adc1_pop      = (step == P_WRITE) && wr_avail && mem_req_ready && wr_from1;

  assign led_code = (state == ST_WAITING) ? LED_GREEN :
                    (state == ST_RESET)   ? LED_BOTH  : LED_RED;

  // byte sent to the host in the reply steps
  always_comb begin
    tx_push = 1'b0;
    tx_byte = 8'h00;
    unique case (step)
      P_ACK:    begin tx_push = !tx_full; tx_byte = ACK_BYTE;          end
      P_STATUS: begin tx_push = !tx_full; tx_byte = status;            end
      P_CNT_HI: begin tx_push = !tx_full; tx_byte = last_events[15:8]; end
      P_CNT_LO: begin tx_push = !tx_full; tx_byte = last_events[7:0];  end
      P_RD_HI:  begin tx_push = !tx_full; tx_byte = rd_word[15:8];     end
      P_RD_LO:  begin tx_push = !tx_full; tx_byte = rd_word[7:0];      end
      default: ;
    endcase
  end

  assign rx_pop = !rx_empty && ((step == P_OPCODE) || (step == P_ARGS));

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= ST_RESET;
      step           <= P_ENTRY;
      opcode         <= '0;
      for (int i = 0; i < 9; i++) args[i] <= '0;
      nargs          <= '0;
      argi           <= '0;
      status         <= '0;
      from_cmd       <= 1'b0;
      n_events       <= '0;
      ev_cnt         <= '0;
      w              <= '0;
      addr           <= '0;
      words_left     <= '0;
      rd_word        <= '0;
      got0           <= 1'b0;
      got1           <= 1'b0;
      got_tdc        <= 1'b0;
      got_temp       <= 1'b0;
      tdc_q          <= '0;
      temp_q         <= '0;
      last_kind      <= ACQ_NONE;
      last_events    <= '0;
      sc_start       <= 1'b0;
      sc_dev         <= '0;
      sc_reg         <= '0;
      sc_data        <= '0;
      fc_src_sel     <= 2'd0;
      fc_sync_delay  <= '0;
      fc_rst_req     <= 1'b0;
      fc_calib       <= 1'b0;
      to_enable      <= 1'b0;
      to_load        <= 1'b0;
      to_code        <= '0;
      ti_scheme      <= '0;
      dac_start      <= 1'b0;
      dac_thresholds <= '0;
      tdc_enable     <= 1'b0;
      temp_start     <= 1'b0;
    end else begin
      sc_start   <= 1'b0;
      fc_rst_req <= 1'b0;
      fc_calib   <= 1'b0;
      to_load    <= 1'b0;
      dac_start  <= 1'b0;
      temp_start <= 1'b0;

      // frame, TDC and temperature completions are latched in any step
      if (adc0_frame_done) got0     <= 1'b1;
      if (adc1_frame_done) got1     <= 1'b1;
      if (tdc_valid) begin
        got_tdc <= 1'b1;
        tdc_q   <= tdc_value;
      end
      if (temp_done) begin
        got_temp <= 1'b1;
        temp_q   <= temp_value;
      end

      unique case (step)
        // ---------------------------------------------------------------
        P_ENTRY: begin   // RESET state: initialise the system
          fc_rst_req    <= 1'b1;
          fc_src_sel    <= 2'd0;
          to_enable     <= 1'b0;
          tdc_enable    <= 1'b0;
          status        <= 8'h00;
          step          <= P_WAIT_BLOCK;
        end
        P_OPCODE: if (!rx_empty) begin   // WAITING: fetch a command
          opcode <= rx_byte;
          nargs  <= arg_count(rx_byte);
          argi   <= '0;
          step   <= (arg_count(rx_byte) == 4'd0) ? P_EXEC : P_ARGS;
        end
        P_ARGS: if (!rx_empty) begin
          args[argi] <= rx_byte;
          argi       <= argi + 1'b1;
          if (argi + 1'b1 == nargs) step <= P_EXEC;
        end
        P_EXEC: begin
          status <= 8'h00;
          unique case (opcode)
            CMD_RESET: begin
              state    <= ST_RESET;
              from_cmd <= 1'b1;
              step     <= P_ENTRY;
            end
            CMD_BEETLE_CFG: begin
              state    <= ST_BEETLE_CFG;
              sc_dev   <= args[0][6:0];
              sc_reg   <= args[1];
              sc_data  <= args[2];
              sc_start <= 1'b1;
              step     <= P_WAIT_BLOCK;
            end
            CMD_TRIGIN_CFG: begin
              state <= ST_TRIGIN_CFG;
              for (int i = 0; i < 4; i++)
                dac_thresholds[i] <= {args[2*i][3:0], args[2*i+1]};
              ti_scheme <= args[8][4:0];
              dac_start <= 1'b1;
              step      <= P_WAIT_BLOCK;
            end
            CMD_LASER_SYNC: begin
              state         <= ST_LASER_SYNC;
              to_code       <= args[0];
              fc_sync_delay <= args[1];
              to_load       <= 1'b1;
              step          <= P_ACK;
            end
            CMD_CALIBRATION, CMD_LASER_ACQ, CMD_RS_ACQ: begin
              state    <= (opcode == CMD_CALIBRATION) ? ST_CALIBRATION :
                          (opcode == CMD_LASER_ACQ)   ? ST_LASER_ACQ : ST_RS_ACQ;
              n_events <= ({args[0], args[1]} > 16'(MAX_EV)) ? 16'(MAX_EV)
                                                             : {args[0], args[1]};
              ev_cnt   <= '0;
              addr     <= '0;
              last_kind   <= ACQ_NONE;
              last_events <= '0;
              to_enable   <= (opcode == CMD_LASER_ACQ);
              step        <= P_ARM;
            end
            CMD_LASER_READ, CMD_RS_READ: begin
              state <= (opcode == CMD_LASER_READ) ? ST_LASER_READ : ST_RS_READ;
              step  <= P_READ_HDR;
            end
            default: begin
              status <= 8'hEE;
              step   <= P_ACK;
            end
          endcase
        end
        P_WAIT_BLOCK: begin
          unique case (state)
            ST_RESET: if (mem_init_done) begin
              step <= from_cmd ? P_ACK : P_OPCODE;
              if (!from_cmd) state <= ST_WAITING;
              from_cmd <= 1'b0;
            end
            ST_BEETLE_CFG: if (sc_done) begin
              status <= sc_ack_error ? 8'd2 : 8'd0;
              step   <= P_ACK;
            end
            ST_TRIGIN_CFG: if (dac_done) step <= P_ACK;
            default: step <= P_ACK;
          endcase
        end
        // ------------------------------------------------ acquisition
        P_ARM: begin
          if (ev_cnt == n_events) begin
            to_enable   <= 1'b0;
            tdc_enable  <= 1'b0;
            last_kind   <= is_rs ? ACQ_RS : ACQ_LASER;
            last_events <= n_events;
            step        <= P_ACK;
          end else begin
            got0     <= 1'b0;
            got1     <= 1'b0;
            got_tdc  <= 1'b0;
            got_temp <= 1'b0;
            fc_src_sel <= (state == ST_CALIBRATION) ? 2'd3 :
                          (state == ST_LASER_ACQ)   ? 2'd1 : 2'd2;
            fc_calib   <= (state == ST_CALIBRATION);
            tdc_enable <= is_rs;
            step       <= P_WAIT_TRIG;
          end
        end
        P_WAIT_TRIG: if (fc_accepted) begin
          fc_src_sel <= 2'd0;
          tdc_enable <= 1'b0;
          temp_start <= 1'b1;
          step       <= P_WAIT_DATA;
        end
        P_WAIT_DATA: if (got0 && got1 && got_temp && (got_tdc || !is_rs)) begin
          w    <= '0;
          step <= P_WRITE;
        end
        P_WRITE: if (wr_avail && mem_req_ready) begin
          addr <= addr + 1'b1;
          if (w == event_words - 1'b1) begin
            ev_cnt <= ev_cnt + 1'b1;
            step   <= P_ARM;
          end
          w <= w + 1'b1;
        end
        // ---------------------------------------------------- reading
        P_READ_HDR: begin
          if ((state == ST_LASER_READ && last_kind == ACQ_LASER) ||
              (state == ST_RS_READ && last_kind == ACQ_RS)) begin
            status     <= 8'h00;
            words_left <= 25'(last_events) *
                          25'((last_kind == ACQ_RS) ? RS_EVENT_WORDS : LASER_EVENT_WORDS);
          end else begin
            status     <= 8'h01;
            words_left <= '0;
          end
          addr <= '0;
          step <= P_ACK;
        end
        P_RD_REQ: if (mem_req_ready) begin
          addr <= addr + 1'b1;
          step <= P_RD_WAIT;
        end
        P_RD_WAIT: if (mem_rd_valid) begin
          rd_word <= mem_rd_data;
          step    <= P_RD_HI;
        end
        P_RD_HI: if (!tx_full) step <= P_RD_LO;
        P_RD_LO: if (!tx_full) begin
          words_left <= words_left - 1'b1;
          if (words_left == 25'd1) begin
            state <= ST_WAITING;
            step  <= P_OPCODE;
          end else begin
            step <= P_RD_REQ;
          end
        end
        // ---------------------------------------------------- replies
        P_ACK:    if (!tx_full) step <= P_STATUS;
        P_STATUS: if (!tx_full) begin
          if ((state == ST_LASER_READ || state == ST_RS_READ) && status == 8'h00) begin
            step <= P_CNT_HI;
          end else begin
            state <= ST_WAITING;
            step  <= P_OPCODE;
          end
        end
        P_CNT_HI: if (!tx_full) step <= P_CNT_LO;
        P_CNT_LO: if (!tx_full) begin
          if (words_left == '0) begin
            state <= ST_WAITING;
            step  <= P_OPCODE;
          end else begin
            step <= P_RD_REQ;
          end
        end
        default: step <= P_OPCODE;
      endcase

    end
  end
endmodule
