// sdram_control: controller for the 256 Mbit event-buffer SDRAM.
//
// Every acquisition is stored in a 256 Mbit single-data-rate SDRAM before
// the PC reads it, organised here as 2^24 words of 16 bits in four banks of
// 8192 rows by 512 columns. The word address is split as
// {row[12:0], bank[1:0], column[8:0]}.
// After reset the controller waits INIT_WAIT clocks (100 us), precharges all
// banks, issues two auto-refreshes and loads the mode register (burst length
// 1, sequential, CAS latency CL). It then serves one word at a time: an
// access is ACTIVATE, then after T_RCD clocks a READ or WRITE with
// auto-precharge (A10 high), so every bank is idle between accesses. A write
// occupies T_RCD + T_WR + T_RP clocks (4 at the defaults). A read returns rd_data with a
// one-clock rd_valid CL + 1 clocks after the READ command leaves the
// controller (the SDRAM samples the command on the next edge and its data
// is captured one edge after it appears). An auto-refresh is inserted every
// REF_INT clocks (7.8 us) between accesses.
// Request side: present req_valid with req_we, req_addr, req_wdata; the
// request is taken when req_ready is high in the same clock. Every access
// is a full 16-bit word, so the byte masks sd_dqm are held at zero.
// The SDRAM size and its use follow the system description; the 16-bit data
// width, geometry, CAS latency and all timings (in 25 ns clocks) are this
// design's choices, for a common 16M x 16 part.
module sdram_control
  import alibava_pkg::*;
#(
  parameter int unsigned INIT_WAIT = 4000,
  parameter int unsigned REF_INT   = 312,
  parameter int unsigned CL        = 2,
  parameter int unsigned T_RCD     = 1,
  parameter int unsigned T_RP      = 1,
  parameter int unsigned T_WR      = 2,
  parameter int unsigned T_RFC     = 3
) (
  input  logic        clk,
  input  logic        rst,
  // request side
  input  logic        req_valid,
  input  logic        req_we,
  input  sdram_addr_t req_addr,
  input  word_t       req_wdata,
  output logic        req_ready,
  output word_t       rd_data,
  output logic        rd_valid,
  output logic        init_done,
  // SDRAM pins
  output logic        sd_cke,
  output logic        sd_cs_n,
  output logic        sd_ras_n,
  output logic        sd_cas_n,
  output logic        sd_we_n,
  output logic [1:0]  sd_ba,
  output logic [12:0] sd_a,
  output logic [1:0]  sd_dqm,
  output word_t       sd_dq_o,
  output logic        sd_dq_oe,
  input  word_t       sd_dq_i
);
  // {cs_n, ras_n, cas_n, we_n}
  localparam logic [3:0] C_NOP = 4'b0111, C_ACT = 4'b0011, C_RD  = 4'b0101,
                         C_WR  = 4'b0100, C_PRE = 4'b0010, C_REF = 4'b0001,
                         C_MRS = 4'b0000;

  typedef enum logic [3:0] {
    S_INIT, S_PREALL, S_REF1, S_REF2, S_MRS, S_IDLE, S_REFRESH,
    S_ACT, S_RW, S_WAIT
  } sd_state_e;

  localparam int unsigned WW = $clog2(INIT_WAIT + REF_INT + 16);
  // S_WAIT / S_REFRESH count down to 0, then IDLE takes one clock, so the
  // next command leaves N clocks after the last one when loaded with N - 2.
  localparam int unsigned GAP_WR  = (T_WR + T_RP > 2) ? T_WR + T_RP - 2 : 0;
  localparam int unsigned GAP_RD  = CL + 1 + T_RP - 2;
  localparam int unsigned GAP_RFC = (T_RFC > 2) ? T_RFC - 2 : 0;

  sd_state_e     state;
  logic [WW-1:0] wait_cnt;
  logic [WW-1:0] ref_cnt;
  logic          ref_due;
  logic          op_we;
  logic [10:0]   op_addr;       // bank and column of the access in progress
  word_t         op_wdata;
  logic [3:0]    cmd;
  logic [CL+1:0] rd_pipe;

  assign {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} = cmd;
  assign sd_dqm    = 2'b00;
  assign req_ready = (state == S_IDLE) && !ref_due && init_done;

  // refresh timer
  always_ff @(posedge clk) begin
    if (rst) begin
      ref_cnt <= '0;
      ref_due <= 1'b0;
    end else begin
      if (state == S_REFRESH) begin
        ref_due <= 1'b0;
      end else if (init_done && ref_cnt == WW'(REF_INT - 1)) begin
        ref_due <= 1'b1;
      end
      ref_cnt <= (ref_cnt == WW'(REF_INT - 1) || !init_done) ? '0 : ref_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_INIT;
      wait_cnt  <= WW'(INIT_WAIT);
      init_done <= 1'b0;
      cmd       <= C_NOP;
      sd_cke    <= 1'b0;
      sd_ba     <= '0;
      sd_a      <= '0;
      sd_dq_o   <= '0;
      sd_dq_oe  <= 1'b0;
      op_we     <= 1'b0;
      op_addr   <= '0;
      op_wdata  <= '0;
    end else begin
      cmd      <= C_NOP;
      sd_dq_oe <= 1'b0;
      if (wait_cnt != '0) wait_cnt <= wait_cnt - 1'b1;
      unique case (state)
        S_INIT: begin
          sd_cke <= 1'b1;
          if (wait_cnt == '0) begin
            cmd      <= C_PRE;
            sd_a[10] <= 1'b1;               // all banks
            wait_cnt <= WW'(T_RP);
            state    <= S_PREALL;
          end
        end
        S_PREALL: if (wait_cnt == '0) begin
          cmd      <= C_REF;
          wait_cnt <= WW'(T_RFC);
          state    <= S_REF1;
        end
        S_REF1: if (wait_cnt == '0) begin
          cmd      <= C_REF;
          wait_cnt <= WW'(T_RFC);
          state    <= S_REF2;
        end
        S_REF2: if (wait_cnt == '0) begin
          cmd      <= C_MRS;
          sd_ba    <= 2'b00;
          // write burst = burst, CAS latency, sequential, burst length 1
          sd_a     <= {3'b000, 1'b0, 2'b00, 3'(CL), 1'b0, 3'b000};
          wait_cnt <= WW'(2);
          state    <= S_MRS;
        end
        S_MRS: if (wait_cnt == '0) begin
          init_done <= 1'b1;
          state     <= S_IDLE;
        end
        S_IDLE: begin
          if (ref_due) begin
            cmd      <= C_REF;
            wait_cnt <= WW'(GAP_RFC);
            state    <= S_REFRESH;
          end else if (req_valid && init_done) begin
            // wait_cnt counts the idle clocks between two commands
            op_we    <= req_we;
            op_addr  <= req_addr[10:0];
            op_wdata <= req_wdata;
            cmd      <= C_ACT;
            sd_ba    <= req_addr[10:9];
            sd_a     <= req_addr[23:11];
            wait_cnt <= WW'(T_RCD - 1);
            state    <= S_ACT;
          end
        end
        S_REFRESH: if (wait_cnt == '0) state <= S_IDLE;
        S_ACT: if (wait_cnt == '0) begin
          sd_ba <= op_addr[10:9];
          sd_a  <= {2'b00, 1'b1, 1'b0, op_addr[8:0]};   // A10 = auto-precharge
          if (op_we) begin
            cmd      <= C_WR;
            sd_dq_o  <= op_wdata;
            sd_dq_oe <= 1'b1;
            wait_cnt <= WW'(GAP_WR);
          end else begin
            cmd      <= C_RD;
            wait_cnt <= WW'(GAP_RD);
          end
          state <= S_WAIT;
        end
        S_WAIT: if (wait_cnt == '0) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // read data capture, CL + 1 clocks after the READ command is registered
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_pipe  <= '0;
      rd_valid <= 1'b0;
      rd_data  <= '0;
    end else begin
      rd_pipe  <= {rd_pipe[CL:0], (state == S_ACT && wait_cnt == '0 && !op_we)};
      rd_valid <= rd_pipe[CL];
      if (rd_pipe[CL]) rd_data <= sd_dq_i;
    end
  end
endmodule
