// tdc_control: time measurement of radioactive-source triggers.
//
// An external TDC chip (600 ps resolution, 100 ns range) measures the time
// from the leading edge of a periodic START signal to the leading edge of
// the external trigger TRIG. This block generates START, a square wave of
// START_PERIOD clocks (100 ns, i.e. 4 clocks at 40 MHz; high for the first
// half of each period). While `enable` is high, each internal trigger pulse
// trig_in (the synchronised TRIG) is passed on at the next clock as TRIG_R,
// the trigger for the Beetle fast control, and the block then waits for the
// TDC to signal a result (tdc_ready high). It reads the 32-bit result as two
// 16-bit words over the chip's parallel port (tdc_addr 0 = upper half,
// 1 = lower half, tdc_rd_n low for RD_W clocks, data sampled on the last of
// them) and presents it on `value` with a one-clock `valid`. If no result
// arrives within TIMEOUT clocks, `value` is all ones and `valid` still
// pulses, so that an event always has a TDC word.
// START period, the 32-bit readout and TRIG_R follow the system
// description; the chip's port, its protocol and the timeout are this
// design's choices.
module tdc_control #(
  parameter int unsigned START_PERIOD = 4,
  parameter int unsigned RD_W         = 2,
  parameter int unsigned TIMEOUT      = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        trig_in,
  output logic        trig_r,
  output logic        tdc_start,
  input  logic        tdc_ready,
  input  logic [15:0] tdc_data,
  output logic        tdc_addr,
  output logic        tdc_rd_n,
  output logic [31:0] value,
  output logic        valid,
  output logic        busy
);
  localparam int unsigned PW = $clog2(START_PERIOD + 1);
  localparam int unsigned TW = $clog2(TIMEOUT + 1);
  localparam int unsigned RW = $clog2(RD_W + 1);

  typedef enum logic [2:0] {T_IDLE, T_WAIT, T_RD_HI, T_RD_LO, T_DONE} tdc_state_e;

  tdc_state_e    state;
  logic [PW-1:0] pcnt;
  logic [TW-1:0] tcnt;
  logic [RW-1:0] rcnt;

  // START generator: runs continuously.
  always_ff @(posedge clk) begin
    if (rst) begin
      pcnt      <= '0;
      tdc_start <= 1'b0;
    end else begin
      pcnt      <= (pcnt == PW'(START_PERIOD - 1)) ? '0 : pcnt + 1'b1;
      tdc_start <= (pcnt < PW'(START_PERIOD / 2));
    end
  end

  assign busy = (state != T_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= T_IDLE;
      trig_r   <= 1'b0;
      tcnt     <= '0;
      rcnt     <= '0;
      tdc_addr <= 1'b0;
      tdc_rd_n <= 1'b1;
      value    <= '0;
      valid    <= 1'b0;
    end else begin
      trig_r <= 1'b0;
      valid  <= 1'b0;
      unique case (state)
        T_IDLE: if (enable && trig_in) begin
          trig_r <= 1'b1;
          tcnt   <= TW'(TIMEOUT);
          state  <= T_WAIT;
        end
        T_WAIT: begin
          if (tdc_ready) begin
            tdc_addr <= 1'b0;
            tdc_rd_n <= 1'b0;
            rcnt     <= RW'(RD_W - 1);
            state    <= T_RD_HI;
          end else if (tcnt == '0) begin
            value <= '1;
            state <= T_DONE;
          end else begin
            tcnt <= tcnt - 1'b1;
          end
        end
        T_RD_HI: begin
          if (rcnt == '0) begin
            value[31:16] <= tdc_data;
            tdc_addr     <= 1'b1;
            rcnt         <= RW'(RD_W - 1);
            state        <= T_RD_LO;
          end else begin
            rcnt <= rcnt - 1'b1;
          end
        end
        T_RD_LO: begin
          if (rcnt == '0) begin
            value[15:0] <= tdc_data;
            tdc_rd_n    <= 1'b1;      // address held while rd_n rises
            state       <= T_DONE;
          end else begin
            rcnt <= rcnt - 1'b1;
          end
        end
        T_DONE: begin
          tdc_addr <= 1'b0;
          valid    <= 1'b1;
          state <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end
endmodule
