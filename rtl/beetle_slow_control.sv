// beetle_slow_control: I2C master that writes Beetle configuration registers.
//
// Both Beetle chips share one standard-mode (100 kHz) I2C bus driven
// directly by the FPGA. On `start` the block performs one write transfer:
// START, the 7-bit device address with the write bit, the register number,
// the register value, STOP. Each bit takes four quarter periods of QUARTER
// clocks (100 clocks at 40 MHz gives 100 kHz): data changes while SCL is
// low, SCL is high for the middle two quarters, and the slave's acknowledge
// is sampled in the middle of the SCL-high time of each ninth bit. A missing
// acknowledge sets ack_error for the transfer; `done` pulses at the end.
// The lines are open drain: scl_oe / sda_oe high pulls the line low.
// The standard-mode I2C bus follows the system description; the register
// write format is the plain I2C write of this design (the chip's own
// register protocol is not modelled beyond it).
module beetle_slow_control #(
  parameter int unsigned QUARTER = 100
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [6:0] dev_addr,
  input  logic [7:0] reg_addr,
  input  logic [7:0] reg_data,
  output logic       busy,
  output logic       done,
  output logic       ack_error,
  output logic       scl_oe,
  output logic       sda_oe,
  input  logic       sda_i
);
  localparam int unsigned QW = $clog2(QUARTER + 1);

  typedef enum logic [1:0] {I_IDLE, I_START, I_BITS, I_STOP} i2c_state_e;

  i2c_state_e    state;
  logic [QW-1:0] qcnt;
  logic [1:0]    phase;
  logic [1:0]    nbyte;
  logic [3:0]    nbit;     // 0..7 data, 8 acknowledge
  logic [23:0]   shreg;
  logic          scl, sda;

  assign scl_oe = !scl;
  assign sda_oe = !sda;
  assign busy   = (state != I_IDLE);

  wire tick = (qcnt == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= I_IDLE;
      qcnt      <= '0;
      phase     <= '0;
      nbyte     <= '0;
      nbit      <= '0;
      shreg     <= '0;
      scl       <= 1'b1;
      sda       <= 1'b1;
      done      <= 1'b0;
      ack_error <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state != I_IDLE) qcnt <= tick ? QW'(QUARTER - 1) : qcnt - 1'b1;
      unique case (state)
        I_IDLE: begin
          scl <= 1'b1;
          sda <= 1'b1;
          if (start) begin
            shreg     <= {dev_addr, 1'b0, reg_addr, reg_data};
            ack_error <= 1'b0;
            phase     <= '0;
            qcnt      <= QW'(QUARTER - 1);
            state     <= I_START;
          end
        end
        I_START: if (tick) begin
          phase <= phase + 1'b1;
          unique case (phase)
            2'd0: sda <= 1'b0;               // SDA falls while SCL high
            2'd1: scl <= 1'b0;
            2'd2: ;
            2'd3: begin
              nbyte <= '0;
              nbit  <= '0;
              sda   <= shreg[23];
              state <= I_BITS;
            end
          endcase
        end
        I_BITS: if (tick) begin
          phase <= phase + 1'b1;
          unique case (phase)
            2'd0: scl <= 1'b1;
            2'd1: if (nbit == 4'd8 && sda_i) ack_error <= 1'b1;
            2'd2: scl <= 1'b0;
            2'd3: begin
              if (nbit == 4'd8) begin
                nbit <= '0;
                if (nbyte == 2'd2) begin
                  sda   <= 1'b0;
                  state <= I_STOP;
                end else begin
                  nbyte <= nbyte + 1'b1;
                  sda   <= shreg[23];
                end
              end else begin
                nbit  <= nbit + 1'b1;
                shreg <= {shreg[22:0], 1'b0};
                // after the eighth data bit release SDA for the acknowledge
                sda   <= (nbit == 4'd7) ? 1'b1 : shreg[22];
              end
            end
          endcase
        end
        I_STOP: if (tick) begin
          phase <= phase + 1'b1;
          unique case (phase)
            2'd0: scl <= 1'b1;
            2'd1: sda <= 1'b1;               // SDA rises while SCL high
            2'd2: ;
            2'd3: begin
              done  <= 1'b1;
              state <= I_IDLE;
            end
          endcase
        end
        default: state <= I_IDLE;
      endcase
    end
  end
endmodule
