// dac_control: programs the four trigger-discriminator thresholds.
//
// The trigger conditioning circuit needs four threshold voltages (one for
// each photomultiplier input, one each for the positive and negative pulse
// discriminators), supplied by a 12-bit DAC. On `start` the block writes the
// four 12-bit codes in order 0..3 through a parallel DAC port: for each
// channel it sets addr and data, holds cs_n and wr_n low for WR_W clocks and
// high again for one clock; after the fourth write it pulses ldac_n low for
// one clock so that all four outputs change together, then pulses `done`.
// A full update takes 4*(WR_W+2) + 2 clocks. The DAC resolution and the four
// thresholds follow the system description; the parallel port and its
// timing are this design's choices.
module dac_control
  import alibava_pkg::*;
#(
  parameter int unsigned WR_W = 2
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic [3:0][DAC_W-1:0] thresholds,
  output logic                 busy,
  output logic                 done,
  output logic [DAC_W-1:0]     dac_data,
  output logic [1:0]           dac_addr,
  output logic                 dac_cs_n,
  output logic                 dac_wr_n,
  output logic                 dac_ldac_n
);
  typedef enum logic [2:0] {D_IDLE, D_SETUP, D_STROBE, D_GAP, D_LOAD, D_DONE} dac_state_e;
  localparam int unsigned WW = $clog2(WR_W + 1);

  dac_state_e    state;
  logic [WW-1:0] wcnt;
  logic [1:0]    ch;

  assign busy = (state != D_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= D_IDLE;
      wcnt       <= '0;
      ch         <= '0;
      done       <= 1'b0;
      dac_data   <= '0;
      dac_addr   <= '0;
      dac_cs_n   <= 1'b1;
      dac_wr_n   <= 1'b1;
      dac_ldac_n <= 1'b1;
    end else begin
      done <= 1'b0;
      unique case (state)
        D_IDLE: if (start) begin
          ch    <= '0;
          state <= D_SETUP;
        end
        D_SETUP: begin
          dac_addr <= ch;
          dac_data <= thresholds[ch];
          dac_cs_n <= 1'b0;
          dac_wr_n <= 1'b0;
          wcnt     <= WW'(WR_W - 1);
          state    <= D_STROBE;
        end
        D_STROBE: begin
          if (wcnt == '0) begin
            dac_cs_n <= 1'b1;
            dac_wr_n <= 1'b1;
            state    <= D_GAP;
          end else begin
            wcnt <= wcnt - 1'b1;
          end
        end
        D_GAP: begin
          if (ch == 2'd3) begin
            dac_ldac_n <= 1'b0;
            state      <= D_LOAD;
          end else begin
            ch    <= ch + 1'b1;
            state <= D_SETUP;
          end
        end
        D_LOAD: begin
          dac_ldac_n <= 1'b1;
          state      <= D_DONE;
        end
        D_DONE: begin
          done  <= 1'b1;
          state <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end
endmodule
