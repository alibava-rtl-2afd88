// adc_control: captures one Beetle chip's readout frame from its ADC.
//
// Each Beetle chip sends its analogue readout frame on one port: 16 header
// slots followed by 128 channel slots, one per 25 ns clock, and raises
// DATAVALID one clock before the first header slot (DATAVALID falls two
// clocks before the frame ends, so only its rising edge is used). The
// analogue signal is digitised by an external ADC running on the same
// 40 MHz clock, whose output lags its input by ADC_LAT clocks.
// Both DATAVALID and the ADC word are registered once at the input. On the
// rising edge of DATAVALID the block counts past the 16 header slots (which
// this system does not use) and the ADC latency, then writes the next 128
// samples, zero-extended to 16 bits, into an internal FIFO of FIFO_DEPTH
// words, from which the central state machine moves them to SDRAM.
// frame_done pulses for one clock after the 128th sample has been written;
// `overflow` pulses for each sample lost to a full FIFO.
// Frame format and timing follow the Beetle readout description; the ADC
// resolution, its latency and the FIFO depth are this design's choices.
module adc_control
  import alibava_pkg::*;
#(
  parameter int unsigned ADC_W      = 12,
  parameter int unsigned ADC_LAT    = 0,
  parameter int unsigned FIFO_DEPTH = 256
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             datavalid,
  input  logic [ADC_W-1:0] adc_data,
  // frame FIFO read side
  input  logic             rd_en,
  output word_t            rd_data,
  output logic             empty,
  output logic             frame_done,
  output logic             overflow
);
  localparam int unsigned SKIP = 1 + HEADER_BITS + ADC_LAT; // clocks from DATAVALID to channel 0
  localparam int unsigned SW   = $clog2(SKIP + N_CHANNELS + 1);

  typedef enum logic [1:0] {IDLE, SKIP_HDR, CAPTURE} cap_state_e;

  cap_state_e       state;
  logic             dv_q, dv_qq;
  logic [ADC_W-1:0] data_q;
  logic [SW-1:0]    cnt;
  logic             capture, wr_en;
  logic             full;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  always_ff @(posedge clk) begin
    if (rst) begin
      dv_q   <= 1'b0;
      dv_qq  <= 1'b0;
      data_q <= '0;
    end else begin
      dv_q   <= datavalid;
      dv_qq  <= dv_q;
      data_q <= adc_data;
    end
  end

  wire dv_rise = dv_q && !dv_qq;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      cnt        <= '0;
      frame_done <= 1'b0;
      overflow   <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      overflow   <= capture && full;
      unique case (state)
        IDLE: if (dv_rise) begin
          state <= SKIP_HDR;
          cnt   <= SW'(SKIP - 1);
        end
        SKIP_HDR: begin
          if (cnt == SW'(1)) begin
            state <= CAPTURE;
            cnt   <= '0;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        CAPTURE: begin
          if (cnt == SW'(N_CHANNELS - 1)) begin
            state      <= IDLE;
            frame_done <= 1'b1;
          end
          cnt <= cnt + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign capture = (state == CAPTURE);
  assign wr_en   = capture && !full;   // a sample that finds the FIFO full is lost

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_frame_fifo (
    .clk     (clk),
    .rst     (rst),
    .wr_en   (wr_en),
    .wr_data (WORD_W'(data_q)),
    .rd_en   (rd_en),
    .rd_data (rd_data),
    .full    (full),
    .empty   (empty),
    .count   (fifo_count)
  );

  initial begin
    assert (ADC_W <= WORD_W) else $error("ADC_W must fit a 16-bit word");
    assert (SKIP >= 2) else $error("SKIP must be at least 2");
  end
endmodule
