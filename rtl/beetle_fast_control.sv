// beetle_fast_control: fast control signals of the two Beetle readout chips.
//
// Generates CLK, RESET, TRIGGER and TESTPULSE, which the board buffers and
// sends as LVDS to both chips in parallel. CLK is the 40 MHz system clock.
// A trigger source pulse, selected by src_sel (laser TRIG_L, radioactive
// source TRIG_R, or the internal calibration request, which also produces a
// one-clock TESTPULSE), is turned into a one-clock TRIGGER exactly
// PIPE_LATENCY + sync_delay clocks later: the Beetle pipeline holds each
// sample for 128 clocks, and sync_delay adds the setup-specific
// synchronisation delay. The chips work in single-readout mode, so a source
// pulse that arrives while a trigger is pending, or during the HOLDOFF clocks
// after a TRIGGER (the 144-slot readout frame plus margin), is dropped and
// reported on `dropped`; an accepted one is reported on `accepted`.
// rst_req gives a RESET pulse of RESET_W clocks.
// Latency, frame length and the single-readout rule follow the system
// description; pulse widths and the hold-off length are this design's.
module beetle_fast_control
  import alibava_pkg::*;
#(
  parameter int unsigned LATENCY = PIPE_LATENCY,
  parameter int unsigned HOLDOFF = 200,
  parameter int unsigned RESET_W = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] src_sel,     // 0 none, 1 laser, 2 radioactive source, 3 calibration
  input  logic       trig_l,
  input  logic       trig_r,
  input  logic       calib,
  input  logic [7:0] sync_delay,  // extra clocks between source and TRIGGER
  input  logic       rst_req,
  output logic       beetle_clk,
  output logic       beetle_reset,
  output logic       beetle_trigger,
  output logic       beetle_testpulse,
  output logic       accepted,
  output logic       dropped
);
  localparam int unsigned DW = $clog2(LATENCY + 256 + 1);
  localparam int unsigned HW = $clog2(HOLDOFF + 1);
  localparam int unsigned RW = $clog2(RESET_W + 1);

  logic          src;
  logic          pending;
  logic [DW-1:0] dly;
  logic [HW-1:0] hold;
  logic [RW-1:0] rcnt;

  assign beetle_clk = clk;

  always_comb begin
    unique case (src_sel)
      2'd1:    src = trig_l;
      2'd2:    src = trig_r;
      2'd3:    src = calib;
      default: src = 1'b0;
    endcase
  end

  wire busy = pending || (hold != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      pending          <= 1'b0;
      dly              <= '0;
      hold             <= '0;
      beetle_trigger   <= 1'b0;
      beetle_testpulse <= 1'b0;
      accepted         <= 1'b0;
      dropped          <= 1'b0;
    end else begin
      beetle_trigger   <= 1'b0;
      beetle_testpulse <= 1'b0;
      accepted         <= 1'b0;
      dropped          <= 1'b0;
      if (hold != '0) hold <= hold - 1'b1;
      if (src && busy) begin
        dropped <= 1'b1;
      end else if (src) begin
        pending          <= 1'b1;
        // Counted so that TRIGGER is high LATENCY + sync_delay clocks
        // after the clock in which the source pulse is high.
        dly              <= DW'(LATENCY) + DW'(sync_delay) - DW'(2);
        accepted         <= 1'b1;
        beetle_testpulse <= (src_sel == 2'd3);
      end
      if (pending) begin
        if (dly == '0) begin
          pending        <= 1'b0;
          beetle_trigger <= 1'b1;
          hold           <= HW'(HOLDOFF);
        end else begin
          dly <= dly - 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rcnt         <= '0;
      beetle_reset <= 1'b0;
    end else if (rst_req) begin
      rcnt         <= RW'(RESET_W - 1);
      beetle_reset <= 1'b1;
    end else if (rcnt != '0) begin
      rcnt <= rcnt - 1'b1;
    end else begin
      beetle_reset <= 1'b0;
    end
  end

  a_single_readout: assert property (@(posedge clk) disable iff (rst)
    beetle_trigger |=> !beetle_trigger);
endmodule
