// clock_generator: FPGA clock distribution and reset generation.
//
// The FPGA runs from a 40 MHz crystal, which is also the Beetle chip clock
// and the SDRAM clock. The clock multiplier/deskew primitive of the FPGA is
// vendor specific and is not modelled: clk_in is passed on as the system
// clock and the SDRAM clock, and the primitive's lock indication enters as
// the input `locked`. What this block does in logic is the reset: the
// asynchronous external reset (EXT_RST) and the loss of lock are
// synchronised to the clock and stretched, so rst_out stays high for
// RST_HOLD clocks after both the external reset has been released and the
// clock is locked. The system therefore passes through its reset state
// after power-up, after configuration and after an external reset. The
// stretch length is this design's choice.
module clock_generator #(
  parameter int unsigned RST_HOLD = 16
) (
  input  logic clk_in,
  input  logic ext_rst_n,   // asynchronous, active low
  input  logic locked,      // lock indication of the clock primitive
  output logic clk_sys,     // 40 MHz system clock
  output logic clk_sdram,   // clock forwarded to the SDRAM
  output logic rst_out      // synchronous, active high
);
  localparam int unsigned CW = $clog2(RST_HOLD + 1);

  logic [1:0]    sync;
  logic [CW-1:0] hold;

  assign clk_sys   = clk_in;
  assign clk_sdram = clk_in;

  // Two-flop synchroniser with asynchronous assertion.
  always_ff @(posedge clk_in or negedge ext_rst_n) begin
    if (!ext_rst_n) sync <= 2'b00;
    else            sync <= {sync[0], locked};
  end

  always_ff @(posedge clk_in) begin
    if (!sync[1]) begin
      hold    <= '0;
      rst_out <= 1'b1;
    end else if (hold != CW'(RST_HOLD)) begin
      hold    <= hold + 1'b1;
      rst_out <= 1'b1;
    end else begin
      rst_out <= 1'b0;
    end
  end
endmodule
