// temp_control: reads the thermistor temperature from a serial converter.
//
// The thermistor on the daughter board is digitised on the mother board by
// a converter with a three-wire serial (SPI) output. On `start` the block
// pulls cs_n low and clocks in DATA_W bits, most significant first: each bit
// is SCLK_DIV clocks with sclk low followed by SCLK_DIV clocks with sclk high,
// and sdo is sampled on the rising sclk edge. After the last bit cs_n rises,
// `temp` holds the word and `done` pulses for one clock. One read takes
// 2*SCLK_DIV*DATA_W + 2 clocks (642 clocks, 16 us, at the defaults).
// The 16-bit readout per event follows the system description; the frame
// format and SCLK rate (1 MHz) are this design's choices.
module temp_control #(
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned SCLK_DIV = 20
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [DATA_W-1:0] temp,
  output logic              cs_n,
  output logic              sclk,
  input  logic              sdo
);
  localparam int unsigned DVW = $clog2(SCLK_DIV + 1);
  localparam int unsigned BW  = $clog2(DATA_W + 1);

  logic [DVW-1:0]    div;
  logic [BW-1:0]     nbit;
  logic [DATA_W-1:0] shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      cs_n  <= 1'b1;
      sclk  <= 1'b0;
      div   <= '0;
      nbit  <= '0;
      shreg <= '0;
      temp  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          cs_n <= 1'b0;
          sclk <= 1'b0;
          div  <= DVW'(SCLK_DIV - 1);
          nbit <= '0;
        end
      end else if (nbit == BW'(DATA_W)) begin
        busy <= 1'b0;
        cs_n <= 1'b1;
        done <= 1'b1;
        temp <= shreg;
      end else if (div != '0) begin
        div <= div - 1'b1;
      end else begin
        div  <= DVW'(SCLK_DIV - 1);
        sclk <= !sclk;
        if (!sclk) begin
          shreg <= {shreg[DATA_W-2:0], sdo};
        end else begin
          nbit <= nbit + 1'b1;
        end
      end
    end
  end
endmodule
