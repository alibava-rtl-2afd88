// spi_adc_model: behavioural model of the thermistor's serial converter,
// for simulation only. While cs_n is low it shifts `value` out, most
// significant bit first: the first bit when cs_n falls, the next on every
// falling sclk edge.
module spi_adc_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic [15:0] value,
  output logic        sdo
);
  logic [15:0] sh;
  int          reads = 0;
  initial sdo = 0;
  always @(negedge cs_n) begin
    sh  = value;
    sdo = sh[15];
    reads++;
  end
  always @(negedge sclk) if (!cs_n) begin
    sh  = {sh[14:0], 1'b0};
    sdo = sh[15];
  end
endmodule
