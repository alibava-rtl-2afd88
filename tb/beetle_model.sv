// beetle_model: behavioural model of one Beetle chip and its ADC channel,
// for simulation only.
// A one-clock TRIGGER starts a readout TRIG_TO_DV clocks later: DATAVALID
// is high for 143 clocks (from one clock before the first header slot to
// two clocks before the end of the frame) and the ADC output carries 16
// header codes followed by 128 channel codes, one per clock. Channel k of
// readout n carries sample(CHIP, n, k), a formula the testbenches also use.
// A TRIGGER during a readout is counted as a violation of single-readout
// operation. Rising edges of TESTPULSE and RESET are counted.
module beetle_model #(
  parameter int CHIP       = 0,
  parameter int TRIG_TO_DV = 3
) (
  input  logic        clk,
  input  logic        trigger,
  input  logic        testpulse,
  input  logic        reset,
  output logic        datavalid,
  output logic [11:0] adc
);
  int  readouts = 0, violations = 0, testpulses = 0, resets = 0;
  int  t = -1;   // clocks since the trigger, -1 when idle
  int  s;
  logic tp_q = 0, rst_q = 0;
  localparam int FRAME = 16 + 128;

  function automatic logic [11:0] sample(input int chip, input int n, input int k);
    return 12'((n * 37 + chip * 1000 + k * 5 + 300) % 4096);
  endfunction

  initial begin
    datavalid = 0;
    adc       = '0;
  end

  always @(posedge clk) begin
    if (testpulse && !tp_q) testpulses++;
    if (reset && !rst_q) resets++;
    tp_q  <= testpulse;
    rst_q <= reset;
    if (trigger) begin
      if (t >= 0) violations++;
      else t = 0;
    end else if (t >= 0) begin
      t++;
    end
    // slot s of the frame is on the ADC in the clock after t == TRIG_TO_DV + 1 + s
    datavalid <= (t >= TRIG_TO_DV) && (t < TRIG_TO_DV + FRAME - 1);
    if (t >= TRIG_TO_DV + 1 && t < TRIG_TO_DV + 1 + FRAME) begin
      s = t - TRIG_TO_DV - 1;
      adc <= (s < 16) ? 12'hF00 + 12'(s) : sample(CHIP, readouts, s - 16);
    end else begin
      adc <= 12'h000;
    end
    if (t == TRIG_TO_DV + FRAME) begin
      t = -1;
      readouts++;
    end
  end
endmodule
