// trigger_in: combines the discriminated external trigger inputs.
//
// Inputs are the four comparator outputs of the trigger conditioning
// circuit: SIN1 and SIN2 (two photomultipliers), PPOS and PNEG (positive and
// negative pulses on the pulse input). A scheme register selects which of
// them take part and whether SIN1 and SIN2 must coincide. Two triggers are
// produced, as in the system description:
//   trig     external trigger, a combinational function of the asynchronous
//            inputs, so that the TDC sees its leading edge with no clock
//            quantisation;
//   trig_in  internal trigger, trig synchronised to the 40 MHz clock by two
//            flip-flops and reduced to a one-clock pulse on its rising edge
//            (three clocks after the input edge).
// The scheme bit assignment is this design's choice:
//   scheme[0] use SIN1, [1] use SIN2, [2] require SIN1 AND SIN2 (coincidence,
//   needs [0] and [1]), [3] use PPOS, [4] use PNEG.
module trigger_in (
  input  logic       clk,
  input  logic       rst,
  input  logic [4:0] scheme,
  input  logic       sin1,
  input  logic       sin2,
  input  logic       ppos,
  input  logic       pneg,
  output logic       trig,
  output logic       trig_in
);
  logic pm;
  logic [2:0] sync;

  always_comb begin
    if (scheme[2]) pm = scheme[0] && scheme[1] && sin1 && sin2;
    else           pm = (scheme[0] && sin1) || (scheme[1] && sin2);
    trig = pm || (scheme[3] && ppos) || (scheme[4] && pneg);
  end

  always_ff @(posedge clk) begin
    if (rst) sync <= '0;
    else     sync <= {sync[1:0], trig};
  end

  assign trig_in = sync[1] && !sync[2];
endmodule
