// tdc_model: behavioural model of the TDC chip (600 ps bins, 100 ns
// range), for simulation only. It measures the time from the last rising
// START edge to a rising STOP (trigger) edge, raises `ready` READY_NS later
// and presents the 32-bit result on a 16-bit port: addr 0 upper half,
// addr 1 lower half. Reading the lower half (rd_n rising with addr 1)
// clears ready. The lower half holds the time in bins; the upper half holds
// a running measurement number, so that a swapped or lost half shows up.
// The last result is kept in `last` for the testbench.
module tdc_model #(
  parameter real READY_NS = 200.0
) (
  input  logic        start,
  input  logic        stop,
  input  logic        addr,
  input  logic        rd_n,
  output logic        ready,
  output logic [15:0] data,
  output logic [31:0] last
);
  realtime t_start = 0;
  int      measurements = 0;
  initial begin ready = 0; last = '0; end
  always @(posedge start) t_start = $realtime;
  always @(posedge stop) begin
    measurements++;
    last = {16'(measurements), 16'(int'((($realtime - t_start) * 1000.0) / 600.0))};
    #(READY_NS) ready = 1;
  end
  always @(posedge rd_n) if (addr) ready = 0;
  assign data = addr ? last[15:0] : last[31:16];
endmodule
