// usb_host_model: behavioural model of the USB-to-parallel-FIFO controller
// together with the PC behind it, for simulation only.
// Bytes queued with send() appear to the FPGA: rxf_n is low while the
// receive queue holds a byte, the head byte is driven while rd_n is low and
// popped when rd_n rises. txe_n is low (space available) except for
// occasional busy clocks; the byte on the FPGA's data lines is taken on the
// falling edge of wr and appended to the `got` queue read by the testbench.
module usb_host_model (
  input  logic       clk,
  output logic [7:0] d_to_fpga,
  input  logic [7:0] d_from_fpga,
  input  logic       d_oe,
  output logic       rxf_n,
  output logic       txe_n,
  input  logic       rd_n,
  input  logic       wr
);
  logic [7:0] to_fpga[$];
  logic [7:0] got[$];
  int         bus_errors = 0;
  logic       wr_q = 0, rd_q = 1;

  initial begin
    d_to_fpga = '0;
    rxf_n     = 1;
    txe_n     = 1;
  end

  task automatic send(input logic [7:0] b);
    to_fpga.push_back(b);
  endtask

  task automatic clear();
    got.delete();
    bus_errors = 0;
  endtask

  function automatic int n_got();
    return got.size();
  endfunction

  function automatic logic [7:0] take();
    return got.pop_front();
  endfunction

  always @(posedge clk) begin
    wr_q <= wr;
    rd_q <= rd_n;
    if (!rd_n && rd_q) begin
      if (to_fpga.size() == 0) bus_errors++;
      else d_to_fpga <= to_fpga[0];
    end
    if (rd_n && !rd_q && to_fpga.size() > 0) void'(to_fpga.pop_front());
    if (!wr && wr_q) begin
      if (!d_oe) bus_errors++;
      got.push_back(d_from_fpga);
    end
    rxf_n <= (to_fpga.size() == 0) || (rd_n && !rd_q && to_fpga.size() == 1);
    txe_n <= ($urandom_range(0, 15) == 0);
  end
endmodule
