// i2c_slave_model: behavioural I2C slave with 256 byte registers, standing
// in for a Beetle chip's slow-control port, for simulation only.
// It recognises START and STOP, acknowledges its own 7-bit address with the
// write bit, takes the next byte as a register number and the following
// bytes as register values (auto-increment), acknowledging each.
module i2c_slave_model #(
  parameter logic [6:0] ADDR = 7'h20
) (
  input  logic scl,
  input  logic sda,
  output logic sda_pull      // slave pulls SDA low
);
  logic [7:0] regs [256];
  int         writes = 0, starts = 0, stops = 0;
  logic [7:0] shreg;
  int         nbit, nbyte;
  bit         active, addressed, ack_phase;
  logic [7:0] ptr;

  initial begin
    sda_pull = 0;
    active = 0; addressed = 0; ack_phase = 0;
    for (int i = 0; i < 256; i++) regs[i] = 8'h00;
  end

  always @(negedge sda) if (scl) begin
    starts++;
    active = 1; addressed = 0; nbit = 0; nbyte = 0; ack_phase = 0;
  end

  always @(posedge sda) if (scl && active) begin
    stops++;
    active = 0;
  end

  always @(posedge scl) if (active && !ack_phase) begin
    shreg = {shreg[6:0], sda};
    nbit++;
  end

  always @(negedge scl) if (active) begin
    if (ack_phase) begin
      sda_pull  = 0;
      ack_phase = 0;
    end else if (nbit == 8) begin
      nbit = 0;
      if (nbyte == 0) begin
        addressed = (shreg == {ADDR, 1'b0});
      end else if (addressed && nbyte == 1) begin
        ptr = shreg;
      end else if (addressed) begin
        regs[ptr] = shreg;
        ptr++;
        writes++;
      end
      nbyte++;
      ack_phase = 1;
      sda_pull  = addressed;
    end
  end
endmodule
