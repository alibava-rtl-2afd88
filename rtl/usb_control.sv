// usb_control: interface to the USB-to-parallel-FIFO controller chip.
//
// The PC link is a USB controller that presents an 8-bit bidirectional
// parallel FIFO. The block moves bytes between that chip and two byte
// streams of the central state machine, with the chip's handshake of the
// common asynchronous-FIFO style:
//   rxf_n low  : the chip holds a received byte. The block pulls rd_n low
//                for RD_LOW clocks, samples usb_d_i on the last of them,
//                raises rd_n and pushes the byte (rx_push/rx_byte) into the
//                receive FIFO outside this block, if that FIFO is not full.
//   txe_n low  : the chip can accept a byte. If the transmit FIFO is not
//                empty the block drives its head byte (usb_d_oe high), holds
//                wr high for WR_HIGH clocks, lowers it (the chip latches on
//                the falling edge), keeps the data one more clock and pops
//                the byte.
// After each transfer the bus idles for GAP clocks so the chip's status
// flags can update. Reception has priority over transmission.
// The 8-bit bidirectional FIFO link follows the system description; the
// handshake and its clock counts are this design's choices.
module usb_control #(
  parameter int unsigned RD_LOW  = 3,
  parameter int unsigned WR_HIGH = 2,
  parameter int unsigned GAP     = 4
) (
  input  logic       clk,
  input  logic       rst,
  // chip side
  input  logic [7:0] usb_d_i,
  output logic [7:0] usb_d_o,
  output logic       usb_d_oe,
  input  logic       rxf_n,
  input  logic       txe_n,
  output logic       rd_n,
  output logic       wr,
  // receive stream
  output logic       rx_push,
  output logic [7:0] rx_byte,
  input  logic       rx_full,
  // transmit stream
  input  logic [7:0] tx_byte,
  input  logic       tx_empty,
  output logic       tx_pop
);
  localparam int unsigned CW = $clog2(RD_LOW + WR_HIGH + GAP + 2);

  typedef enum logic [2:0] {U_IDLE, U_READ, U_WRITE, U_WHOLD, U_GAP} usb_state_e;

  usb_state_e    state;
  logic [CW-1:0] cnt;
  logic [1:0]    rxf_s, txe_s;   // flags from the chip, synchronised

  always_ff @(posedge clk) begin
    if (rst) begin
      rxf_s <= 2'b11;
      txe_s <= 2'b11;
    end else begin
      rxf_s <= {rxf_s[0], rxf_n};
      txe_s <= {txe_s[0], txe_n};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= U_IDLE;
      cnt      <= '0;
      rd_n     <= 1'b1;
      wr       <= 1'b0;
      usb_d_o  <= '0;
      usb_d_oe <= 1'b0;
      rx_push  <= 1'b0;
      rx_byte  <= '0;
      tx_pop   <= 1'b0;
    end else begin
      rx_push <= 1'b0;
      tx_pop  <= 1'b0;
      unique case (state)
        U_IDLE: begin
          if (!rxf_s[1] && !rx_full) begin
            rd_n  <= 1'b0;
            cnt   <= CW'(RD_LOW - 1);
            state <= U_READ;
          end else if (!txe_s[1] && !tx_empty) begin
            usb_d_o  <= tx_byte;
            usb_d_oe <= 1'b1;
            wr       <= 1'b1;
            cnt      <= CW'(WR_HIGH - 1);
            state    <= U_WRITE;
          end
        end
        U_READ: begin
          if (cnt == '0) begin
            rd_n    <= 1'b1;
            rx_byte <= usb_d_i;
            rx_push <= 1'b1;
            cnt     <= CW'(GAP);
            state   <= U_GAP;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        U_WRITE: begin
          if (cnt == '0) begin
            wr     <= 1'b0;
            tx_pop <= 1'b1;
            state  <= U_WHOLD;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        U_WHOLD: begin
          usb_d_oe <= 1'b0;
          cnt      <= CW'(GAP);
          state    <= U_GAP;
        end
        U_GAP: begin
          if (cnt == '0) state <= U_IDLE;
          else           cnt   <= cnt - 1'b1;
        end
        default: state <= U_IDLE;
      endcase
    end
  end
endmodule
