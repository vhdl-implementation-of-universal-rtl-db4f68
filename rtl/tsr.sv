// tsr: transmitter shift register (the parallel to serial converter).
//
// Frames a byte and sends it one bit per baud period, LSB first. On load the
// 12-bit register is filled, from bit 0 up, with the start bit (0), the data
// bits selected by the LCR word length, the parity bit when parity is
// enabled, and one or two stop bits (1); unused upper bits are 1. Each
// baud_tick drives the next bit onto serialout and shifts the register right,
// filling with 1. As soon as the last stop bit is on the line the register
// is empty and ready goes high, so the next frame can be loaded while that
// stop bit lasts. The 12-bit width, the framing order and LSB-first order
// are the design's; the cycle timing below is this implementation's.
//
// tx is a transmit enable: a loaded frame does not start while tx is 0. A
// frame that has started always completes.
//
// Timing: the start bit appears on the first baud_tick after load (with tx
// high); each bit lasts exactly one baud_tick period; ready rises on the
// clock edge that puts the last stop bit out, so a frame loaded during that
// stop bit starts on the next baud_tick with no idle gap.
module tsr
  import uart_pkg::*;
#(
  parameter int unsigned FRAME_W = uart_pkg::TSR_BITS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  lcr_t       lcr,
  input  logic       baud_tick,
  input  logic       tx,
  input  logic       load,
  input  logic [7:0] datain,
  output logic       ready,
  output logic       serialout
);

  localparam int unsigned CW = $clog2(FRAME_W + 1);

  logic [FRAME_W-1:0] shreg, frame;
  logic [CW-1:0]      bits_left, frame_len;
  logic               sending;

  // Frame assembly from the byte and the current LCR.
  always_comb begin
    int unsigned nb;
    nb    = data_bits(lcr.wls);
    frame = '1;
    frame[0] = 1'b0;
    for (int unsigned i = 0; i < 8; i++)
      if (i < nb) frame[1 + i] = datain[i];
    if (lcr.pen) frame[1 + nb] = parity_of(datain, lcr.wls, lcr.eps);
    frame_len = CW'(1 + nb + 32'(lcr.pen) + 1 + 32'(lcr.stb));
  end

  // The next frame may be loaded as soon as the last bit is on the line.
  assign ready = (bits_left == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      sending   <= 1'b0;
      serialout <= 1'b1;
    end else begin
      if (load && ready) begin
        shreg     <= frame;
        bits_left <= frame_len;
        sending   <= 1'b0;
      end else if (baud_tick) begin
        if (bits_left != '0 && (sending || tx)) begin
          serialout <= shreg[0];
          shreg     <= {1'b1, shreg[FRAME_W-1:1]};
          bits_left <= bits_left - 1'b1;
          sending   <= 1'b1;
        end else if (bits_left == '0) begin
          // the last stop bit has lasted its full period: idle
          serialout <= 1'b1;
          sending   <= 1'b0;
        end
      end
    end
  end

  a_load_when_ready: assert property (@(posedge clk) disable iff (!rst_n) load |-> ready);

endmodule
