// uart_top: the complete UART.
//
// Four units share one system clock: the line control register (LCR), the
// baud rate generator, the transmitter and the receiver. The host writes
// over one 8-bit bus: wr with cw high loads the LCR, wr with cw low pushes a
// byte into the 16-byte transmit buffer. The transmitter sends buffered
// bytes on txout while tx is high; txe and txf report the transmit buffer
// empty and full. The receiver takes frames from rxin into its own 16-byte
// buffer, read with rd on rxout, and reports break, overrun, parity and
// framing errors on status ({BI, OE, PE, FE}) until err_clr. baud_out is the
// 1x baud strobe. The division into these four units and their connections
// follow the design; the shared bus decode and the strobe-style baud
// outputs are this design's choices.
//
// Parameters: CLK_HZ is the system clock (100 MHz, the 10 ns period the
// design simulates with), BAUD the line rate (115200, this design's choice),
// DEPTH the size of both buffers (16 bytes).
module uart_top
  import uart_pkg::*;
#(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 115_200,
  parameter int unsigned DEPTH  = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  // host write side
  input  logic       wr,
  input  logic       cw,
  input  logic [7:0] din,
  input  logic       tx,
  output logic       txout,
  output logic       txe,
  output logic       txf,
  output logic       baud_out,
  // receive side
  input  logic       rxin,
  input  logic       rd,
  output logic [7:0] rxout,
  output logic       rx_empty,
  output logic       rx_full,
  input  logic       err_clr,
  output rx_status_t status,
  output lcr_t       lcr
);

  logic tick16, baud_tick;

  lcr_reg u_lcr (.clk, .rst_n, .wr, .cw, .din, .lcr);

  baud_gen #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .OVERSAMPLE(16)) u_baud (
    .clk, .rst_n, .tick16, .baud_tick
  );

  assign baud_out = baud_tick;

  transmitter #(.DEPTH(DEPTH)) u_tx (
    .clk, .rst_n,
    .wr     (wr && !cw),
    .datain (din),
    .lcr, .baud_tick, .tx, .txout, .txe, .txf
  );

  receiver #(.DEPTH(DEPTH)) u_rx (
    .clk, .rst_n, .rxin, .tick16, .lcr, .rd, .rxout,
    .rx_empty, .rx_full, .err_clr, .status
  );

endmodule
