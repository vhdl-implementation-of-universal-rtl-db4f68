// transmitter: the transmit path of the UART.
//
// Bytes written by the host (wr, datain) go into a 16-byte first-in
// first-out buffer. The transmitter hold register (THR) pulls the oldest
// byte when it is empty, and passes it to the transmitter shift register
// (TSR) when that is empty; the TSR adds start, parity and stop bits as the
// LCR says and shifts the frame out on txout at the baud rate. txe is high
// while the buffer is empty, txf while it is full; a write into a full
// buffer is dropped. This buffer -> THR -> TSR chain and the two flags are
// the design's; the handshake timing is this implementation's.
//
// Timing: a byte written into an idle transmitter at clock edge n is
// loaded into the TSR at edge n+3; its start bit begins on the next
// baud_tick with tx high.
// Consecutive bytes are sent back to back.
module transmitter
  import uart_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic [7:0] datain,
  input  lcr_t       lcr,
  input  logic       baud_tick,
  input  logic       tx,
  output logic       txout,
  output logic       txe,
  output logic       txf
);

  logic       lilo_rd, tsr_ready, tsr_load, thr_valid;
  logic [7:0] lilo_dout, thr_data;

  lilo_fifo #(.DEPTH(DEPTH), .WIDTH(8)) u_lilo (
    .clk, .rst_n,
    .wr        (wr),
    .rd        (lilo_rd),
    .datain    (datain),
    .dataout   (lilo_dout),
    .liloempty (txe),
    .lilofull  (txf)
  );

  thr u_thr (
    .clk, .rst_n,
    .lilo_empty (txe),
    .lilo_rd    (lilo_rd),
    .lilo_data  (lilo_dout),
    .tsr_ready  (tsr_ready),
    .tsr_load   (tsr_load),
    .thr_valid  (thr_valid),
    .thr_data   (thr_data)
  );

  tsr u_tsr (
    .clk, .rst_n,
    .lcr       (lcr),
    .baud_tick (baud_tick),
    .tx        (tx),
    .load      (tsr_load),
    .datain    (thr_data),
    .ready     (tsr_ready),
    .serialout (txout)
  );

endmodule
