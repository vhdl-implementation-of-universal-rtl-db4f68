// receiver: the receive path of the UART.
//
// RXIN is synchronised and filtered by the sampling logic; the timing and
// control state machine finds each start bit and strobes every later bit
// in its middle; the receive shift register (RSR) collects the data bits;
// the receive hold register (RHR) passes each finished word into a 16-byte
// first-in first-out buffer, which the host reads with rd on rxout. The
// error logic checks parity, stop bit and break for every frame and keeps
// sticky break, overrun, parity and framing flags in the error status
// register. This is the block structure the design draws for its
// receiver; everything inside the blocks is this design's own.
//
// Timing: a word is in the buffer (rx_empty low) about four clocks plus two
// tick16 periods after the middle of its stop bit on rxin. rxout shows a byte from
// the clock edge on which rd pops it.
module receiver
  import uart_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxin,
  input  logic       tick16,
  input  lcr_t       lcr,
  input  logic       rd,
  output logic [7:0] rxout,
  output logic       rx_empty,
  output logic       rx_full,
  input  logic       err_clr,
  output rx_status_t status
);

  logic       rx_s, clear, shift, par_bit, stop_bit, done;
  logic       fifo_wr, overrun;
  logic       pe_now, fe_now, bi_now;
  logic [7:0] rsr_data, rhr_data;

  rx_sampling u_samp (.clk, .rst_n, .rxin, .tick16, .rx_s);

  rx_ctrl u_ctrl (
    .clk, .rst_n, .rx_s, .tick16, .lcr,
    .clear, .shift, .par_bit, .stop_bit, .done
  );

  rsr u_rsr (.clk, .rst_n, .clear, .shift, .bit_in(rx_s), .lcr, .data(rsr_data));

  rhr u_rhr (
    .clk, .rst_n,
    .done      (done),
    .data_in   (rsr_data),
    .fifo_full (rx_full),
    .fifo_wr   (fifo_wr),
    .data_out  (rhr_data),
    .overrun   (overrun)
  );

  lilo_fifo #(.DEPTH(DEPTH), .WIDTH(8)) u_fifo (
    .clk, .rst_n,
    .wr        (fifo_wr),
    .rd        (rd),
    .datain    (rhr_data),
    .dataout   (rxout),
    .liloempty (rx_empty),
    .lilofull  (rx_full)
  );

  rx_error u_err (
    .clk, .rst_n,
    .done     (done),
    .data     (rsr_data),
    .par_bit, .stop_bit, .overrun, .lcr,
    .clr      (err_clr),
    .pe_now, .fe_now, .bi_now,
    .status
  );

endmodule
