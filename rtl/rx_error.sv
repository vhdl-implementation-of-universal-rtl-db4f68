// rx_error: receiver error logic and error status register.
//
// When a frame completes (done), three errors are worked out from the
// received word, parity bit and stop bit:
//   parity error  - parity enabled and the received parity bit differs from
//                   the parity of the received word (odd or even per LCR)
//   framing error - the stop bit was sampled as 0
//   break         - the whole frame, data, parity and stop, was 0
// They are offered for the current frame on pe_now, fe_now and bi_now while
// done is high, and ORed into a sticky four-bit status register together
// with the overrun indication from the receive hold register. The status
// bits stay set until clr; a new error in the clr cycle still sets its bit.
// The four flags (break, overrun, parity, framing) are the ones the design
// names; the break rule and the clearing are this design's choices,
// following the common 16550 convention.
//
// Timing: status updates on the clock edge that ends the done (or overrun)
// cycle.
module rx_error
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       done,
  input  logic [7:0] data,
  input  logic       par_bit,
  input  logic       stop_bit,
  input  logic       overrun,
  input  lcr_t       lcr,
  input  logic       clr,
  output logic       pe_now,
  output logic       fe_now,
  output logic       bi_now,
  output rx_status_t status
);

  always_comb begin
    pe_now = done && lcr.pen && (par_bit != parity_of(data, lcr.wls, lcr.eps));
    fe_now = done && !stop_bit;
    bi_now = done && (data == '0) && !stop_bit && !(lcr.pen && par_bit);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) status <= '0;
    else begin
      status.bi <= (status.bi && !clr) || bi_now;
      status.oe <= (status.oe && !clr) || overrun;
      status.pe <= (status.pe && !clr) || pe_now;
      status.fe <= (status.fe && !clr) || fe_now;
    end
  end

endmodule
