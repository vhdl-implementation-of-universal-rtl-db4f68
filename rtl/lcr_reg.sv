// lcr_reg: line control register (LCR).
//
// An 8-bit register that holds the framing of the serial link (see uart_pkg
// for the field layout). The host writes it over the same data bus as the
// transmit data: a write with both wr and cw high lands here, a write with
// wr high and cw low goes to the transmit buffer instead. That split follows
// the write flowchart of the design. The reset value, 8 data bits, one stop
// bit and even parity (8'h1B), is this design's choice.
//
// Timing: the new value is visible on lcr one clock after the write.
module lcr_reg
  import uart_pkg::*;
#(
  parameter logic [7:0] RESET_VALUE = 8'h1B
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic       cw,
  input  logic [7:0] din,
  output lcr_t       lcr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        lcr <= lcr_t'(RESET_VALUE);
    else if (wr && cw) lcr <= lcr_t'(din);
  end

endmodule
