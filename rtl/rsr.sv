// rsr: receive shift register.
//
// Collects the data bits of a character as they are sampled, LSB first:
// each shift strobe moves the register right and puts the new bit in bit 7.
// After the last bit of a 5-, 6- or 7-bit word the data sits in the upper
// bits, so the output is shifted down by 8 minus the word length, leaving
// the word right-aligned with zeros above it. clear empties the register at
// the start of a frame. This is the de-framing step: only the data bits
// leave the receiver. The register itself is this design's; the design
// only names it.
//
// Timing: data is valid the clock after the last shift strobe.
module rsr
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       shift,
  input  logic       bit_in,
  input  lcr_t       lcr,
  output logic [7:0] data
);

  logic [7:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sh <= '0;
    else if (clear) sh <= '0;
    else if (shift) sh <= {bit_in, sh[7:1]};
  end

  assign data = sh >> (2'd3 - lcr.wls);

endmodule
