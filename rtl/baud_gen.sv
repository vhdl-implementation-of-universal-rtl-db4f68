// baud_gen: baud rate generator.
//
// Divides the system clock into two one-cycle strobes: tick16 at sixteen
// times the baud rate, which the receiver uses to find the middle of each
// bit, and baud_tick at the baud rate itself, which paces the transmitter
// and is brought out as Baud Out. baud_tick is every sixteenth tick16, so
// the two are phase locked. Both are clock enables in the system clock
// domain, not clocks.
//
// The 10 ns system clock period (100 MHz) is the one the design's
// simulations use. The baud rate, the 16x oversampling and the rounding of
// the divisor are this design's choices. With the defaults the 16x divisor
// is round(100e6 / (16 * 115200)) = 54, so one bit lasts 864 clocks.
//
// Timing: tick16 is high for one clock every DIV16 clocks; the first one
// comes DIV16 clocks after reset.
module baud_gen #(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned BAUD       = 115_200,
  parameter int unsigned OVERSAMPLE = 16,
  // 16x divisor, rounded to the nearest integer
  parameter int unsigned DIV16 = (CLK_HZ + (BAUD * OVERSAMPLE) / 2) / (BAUD * OVERSAMPLE)
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick16,
  output logic baud_tick
);

  localparam int unsigned CW = (DIV16 > 1) ? $clog2(DIV16) : 1;
  localparam int unsigned OW = (OVERSAMPLE > 1) ? $clog2(OVERSAMPLE) : 1;

  logic [CW-1:0] div_cnt;
  logic [OW-1:0] os_cnt;

  initial assert (DIV16 >= 1) else $error("baud_gen: divisor must be at least 1");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt   <= '0;
      os_cnt    <= '0;
      tick16    <= 1'b0;
      baud_tick <= 1'b0;
    end else begin
      tick16    <= 1'b0;
      baud_tick <= 1'b0;
      if (div_cnt == CW'(DIV16 - 1)) begin
        div_cnt <= '0;
        tick16  <= 1'b1;
        if (os_cnt == OW'(OVERSAMPLE - 1)) begin
          os_cnt    <= '0;
          baud_tick <= 1'b1;
        end else begin
          os_cnt <= os_cnt + 1'b1;
        end
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end
  end

endmodule
