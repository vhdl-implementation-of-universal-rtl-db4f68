// rhr: receive hold register.
//
// Holds the word the receive shift register has just completed until the
// receive buffer can take it. A held word is written into the buffer
// (fifo_wr) in the first cycle the buffer is not full. If a new word
// arrives while the old one is still held, because the buffer has stayed
// full, the new word is lost and overrun pulses for one clock. A word that
// arrives in the same cycle the held one leaves is kept. The overrun rule
// is this design's choice (the common 16550 one); the design only names
// the register.
//
// Timing: a word arriving with done at edge n is written into a non-full
// buffer at edge n+1.
module rhr (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       done,
  input  logic [7:0] data_in,
  input  logic       fifo_full,
  output logic       fifo_wr,
  output logic [7:0] data_out,
  output logic       overrun
);

  logic full;

  assign fifo_wr = full && !fifo_full;
  assign overrun = done && full && !fifo_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full     <= 1'b0;
      data_out <= '0;
    end else begin
      if (done && !overrun) begin
        data_out <= data_in;
        full     <= 1'b1;
      end else if (fifo_wr) begin
        full <= 1'b0;
      end
    end
  end

endmodule
