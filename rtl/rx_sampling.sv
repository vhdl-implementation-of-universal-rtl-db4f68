// rx_sampling: receiver sampling logic.
//
// Brings the asynchronous serial input RXIN into the system clock domain
// through two flip-flops, then samples it on every 16x baud strobe and
// outputs the majority of the last three samples. A glitch shorter than two
// sample periods therefore never reaches the receiver's timing logic. The
// synchroniser and the majority filter are this design's choices; the
// design names only a sampling stage between RXIN and the receive shift
// register. The line idles at 1 and every stage resets to 1.
//
// Timing: rx_s follows a clean level change on rxin after two clocks plus
// two tick16 strobes.
module rx_sampling (
  input  logic clk,
  input  logic rst_n,
  input  logic rxin,
  input  logic tick16,
  output logic rx_s
);

  logic [1:0] sync;
  logic [1:0] win;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= 2'b11;
      win  <= 2'b11;
      rx_s <= 1'b1;
    end else begin
      sync <= {sync[0], rxin};
      if (tick16) begin
        win  <= {win[0], sync[1]};
        // majority of the three newest samples
        rx_s <= (win[1] & win[0]) | (win[1] & sync[1]) | (win[0] & sync[1]);
      end
    end
  end

endmodule
