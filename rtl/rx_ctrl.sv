// rx_ctrl: receiver timing and control.
//
// A state machine clocked by the 16x baud strobe. In IDLE it waits for a
// falling edge of the filtered line (1 then 0 on consecutive strobes). It
// then counts 8 strobes to the middle of the start bit; if the line is back
// at 1 there, the edge was noise and it returns to IDLE. Otherwise it
// samples every 16 strobes after that, in the middle of each bit: the data
// bits (shift strobes for the receive shift register), the parity bit when
// the LCR enables it, and the first stop bit. In the middle of the stop
// bit it pulses done and goes back to IDLE, so a following start bit is
// caught even if the far end's clock is slightly fast. A second stop bit is
// not checked. All of this is this design's choice: the design names the
// block but does not describe its insides.
//
// Timing: clear pulses in the tick16 cycle that confirms the start bit;
// shift, par_bit and stop_bit update in the tick16 cycle of each bit's
// middle; done is a one-clock pulse, registered on the same edge as
// stop_bit, so par_bit and stop_bit are valid while done is high.
module rx_ctrl
  import uart_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic rx_s,
  input  logic tick16,
  input  lcr_t lcr,
  output logic clear,
  output logic shift,
  output logic par_bit,
  output logic stop_bit,
  output logic done
);

  typedef enum logic [2:0] {IDLE, START, DATA, PARITY, STOP} state_t;
  state_t     state;
  logic [3:0] cnt;
  logic [2:0] bitidx;
  logic       prev;
  logic       mid;

  assign mid   = tick16 && (cnt == 4'd15);
  assign clear = tick16 && (state == START) && (cnt == 4'd7) && !rx_s;
  assign shift = mid && (state == DATA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      cnt      <= '0;
      bitidx   <= '0;
      prev     <= 1'b1;
      par_bit  <= 1'b0;
      stop_bit <= 1'b1;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (tick16) begin
        prev <= rx_s;
        cnt  <= cnt + 1'b1;
        unique case (state)
          IDLE: begin
            cnt <= '0;
            if (prev && !rx_s) state <= START;
          end
          START: if (cnt == 4'd7) begin
            cnt    <= '0;
            bitidx <= '0;
            state  <= rx_s ? IDLE : DATA;
          end
          DATA: if (mid) begin
            bitidx <= bitidx + 1'b1;
            if (32'(bitidx) == data_bits(lcr.wls) - 1)
              state <= lcr.pen ? PARITY : STOP;
          end
          PARITY: if (mid) begin
            par_bit <= rx_s;
            state   <= STOP;
          end
          STOP: if (mid) begin
            stop_bit <= rx_s;
            done     <= 1'b1;
            state    <= IDLE;
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

endmodule
