// thr: transmitter hold register.
//
// An 8-bit register between the transmit buffer and the transmit shift
// register (TSR). When it is empty and the buffer holds data it raises
// lilo_rd for one clock, which is the acknowledge that pops the buffer; the
// buffer's registered output is valid one clock later and is captured then.
// When the TSR reports ready, the held byte is handed over with a one-clock
// tsr_load and the register is empty again. That two-way handshake (buffer
// has data -> THR acknowledges; TSR empty -> THR loads it) is the design's;
// the exact cycle timing is this implementation's.
//
// Timing: buffer not empty at edge n -> lilo_rd high in cycle n..n+1 -> byte
// held from edge n+2 -> tsr_load in the first cycle after that with
// tsr_ready high.
module thr (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       lilo_empty,
  output logic       lilo_rd,
  input  logic [7:0] lilo_data,
  input  logic       tsr_ready,
  output logic       tsr_load,
  output logic       thr_valid,
  output logic [7:0] thr_data
);

  typedef enum logic [1:0] {EMPTY, FETCH, FULL} state_t;
  state_t state;

  assign lilo_rd   = (state == EMPTY) && !lilo_empty;
  assign tsr_load  = (state == FULL) && tsr_ready;
  assign thr_valid = (state == FULL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= EMPTY;
      thr_data <= '0;
    end else begin
      unique case (state)
        EMPTY: if (lilo_rd) state <= FETCH;
        FETCH: begin
          thr_data <= lilo_data;
          state    <= FULL;
        end
        FULL:  if (tsr_load) state <= EMPTY;
        default: state <= EMPTY;
      endcase
    end
  end

  // The buffer is never popped while it is empty.
  a_no_rd_empty: assert property (@(posedge clk) disable iff (!rst_n) lilo_rd |-> !lilo_empty);
  // A byte is only handed to the TSR when the TSR is ready for it.
  a_load_ready:  assert property (@(posedge clk) disable iff (!rst_n) tsr_load |-> tsr_ready);

endmodule
