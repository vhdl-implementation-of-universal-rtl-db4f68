// lilo_fifo: 16-byte first-in first-out byte buffer.
//
// The buffer between the host and the serial engines: the byte written
// first is the byte read first ("last in, last out"). It is used twice, as
// the transmit buffer in front of the transmitter hold register and as the
// receive buffer behind the receiver hold register. The port names follow
// the design's buffer symbol: datain, dataout, rd, wr, liloempty, lilofull.
//
// Storage is a DEPTH x WIDTH array with a write pointer and a read pointer,
// each one bit wider than the address so that full and empty can be told
// apart. dataout is a register: it keeps its value until a read, so it
// shows the last byte read, not the next one. A write while full and a read
// while empty are ignored; a read and a write in the same cycle both happen.
// The single-clock structure and the reset are this design's choices.
//
// Timing: a byte written at clock edge n can be read from edge n+1 on; after
// a read at edge n, dataout holds the byte from edge n on.
module lilo_fifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr,
  input  logic             rd,
  input  logic [WIDTH-1:0] datain,
  output logic [WIDTH-1:0] dataout,
  output logic             liloempty,
  output logic             lilofull
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign liloempty = (wptr == rptr);
  assign lilofull  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign do_wr     = wr && !lilofull;
  assign do_rd     = rd && !liloempty;

  initial assert (DEPTH == (1 << AW)) else $error("lilo_fifo: DEPTH must be a power of two");

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= datain;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr    <= '0;
      rptr    <= '0;
      dataout <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) begin
        rptr    <= rptr + 1'b1;
        dataout <= mem[rptr[AW-1:0]];
      end
    end
  end

endmodule
