// uart_pkg: types and helpers shared by the UART blocks.
//
// The line control register (LCR) is an 8-bit value that sets the character
// framing of both directions. The frame itself follows the usual asynchronous
// format: an idle line at 1, one start bit at 0, 5 to 8 data bits sent LSB
// first, an optional odd or even parity bit and one or two stop bits at 1.
// The widest frame is 1 + 8 + 1 + 2 = 12 bits, which is the width of the
// transmit shift register.
//
// The LCR bit layout is this design's choice and follows the familiar
// 16550 arrangement for the fields it uses:
//   [1:0] word length: 00 = 5, 01 = 6, 10 = 7, 11 = 8 data bits
//   [2]   stop bits:   0 = one, 1 = two
//   [3]   parity enable
//   [4]   parity type: 1 = even, 0 = odd
//   [7:5] stored, not used
package uart_pkg;

  localparam int unsigned TSR_BITS = 12;  // start + 8 data + parity + 2 stop

  typedef struct packed {
    logic [2:0] rsvd;
    logic       eps;   // 1 = even parity
    logic       pen;   // parity enable
    logic       stb;   // 1 = two stop bits
    logic [1:0] wls;   // word length select
  } lcr_t;

  // Receiver error status bits, in the order of the status port.
  typedef struct packed {
    logic bi;  // break
    logic oe;  // overrun
    logic pe;  // parity error
    logic fe;  // framing error
  } rx_status_t;

  // Number of data bits selected by the word length field.
  function automatic int unsigned data_bits(input logic [1:0] wls);
    return 5 + int'(wls);
  endfunction

  // Keep only the data bits that the word length selects.
  function automatic logic [7:0] mask_word(input logic [7:0] d, input logic [1:0] wls);
    return d & (8'hFF >> (3 - wls));
  endfunction

  // Parity bit for a word. Even parity makes the count of ones in data plus
  // parity even, odd parity makes it odd.
  function automatic logic parity_of(input logic [7:0] d, input logic [1:0] wls, input logic even);
    return (^mask_word(d, wls)) ^ ~even;
  endfunction

endpackage
