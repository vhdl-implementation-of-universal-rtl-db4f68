// tb_uart_full: the whole UART at its default settings.
//
// uart_top runs with its default parameters: 100 MHz clock, 115200 baud
// (16x divisor 54, so one bit is 864 clocks), 16-byte buffers. txout is
// looped back to rxin. The test keeps the reset framing (8 data bits, even
// parity, one stop bit), sends the character 'A' and a few random bytes,
// checks the start, data, parity and stop bits of the first frame on the
// line at their nominal bit times, and reads every byte back from the
// receiver with no error flags.
module tb_uart_full;
  import uart_pkg::*;
  localparam int BITC = 16 * 54;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       wr = 1'b0, cw = 1'b0, tx = 1'b1, rd = 1'b0, err_clr = 1'b0;
  logic [7:0] din = '0, rxout;
  logic       txout, txe, txf, baud_out, rx_empty, rx_full, rxin;
  rx_status_t status;
  lcr_t       lcr;
  int         checks = 0, failures = 0;
  logic [7:0] sent[$];

  always #5 clk = ~clk;

  assign rxin = txout;

  uart_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the first frame on the line: 'A' = 01000001, even parity bit 0
  initial begin
    logic exp[11] = '{0, 1, 0, 0, 0, 0, 0, 1, 0, 0, 1};
    @(negedge txout);
    repeat (BITC / 2) @(posedge clk);
    for (int k = 0; k < 11; k++) begin
      check(txout == exp[k], $sformatf("bit %0d of 'A' on the line", k));
      repeat (BITC) @(posedge clk);
    end
  end

  initial begin
    int n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    #1;
    check(lcr == lcr_t'(8'h1B), "reset framing 8E1");
    sent.push_back(8'h41);
    for (int i = 0; i < 3; i++) sent.push_back(8'($urandom));
    foreach (sent[i]) begin
      @(negedge clk);
      wr = 1'b1; din = sent[i];
      @(negedge clk);
      wr = 1'b0;
    end
    repeat (4 * 11 * BITC + 4 * BITC) @(posedge clk);
    while (!rx_empty) begin
      @(negedge clk);
      rd = 1'b1;
      @(negedge clk);
      rd = 1'b0;
      check(rxout == sent[n], $sformatf("byte %0d: %h expected %h", n, rxout, sent[n]));
      n++;
    end
    check(n == 4, $sformatf("%0d bytes received", n));
    check(status == '0, "no errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
