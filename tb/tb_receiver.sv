// tb_receiver: self-checking test of the receive path.
//
// A serialiser in the test drives rxin with frames built from random bytes
// for every word length, stop-bit and parity setting; tick16 comes every 4
// clocks, so a nominal bit is 64 clocks. Received bytes are read back with
// rd and compared with what was sent. Further cases: frames sent 3% slow
// and 3% fast, a wrong parity bit (PE), a stop bit at 0 (FE), an all-zero
// frame (BI and FE), a noise pulse shorter than half a bit (ignored), and
// 18 frames sent without reading (16 in the buffer, 1 in the hold register,
// the 18th lost: OE). status is compared with the expected flags after each
// case and cleared with err_clr.
module tb_receiver;
  import uart_pkg::*;
  localparam int DIV = 4;
  localparam int BITC = 16 * DIV;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       rxin = 1'b1, tick16 = 1'b0, rd = 1'b0, err_clr = 1'b0;
  lcr_t       lcr = lcr_t'(8'h1B);
  logic [7:0] rxout;
  logic       rx_empty, rx_full;
  rx_status_t status;
  int         checks = 0, failures = 0, tcnt = 0;
  logic [7:0] sent[$];

  always #5 clk = ~clk;

  receiver #(.DEPTH(16)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  always @(negedge clk) begin
    tcnt   = (tcnt + 1) % DIV;
    tick16 = (tcnt == 0);
  end

  // drive one frame; bad_par flips the parity bit, bad_stop sends stop at 0
  task automatic send(input logic [7:0] d, input int bitc, input bit bad_par, input bit bad_stop);
    int nb = 5 + lcr.wls, ones = 0;
    rxin = 1'b0;
    repeat (bitc) @(posedge clk);
    for (int i = 0; i < nb; i++) begin
      rxin = d[i];
      ones += d[i];
      repeat (bitc) @(posedge clk);
    end
    if (lcr.pen) begin
      rxin = (lcr.eps ? logic'(ones % 2) : logic'(!(ones % 2))) ^ bad_par;
      repeat (bitc) @(posedge clk);
    end
    rxin = !bad_stop;
    repeat (bitc * (lcr.stb ? 2 : 1)) @(posedge clk);
    rxin = 1'b1;
  endtask

  task automatic idle(input int bits);
    rxin = 1'b1;
    repeat (bits * BITC) @(posedge clk);
  endtask

  // read everything from the buffer and compare with the sent queue
  task automatic drain(input int expect_n);
    int n = 0;
    while (!rx_empty) begin
      @(negedge clk);
      rd = 1'b1;
      @(negedge clk);
      rd = 1'b0;
      check(sent.size() > 0 && rxout == sent[0],
            $sformatf("read %h expected %h", rxout, sent.size() ? sent[0] : 8'h0));
      if (sent.size()) void'(sent.pop_front());
      n++;
    end
    check(n == expect_n, $sformatf("%0d bytes read, expected %0d", n, expect_n));
    check(sent.size() == 0, "all sent bytes received");
    sent.delete();
  endtask

  task automatic expect_status(input rx_status_t s, input string what);
    check(status == s, $sformatf("%s: status %b expected %b", what, status, s));
    @(negedge clk);
    err_clr = 1'b1;
    @(negedge clk);
    err_clr = 1'b0;
    check(status == '0, "status cleared");
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    #1;
    check(rx_empty && !rx_full && status == '0, "reset state");
    idle(2);
    // all framings, back to back, three frames each
    for (int c = 0; c < 32; c++) begin
      lcr = lcr_t'(c);
      for (int r = 0; r < 3; r++) begin
        b = 8'($urandom) & (8'hFF >> (3 - lcr.wls));
        sent.push_back(b);
        send(b, BITC, 0, 0);
      end
      idle(1);
      drain(3);
      check(status == '0, $sformatf("no errors for lcr %h", c));
    end
    // clock mismatch of +-3%
    lcr = lcr_t'(8'h1B);
    for (int r = 0; r < 4; r++) begin
      b = 8'($urandom); sent.push_back(b); send(b, BITC - 2, 0, 0);
      b = 8'($urandom); sent.push_back(b); send(b, BITC + 2, 0, 0);
    end
    idle(1);
    drain(8);
    check(status == '0, "no errors with 3% clock mismatch");
    // parity error, even and odd
    sent.push_back(8'h41); send(8'h41, BITC, 1, 0); idle(1);
    expect_status(rx_status_t'(4'b0010), "parity error (even)");
    lcr = lcr_t'(8'h0B);
    sent.push_back(8'h41); send(8'h41, BITC, 1, 0); idle(1);
    expect_status(rx_status_t'(4'b0010), "parity error (odd)");
    drain(2);
    // framing error
    lcr = lcr_t'(8'h1B);
    sent.push_back(8'h96); send(8'h96, BITC, 0, 1); idle(2);
    expect_status(rx_status_t'(4'b0001), "framing error");
    // break: all zero, even parity bit is 0 too
    sent.push_back(8'h00); send(8'h00, BITC, 0, 1); idle(2);
    expect_status(rx_status_t'(4'b1001), "break");
    drain(2);
    // noise pulse of a quarter bit is not a start bit
    rxin = 1'b0; repeat (BITC / 4) @(posedge clk); rxin = 1'b1;
    idle(12);
    check(rx_empty && status == '0, "glitch ignored");
    // overrun: 18 frames without reading
    for (int r = 0; r < 18; r++) begin
      b = 8'($urandom);
      if (r < 17) sent.push_back(b);
      send(b, BITC, 0, 0);
    end
    idle(1);
    check(rx_full, "buffer full");
    expect_status(rx_status_t'(4'b0100), "overrun");
    drain(17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
