// tb_tsr: self-checking test of the transmitter shift register.
//
// For every word length, stop-bit count and parity setting, loads random
// bytes and records serialout after each baud strobe. The recorded bits are
// compared with a frame built here from the byte (start 0, data LSB first,
// parity from a count of ones, stop bits 1). A monitor checks that
// serialout never changes except on a baud strobe, so each bit lasts exactly
// one baud period. ready must be back as soon as the last stop bit is on the
// line, and that stop bit must still last a full baud period. One case holds
// tx low after the load and checks that nothing is sent until tx rises.
module tb_tsr;
  import uart_pkg::*;
  localparam int BIT = 8;  // clocks per baud period in this test

  logic       clk = 1'b0, rst_n = 1'b0;
  lcr_t       lcr = '0;
  logic       baud_tick = 1'b0, tx = 1'b1, load = 1'b0;
  logic [7:0] datain = '0;
  logic       ready, serialout;
  int         checks = 0, failures = 0;
  int         tick_cnt = 0;
  logic       prev_out = 1'b1;

  always #5 clk = ~clk;

  tsr dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // baud strobe, changed on the falling edge so it is stable at the rising one
  always @(negedge clk) begin
    tick_cnt  = (tick_cnt + 1) % BIT;
    baud_tick = (tick_cnt == 0);
  end

  // serialout may only change on a clock edge where the strobe was high
  always @(posedge clk) begin
    automatic logic t = baud_tick;
    #1;
    if (rst_n && serialout != prev_out) check(t, "serialout changed between baud strobes");
    prev_out = serialout;
  end

  // expected frame, built independently of the DUT
  function automatic int build(input logic [7:0] d, input lcr_t l, output logic exp[16]);
    int n = 0, nb = 5 + l.wls, ones = 0;
    exp[n++] = 1'b0;
    for (int i = 0; i < nb; i++) begin
      exp[n++] = d[i];
      ones += d[i];
    end
    if (l.pen) exp[n++] = l.eps ? logic'(ones % 2) : logic'(!(ones % 2));
    exp[n++] = 1'b1;
    if (l.stb) exp[n++] = 1'b1;
    return n;
  endfunction

  task automatic send(input logic [7:0] d, input lcr_t l, input int hold_tx);
    logic exp[16];
    int   n, k, cyc;
    n = build(d, l, exp);
    @(negedge clk);
    check(ready, "ready before load");
    lcr = l; datain = d; load = 1'b1;
    if (hold_tx > 0) tx = 1'b0;
    @(negedge clk);
    load = 1'b0;
    check(!ready, "not ready after load");
    if (hold_tx > 0) begin
      repeat (hold_tx) @(negedge clk);
      check(serialout == 1'b1, "no start bit while tx is low");
      tx = 1'b1;
    end
    // bits after each following baud strobe
    k = 0;
    while (k < n) begin
      @(posedge clk);
      if (baud_tick) begin
        #1;
        check(serialout == exp[k], $sformatf("bit %0d of %h: got %b expected %b", k, d, serialout, exp[k]));
        if (k < n - 1) check(!ready, "busy during the frame");
        k++;
      end
    end
    // ready as soon as the last stop bit is on the line; that bit still
    // lasts a full baud period
    check(ready, "ready while the last stop bit is on the line");
    cyc = 0;
    do begin
      @(posedge clk);
      #1;
      cyc++;
      check(serialout == 1'b1, "stop level held");
    end while (!baud_tick && cyc < 4 * BIT);
    check(cyc == BIT, $sformatf("last stop bit lasted %0d clocks, expected %0d", cyc, BIT));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    #1;
    check(ready && serialout == 1'b1, "reset: idle and ready");
    // the example 'A' = 01000001: even parity bit 0, odd parity bit 1
    send(8'h41, lcr_t'(8'h1B), 0);
    send(8'h41, lcr_t'(8'h0B), 0);
    for (int c = 0; c < 32; c++)
      for (int r = 0; r < 6; r++)
        send(8'($urandom), lcr_t'(c), 0);
    send(8'h5A, lcr_t'(8'h1B), 3 * BIT + 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
