// tb_uart_top: end-to-end test of the whole UART.
//
// The UART runs at 100 MHz and 1 562 500 baud, so the 16x strobe comes
// every 4 clocks and a bit lasts 64 clocks. txout is looped back to rxin
// for most of the test; for error cases the test drives rxin itself.
// Each mechanism of the design is made to happen and counted:
//   LCR write      the host bus loads framing with wr and cw
//   mode switch    several framings are sent and received in turn
//   tx hold        with tx low nothing leaves the transmitter
//   tx full        txf rises after 18 bytes and a further write is dropped
//   back to back   frames follow each other with no idle gap
//   rx full        the receive buffer fills (16 bytes) and signals rx_full
//   overrun        a frame arriving with buffer and hold register full is
//                  lost and OE is set
//   parity, framing error and break are flagged on status and cleared
// Baud Out is checked to come every 64 clocks. Every received byte is
// compared with the byte written; a mechanism that never happened counts
// as a failure.
module tb_uart_top;
  import uart_pkg::*;
  localparam int BITC = 64;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       wr = 1'b0, cw = 1'b0, tx = 1'b0, rd = 1'b0, err_clr = 1'b0;
  logic [7:0] din = '0, rxout;
  logic       txout, txe, txf, baud_out, rx_empty, rx_full;
  logic       loop = 1'b1, line = 1'b1, rxin;
  rx_status_t status;
  lcr_t       lcr;
  int         checks = 0, failures = 0;
  logic [7:0] sent[$];
  int         n_lcr = 0, n_mode = 0, n_hold = 0, n_txfull = 0, n_b2b = 0, n_rxfull = 0;
  int         n_ovr = 0, n_pe = 0, n_fe = 0, n_bi = 0, n_clr = 0;
  int         cyc = 0, last_baud = -1, n_baud = 0;
  int         last_start = -1;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  assign rxin = loop ? txout : line;

  uart_top #(.CLK_HZ(100_000_000), .BAUD(1_562_500), .DEPTH(16)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // Baud Out spacing
  always @(posedge clk) if (rst_n && baud_out) begin
    if (last_baud >= 0) check(cyc - last_baud == BITC, "baud_out period");
    last_baud = cyc;
    n_baud++;
  end

  // back-to-back frames: a start bit exactly one frame after the previous.
  // After each start edge the rest of the frame is skipped, so edges inside
  // the data are not taken for start bits.
  initial forever begin
    int len;
    @(negedge txout);
    if (!rst_n) continue;
    len = 1 + 5 + lcr.wls + lcr.pen + 1 + lcr.stb;
    if (last_start >= 0 && cyc - last_start == len * BITC) n_b2b++;
    last_start = cyc;
    repeat (len * BITC - BITC / 2) @(posedge clk);
  end

  task automatic host_write(input logic c, input logic [7:0] d);
    @(negedge clk);
    wr = 1'b1; cw = c; din = d;
    @(negedge clk);
    wr = 1'b0; cw = 1'b0;
  endtask

  task automatic set_lcr(input logic [7:0] v);
    host_write(1'b1, v);
    #1;
    check(lcr == lcr_t'(v), "LCR written");
    n_lcr++;
  endtask

  task automatic read_all(input int expect_n);
    int n = 0;
    while (!rx_empty) begin
      @(negedge clk);
      rd = 1'b1;
      @(negedge clk);
      rd = 1'b0;
      check(sent.size() > 0 && rxout == sent[0],
            $sformatf("received %h expected %h", rxout, sent.size() ? sent[0] : 8'h0));
      if (sent.size()) void'(sent.pop_front());
      n++;
    end
    check(n == expect_n, $sformatf("%0d bytes received, expected %0d", n, expect_n));
    sent.delete();
  endtask

  task automatic clear_status();
    @(negedge clk);
    err_clr = 1'b1;
    @(negedge clk);
    err_clr = 1'b0;
    check(status == '0, "status cleared");
    n_clr++;
  endtask

  // the test's own serialiser for error frames (8 data bits, even parity)
  task automatic drive(input logic [7:0] d, input logic p, input logic s);
    logic bits[11];
    bits[0] = 1'b0;
    for (int i = 0; i < 8; i++) bits[1 + i] = d[i];
    bits[9] = p; bits[10] = s;
    for (int k = 0; k < 11; k++) begin
      line = bits[k];
      repeat (BITC) @(posedge clk);
    end
    line = 1'b1;
    repeat (2 * BITC) @(posedge clk);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int accepted;
    logic [7:0] b;
    logic [7:0] modes[5] = '{8'h1B, 8'h03, 8'h0E, 8'h07, 8'h18};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    #1;
    check(txe && !txf && rx_empty && txout && status == '0, "reset state");

    // several framings, loopback, tx held low while filling
    foreach (modes[i]) begin
      automatic logic [7:0] v = modes[i];
      set_lcr(v);
      n_mode++;
      tx = 1'b0;
      for (int k = 0; k < 5; k++) begin
        b = 8'($urandom);
        host_write(1'b0, b);
        sent.push_back(b & (8'hFF >> (3 - v[1:0])));
      end
      repeat (4 * BITC) @(posedge clk);
      check(txout == 1'b1 && rx_empty, "nothing sent while tx is low");
      n_hold++;
      tx = 1'b1;
      // txe only says the buffer is empty: THR and TSR still hold two frames
      wait (txe);
      repeat (40 * BITC) @(posedge clk);
      read_all(5);
      check(status == '0, "no errors in loopback");
    end

    // fill the transmitter: 16 buffer + THR + TSR, then one write dropped
    set_lcr(8'h1B);
    tx = 1'b0;
    accepted = 0;
    while (!txf) begin
      b = 8'($urandom);
      host_write(1'b0, b);
      sent.push_back(b);
      accepted++;
      repeat (4) @(negedge clk);
    end
    check(accepted == 18, $sformatf("transmitter took %0d bytes", accepted));
    host_write(1'b0, 8'hEE);
    n_txfull++;
    // send all 18 back to back into the receiver: 16 in the buffer, 1 in
    // the hold register, the 18th is lost
    tx = 1'b1;
    wait (txe);
    repeat (40 * BITC) @(posedge clk);
    check(rx_full, "receive buffer full");
    if (rx_full) n_rxfull++;
    check(status.oe, "overrun flagged");
    if (status.oe) n_ovr++;
    void'(sent.pop_back());
    read_all(17);
    clear_status();

    // error frames from the test's own line
    loop = 1'b0;
    drive(8'h41, 1'b1, 1'b1);  // 'A' with even parity must carry 0
    check(status == rx_status_t'(4'b0010), "parity error");
    if (status.pe) n_pe++;
    clear_status();
    drive(8'h41, 1'b0, 1'b0);  // stop bit low
    check(status == rx_status_t'(4'b0001), "framing error");
    if (status.fe) n_fe++;
    clear_status();
    drive(8'h00, 1'b0, 1'b0);  // all zero: break
    check(status == rx_status_t'(4'b1001), "break");
    if (status.bi) n_bi++;
    clear_status();
    sent.push_back(8'h41); sent.push_back(8'h41); sent.push_back(8'h00);
    read_all(3);
    loop = 1'b1;

    check(n_lcr >= 6, $sformatf("LCR writes: %0d", n_lcr));
    check(n_mode >= 5, $sformatf("framings: %0d", n_mode));
    check(n_hold >= 5, $sformatf("tx holds: %0d", n_hold));
    check(n_txfull >= 1, $sformatf("tx full: %0d", n_txfull));
    check(n_b2b >= 17, $sformatf("back-to-back frames: %0d", n_b2b));
    check(n_rxfull >= 1, $sformatf("rx full: %0d", n_rxfull));
    check(n_ovr >= 1, $sformatf("overruns: %0d", n_ovr));
    check(n_pe >= 1 && n_fe >= 1 && n_bi >= 1, "parity, framing and break errors seen");
    check(n_clr >= 4, $sformatf("status clears: %0d", n_clr));
    check(n_baud > 100, $sformatf("baud_out strobes: %0d", n_baud));
    $display("mechanisms: lcr=%0d modes=%0d hold=%0d txfull=%0d b2b=%0d rxfull=%0d ovr=%0d pe=%0d fe=%0d bi=%0d clr=%0d",
             n_lcr, n_mode, n_hold, n_txfull, n_b2b, n_rxfull, n_ovr, n_pe, n_fe, n_bi, n_clr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
