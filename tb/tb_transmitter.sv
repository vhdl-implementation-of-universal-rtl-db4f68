// tb_transmitter: self-checking test of the transmit path (buffer, THR, TSR).
//
// With tx held low, bytes are written until txf rises: the 16-byte buffer
// plus the hold register and the shift register take 18 bytes, and a write
// while full is dropped. Then tx is raised and a serial decoder in the
// test, which knows only the baud period, receives the frames and checks
// data, parity and stop bits and their order. Frames must follow each other
// with no gap: consecutive start bits are exactly one frame length apart.
// txe must be high again at the end. A second run with 7 data bits, odd
// parity and two stop bits repeats the data check.
module tb_transmitter;
  import uart_pkg::*;
  localparam int BIT = 8;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       wr = 1'b0, tx = 1'b0, baud_tick = 1'b0;
  logic [7:0] datain = '0;
  lcr_t       lcr = lcr_t'(8'h1B);
  logic       txout, txe, txf;
  int         checks = 0, failures = 0, tick_cnt = 0, cyc = 0;
  logic [7:0] sent[$];
  int         nrx = 0, last_start = -1, gaps_ok = 0;

  always #5 clk = ~clk;

  transmitter #(.DEPTH(16)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  always @(negedge clk) begin
    tick_cnt  = (tick_cnt + 1) % BIT;
    baud_tick = (tick_cnt == 0);
  end
  always @(posedge clk) cyc++;

  function automatic int frame_len(input lcr_t l);
    return 1 + 5 + l.wls + l.pen + 1 + l.stb;
  endfunction

  // serial decoder: samples the middle of every bit
  initial begin
    forever begin
      logic [7:0] d;
      int ones, nb;
      @(negedge txout);
      if (!rst_n) continue;
      if (last_start >= 0 && nrx > 0 && nrx != 18) begin
        check(cyc - last_start == frame_len(lcr) * BIT,
              $sformatf("frame %0d started %0d clocks after the previous one", nrx, cyc - last_start));
        gaps_ok++;
      end
      last_start = cyc;
      nb = 5 + lcr.wls;
      repeat (BIT / 2) @(posedge clk);
      check(txout == 1'b0, "start bit");
      d = '0; ones = 0;
      for (int i = 0; i < nb; i++) begin
        repeat (BIT) @(posedge clk);
        d[i] = txout;
        ones += txout;
      end
      if (lcr.pen) begin
        repeat (BIT) @(posedge clk);
        ones += txout;
        check((ones % 2) == (lcr.eps ? 0 : 1), $sformatf("parity of frame %0d", nrx));
      end
      repeat (BIT) @(posedge clk);
      check(txout == 1'b1, "stop bit");
      if (lcr.stb) begin
        repeat (BIT) @(posedge clk);
        check(txout == 1'b1, "second stop bit");
      end
      check(sent.size() > 0 && d == (sent[0] & (8'hFF >> (8 - nb))),
            $sformatf("frame %0d data %h expected %h", nrx, d, sent.size() ? sent[0] : 8'h0));
      if (sent.size()) void'(sent.pop_front());
      nrx++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill_and_send(input lcr_t l, input int expect_n);
    int accepted = 0;
    lcr = l;
    tx  = 1'b0;
    while (!txf && accepted < 40) begin
      @(negedge clk);
      wr = 1'b1; datain = 8'($urandom);
      sent.push_back(datain);
      accepted++;
      @(negedge clk);
      wr = 1'b0;
      repeat (3) @(negedge clk);
    end
    check(accepted == expect_n, $sformatf("%0d bytes accepted before full, expected %0d", accepted, expect_n));
    // one more write while full is dropped
    @(negedge clk);
    wr = 1'b1; datain = 8'hEE;
    @(negedge clk);
    wr = 1'b0;
    check(txf && !txe, "flags while full");
    tx = 1'b1;
    wait (sent.size() == 0);
    repeat (4 * BIT) @(posedge clk);
    check(txe && !txf, "txe after all frames");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    #1;
    check(txe && !txf && txout, "reset state");
    fill_and_send(lcr_t'(8'h1B), 18);
    check(nrx == 18, $sformatf("%0d frames received", nrx));
    check(gaps_ok == 17, $sformatf("%0d back-to-back gaps checked", gaps_ok));
    fill_and_send(lcr_t'(8'h0E), 18);
    check(nrx == 36, $sformatf("%0d frames received", nrx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
