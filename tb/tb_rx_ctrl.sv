// tb_rx_ctrl: self-checking test of the receiver timing and control.
//
// The test drives the filtered line rx_s and the 16x strobe directly, 16
// strobes per bit, for every framing setting with random data, parity and
// stop values. It checks that exactly one clear comes in the start bit,
// that there is one shift strobe per data bit, each between strobes 6 and
// 10 of its bit and with the right level on the line, that done comes once
// per frame with the sent parity and stop bits captured, and that a low
// pulse of 4 strobes (shorter than half a bit) starts nothing.
module tb_rx_ctrl;
  import uart_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rx_s = 1'b1, tick16 = 1'b0;
  lcr_t lcr = '0;
  logic clear, shift, par_bit, stop_bit, done;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  rx_ctrl dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // one strobe period (2 clocks) with the given line level
  task automatic tick(input logic level, output bit sh, output bit cl, output bit dn);
    @(negedge clk);
    rx_s = level; tick16 = 1'b1;
    #1;
    sh = shift; cl = clear;
    @(negedge clk);
    tick16 = 1'b0;
    dn = done;
  endtask

  task automatic frame(input logic [7:0] d, input logic pbit, input logic sbit);
    logic bits[16];
    int   n = 0, nb = 5 + lcr.wls, nsh = 0, ncl = 0, ndn = 0, k;
    bit   sh, cl, dn;
    logic p_seen = 1'b0, s_seen = 1'b0;
    bits[n++] = 1'b0;
    for (int i = 0; i < nb; i++) bits[n++] = d[i];
    if (lcr.pen) bits[n++] = pbit;
    bits[n++] = sbit;
    if (lcr.stb) bits[n++] = 1'b1;
    for (k = 0; k < n; k++)
      for (int t = 0; t < 16; t++) begin
        tick(bits[k], sh, cl, dn);
        if (cl) begin
          ncl++;
          check(k == 0, "clear outside the start bit");
        end
        if (sh) begin
          nsh++;
          check(k >= 1 && k <= nb, $sformatf("shift in bit %0d", k));
          check(t >= 6 && t <= 10, $sformatf("shift at strobe %0d of the bit", t));
        end
        if (dn) begin
          ndn++;
          p_seen = par_bit;
          s_seen = stop_bit;
        end
      end
    for (int t = 0; t < 4; t++) begin
      tick(1'b1, sh, cl, dn);
      if (dn) begin
        ndn++; p_seen = par_bit; s_seen = stop_bit;
      end
    end
    check(ncl == 1, $sformatf("%0d clears", ncl));
    check(nsh == nb, $sformatf("%0d shifts for %0d data bits", nsh, nb));
    check(ndn == 1, $sformatf("%0d done pulses", ndn));
    check(s_seen == sbit, "stop bit captured");
    if (lcr.pen) check(p_seen == pbit, "parity bit captured");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit sh, cl, dn;
    int nany;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (4) tick(1'b1, sh, cl, dn);
    for (int c = 0; c < 32; c++) begin
      lcr = lcr_t'(c);
      for (int r = 0; r < 4; r++) frame(8'($urandom), 1'($urandom), ($urandom_range(0, 3) != 0));
    end
    // a short low pulse is not a start bit
    nany = 0;
    for (int t = 0; t < 4; t++) begin
      tick(1'b0, sh, cl, dn);
      nany += sh + cl + dn;
    end
    for (int t = 0; t < 200; t++) begin
      tick(1'b1, sh, cl, dn);
      nany += sh + cl + dn;
    end
    check(nany == 0, "false start ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
