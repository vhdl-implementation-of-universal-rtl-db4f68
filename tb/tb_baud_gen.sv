// tb_baud_gen: self-checking test of the baud rate generator.
//
// Runs the generator with its default 100 MHz / 115200 baud setting and
// checks that tick16 comes every 54 clocks (round(100e6 / (16 * 115200)))
// as a one-clock pulse, that baud_tick comes every 16 * 54 = 864 clocks,
// and that every baud_tick coincides with a tick16.
module tb_baud_gen;
  localparam int DIV16 = 54;  // worked out by hand from the default rates

  logic clk = 1'b0, rst_n = 1'b0;
  logic tick16, baud_tick;
  int   checks = 0, failures = 0;
  int   cyc = 0, last16 = -1, lastb = -1, n16 = 0, nb = 0;

  always #5 clk = ~clk;

  baud_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (nb < 20) begin
      @(posedge clk);
      #1;
      cyc++;
      if (tick16) begin
        if (last16 >= 0) check(cyc - last16 == DIV16, $sformatf("tick16 spacing %0d", cyc - last16));
        else             check(cyc == DIV16, $sformatf("first tick16 after %0d clocks", cyc));
        last16 = cyc;
        n16++;
      end
      if (baud_tick) begin
        check(tick16, "baud_tick without tick16");
        if (lastb >= 0) check(cyc - lastb == 16 * DIV16, $sformatf("baud_tick spacing %0d", cyc - lastb));
        lastb = cyc;
        nb++;
      end
    end
    check(n16 == 20 * 16, $sformatf("%0d tick16 per 20 baud ticks", n16));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
