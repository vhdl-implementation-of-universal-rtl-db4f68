// tb_rx_sampling: self-checking test of the receiver sampling logic.
//
// tick16 comes every 4 clocks. Random levels are held on rxin for 4 to 20
// tick periods; rx_s must take each new level within 2 clocks plus 3 tick
// periods and keep it. Glitches of 1 or 2 clocks against a steady level
// are seen by at most one sample and must never reach rx_s.
module tb_rx_sampling;
  localparam int DIV = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rxin = 1'b1, tick16 = 1'b0;
  logic rx_s;
  int   checks = 0, failures = 0, tcnt = 0, nglitch = 0;

  always #5 clk = ~clk;

  rx_sampling dut (.*);

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

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic lvl;
    int   hold, seen;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    #1;
    check(rx_s == 1'b1, "reset level");
    for (int i = 0; i < 600; i++) begin
      lvl  = 1'($urandom);
      hold = $urandom_range(4, 20) * DIV;
      @(negedge clk);
      rxin = lvl;
      seen = -1;
      for (int c = 0; c < hold; c++) begin
        @(posedge clk);
        #1;
        if (seen < 0 && rx_s == lvl) seen = c;
        if (seen >= 0) check(rx_s == lvl, "level kept once taken");
      end
      check(seen >= 0 && seen <= 2 + 3 * DIV, $sformatf("level %b taken after %0d clocks", lvl, seen));
      // a short glitch against the steady level
      if ($urandom_range(0, 1)) begin
        repeat ($urandom_range(0, DIV - 1)) @(negedge clk);
        rxin = !lvl;
        repeat ($urandom_range(1, 2)) @(negedge clk);
        rxin = lvl;
        nglitch++;
        repeat (4 * DIV) begin
          @(posedge clk);
          #1;
          check(rx_s == lvl, "glitch filtered");
        end
      end
    end
    check(nglitch > 100, "glitches applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
