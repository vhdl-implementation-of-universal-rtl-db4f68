// tb_lcr: self-checking test of the line control register.
//
// Checks the reset value (8 data bits, one stop bit, even parity), that a
// write with wr and cw both high loads the register one clock later, and
// that writes with only one of them high leave it unchanged.
module tb_lcr;
  import uart_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       wr = 1'b0, cw = 1'b0;
  logic [7:0] din = '0;
  lcr_t       lcr;
  logic [7:0] model = 8'h1B;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  lcr_reg dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    #1;
    check(lcr == lcr_t'(8'h1B), "reset value 8'h1B");
    check(lcr.wls == 2'b11 && !lcr.stb && lcr.pen && lcr.eps, "reset fields: 8 bits, 1 stop, even parity");
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      wr  = 1'($urandom);
      cw  = 1'($urandom);
      din = 8'($urandom);
      @(posedge clk);
      if (wr && cw) model = din;
      #1;
      check(lcr == lcr_t'(model), $sformatf("lcr %h expected %h", lcr, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
