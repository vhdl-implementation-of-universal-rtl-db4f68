// tb_rx_error: self-checking test of the error logic and status register.
//
// Random frames (word, parity bit, stop bit, LCR) are presented with done;
// the per-frame flags are compared with values worked out here: parity
// error from a count of ones against the LCR's odd/even setting, framing
// error from the stop bit, break when word, parity and stop are all zero.
// A model of the sticky status, with random overrun pulses and random
// clears, is compared every clock.
module tb_rx_error;
  import uart_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       done = 1'b0, par_bit = 1'b0, stop_bit = 1'b1, overrun = 1'b0, clr = 1'b0;
  logic [7:0] data = '0;
  lcr_t       lcr = '0;
  logic       pe_now, fe_now, bi_now;
  rx_status_t status;
  logic [3:0] model = '0;
  int         checks = 0, failures = 0, npe = 0, nfe = 0, nbi = 0, noe = 0;

  always #5 clk = ~clk;

  rx_error dut (.*);

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
    bit epe, efe, ebi;
    int ones;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      done     = 1'($urandom_range(0, 1));
      lcr      = lcr_t'($urandom);
      data     = ($urandom_range(0, 3) == 0) ? 8'h00 : 8'($urandom) & 8'((1 << (5 + lcr.wls)) - 1);
      par_bit  = 1'($urandom);
      stop_bit = ($urandom_range(0, 3) != 0);
      overrun  = ($urandom_range(0, 15) == 0);
      clr      = ($urandom_range(0, 7) == 0);
      ones = $countones(data) + par_bit;
      epe = done && lcr.pen && ((ones % 2) != (lcr.eps ? 0 : 1));
      efe = done && !stop_bit;
      ebi = done && data == 0 && !stop_bit && !(lcr.pen && par_bit);
      #1;
      check(pe_now == epe, "pe_now");
      check(fe_now == efe, "fe_now");
      check(bi_now == ebi, "bi_now");
      npe += epe; nfe += efe; nbi += ebi; noe += overrun;
      @(posedge clk);
      model = (clr ? 4'b0 : model) | {ebi, overrun, epe, efe};
      #1;
      check(status == rx_status_t'(model), $sformatf("status %b expected %b", status, model));
    end
    check(npe > 0 && nfe > 0 && nbi > 0 && noe > 0, "every error seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
