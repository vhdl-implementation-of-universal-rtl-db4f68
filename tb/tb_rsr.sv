// tb_rsr: self-checking test of the receive shift register.
//
// For every word length, clears the register, shifts in random bits LSB
// first and compares the output with the word rebuilt here (right-aligned,
// zeros above). Also checks that clear empties it and that the register
// holds while shift is low.
module tb_rsr;
  import uart_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       clear = 1'b0, shift = 1'b0, bit_in = 1'b0;
  lcr_t       lcr = '0;
  logic [7:0] data;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  rsr dut (.*);

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
    logic [7:0] w;
    int nb;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      lcr = lcr_t'($urandom);
      nb  = 5 + lcr.wls;
      w   = 8'($urandom) & 8'((1 << nb) - 1);
      @(negedge clk);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      check(data == 8'h00, "cleared");
      for (int k = 0; k < nb; k++) begin
        @(negedge clk);
        shift = 1'b1; bit_in = w[k];
        @(negedge clk);
        shift = 1'b0; bit_in = ~w[k];
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      check(data == w, $sformatf("%0d bits: data %h expected %h", nb, data, w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
